// tb_gat_harness: end-to-end harness for one GAT layer on sh_gat_top at its
// default parameters (16 output features, 3 lanes, 2 softmax lanes, 2 slots,
// subgraphs up to 256 nodes, 4096-word weight columns).
//
// It builds a random graph: NODES nodes with sparse Q16.16 features of
// IN_DIM columns (about DENS_PM per mille nonzero), one subgraph per source
// node with a random neighbour list (average degree AVG_DEG, plus a few hub
// nodes of HUB_DEG neighbours), a random weight matrix and attention vector.
// The GCSR rows (source, then its neighbours' pre-fetched rows) are dealt
// round-robin over the three channel groups, each channel driven with its own
// random valid pattern; the output consumer stalls at random. Every h vector
// is checked against a reference computed here with wide integers:
//   z_n = W h_n, e_i = alpha_1 . z_i, e_j = alpha_2 . z_j,
//   a_ij = 2^lrelu(e_i+e_j) / sum (1+frac shift form), h_i' = ReLU(sum a_ij z_j).
// It also counts the mechanisms of the design and fails if one never
// occurred: slot stall (loading held back), a row handed to a lane other than
// its channel group's number, two or more lanes streaming at once, an empty
// row, a subgraph without neighbours, a partial softmax beat, feature-channel
// back-pressure, output back-pressure and ReLU clamping. It reports the cycle
// count of the layer. When finished it raises done with its check and
// failure counts; the enclosing testbench prints the result.
module tb_gat_harness #(
  parameter int NODES    = 40,
  parameter int IN_DIM   = 48,
  parameter int DENS_PM  = 150,      // feature density, per mille
  parameter int AVG_DEG  = 4,
  parameter int HUB_DEG  = 20,
  parameter int NHUBS    = 1,
  parameter int VALID_PCT = 75,
  parameter int LAYERS   = 2,        // 2: a second layer from the hidden features to CLASSES outputs
  parameter int CLASSES  = 7,
  parameter string NAME = "graph"
) (
  output logic done,
  output int   n_checks,
  output int   n_failures
);
  import sh_gat_pkg::*;
  import tb_ref_pkg::*;

  localparam int F_OUT = 16;
  localparam int G = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, act_en, w_valid, w_ready, a_valid, a_ready, h_valid, h_ready;
  logic weights_loaded, alpha_loaded, stall_slot, bind_fire;
  logic [1:0] bind_lane;
  logic [12:0] in_dim;
  data_t w_data, a_data;
  logic [G-1:0] val_valid, val_ready, inf_valid, inf_ready, inf_last;
  data_t [G-1:0] val_data;
  logic [G-1:0][31:0] inf_data;
  data_t [F_OUT-1:0] h_data;

  sh_gat_top dut (.*);

  // ---------------- graph and reference ----------------
  int W [F_OUT][IN_DIM];
  int av [2*F_OUT];
  int fcol [NODES][$];
  int fval [NODES][$];
  data_t [F_OUT-1:0] zn [NODES];
  int e1 [NODES], e2 [NODES];
  int nbr [NODES][$];
  data_t [F_OUT-1:0] exp_h [NODES];

  int gv [G][$];      // value channel words per group
  int gi [G][$];      // info channel words per group
  bit gl [G][$];      // last markers

  int checks = 0, failures = 0, nout = 0, cyc = 0, t_start = 0, t_end = 0;
  int c_stall = 0, c_cross = 0, c_conc = 0, c_empty = 0, c_lonely = 0, c_partial = 0;
  int c_fbp = 0, c_hbp = 0, c_relu = 0;
  int nrows = 0;

  int cur_dim, cur_act;

  // layer-1 input: random sparse features, weights and attention vector
  task automatic gen_layer1();
    cur_dim = IN_DIM;
    cur_act = 1;
    for (int k = 0; k < F_OUT; k++)
      for (int c = 0; c < IN_DIM; c++) W[k][c] = rnd_q(32768);
    for (int i = 0; i < 2*F_OUT; i++) av[i] = rnd_q(65536);
    for (int n = 0; n < NODES; n++) begin
      fcol[n].delete();
      fval[n].delete();
      if (n % 17 != 5)
        for (int c = 0; c < IN_DIM; c++)
          if ($urandom_range(0, 999) < DENS_PM) begin
            fcol[n].push_back(c);
            fval[n].push_back(rnd_q(65536));
          end
    end
    for (int n = 0; n < NODES; n++) begin
      int d;
      nbr[n].delete();
      d = (n < NHUBS) ? HUB_DEG : ((n % 11 == 7) ? 0 : int'($urandom_range(1, 2 * AVG_DEG - 1)));
      for (int j = 0; j < d; j++) nbr[n].push_back(int'($urandom_range(0, NODES - 1)));
    end
  endtask

  // layer-2 input: the checked layer-1 outputs (nonzeros only) with a
  // 16 x CLASSES weight matrix, zero in the unused output columns
  task automatic gen_layer2();
    cur_dim = F_OUT;
    cur_act = 0;
    for (int k = 0; k < F_OUT; k++)
      for (int c = 0; c < F_OUT; c++) W[k][c] = (k < CLASSES) ? rnd_q(65536) : 0;
    for (int i = 0; i < 2*F_OUT; i++) av[i] = rnd_q(65536);
    for (int n = 0; n < NODES; n++) begin
      fcol[n].delete();
      fval[n].delete();
      for (int c = 0; c < F_OUT; c++)
        if (exp_h[n][c] != 0) begin
          fcol[n].push_back(c);
          fval[n].push_back(exp_h[n][c]);
        end
    end
  endtask

  task automatic build();
    for (int n = 0; n < NODES; n++) begin
      for (int k = 0; k < F_OUT; k++) begin
        zn[n][k] = 0;
        foreach (fcol[n][i]) zn[n][k] = zn[n][k] + ref_qmul(fval[n][i], W[k][fcol[n][i]]);
      end
      e1[n] = 0;
      e2[n] = 0;
      for (int k = 0; k < F_OUT; k++) begin
        e1[n] += ref_qmul(zn[n][k], av[k]);
        e2[n] += ref_qmul(zn[n][k], av[F_OUT + k]);
      end
    end
    // reference outputs
    for (int n = 0; n < NODES; n++) begin
      longint p [$];
      longint sum;
      sum = 0;
      p.delete();
      foreach (nbr[n][j]) begin
        p.push_back(ref_pow2(ref_lrelu(e1[n] + e2[nbr[n][j]])));
        sum += p[j];
      end
      exp_h[n] = '0;
      foreach (nbr[n][j])
        for (int k = 0; k < F_OUT; k++)
          exp_h[n][k] = exp_h[n][k] + ref_qmul(ref_div_alpha(p[j], sum), zn[nbr[n][j]][k]);
      if (cur_act != 0)
        for (int k = 0; k < F_OUT; k++) if (exp_h[n][k] < 0) begin exp_h[n][k] = 0; c_relu++; end
    end
    // GCSR rows, dealt round-robin over the groups
    nrows = 0;
    for (int g = 0; g < G; g++) begin
      gv[g].delete();
      gi[g].delete();
      gl[g].delete();
    end
    for (int n = 0; n < NODES; n++)
      for (int j = -1; j < nbr[n].size(); j++) begin
        int m, len, g;
        m = (j < 0) ? n : nbr[n][j];
        len = fcol[m].size();
        g = nrows % G;
        if (len == 0) begin
          gv[g].push_back(0);
          gi[g].push_back({16'({15'(0), j < 0}), 16'(0)});
          gl[g].push_back(0);
        end else
          foreach (fcol[m][i]) begin
            gv[g].push_back(fval[m][i]);
            gi[g].push_back({16'({15'(len), j < 0}), 16'(fcol[m][i])});
            gl[g].push_back(0);
          end
        nrows++;
        if (n == NODES - 1 && j == nbr[n].size() - 1) gl[g][gl[g].size() - 1] = 1;
      end
  endtask

  // ---------------- drivers ----------------
  int vi [G], ii [G];
  logic feed = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int g = 0; g < G; g++) begin
      if (rst_n && val_valid[g] && val_ready[g]) vi[g]++;
      if (rst_n && inf_valid[g] && inf_ready[g]) ii[g]++;
      if (rst_n && ((val_valid[g] && !val_ready[g]) || (inf_valid[g] && !inf_ready[g]))) c_fbp++;
      val_valid[g] <= feed && (vi[g] < gv[g].size()) && ($urandom_range(0, 99) < VALID_PCT);
      val_data[g]  <= (vi[g] < gv[g].size()) ? gv[g][vi[g]] : 0;
      inf_valid[g] <= feed && (ii[g] < gi[g].size()) && ($urandom_range(0, 99) < VALID_PCT);
      inf_data[g]  <= (ii[g] < gi[g].size()) ? 32'(gi[g][ii[g]]) : 0;
      inf_last[g]  <= (ii[g] < gi[g].size()) ? gl[g][ii[g]] : 1'b0;
    end
    h_ready <= ($urandom_range(0, 99) < 80);
  end

  // ---------------- monitors ----------------
  always @(posedge clk) if (rst_n) begin
    int busy;
    if (stall_slot) c_stall++;
    if (bind_fire && bind_lane != dut.u_sched.next_grp) c_cross++;
    busy = $countones(dut.u_sched.pe_valid);
    if (busy >= 2) c_conc++;
    if (dut.u_sched.pe_valid[0] && dut.u_sched.pe_first[0] && dut.u_sched.pe_row_len[0] == 0) c_empty++;
    if (dut.u_agg.state == dut.u_agg.A_IDLE && dut.u_agg.ready_slot && dut.u_agg.size[dut.u_agg.ps] == 1) c_lonely++;
    if (dut.u_af.in_valid && dut.u_af.in_ready && dut.u_af.in_mask != '1) c_partial++;
    if (h_valid && !h_ready) c_hbp++;
    if (h_valid && h_ready) begin
      checks++;
      if (h_data !== exp_h[nout]) begin
        failures++;
        if (failures < 10) $display("FAIL node %0d: h[0]=%0d exp %0d", nout, h_data[0], exp_h[nout][0]);
      end
      nout++;
      if (nout == NODES) t_end = cyc;
    end
  end

  task automatic check_count(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  task automatic run_layer(int layer);
    feed <= 0;
    @(posedge clk);
    for (int g = 0; g < G; g++) begin vi[g] = 0; ii[g] = 0; end
    build();
    nout = 0;
    in_dim <= 13'(cur_dim);
    act_en <= (cur_act != 0);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    feed <= 1;          // features may arrive before the weights: they wait in the buffers
    t_start = cyc;
    for (int k = 0; k < F_OUT; k++)
      for (int c = 0; c < cur_dim; c++) begin
        @(posedge clk);
        w_valid <= 1; w_data <= W[k][c];
      end
    @(posedge clk);
    w_valid <= 0;
    for (int i = 0; i < 2*F_OUT; i++) begin
      @(posedge clk);
      a_valid <= 1; a_data <= av[i];
    end
    @(posedge clk);
    a_valid <= 0;
    wait (nout == NODES);
    repeat (5) @(posedge clk);
    $display("%s layer %0d: %0d nodes, %0d input features, %0d rows, %0d cycles from start",
             NAME, layer, NODES, cur_dim, nrows, t_end - t_start);
  endtask

  initial begin
    start = 0; act_en = 1; w_valid = 0; a_valid = 0; w_data = 0; a_data = 0;
    in_dim = 13'(IN_DIM);
    val_valid = '0; inf_valid = '0; val_data = '0; inf_data = '0; inf_last = '0; h_ready = 0;
    for (int g = 0; g < G; g++) begin vi[g] = 0; ii[g] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    gen_layer1();
    run_layer(1);
    if (LAYERS > 1) begin
      gen_layer2();
      run_layer(2);
    end
    check_count("slot stalls (cycles)", c_stall);
    check_count("rows to a foreign lane", c_cross);
    check_count("multi-lane cycles", c_conc);
    check_count("empty rows", c_empty);
    check_count("subgraphs w/o neighbours", c_lonely);
    check_count("partial softmax beats", c_partial);
    check_count("feature back-pressure", c_fbp);
    check_count("output back-pressure", c_hbp);
    check_count("ReLU clamps", c_relu);
    n_checks   = checks;
    n_failures = failures;
    done       = 1'b1;
  end

  initial begin
    done = 1'b0;
    n_checks = 0;
    n_failures = 0;
  end
endmodule
