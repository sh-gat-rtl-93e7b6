// tb_aggregator: the aggregator with its AF module (LeakyReLU + base-2
// softmax). A scheduler model fills the two slots of the z_ij buffer with
// random subgraphs (1 to 12 nodes), writing z vectors and scores up to three
// per cycle in shuffled order and sending the close message at a random
// point, and only reuses a slot after it is released. Checks every output
// h = ReLU(sum_j alpha_ij z_j) against a wide-integer reference, the output
// order, and the slot releases; the consumer stalls at random.
module tb_aggregator;
  import sh_gat_pkg::*;
  import tb_ref_pkg::*;

  localparam int F_OUT = 4, LANES = 3, SM = 2, NSLOT = 2, MAX_SG = 16;
  localparam int SLOT_W = 1, IDX_W = 4, TAG_W = 6;
  localparam int NSG = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic act_en;
  logic [LANES-1:0] wr_valid;
  logic [LANES-1:0][TAG_W-1:0] wr_tag;
  data_t [LANES-1:0] wr_e;
  data_t [LANES-1:0][F_OUT-1:0] wr_z;
  logic close_valid;
  logic [SLOT_W-1:0] close_slot;
  logic [IDX_W:0] close_count;
  logic [NSLOT-1:0] slot_release;
  logic sc_valid, sc_ready, sc_last, al_valid, al_ready, al_last, h_valid, h_ready;
  data_t [SM-1:0] sc_score, al_alpha;
  logic [SM-1:0] sc_mask, al_mask;
  data_t [F_OUT-1:0] h_data;

  aggregator #(.F_OUT(F_OUT), .LANES(LANES), .SM_LANES(SM), .NSLOT(NSLOT), .MAX_SG(MAX_SG)) dut (.*);
  af_unit #(.LANES(SM), .MAX_N(MAX_SG)) u_af (
    .clk, .rst_n, .in_valid(sc_valid), .in_ready(sc_ready), .in_score(sc_score), .in_mask(sc_mask),
    .in_last(sc_last), .out_valid(al_valid), .out_ready(al_ready), .out_alpha(al_alpha),
    .out_mask(al_mask), .out_last(al_last));

  int checks = 0, failures = 0, nout = 0, nrel = 0;
  data_t [F_OUT-1:0] exp_h [$];
  logic [NSLOT-1:0] slot_busy;

  always @(posedge clk) begin
    h_ready <= ($urandom_range(0, 2) != 0);
    if (rst_n && h_valid && h_ready) begin
      data_t [F_OUT-1:0] e;
      e = exp_h.pop_front();
      checks++;
      nout++;
      if (h_data !== e) begin
        failures++;
        $display("FAIL subgraph %0d: %0d %0d %0d %0d exp %0d %0d %0d %0d", nout - 1,
                 h_data[0], h_data[1], h_data[2], h_data[3], e[0], e[1], e[2], e[3]);
      end
    end
    if (rst_n && slot_release != '0) begin
      checks++;
      nrel++;
      if (slot_release != NSLOT'(1 << ((nrel - 1) % NSLOT))) begin failures++; $display("FAIL release"); end
      slot_busy = slot_busy & ~slot_release;
    end
  end

  initial begin
    act_en = 1; wr_valid = '0; wr_tag = '0; wr_e = '0; wr_z = '0;
    close_valid = 0; close_slot = 0; close_count = 0; slot_busy = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < NSG; s++) begin
      int n, slot, close_at, w, order [$];
      data_t [F_OUT-1:0] z [MAX_SG];
      int e [MAX_SG];
      longint p [MAX_SG];
      longint sum;
      data_t [F_OUT-1:0] h;
      slot = s % NSLOT;
      n = (s == 3) ? 1 : int'($urandom_range(1, 12));
      for (int i = 0; i < n; i++) begin
        for (int k = 0; k < F_OUT; k++) z[i][k] = rnd_q(4 * 65536);
        e[i] = rnd_q(3 * 65536);
      end
      // reference
      sum = 0;
      for (int j = 1; j < n; j++) begin
        p[j] = ref_pow2(ref_lrelu(e[0] + e[j]));
        sum += p[j];
      end
      h = '0;
      for (int j = 1; j < n; j++)
        for (int k = 0; k < F_OUT; k++)
          h[k] = h[k] + ref_qmul(ref_div_alpha(p[j], sum), z[j][k]);
      for (int k = 0; k < F_OUT; k++) if (act_en && h[k] < 0) h[k] = 0;
      exp_h.push_back(h);
      // wait for the slot
      while (slot_busy[slot]) @(posedge clk);
      slot_busy[slot] = 1'b1;
      order.delete();
      for (int i = 0; i < n; i++) order.push_back(i);
      order.shuffle();
      close_at = int'($urandom_range(0, n));
      w = 0;
      while (w < n || close_at >= 0) begin
        @(posedge clk);
        wr_valid <= '0;
        close_valid <= 0;
        if (close_at == 0) begin
          close_valid <= 1; close_slot <= SLOT_W'(slot); close_count <= (IDX_W+1)'(n);
        end
        close_at--;
        for (int l = 0; l < LANES; l++)
          if (w < n && $urandom_range(0, 1) == 1) begin
            wr_valid[l] <= 1'b1;
            wr_tag[l]   <= {SLOT_W'(slot), IDX_W'(order[w]), order[w] == 0};
            wr_z[l]     <= z[order[w]];
            wr_e[l]     <= e[order[w]];
            w++;
          end
      end
      @(posedge clk);
      wr_valid <= '0;
      close_valid <= 0;
    end
    wait (nout == NSG);
    repeat (5) @(posedge clk);
    checks++;
    if (nrel != NSG) begin failures++; $display("FAIL releases %0d", nrel); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
