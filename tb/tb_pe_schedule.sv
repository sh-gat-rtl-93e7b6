// tb_pe_schedule: the schedule against modelled group buffers, SP-PE
// completion signals (returned 2 to 6 cycles after a row's last element) and
// an aggregator that releases slots late. A random graph of subgraphs (source
// plus 0 to 5 neighbours, rows of 0 to 6 nonzeros) is dealt round-robin over
// the three groups. Checks, for every row: it goes to the lowest free lane,
// its elements arrive whole and in order on that lane, its tag is
// {slot, index, flag}; every close message has the right slot and count;
// and the mechanisms all occur: several lanes streaming at once, a stall on
// a full z_ij buffer, and a row bound to a lane other than its group number.
// The rows form two layers, each ending in a last marker and each starting
// again at group 0.
module tb_pe_schedule;
  import sh_gat_pkg::*;

  localparam int G = 3, L = 3, NSLOT = 2, MAX_SG = 16;
  localparam int SLOT_W = 1, IDX_W = 4, TAG_W = 6;
  localparam int NSG = 30;   // two layers of 15 subgraphs

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic run;
  logic [G-1:0] head_valid, pop;
  gcsr_elem_t [G-1:0] head;
  logic [L-1:0] pe_valid, pe_first, pe_en, done_valid;
  logic [L-1:0][LEN_W-1:0] pe_row_len;
  logic [L-1:0][COL_W-1:0] pe_col;
  data_t [L-1:0] pe_value;
  logic [L-1:0][TAG_W-1:0] pe_tag;
  logic [L-1:0][1:0] done_addr;
  logic [NSLOT-1:0] slot_release;
  logic close_valid, stall_slot, bind_fire;
  logic [SLOT_W-1:0] close_slot;
  logic [IDX_W:0] close_count;
  logic [1:0] bind_lane;

  pe_schedule #(.GROUPS(G), .LANES(L), .NSLOT(NSLOT), .MAX_SG(MAX_SG)) dut (.*);

  // reference graph
  gcsr_elem_t rows [$][$];  // rows[k] = elements of logical row k
  int row_sg [$], row_idx [$], sg_size [$];
  gcsr_elem_t gq [G][$];

  int checks = 0, failures = 0;
  int next_row = 0, closes = 0, releases = 0;
  int lane_row [L], lane_pos [L];
  logic [L-1:0] lane_free;
  int done_timer [L];
  int rel_timer [$];
  int cnt_concurrent = 0, cnt_stall = 0, cnt_cross = 0;

  assign run = 1'b1;
  task automatic refresh_heads();
    for (int g = 0; g < G; g++) begin
      head_valid[g] = (gq[g].size() != 0);
      head[g] = head_valid[g] ? gq[g][0] : '0;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    int nstream;
    nstream = 0;
    if (stall_slot) cnt_stall++;
    // bind check: lowest free lane
    if (bind_fire) begin
      int lo;
      lo = -1;
      for (int l = L-1; l >= 0; l--) if (lane_free[l]) lo = l;
      checks++;
      if (bind_lane !== 2'(lo)) begin failures++; $display("FAIL bind lane %0d exp %0d", bind_lane, lo); end
      if (lo >= 0) lane_free[lo] = 1'b0;
      if (lo != next_row % G) cnt_cross++;
    end
    for (int l = 0; l < L; l++) if (done_valid[l]) lane_free[l] = 1'b1;
    for (int l = 0; l < L; l++) begin
      if (pe_valid[l]) begin
        gcsr_elem_t e;
        nstream++;
        if (pe_first[l]) begin
          lane_row[l] = next_row++;
          lane_pos[l] = 0;
          checks++;
          if (pe_tag[l] !== {SLOT_W'(row_sg[lane_row[l]] % NSLOT), IDX_W'(row_idx[lane_row[l]]), row_idx[lane_row[l]] == 0}) begin
            failures++;
            $display("FAIL tag row %0d: %b", lane_row[l], pe_tag[l]);
          end
        end
        e = rows[lane_row[l]][lane_pos[l]];
        checks++;
        if (pe_col[l] !== e.col || pe_value[l] !== e.value || pe_row_len[l] !== e.info.row_len) begin
          failures++;
          $display("FAIL element row %0d pos %0d lane %0d", lane_row[l], lane_pos[l], l);
        end
        lane_pos[l]++;
        if (lane_pos[l] == rows[lane_row[l]].size()) done_timer[l] = int'($urandom_range(2, 6));
      end
    end
    if (nstream >= 2) cnt_concurrent++;
    for (int g = 0; g < G; g++) if (pop[g]) void'(gq[g].pop_front());
    refresh_heads();
    // completion model
    done_valid <= '0;
    for (int l = 0; l < L; l++) begin
      done_addr[l] <= 2'(l);
      if (done_timer[l] > 0) begin
        done_timer[l]--;
        if (done_timer[l] == 0) begin
          done_valid[l] <= 1'b1;
        end
      end
    end
    // close check and slow slot release
    slot_release <= '0;
    if (close_valid) begin
      checks += 2;
      if (close_slot !== SLOT_W'(closes % NSLOT)) begin failures++; $display("FAIL close slot"); end
      if (close_count !== (IDX_W+1)'(sg_size[closes])) begin
        failures++; $display("FAIL close count %0d exp %0d", close_count, sg_size[closes]);
      end
      closes++;
      rel_timer.push_back(int'($urandom_range(20, 60)));
    end
    if (rel_timer.size() != 0) begin
      if (rel_timer[0] == 0) begin
        slot_release[releases % NSLOT] <= 1'b1;
        releases++;
        void'(rel_timer.pop_front());
      end else rel_timer[0]--;
    end
  end

  initial begin
    int k;
    done_valid = '0; done_addr = '0; slot_release = '0;
    lane_free = '1;
    for (int l = 0; l < L; l++) done_timer[l] = 0;
    for (int s = 0; s < NSG; s++) begin
      int n;
      if (s % (NSG / 2) == 0) k = 0;   // each layer's rows start at group 0
      n = 1 + int'($urandom_range(0, 5));
      // make the first layer's row count no multiple of G
      if (s == NSG / 2 - 1 && (k + n) % G == 0) n++;
      sg_size.push_back(n);
      for (int i = 0; i < n; i++) begin
        int len;
        gcsr_elem_t r [$];
        len = int'($urandom_range(0, 6));
        r.delete();
        for (int e = 0; e < ((len == 0) ? 1 : len); e++) begin
          gcsr_elem_t el;
          el.info.row_len  = LEN_W'(len);
          el.info.src_flag = (i == 0);
          el.col   = COL_W'($urandom);
          el.value = (len == 0) ? 0 : int'($urandom);
          el.last  = (s % (NSG / 2) == NSG / 2 - 1) && (i == n-1) && (e == ((len == 0) ? 0 : len-1));
          r.push_back(el);
          gq[k % G].push_back(el);
        end
        rows.push_back(r);
        row_sg.push_back(s);
        row_idx.push_back(i);
        k++;
      end
    end
    refresh_heads();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (closes == NSG);
    repeat (80) @(posedge clk);
    checks += 4;
    if (next_row != rows.size()) begin failures++; $display("FAIL rows %0d of %0d", next_row, rows.size()); end
    if (cnt_concurrent == 0) begin failures++; $display("FAIL never concurrent"); end
    if (cnt_stall == 0)      begin failures++; $display("FAIL never stalled on slots"); end
    if (cnt_cross == 0)      begin failures++; $display("FAIL no dynamic lane choice"); end
    $display("concurrent=%0d stall=%0d cross=%0d", cnt_concurrent, cnt_stall, cnt_cross);
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
