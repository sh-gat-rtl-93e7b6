// tb_sp_pe: one SP-PE with a 64-word weight column. Streams back-to-back
// sparse rows of random length (including empty rows sent as one zero
// element), checks each row's inner product, its tag, the two-cycle latency
// from last element to result, and the lane address.
module tb_sp_pe;
  import sh_gat_pkg::*;
  import tb_ref_pkg::*;

  localparam int DEPTH = 64;
  localparam int TAG_W = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, w_we, in_valid, in_first, out_valid;
  logic [5:0] w_addr;
  data_t w_data, in_value, out_z;
  logic [LEN_W-1:0] in_row_len;
  logic [COL_W-1:0] in_col;
  logic [TAG_W-1:0] in_tag, out_tag;
  logic [1:0] out_addr;
  logic tb_last;

  sp_pe #(.DEPTH(DEPTH), .TAG_W(TAG_W), .LANE_ID(2)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int w [DEPTH];
  int exp_z[$];
  int exp_tag[$];
  int last_cyc[$];
  int results = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && tb_last) last_cyc.push_back(cyc);
    if (rst_n && out_valid) begin
      int ez, et, lc;
      ez = exp_z.pop_front();
      et = exp_tag.pop_front();
      lc = last_cyc.pop_front();
      checks += 3;
      results++;
      if (out_z !== ez)            begin failures++; $display("FAIL z=%0d exp=%0d", out_z, ez); end
      if (out_tag !== TAG_W'(et))  begin failures++; $display("FAIL tag=%0d exp=%0d", out_tag, et); end
      if (cyc - lc != 2)           begin failures++; $display("FAIL latency %0d", cyc - lc); end
      checks++;
      if (out_addr !== 2'd2) failures++;
    end
  end

  initial begin
    en = 1; w_we = 0; in_valid = 0; in_first = 0; in_row_len = 0; in_col = 0;
    in_value = 0; in_tag = 0; w_addr = 0; w_data = 0; tb_last = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < DEPTH; a++) begin
      w[a] = rnd_q(4 * 65536);
      @(posedge clk);
      w_we <= 1; w_addr <= 6'(a); w_data <= w[a];
    end
    @(posedge clk);
    w_we <= 0;
    for (int r = 0; r < 40; r++) begin
      int len, acc, gap;
      len = (r % 7 == 3) ? 0 : int'($urandom_range(1, 12));
      acc = 0;
      for (int e = 0; e < ((len == 0) ? 1 : len); e++) begin
        int c, v;
        c = int'($urandom_range(0, DEPTH-1));
        v = (len == 0) ? 0 : rnd_q(8 * 65536);
        acc = acc + ref_qmul(v, w[c]);
        @(posedge clk);
        in_valid <= 1; in_first <= (e == 0); in_row_len <= LEN_W'(len);
        in_col <= COL_W'(c); in_value <= v; in_tag <= TAG_W'(r * 7);
        tb_last <= (e == ((len == 0) ? 0 : len - 1));
      end
      exp_z.push_back(acc);
      exp_tag.push_back((r * 7) % 1024);
      gap = (r % 3 == 0) ? 2 : 0;
      for (int g = 0; g < gap; g++) begin
        @(posedge clk);
        in_valid <= 0; tb_last <= 0;
      end
    end
    @(posedge clk);
    in_valid <= 0; tb_last <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (results != 40) begin failures++; $display("FAIL results=%0d", results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
