// tb_spmm: SPMM with 4 sets x 3 lanes and 32-row weight columns. Loads a
// random weight matrix through the weight write port (duplicated into every
// lane of a set), then streams different sparse rows on the three lanes at
// once, each lane at its own pace, and checks every lane's full output
// vector z = W h against a dense reference, plus tags and done addresses.
module tb_spmm;
  import sh_gat_pkg::*;
  import tb_ref_pkg::*;

  localparam int F_OUT = 4;
  localparam int LANES = 3;
  localparam int DEPTH = 32;
  localparam int TAG_W = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [LANES-1:0] lane_en, in_valid, in_first, out_valid;
  logic w_we;
  logic [1:0] w_col;
  logic [4:0] w_row;
  data_t w_data;
  logic [LANES-1:0][LEN_W-1:0] in_row_len;
  logic [LANES-1:0][COL_W-1:0] in_col;
  data_t [LANES-1:0] in_value;
  logic [LANES-1:0][TAG_W-1:0] in_tag, out_tag;
  data_t [LANES-1:0][F_OUT-1:0] out_z;
  logic [LANES-1:0][1:0] done_addr;

  spmm #(.F_OUT(F_OUT), .LANES(LANES), .DEPTH(DEPTH), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0, nres = 0;
  int W [F_OUT][DEPTH];
  data_t [F_OUT-1:0] exp_z [LANES][$];
  int exp_t [LANES][$];

  always @(posedge clk) if (rst_n)
    for (int l = 0; l < LANES; l++)
      if (out_valid[l]) begin
        data_t [F_OUT-1:0] z;
        int t;
        z = exp_z[l].pop_front(); t = exp_t[l].pop_front();
        nres++;
        checks += 3;
        if (out_z[l] !== z)          begin failures++; $display("FAIL lane %0d z", l); end
        if (out_tag[l] !== TAG_W'(t)) begin failures++; $display("FAIL lane %0d tag", l); end
        if (done_addr[l] !== 2'(l))  begin failures++; $display("FAIL addr"); end
      end

  task automatic lane_driver(int l, int nrows);
    for (int r = 0; r < nrows; r++) begin
      int len;
      data_t [F_OUT-1:0] z;
      len = int'($urandom_range(1, 9));
      z = '0;
      for (int e = 0; e < len; e++) begin
        int c, v;
        c = int'($urandom_range(0, DEPTH-1));
        v = rnd_q(4 * 65536);
        for (int k = 0; k < F_OUT; k++) z[k] = z[k] + ref_qmul(v, W[k][c]);
        @(posedge clk);
        in_valid[l] <= 1; in_first[l] <= (e == 0); in_row_len[l] <= LEN_W'(len);
        in_col[l] <= COL_W'(c); in_value[l] <= v; in_tag[l] <= TAG_W'(l * 64 + r);
      end
      exp_z[l].push_back(z);
      exp_t[l].push_back(l * 64 + r);
      repeat (int'($urandom_range(0, 2))) begin
        @(posedge clk);
        in_valid[l] <= 0;
      end
    end
    @(posedge clk);
    in_valid[l] <= 0;
  endtask

  initial begin
    lane_en = '1; in_valid = '0; in_first = '0; in_row_len = '0; in_col = '0;
    in_value = '0; in_tag = '0; w_we = 0; w_col = 0; w_row = 0; w_data = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < F_OUT; k++)
      for (int a = 0; a < DEPTH; a++) begin
        W[k][a] = rnd_q(2 * 65536);
        @(posedge clk);
        w_we <= 1; w_col <= 2'(k); w_row <= 5'(a); w_data <= W[k][a];
      end
    @(posedge clk);
    w_we <= 0;
    fork
      lane_driver(0, 20);
      lane_driver(1, 25);
      lane_driver(2, 15);
    join
    repeat (10) @(posedge clk);
    checks++;
    if (nres != 60) begin failures++; $display("FAIL results %0d", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
