// tb_weight_loader: streams a 4-column weight matrix with 5 rows per column,
// with random gaps, and checks every (column, row, data) write, the loaded
// flag after the last word, that further words are refused, and a restart.
module tb_weight_loader;
  import sh_gat_pkg::*;

  localparam int F_OUT = 4;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, in_ready, w_we, loaded;
  logic [3:0] in_dim;
  data_t in_data, w_data;
  logic [1:0] w_col;
  logic [2:0] w_row;

  weight_loader #(.F_OUT(F_OUT), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, nwrites = 0;
  int exp_col[$], exp_row[$], exp_dat[$];

  always @(posedge clk) if (rst_n && w_we) begin
    int c, r, d;
    c = exp_col.pop_front(); r = exp_row.pop_front(); d = exp_dat.pop_front();
    checks++;
    nwrites++;
    if (w_col !== 2'(c) || w_row !== 3'(r) || w_data !== d) begin
      failures++;
      $display("FAIL write col=%0d row=%0d d=%0d exp %0d %0d %0d", w_col, w_row, w_data, c, r, d);
    end
  end

  task automatic load(int dim);
    for (int c = 0; c < F_OUT; c++)
      for (int r = 0; r < dim; r++) begin
        int d;
        d = int'($urandom);
        exp_col.push_back(c); exp_row.push_back(r); exp_dat.push_back(d);
        if ($urandom_range(0, 3) == 0) begin
          @(posedge clk); in_valid <= 0;
        end
        @(posedge clk);
        in_valid <= 1; in_data <= d;
        checks++;
        if (loaded) begin failures++; $display("FAIL loaded early"); end
      end
    @(posedge clk);
    in_valid <= 0;
  endtask

  initial begin
    start = 0; in_valid = 0; in_data = 0; in_dim = 5;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    load(5);
    repeat (2) @(posedge clk);
    checks += 2;
    if (!loaded)   begin failures++; $display("FAIL not loaded"); end
    if (in_ready)  begin failures++; $display("FAIL still ready"); end
    in_valid <= 1;
    repeat (3) @(posedge clk);
    in_valid <= 0;
    start <= 1; in_dim <= 3;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    checks++;
    if (loaded) begin failures++; $display("FAIL start did not clear"); end
    load(3);
    repeat (2) @(posedge clk);
    checks += 2;
    if (!loaded) failures++;
    if (nwrites != F_OUT * 8) begin failures++; $display("FAIL writes=%0d", nwrites); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
