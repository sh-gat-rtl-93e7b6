// tb_alpha_loader: loads a 2*F_OUT attention vector and checks that each
// lane gets alpha_1 when its source flag is set and alpha_2 otherwise, and
// the loaded/in_ready handshake.
module tb_alpha_loader;
  import sh_gat_pkg::*;

  localparam int F_OUT = 8;
  localparam int LANES = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, in_ready, loaded;
  data_t in_data;
  logic [LANES-1:0] src_flag;
  data_t [LANES-1:0][F_OUT-1:0] alpha;

  alpha_loader #(.F_OUT(F_OUT), .LANES(LANES)) dut (.*);

  int checks = 0, failures = 0;
  int av [2*F_OUT];

  initial begin
    start = 0; in_valid = 0; in_data = 0; src_flag = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2*F_OUT; i++) begin
      av[i] = int'($urandom);
      @(posedge clk);
      in_valid <= 1; in_data <= av[i];
    end
    @(posedge clk);
    in_valid <= 0;
    @(posedge clk);
    checks += 2;
    if (!loaded)  begin failures++; $display("FAIL not loaded"); end
    if (in_ready) begin failures++; $display("FAIL ready after load"); end
    for (int f = 0; f < 8; f++) begin
      src_flag = 3'(f);
      #1;
      for (int l = 0; l < LANES; l++)
        for (int k = 0; k < F_OUT; k++) begin
          checks++;
          if (alpha[l][k] !== (src_flag[l] ? av[k] : av[F_OUT + k])) begin
            failures++;
            $display("FAIL lane %0d k %0d", l, k);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
