// tb_leaky_relu: checks LeakyReLU on fixed corner values and random inputs
// against the reference slope 0.2 in Q16.16.
module tb_leaky_relu;
  import sh_gat_pkg::*;
  import tb_ref_pkg::*;

  data_t x, y;
  int checks = 0, failures = 0;

  leaky_relu dut (.x(x), .y(y));

  task automatic check(int v);
    x = v;
    #1;
    checks++;
    if (y !== ref_lrelu(v)) begin
      failures++;
      $display("FAIL x=%0d y=%0d exp=%0d", v, y, ref_lrelu(v));
    end
  endtask

  initial begin
    check(0);
    check(65536);
    check(-65536);          // -1.0 -> -0.2
    check(-327680);         // -5.0 -> -1.0
    check(32'h7fffffff);
    check(32'h80000000);
    for (int i = 0; i < 200; i++) check(int'($urandom));
    if (y !== ref_lrelu(x)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
