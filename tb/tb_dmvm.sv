// tb_dmvm: one DMVM with F_OUT = 16. Feeds a random vector pair every cycle
// (with some idle cycles) and checks the inner product, the passed-through z
// and tag, and the 1 + log2(16) = 5 cycle latency.
module tb_dmvm;
  import sh_gat_pkg::*;
  import tb_ref_pkg::*;

  localparam int F_OUT = 16;
  localparam int TAG_W = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  data_t [F_OUT-1:0] in_z, in_alpha, out_z;
  logic [TAG_W-1:0] in_tag, out_tag;
  data_t out_e;

  dmvm #(.F_OUT(F_OUT), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, nres = 0;
  int exp_e[$], exp_tag[$], in_cyc[$];
  data_t [F_OUT-1:0] exp_zq[$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) in_cyc.push_back(cyc);
    if (rst_n && out_valid) begin
      int e, t, c;
      data_t [F_OUT-1:0] z;
      e = exp_e.pop_front(); t = exp_tag.pop_front(); c = in_cyc.pop_front(); z = exp_zq.pop_front();
      nres++;
      checks += 4;
      if (out_e !== e)          begin failures++; $display("FAIL e=%0d exp=%0d", out_e, e); end
      if (out_tag !== TAG_W'(t)) begin failures++; $display("FAIL tag"); end
      if (out_z !== z)          begin failures++; $display("FAIL z"); end
      if (cyc - c != 5)         begin failures++; $display("FAIL latency %0d", cyc - c); end
    end
  end

  initial begin
    in_valid = 0; in_z = '0; in_alpha = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 60; n++) begin
      int e;
      data_t [F_OUT-1:0] z, a;
      e = 0;
      for (int k = 0; k < F_OUT; k++) begin
        z[k] = rnd_q(16 * 65536);
        a[k] = rnd_q(2 * 65536);
        e = e + ref_qmul(z[k], a[k]);
      end
      exp_e.push_back(e); exp_tag.push_back(n); exp_zq.push_back(z);
      @(posedge clk);
      in_valid <= 1; in_z <= z; in_alpha <= a; in_tag <= TAG_W'(n);
      if (n % 9 == 4) begin
        @(posedge clk);
        in_valid <= 0;
      end
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nres != 60) begin failures++; $display("FAIL results %0d", nres); end
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
