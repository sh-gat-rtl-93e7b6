// tb_dmvm_array: three DMVM lanes fed together by the alpha loader. Each
// lane gets random vectors whose tag carries a random source flag; checks
// that a source uses alpha_1 and a neighbour alpha_2, per lane.
module tb_dmvm_array;
  import sh_gat_pkg::*;
  import tb_ref_pkg::*;

  localparam int F_OUT = 8;
  localparam int LANES = 3;
  localparam int TAG_W = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, a_valid, a_ready, loaded;
  data_t a_data;
  logic [LANES-1:0] in_valid, src_flag, out_valid;
  data_t [LANES-1:0][F_OUT-1:0] in_z, alpha, out_z;
  logic [LANES-1:0][TAG_W-1:0] in_tag, out_tag;
  data_t [LANES-1:0] out_e;

  alpha_loader #(.F_OUT(F_OUT), .LANES(LANES)) u_al (
    .clk, .rst_n, .start, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .src_flag, .alpha, .loaded);
  dmvm_array #(.F_OUT(F_OUT), .LANES(LANES), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0, nres = 0, nsrc = 0;
  int av [2*F_OUT];
  int exp_e[LANES][$];

  always @(posedge clk) if (rst_n)
    for (int l = 0; l < LANES; l++)
      if (out_valid[l]) begin
        int e;
        e = exp_e[l].pop_front();
        checks++;
        nres++;
        if (out_e[l] !== e) begin failures++; $display("FAIL lane %0d e=%0d exp=%0d", l, out_e[l], e); end
      end

  initial begin
    start = 0; a_valid = 0; a_data = 0; in_valid = '0; in_z = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2*F_OUT; i++) begin
      av[i] = rnd_q(65536);
      @(posedge clk);
      a_valid <= 1; a_data <= av[i];
    end
    @(posedge clk);
    a_valid <= 0;
    for (int n = 0; n < 40; n++) begin
      logic [LANES-1:0] v;
      data_t [LANES-1:0][F_OUT-1:0] z;
      logic [LANES-1:0][TAG_W-1:0] t;
      v = 3'($urandom);
      for (int l = 0; l < LANES; l++) begin
        int e;
        t[l] = TAG_W'($urandom);
        e = 0;
        for (int k = 0; k < F_OUT; k++) begin
          z[l][k] = rnd_q(8 * 65536);
          e = e + ref_qmul(z[l][k], t[l][0] ? av[k] : av[F_OUT + k]);
        end
        if (v[l]) begin
          exp_e[l].push_back(e);
          if (t[l][0]) nsrc++;
        end
      end
      @(posedge clk);
      in_valid <= v; in_z <= z; in_tag <= t;
    end
    @(posedge clk);
    in_valid <= '0;
    repeat (10) @(posedge clk);
    checks++;
    if (nsrc == 0 || nres == 0) failures++;
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
