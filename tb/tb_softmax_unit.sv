// tb_softmax_unit: base-2 softmax with two lanes and 32 entries. Sends
// subgraphs of 1 to 25 random scores (odd counts give a partial last beat),
// with a randomly stalling consumer, and checks every coefficient against
// floor((2^x << 16) / sum 2^x) computed with wide integers, the lane masks,
// the last flag, and that no score is accepted while dividing.
module tb_softmax_unit;
  import sh_gat_pkg::*;
  import tb_ref_pkg::*;

  localparam int L = 2;
  localparam int MAX_N = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  data_t [L-1:0] in_x, out_alpha;
  logic [L-1:0] in_mask, out_mask;

  softmax_unit #(.LANES(L), .MAX_N(MAX_N)) dut (.*);

  int checks = 0, failures = 0, ngroups = 0;
  int exp_a[$];
  int exp_n[$];
  int got = 0;

  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (rst_n && out_valid) begin
      checks++;
      if (in_ready) begin failures++; $display("FAIL accepting while dividing"); end
    end
    if (rst_n && out_valid && out_ready) begin
      int n;
      n = exp_n[0];
      for (int l = 0; l < L; l++) begin
        checks++;
        if (out_mask[l] !== (got + l < n)) begin failures++; $display("FAIL mask"); end
        if (got + l < n) begin
          int a;
          a = exp_a.pop_front();
          checks++;
          if (out_alpha[l] !== a) begin failures++; $display("FAIL alpha=%0d exp=%0d", out_alpha[l], a); end
        end
      end
      got += L;
      checks++;
      if (out_last !== (got >= n)) begin failures++; $display("FAIL last"); end
      if (got >= n) begin
        void'(exp_n.pop_front());
        got = 0;
        ngroups++;
      end
    end
  end

  initial begin
    in_valid = 0; in_x = '0; in_mask = '0; in_last = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 30; s++) begin
      int n;
      int x [MAX_N];
      longint sum;
      n = (s == 0) ? 1 : int'($urandom_range(1, 25));
      sum = 0;
      for (int i = 0; i < n; i++) begin
        // mix of small scores, large ones (clamped) and very negative ones
        case (i % 5)
          0: x[i] = rnd_q(20 * 65536);
          1: x[i] = rnd_q(3 * 65536);
          default: x[i] = rnd_q(6 * 65536);
        endcase
        sum += ref_pow2(x[i]);
      end
      for (int i = 0; i < n; i++) exp_a.push_back(ref_div_alpha(ref_pow2(x[i]), sum));
      exp_n.push_back(n);
      for (int i = 0; i < n; i += L) begin
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        in_valid <= 1;
        in_last  <= (i + L >= n);
        for (int l = 0; l < L; l++) begin
          in_mask[l] <= (i + l < n);
          in_x[l]    <= (i + l < n) ? x[i + l] : 0;
        end
        @(posedge clk);
        in_valid <= 0;
        #1;
      end
      // hold one cycle so the unit's state reflects the last beat
    end
    wait (ngroups == 30);
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
