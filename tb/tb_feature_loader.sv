// tb_feature_loader: three channel groups, each with a value channel and a
// node-info/col-index channel driven with independent random valid patterns
// (so the two channels of a group are skewed), and a randomly stalling
// consumer. Checks every buffered element (node-info, col-index, value, last)
// in order per group, and that full buffers held the channels back.
module tb_feature_loader;
  import sh_gat_pkg::*;

  localparam int G = 3;
  localparam int N = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [G-1:0] val_valid, val_ready, inf_valid, inf_ready, inf_last, head_valid, pop;
  data_t [G-1:0] val_data;
  logic [G-1:0][31:0] inf_data;
  gcsr_elem_t [G-1:0] head;

  feature_loader #(.GROUPS(G), .FIFO_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0, full_seen = 0;
  int vals [G][N];
  int infs [G][N];
  int vi [G], ii [G], ri [G];
  logic go = 0;

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < G; g++) begin
      if (val_valid[g] && inf_valid[g] && !val_ready[g]) full_seen++;
      if (head_valid[g] && pop[g]) begin
        checks++;
        if (head[g].value !== vals[g][ri[g]] || {head[g].info, head[g].col} !== 32'(infs[g][ri[g]]) ||
            head[g].last !== (ri[g] == N-1)) begin
          failures++;
          $display("FAIL group %0d element %0d", g, ri[g]);
        end
        ri[g]++;
      end
    end
  end

  // channel drivers: present the next word with random valid
  always @(posedge clk) begin
    for (int g = 0; g < G; g++) begin
      int nv, ni;
      if (rst_n && val_valid[g] && val_ready[g]) vi[g]++;
      if (rst_n && inf_valid[g] && inf_ready[g]) ii[g]++;
      nv = vi[g];
      ni = ii[g];
      val_valid[g] <= go && (nv < N) && ($urandom_range(0, 3) != 0);
      val_data[g]  <= (nv < N) ? vals[g][nv] : 0;
      inf_valid[g] <= go && (ni < N) && ($urandom_range(0, 3) != 0);
      inf_data[g]  <= (ni < N) ? 32'(infs[g][ni]) : 0;
      inf_last[g]  <= (ni == N-1);
    end
  end
  // consumer: pops with random stalls (combinational on head_valid)
  logic [G-1:0] want;
  always @(posedge clk) want <= G'($urandom) & G'($urandom);
  always_comb for (int g = 0; g < G; g++) pop[g] = head_valid[g] && want[g];

  initial begin
    for (int g = 0; g < G; g++) begin
      vi[g] = 0; ii[g] = 0; ri[g] = 0;
      for (int n = 0; n < N; n++) begin
        vals[g][n] = int'($urandom);
        infs[g][n] = int'($urandom);
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    go <= 1;
    wait (ri[0] == N && ri[1] == N && ri[2] == N);
    repeat (2) @(posedge clk);
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL buffers never filled"); end
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
