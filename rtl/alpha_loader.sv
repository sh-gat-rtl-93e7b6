// alpha_loader: holds the attention vector and splits it into alpha_1 and
// alpha_2.
//
// The 2*F_OUT words of the attention vector arrive as a stream, alpha_1
// (applied to the source node) first, then alpha_2 (applied to neighbour
// nodes). For every lane of the DMVM array a mux driven by that lane's
// source-node flag hands out alpha_1 or alpha_2, as in the alpha loader
// drawing. loaded rises after the last word; start clears it. The select path
// is combinational.
module alpha_loader
  import sh_gat_pkg::*;
#(
  parameter int unsigned F_OUT = 16,
  parameter int unsigned LANES = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  data_t                         in_data,
  input  logic  [LANES-1:0]             src_flag,
  output data_t [LANES-1:0][F_OUT-1:0]  alpha,
  output logic                          loaded
);

  data_t a1 [F_OUT];
  data_t a2 [F_OUT];
  logic [$clog2(2*F_OUT):0] cnt;

  assign in_ready = !loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      loaded <= 1'b0;
      for (int k = 0; k < F_OUT; k++) begin
        a1[k] <= '0;
        a2[k] <= '0;
      end
    end else if (start) begin
      cnt    <= '0;
      loaded <= 1'b0;
    end else if (in_valid && in_ready) begin
      if (cnt < ($clog2(2*F_OUT)+1)'(F_OUT)) a1[cnt[$clog2(F_OUT)-1:0]] <= in_data;
      else                                  a2[cnt[$clog2(F_OUT)-1:0]] <= in_data;
      cnt <= cnt + 1'b1;
      if (cnt + 1'b1 == ($clog2(2*F_OUT)+1)'(2*F_OUT)) loaded <= 1'b1;
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++)
      for (int k = 0; k < F_OUT; k++)
        alpha[l][k] = src_flag[l] ? a1[k] : a2[k];
  end

endmodule
