// af_unit: the activation-function module between the DMVM array and the
// aggregator. Each score e_i + e_j goes through LeakyReLU and then the
// base-2 softmax over its subgraph, giving the attention coefficients
// alpha_ij. Framing (LANES per beat, mask, last) and timing are those of
// softmax_unit; LeakyReLU is combinational in front of it.
module af_unit
  import sh_gat_pkg::*;
#(
  parameter int unsigned LANES = 2,
  parameter int unsigned MAX_N = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  data_t [LANES-1:0]       in_score,
  input  logic  [LANES-1:0]       in_mask,
  input  logic                    in_last,
  output logic                    out_valid,
  input  logic                    out_ready,
  output data_t [LANES-1:0]       out_alpha,
  output logic  [LANES-1:0]       out_mask,
  output logic                    out_last
);

  data_t [LANES-1:0] act;

  for (genvar l = 0; l < LANES; l++) begin : g_lrelu
    leaky_relu u_lrelu (.x(in_score[l]), .y(act[l]));
  end

  softmax_unit #(.LANES(LANES), .MAX_N(MAX_N)) u_softmax (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_x     (act),
    .in_mask  (in_mask),
    .in_last  (in_last),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_alpha(out_alpha),
    .out_mask (out_mask),
    .out_last (out_last)
  );

endmodule
