// dmvm: dense matrix-vector multiplication unit, here the inner product of a
// node vector z (F_OUT entries) with an attention vector alpha.
//
// F_OUT multipliers feed a register stage (the "D" boxes of the drawing),
// then a binary adder tree with a register after every level. Latency is
// 1 + log2(F_OUT) cycles, one vector accepted per cycle. The vector z and the
// tag travel alongside so that the aggregator can store z with its score.
// Products are Q16.16 truncated to 32 bits and the tree adds with 32-bit
// wrap-around (this design's choice). F_OUT must be a power of two.
module dmvm
  import sh_gat_pkg::*;
#(
  parameter int unsigned F_OUT = 16,
  parameter int unsigned TAG_W = 10,
  localparam int unsigned LV   = $clog2(F_OUT),
  localparam int unsigned LAT  = LV + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  data_t [F_OUT-1:0]       in_z,
  input  data_t [F_OUT-1:0]       in_alpha,
  input  logic  [TAG_W-1:0]       in_tag,
  output logic                    out_valid,
  output data_t                   out_e,
  output data_t [F_OUT-1:0]       out_z,
  output logic  [TAG_W-1:0]       out_tag
);

  data_t tree [LV+1][F_OUT];

  always_ff @(posedge clk) begin
    for (int k = 0; k < F_OUT; k++) tree[0][k] <= qmul(in_z[k], in_alpha[k]);
    for (int v = 0; v < LV; v++)
      for (int i = 0; i < (F_OUT >> (v+1)); i++)
        tree[v+1][i] <= tree[v][2*i] + tree[v][2*i+1];
  end

  logic  [LAT-1:0]                 vpipe;
  data_t [LAT-1:0][F_OUT-1:0]      zpipe;
  logic  [LAT-1:0][TAG_W-1:0]      tpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      zpipe <= '0;
      tpipe <= '0;
    end else begin
      vpipe[0] <= in_valid;
      zpipe[0] <= in_z;
      tpipe[0] <= in_tag;
      for (int s = 1; s < LAT; s++) begin
        vpipe[s] <= vpipe[s-1];
        zpipe[s] <= zpipe[s-1];
        tpipe[s] <= tpipe[s-1];
      end
    end
  end

  assign out_valid = vpipe[LAT-1];
  assign out_e     = tree[LV][0];
  assign out_z     = zpipe[LAT-1];
  assign out_tag   = tpipe[LAT-1];

endmodule
