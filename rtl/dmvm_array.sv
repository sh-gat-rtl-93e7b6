// dmvm_array: one DMVM per SP-PE lane.
//
// Each lane's node vector z (from the SPMM) is multiplied with the attention
// half that the alpha loader selects by the node's source flag: alpha_1 for a
// source node, giving e_i, alpha_2 for a neighbour, giving e_j. The source
// flag is bit 0 of the lane's tag. Latency 1 + log2(F_OUT) cycles per lane.
module dmvm_array
  import sh_gat_pkg::*;
#(
  parameter int unsigned F_OUT = 16,
  parameter int unsigned LANES = 3,
  parameter int unsigned TAG_W = 10
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic  [LANES-1:0]                  in_valid,
  input  data_t [LANES-1:0][F_OUT-1:0]       in_z,
  input  logic  [LANES-1:0][TAG_W-1:0]       in_tag,
  output logic  [LANES-1:0]                  src_flag,  // to the alpha loader mux
  input  data_t [LANES-1:0][F_OUT-1:0]       alpha,     // from the alpha loader mux
  output logic  [LANES-1:0]                  out_valid,
  output data_t [LANES-1:0]                  out_e,
  output data_t [LANES-1:0][F_OUT-1:0]       out_z,
  output logic  [LANES-1:0][TAG_W-1:0]       out_tag
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    assign src_flag[l] = in_tag[l][0];
    dmvm #(.F_OUT(F_OUT), .TAG_W(TAG_W)) u_dmvm (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[l]),
      .in_z     (in_z[l]),
      .in_alpha (alpha[l]),
      .in_tag   (in_tag[l]),
      .out_valid(out_valid[l]),
      .out_e    (out_e[l]),
      .out_z    (out_z[l]),
      .out_tag  (out_tag[l])
    );
  end

endmodule
