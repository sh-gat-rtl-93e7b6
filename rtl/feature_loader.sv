// feature_loader: receives the GCSR node features from three channel groups
// and buffers them as whole elements.
//
// Each channel group is a pair of channels: one carries the 32-bit value, the
// other the merged [node-info, col-index] word (node-info in bits 31:16,
// col-index in bits 15:0) plus a last marker on the final element of the
// layer. Group 0 is the source-node group, groups 1 and 2 neighbour groups.
// A beat is taken from a group when both of its channels are valid and its
// buffer has room, so the two channels of a group may run skewed. Each group
// has its own FIFO of GCSR elements; a full FIFO holds its channels back, so
// loading stops while the computation lags. Element order inside a group is
// kept. Node-info is repeated on every element of its row (this design's
// convention).
module feature_loader
  import sh_gat_pkg::*;
#(
  parameter int unsigned GROUPS     = 3,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // value channels
  input  logic       [GROUPS-1:0]        val_valid,
  output logic       [GROUPS-1:0]        val_ready,
  input  data_t      [GROUPS-1:0]        val_data,
  // merged node-info / col-index channels
  input  logic       [GROUPS-1:0]        inf_valid,
  output logic       [GROUPS-1:0]        inf_ready,
  input  logic       [GROUPS-1:0][31:0]  inf_data,
  input  logic       [GROUPS-1:0]        inf_last,
  // buffered elements, head of each group
  output logic       [GROUPS-1:0]        head_valid,
  output gcsr_elem_t [GROUPS-1:0]        head,
  input  logic       [GROUPS-1:0]        pop
);

  localparam int unsigned EW = $bits(gcsr_elem_t);

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic       fifo_ready;
    gcsr_elem_t elem;
    logic       both;

    assign both         = val_valid[g] && inf_valid[g];
    assign val_ready[g] = inf_valid[g] && fifo_ready;
    assign inf_ready[g] = val_valid[g] && fifo_ready;

    always_comb begin
      elem.info  = node_info_t'(inf_data[g][31:16]);
      elem.col   = inf_data[g][15:0];
      elem.value = val_data[g];
      elem.last  = inf_last[g];
    end

    sync_fifo #(.WIDTH(EW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (both),
      .in_ready (fifo_ready),
      .in_data  (elem),
      .out_valid(head_valid[g]),
      .out_ready(pop[g]),
      .out_data (head[g])
    );
  end

endmodule
