// spmm: the sparse matrix multiplication kernel.
//
// F_OUT sets of LANES SP-PEs. Set k holds column W_k of the weight matrix;
// every SP-PE of the set gets its own copy (the Duplicate stage is the
// broadcast of a weight write to all lanes of the addressed set). Lane l of
// every set receives the same distributed feature element, so a node row sent
// to lane l yields, LANES-wide in parallel, the whole output vector
// z = W h for that node: out_z[l][k] comes from set k, lane l.
//
// Lanes have no data dependency on each other and run independently. Set 0's
// result pulses serve as the per-lane completion signal with its SP-PE
// address (all sets of a lane run in lock step). Latency from a row's last
// element to out_valid is two cycles (see sp_pe).
module spmm
  import sh_gat_pkg::*;
#(
  parameter int unsigned F_OUT = 16,     // output feature dimension = number of sets
  parameter int unsigned LANES = 3,      // SP-PEs per set
  parameter int unsigned DEPTH = 4096,   // weight column length
  parameter int unsigned TAG_W = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [LANES-1:0]             lane_en,
  // weight write (column, row, data)
  input  logic                         w_we,
  input  logic [$clog2(F_OUT)-1:0]     w_col,
  input  logic [$clog2(DEPTH)-1:0]     w_row,
  input  data_t                        w_data,
  // distributed feature, one element port per lane
  input  logic       [LANES-1:0]       in_valid,
  input  logic       [LANES-1:0]       in_first,
  input  logic       [LANES-1:0][LEN_W-1:0] in_row_len,
  input  logic       [LANES-1:0][COL_W-1:0] in_col,
  input  data_t      [LANES-1:0]       in_value,
  input  logic       [LANES-1:0][TAG_W-1:0] in_tag,
  // results, one node vector per lane
  output logic       [LANES-1:0]       out_valid,
  output data_t      [LANES-1:0][F_OUT-1:0] out_z,
  output logic       [LANES-1:0][TAG_W-1:0] out_tag,
  output logic       [LANES-1:0][1:0]  done_addr
);

  logic [F_OUT-1:0][LANES-1:0]             pe_valid;
  logic [F_OUT-1:0][LANES-1:0][TAG_W-1:0]  pe_tag;
  logic [F_OUT-1:0][LANES-1:0][1:0]        pe_addr;

  for (genvar k = 0; k < F_OUT; k++) begin : g_set
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      sp_pe #(.DEPTH(DEPTH), .TAG_W(TAG_W), .LANE_ID(l)) u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .en        (lane_en[l]),
        .w_we      (w_we && (w_col == k)),
        .w_addr    (w_row),
        .w_data    (w_data),
        .in_valid  (in_valid[l]),
        .in_first  (in_first[l]),
        .in_row_len(in_row_len[l]),
        .in_col    (in_col[l]),
        .in_value  (in_value[l]),
        .in_tag    (in_tag[l]),
        .out_valid (pe_valid[k][l]),
        .out_z     (out_z[l][k]),
        .out_tag   (pe_tag[k][l]),
        .out_addr  (pe_addr[k][l])
      );
    end
  end

  assign out_valid = pe_valid[0];
  assign out_tag   = pe_tag[0];
  assign done_addr = pe_addr[0];

endmodule
