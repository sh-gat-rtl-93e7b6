// sh_gat_pkg: types and constants shared by the GAT layer engine.
//
// Numbers: every feature, weight, attention vector entry and intermediate
// result is a 32-bit signed two's-complement fixed-point number with 16
// fraction bits (Q16.16). The 32-bit value word and the 16-bit col-index and
// node-info fields follow the GCSR layout (value 32 bits, col-index 16 bits,
// node-info 16 bits = row-length || node-flag). The fixed-point format, the
// lane counts of the softmax path and the buffer depths are this design's
// own choices.
package sh_gat_pkg;

  localparam int unsigned DATA_W = 32;   // value word width (GCSR)
  localparam int unsigned FRAC   = 16;   // fraction bits of Q16.16
  localparam int unsigned COL_W  = 16;   // col-index width (GCSR)
  localparam int unsigned INFO_W = 16;   // node-info width (GCSR)
  localparam int unsigned LEN_W  = INFO_W - 1;

  typedef logic signed [DATA_W-1:0] data_t;

  // node-info word: row-length in the upper 15 bits, node-flag in bit 0
  // (1 = source node, 0 = neighbour node).
  typedef struct packed {
    logic [LEN_W-1:0] row_len;
    logic             src_flag;
  } node_info_t;

  // One GCSR element as carried by a channel group: node-info of the row it
  // belongs to, its col-index, its value, and a marker on the final element
  // of the final row of the layer.
  typedef struct packed {
    node_info_t       info;
    logic [COL_W-1:0] col;
    data_t            value;
    logic             last;
  } gcsr_elem_t;

  // Q16.16 multiply, truncated back to 32 bits.
  function automatic data_t qmul(data_t a, data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return data_t'(p >>> FRAC);
  endfunction

endpackage
