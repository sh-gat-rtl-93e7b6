// leaky_relu: LeakyReLU on a Q16.16 number, combinational.
// y = x for x >= 0, y = NEG_SLOPE * x otherwise. NEG_SLOPE is a Q16.16
// constant; its default 0.2 (13107/65536) is the slope commonly used for GAT
// and is this design's choice.
module leaky_relu
  import sh_gat_pkg::*;
#(
  parameter data_t NEG_SLOPE = 32'sd13107
) (
  input  data_t x,
  output data_t y
);

  assign y = x[DATA_W-1] ? qmul(x, NEG_SLOPE) : x;

endmodule
