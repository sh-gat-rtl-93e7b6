// weight_loader: writes the weight matrix into the SPMM sets.
//
// Weights arrive as one word per beat in column-major order, W_0 first: all
// in_dim rows of column 0, then column 1, and so on up to column F_OUT-1. A
// row counter and a column counter turn the stream into (column, row) write
// addresses; the SPMM duplicates each write into every SP-PE of the addressed
// set. loaded rises after the last word of the last column and stays high
// until start clears the counters for a new layer. The stream is always
// accepted (in_ready = !loaded). One word per cycle; merging the eight HBM
// weight channels into this one stream is left to the memory side.
module weight_loader
  import sh_gat_pkg::*;
#(
  parameter int unsigned F_OUT = 16,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,     // clear counters, begin a new weight load
  input  logic [$clog2(DEPTH):0]   in_dim,    // rows per column (input feature dimension)
  input  logic                     in_valid,
  output logic                     in_ready,
  input  data_t                    in_data,
  output logic                     w_we,
  output logic [$clog2(F_OUT)-1:0] w_col,
  output logic [$clog2(DEPTH)-1:0] w_row,
  output data_t                    w_data,
  output logic                     loaded
);

  logic [$clog2(F_OUT):0]   col_cnt;
  logic [$clog2(DEPTH):0]   row_cnt;
  logic                     take;

  assign in_ready = !loaded;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt <= '0;
      row_cnt <= '0;
      loaded  <= 1'b0;
      w_we    <= 1'b0;
      w_col   <= '0;
      w_row   <= '0;
      w_data  <= '0;
    end else begin
      w_we <= 1'b0;
      if (start) begin
        col_cnt <= '0;
        row_cnt <= '0;
        loaded  <= 1'b0;
      end else if (take) begin
        w_we   <= 1'b1;
        w_col  <= col_cnt[$clog2(F_OUT)-1:0];
        w_row  <= row_cnt[$clog2(DEPTH)-1:0];
        w_data <= in_data;
        if (row_cnt + 1'b1 == in_dim) begin
          row_cnt <= '0;
          col_cnt <= col_cnt + 1'b1;
          if (col_cnt + 1'b1 == ($clog2(F_OUT)+1)'(F_OUT)) loaded <= 1'b1;
        end else begin
          row_cnt <= row_cnt + 1'b1;
        end
      end
    end
  end

endmodule
