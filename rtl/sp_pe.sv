// sp_pe: one sparse processing element (SP-PE) of the SPMM.
//
// It computes the inner product of one sparse node-feature row (GCSR
// elements: col-index, value) with one column of the weight matrix, which it
// keeps in its own weight memory (each SP-PE holds a duplicate of its set's
// column). Following the SP-PE drawing, the col-index addresses the weight
// memory, the weight is multiplied by the value and added to the running sum;
// a mux driven by node-info (row-length) either keeps accumulating or emits
// the finished sum.
//
// Timing: fully streaming, one element per cycle. Stage 1 reads the weight
// (registered read, like a block RAM); stage 2 multiplies and accumulates.
// The result of a row appears on out_valid two cycles after its last element
// is accepted, together with the tag captured at the row's first element.
// out_valid doubles as the completion signal, and out_addr carries the
// element's lane address, so the schedule knows which lane finished. A new
// row may start on the cycle after the previous row's last element.
//
// A row whose row-length is 0 is sent as a single element with value 0, so
// the element count of a row is max(row_len, 1): this design's convention.
// en is the per-element clock enable; the gated clock is left to the FPGA
// tools. Arithmetic is Q16.16 with the product truncated to 32 bits and a
// 32-bit wrapping accumulator (this design's choice).
module sp_pe
  import sh_gat_pkg::*;
#(
  parameter int unsigned DEPTH   = 4096,   // weight column length (max input feature dimension)
  parameter int unsigned TAG_W   = 10,
  parameter int unsigned LANE_ID = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  // weight write port (fed by the Duplicate stage)
  input  logic                     w_we,
  input  logic [$clog2(DEPTH)-1:0] w_addr,
  input  data_t                    w_data,
  // element stream
  input  logic                     in_valid,
  input  logic                     in_first,    // first element of a row
  input  logic [LEN_W-1:0]         in_row_len,  // row-length from node-info (on first)
  input  logic [COL_W-1:0]         in_col,
  input  data_t                    in_value,
  input  logic [TAG_W-1:0]         in_tag,      // captured on first
  // result
  output logic                     out_valid,
  output data_t                    out_z,
  output logic [TAG_W-1:0]         out_tag,
  output logic [1:0]               out_addr
);

  data_t wmem [DEPTH];

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_addr] <= w_data;
  end

  // element counter: decides whether this element closes the row
  logic [LEN_W-1:0] remaining;   // elements still to come after the current one
  logic [LEN_W-1:0] eff_len;
  logic             elem_last;

  assign eff_len   = (in_row_len == '0) ? LEN_W'(1) : in_row_len;
  assign elem_last = in_first ? (eff_len == LEN_W'(1)) : (remaining == LEN_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
    end else if (en && in_valid) begin
      remaining <= in_first ? eff_len - LEN_W'(1) : remaining - LEN_W'(1);
    end
  end

  // stage 1: weight read
  logic             s1_valid, s1_first, s1_last;
  data_t            s1_w, s1_value;
  logic [TAG_W-1:0] s1_tag;
  logic [TAG_W-1:0] row_tag;

  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      s1_w     <= wmem[in_col[$clog2(DEPTH)-1:0]];
      s1_value <= in_value;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_tag   <= '0;
      row_tag  <= '0;
    end else if (en) begin
      s1_valid <= in_valid;
      s1_first <= in_valid && in_first;
      s1_last  <= in_valid && elem_last;
      if (in_valid && in_first) begin
        row_tag <= in_tag;
        s1_tag  <= in_tag;
      end else begin
        s1_tag  <= row_tag;
      end
    end else begin
      s1_valid <= 1'b0;
    end
  end

  // stage 2: multiply, accumulate, accumulate-or-output mux
  data_t acc, acc_next;
  assign acc_next = (s1_first ? data_t'(0) : acc) + qmul(s1_value, s1_w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_z     <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (s1_valid) begin
        acc <= acc_next;
        if (s1_last) begin
          out_valid <= 1'b1;
          out_z     <= acc_next;
          out_tag   <= s1_tag;
        end
      end
    end
  end

  assign out_addr = 2'(LANE_ID);

endmodule
