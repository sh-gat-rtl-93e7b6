// softmax_unit: base-2 softmax over the scores of one subgraph.
//
//   alpha_j = 2^x_j / sum_k 2^x_k
//
// Scores arrive LANES per beat (a lane mask marks the used lanes, filled from
// lane 0; only the last beat may be partial). Each score passes a shift unit
// that forms 2^x: with x in Q16.16, x = n + f (n integer, 0 <= f < 1), the
// unit takes 1.f and shifts it left by n (right for negative n). Using 1 + f
// for 2^f is this design's reading of "replacing the power operation with a
// shift"; n is clamped to 14 so 2^x fits 32 bits, and n < -16 gives 0. The
// shifted values then split: one path goes through the adder tree into the
// running sum, the other into a register file where it waits for the
// division. After the last beat the unit switches to dividing: it emits LANES
// coefficients per beat in arrival order, alpha = (2^x << 16) / sum, in
// Q16.16, with the same mask/last framing. A sum of zero gives alpha = 0.
//
// Timing: in_ready is high while collecting; the division phase starts the
// cycle after the last beat and lasts ceil(N / LANES) beats, paced by
// out_ready. Up to MAX_N scores per subgraph.
module softmax_unit
  import sh_gat_pkg::*;
#(
  parameter int unsigned LANES = 2,
  parameter int unsigned MAX_N = 256,
  localparam int unsigned NW   = $clog2(MAX_N) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  data_t [LANES-1:0]       in_x,
  input  logic  [LANES-1:0]       in_mask,
  input  logic                    in_last,
  output logic                    out_valid,
  input  logic                    out_ready,
  output data_t [LANES-1:0]       out_alpha,
  output logic  [LANES-1:0]       out_mask,
  output logic                    out_last
);

  localparam int unsigned SUM_W = 48;

  function automatic logic [31:0] pow2(data_t x);
    logic signed [DATA_W-FRAC-1:0] n;
    logic [47:0] m;
    n = x[DATA_W-1:FRAC];
    m = {31'd0, 1'b1, x[FRAC-1:0]};
    if (n > 14)       return 32'(m << 14);
    else if (n < -16) return 32'd0;
    else if (n >= 0)  return 32'(m << n);
    else              return 32'(m >> (-n));
  endfunction

  typedef enum logic [0:0] {S_COLLECT, S_DIVIDE} state_t;
  state_t state;

  logic [31:0]      preg [MAX_N];
  logic [SUM_W-1:0] sum;
  logic [NW-1:0]    wr_ptr, rd_ptr;

  // shift stage and adder tree over the lanes of one beat
  logic [LANES-1:0][31:0] p;
  logic [SUM_W-1:0]       beat_sum;
  always_comb begin
    beat_sum = '0;
    for (int l = 0; l < LANES; l++) begin
      p[l] = in_mask[l] ? pow2(in_x[l]) : 32'd0;
      beat_sum = beat_sum + SUM_W'(p[l]);
    end
  end

  assign in_ready  = (state == S_COLLECT);
  assign out_valid = (state == S_DIVIDE);

  // divider
  always_comb begin
    out_last = (rd_ptr + NW'(LANES) >= wr_ptr);
    for (int l = 0; l < LANES; l++) begin
      logic [63:0] num;
      logic [NW-1:0] idx;
      idx         = rd_ptr + NW'(l);
      out_mask[l] = (idx < wr_ptr);
      num         = {16'd0, preg[idx[NW-2:0]], 16'd0};
      out_alpha[l] = (sum == '0 || !out_mask[l]) ? data_t'(0) : data_t'(num / 64'(sum));
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_COLLECT && in_valid)
      for (int l = 0; l < LANES; l++)
        if (in_mask[l]) preg[(NW-1)'(wr_ptr + NW'(l))] <= p[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_COLLECT;
      sum    <= '0;
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      case (state)
        S_COLLECT: if (in_valid) begin
          sum    <= sum + beat_sum;
          wr_ptr <= wr_ptr + NW'($countones(in_mask));
          if (in_last) begin
            state  <= S_DIVIDE;
            rd_ptr <= '0;
          end
        end
        S_DIVIDE: if (out_ready) begin
          rd_ptr <= rd_ptr + NW'(LANES);
          if (out_last) begin
            state  <= S_COLLECT;
            sum    <= '0;
            wr_ptr <= '0;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_COLLECT && in_valid |-> wr_ptr + NW'($countones(in_mask)) <= NW'(MAX_N));

endmodule
