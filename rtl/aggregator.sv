// aggregator: z_ij buffer and feature aggregation h_i' = act(sum_j alpha_ij z_j).
//
// The z_ij buffer keeps, for NSLOT subgraphs, every node vector z (from the
// SPMM, passed through the DMVM array) and its score e (e_i for the source,
// e_j for a neighbour), written at {slot, index} from the tag. Up to LANES
// writes per cycle, in any order, since SP-PE lanes finish out of order. The
// schedule's close message gives a slot's node count; the slot is complete
// when that many vectors have been written.
//
// Complete slots are processed in allocation order. For each neighbour j
// (indices 1..count-1) the unit sends the score e_i + e_j to the AF module,
// SM_LANES per beat; the AF returns alpha_ij in the same order, and each
// alpha beat is used at once: z_j is read back from the buffer (reused, not
// recomputed) and alpha_ij * z_j is added into F_OUT accumulators. After the
// last coefficient the result goes through the output activation (ReLU when
// act_en is high, identity otherwise: the activation is this design's choice)
// and is offered on h_valid/h_ready, one F_OUT vector per subgraph in source
// order. When it is taken, the slot is released to the schedule. A subgraph
// with no neighbours yields act(0). Only neighbours listed in the subgraph
// enter the sum: a self-loop is included by listing the source again as its
// own neighbour.
module aggregator
  import sh_gat_pkg::*;
#(
  parameter int unsigned F_OUT    = 16,
  parameter int unsigned LANES    = 3,
  parameter int unsigned SM_LANES = 2,
  parameter int unsigned NSLOT    = 2,
  parameter int unsigned MAX_SG   = 256,
  localparam int unsigned SLOT_W  = (NSLOT > 1) ? $clog2(NSLOT) : 1,
  localparam int unsigned IDX_W   = $clog2(MAX_SG),
  localparam int unsigned TAG_W   = SLOT_W + IDX_W + 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  act_en,
  // z_ij / score write side
  input  logic  [LANES-1:0]                     wr_valid,
  input  logic  [LANES-1:0][TAG_W-1:0]          wr_tag,
  input  data_t [LANES-1:0]                     wr_e,
  input  data_t [LANES-1:0][F_OUT-1:0]          wr_z,
  // subgraph close from the schedule
  input  logic                                  close_valid,
  input  logic  [SLOT_W-1:0]                    close_slot,
  input  logic  [IDX_W:0]                       close_count,
  output logic  [NSLOT-1:0]                     slot_release,
  // scores to the AF module
  output logic                                  sc_valid,
  input  logic                                  sc_ready,
  output data_t [SM_LANES-1:0]                  sc_score,
  output logic  [SM_LANES-1:0]                  sc_mask,
  output logic                                  sc_last,
  // attention coefficients from the AF module
  input  logic                                  al_valid,
  output logic                                  al_ready,
  input  data_t [SM_LANES-1:0]                  al_alpha,
  input  logic  [SM_LANES-1:0]                  al_mask,
  input  logic                                  al_last,
  // updated features
  output logic                                  h_valid,
  input  logic                                  h_ready,
  output data_t [F_OUT-1:0]                     h_data
);

  localparam int unsigned AW = SLOT_W + IDX_W;

  data_t [F_OUT-1:0] zbuf [NSLOT*MAX_SG];
  data_t             ebuf [NSLOT*MAX_SG];

  logic [NSLOT-1:0][IDX_W:0] cnt, size;
  logic [NSLOT-1:0]          closed;

  // write side
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      if (wr_valid[l]) begin
        zbuf[AW'(wr_tag[l] >> 1)] <= wr_z[l];
        ebuf[AW'(wr_tag[l] >> 1)] <= wr_e[l];
      end
  end

  typedef enum logic [1:0] {A_IDLE, A_RUN, A_OUT} state_t;
  state_t state;

  logic [SLOT_W-1:0] ps;
  logic [IDX_W:0]    sj, aj;
  data_t             e_i;
  data_t [F_OUT-1:0] acc, acc_next;

  // score beats
  always_comb begin
    sc_valid = (state == A_RUN) && (sj < size[ps]);
    sc_last  = (sj + (IDX_W+1)'(SM_LANES) >= size[ps]);
    for (int l = 0; l < SM_LANES; l++) begin
      logic [IDX_W:0] j;
      j           = sj + (IDX_W+1)'(l);
      sc_mask[l]  = (j < size[ps]);
      sc_score[l] = e_i + ebuf[{ps, j[IDX_W-1:0]}];
    end
  end

  // aggregation of one alpha beat
  assign al_ready = (state == A_RUN);
  always_comb begin
    acc_next = acc;
    for (int l = 0; l < SM_LANES; l++) begin
      logic [IDX_W:0] j;
      j = aj + (IDX_W+1)'(l);
      if (al_mask[l])
        for (int k = 0; k < F_OUT; k++)
          acc_next[k] = acc_next[k] + qmul(al_alpha[l], zbuf[{ps, j[IDX_W-1:0]}][k]);
    end
  end

  logic ready_slot;
  assign ready_slot = closed[ps] && (cnt[ps] == size[ps]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      size         <= '0;
      closed       <= '0;
      state        <= A_IDLE;
      ps           <= '0;
      sj           <= '0;
      aj           <= '0;
      e_i          <= '0;
      acc          <= '0;
      h_valid      <= 1'b0;
      h_data       <= '0;
      slot_release <= '0;
    end else begin
      slot_release <= '0;
      for (int s = 0; s < NSLOT; s++) begin
        logic [IDX_W:0] inc;
        inc = '0;
        for (int l = 0; l < LANES; l++)
          if (wr_valid[l] && (wr_tag[l][TAG_W-1 -: SLOT_W] == SLOT_W'(s))) inc = inc + 1'b1;
        cnt[s] <= cnt[s] + inc;
      end
      if (close_valid) begin
        size[close_slot]   <= close_count;
        closed[close_slot] <= 1'b1;
      end

      case (state)
        A_IDLE: if (ready_slot) begin
          e_i <= ebuf[{ps, IDX_W'(0)}];
          sj  <= (IDX_W+1)'(1);
          aj  <= (IDX_W+1)'(1);
          acc <= '0;
          if (size[ps] == (IDX_W+1)'(1)) begin
            state   <= A_OUT;
            h_valid <= 1'b1;
            h_data  <= '0;
          end else begin
            state <= A_RUN;
          end
        end
        A_RUN: begin
          if (sc_valid && sc_ready) sj <= sj + (IDX_W+1)'(SM_LANES);
          if (al_valid) begin
            aj  <= aj + (IDX_W+1)'(SM_LANES);
            acc <= acc_next;
            if (al_last) begin
              state   <= A_OUT;
              h_valid <= 1'b1;
              for (int k = 0; k < F_OUT; k++)
                h_data[k] <= (act_en && acc_next[k][DATA_W-1]) ? data_t'(0) : acc_next[k];
            end
          end
        end
        A_OUT: if (h_ready) begin
          h_valid          <= 1'b0;
          slot_release[ps] <= 1'b1;
          closed[ps]       <= 1'b0;
          cnt[ps]          <= '0;
          ps               <= (ps == SLOT_W'(NSLOT-1)) ? '0 : ps + 1'b1;
          state            <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  a_complete_on_out: assert property (@(posedge clk) disable iff (!rst_n)
    state == A_OUT |-> cnt[ps] == size[ps]);

endmodule
