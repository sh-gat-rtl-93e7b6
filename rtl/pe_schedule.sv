// pe_schedule: the load-balancing schedule between the feature loader and
// the SP-PE lanes.
//
// Node rows are taken in their GCSR order. That order is dealt round-robin
// over the channel groups (row 0 in group 0, row 1 in group 1, ...), so the
// schedule looks for the next row at the head of group next_grp. When that
// row's first element is buffered, the group is not already streaming, and an
// SP-PE lane is free, the row is bound to the lowest free lane and, from the
// next cycle, streamed to it one element per cycle straight from the group's
// buffer (the output mux). Up to LANES rows stream at once. A lane becomes
// free again only when its SP-PE returns the completion signal with its
// address, so short rows release their lane early and long rows do not hold
// up the others.
//
// Each row is tagged {slot, index, source flag}. A source row (node-flag 1)
// opens a subgraph: it needs a free slot of the aggregator's z_ij buffer and
// gets index 0; the following neighbour rows get indices 1, 2, ... Opening a
// subgraph closes the previous one, and the element marked last closes the
// final one: the close message gives the slot and its node count. After that
// element the group pointer returns to group 0, where the next layer starts. When no
// slot is free, binding stops (stall_slot) and the feature buffers fill up,
// which holds back the memory side: loading pauses until a subgraph has been
// computed and its slot released.
module pe_schedule
  import sh_gat_pkg::*;
#(
  parameter int unsigned GROUPS = 3,
  parameter int unsigned LANES  = 3,
  parameter int unsigned NSLOT  = 2,
  parameter int unsigned MAX_SG = 256,
  localparam int unsigned SLOT_W = (NSLOT > 1) ? $clog2(NSLOT) : 1,
  localparam int unsigned IDX_W  = $clog2(MAX_SG),
  localparam int unsigned TAG_W  = SLOT_W + IDX_W + 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           run,
  // feature loader side
  input  logic       [GROUPS-1:0]        head_valid,
  input  gcsr_elem_t [GROUPS-1:0]        head,
  output logic       [GROUPS-1:0]        pop,
  // distributed feature to the SP-PE lanes
  output logic       [LANES-1:0]         pe_valid,
  output logic       [LANES-1:0]         pe_first,
  output logic       [LANES-1:0][LEN_W-1:0] pe_row_len,
  output logic       [LANES-1:0][COL_W-1:0] pe_col,
  output data_t      [LANES-1:0]         pe_value,
  output logic       [LANES-1:0][TAG_W-1:0] pe_tag,
  output logic       [LANES-1:0]         pe_en,
  // completion signal and SP-PE address
  input  logic       [LANES-1:0]         done_valid,
  input  logic       [LANES-1:0][1:0]    done_addr,
  // aggregator slots
  input  logic       [NSLOT-1:0]         slot_release,
  output logic                           close_valid,
  output logic       [SLOT_W-1:0]        close_slot,
  output logic       [IDX_W:0]           close_count,
  // observation
  output logic                           stall_slot,
  output logic                           bind_fire,
  output logic       [1:0]               bind_lane
);

  logic [LANES-1:0]              lane_busy, lane_wait, lane_first;
  logic [LANES-1:0][1:0]         lane_grp;
  logic [LANES-1:0][LEN_W-1:0]   lane_rem;
  logic [LANES-1:0][TAG_W-1:0]   lane_tag;
  logic [GROUPS-1:0]             grp_bound;
  logic [1:0]                    next_grp;
  logic                          have_sg;
  logic [SLOT_W-1:0]             cur_slot, alloc_ptr;
  logic [IDX_W-1:0]              cur_idx;
  logic [NSLOT-1:0]              slot_used;

  // streaming: lane l reads the head of its bound group
  logic [LANES-1:0] row_end;
  logic             last_seen;
  logic [LANES-1:0] lane_done;

  always_comb begin
    pop       = '0;
    row_end   = '0;
    last_seen = 1'b0;
    lane_done = '0;
    for (int l = 0; l < LANES; l++) begin
      gcsr_elem_t e;
      logic [LEN_W-1:0] eff;
      e             = head[lane_grp[l]];
      eff           = (e.info.row_len == '0) ? LEN_W'(1) : e.info.row_len;
      pe_valid[l]   = lane_busy[l] && head_valid[lane_grp[l]];
      pe_first[l]   = lane_first[l];
      pe_row_len[l] = e.info.row_len;
      pe_col[l]     = e.col;
      pe_value[l]   = e.value;
      pe_tag[l]     = lane_tag[l];
      pe_en[l]      = lane_busy[l] || lane_wait[l];
      if (pe_valid[l]) begin
        pop[lane_grp[l]] = 1'b1;
        row_end[l] = lane_first[l] ? (eff == LEN_W'(1)) : (lane_rem[l] == LEN_W'(1));
        if (e.last) last_seen = 1'b1;
      end
    end
    for (int l = 0; l < LANES; l++)
      if (done_valid[l]) lane_done[done_addr[l]] = 1'b1;
  end

  // binding of the next row to the lowest free lane
  logic             free_found;
  logic [1:0]       free_lane;
  gcsr_elem_t       nh;
  logic             can_bind, want_src;

  always_comb begin
    free_found = 1'b0;
    free_lane  = '0;
    for (int l = LANES-1; l >= 0; l--)
      if (!lane_busy[l] && !lane_wait[l]) begin
        free_found = 1'b1;
        free_lane  = 2'(l);
      end
    nh         = head[next_grp];
    want_src   = nh.info.src_flag;
    can_bind   = run && free_found && !grp_bound[next_grp] && head_valid[next_grp] && !last_seen;
    stall_slot = can_bind && want_src && slot_used[alloc_ptr];
    bind_fire  = can_bind && !stall_slot;
    bind_lane  = free_lane;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_busy   <= '0;
      lane_wait   <= '0;
      lane_first  <= '0;
      lane_grp    <= '0;
      lane_rem    <= '0;
      lane_tag    <= '0;
      grp_bound   <= '0;
      next_grp    <= '0;
      have_sg     <= 1'b0;
      cur_slot    <= '0;
      alloc_ptr   <= '0;
      cur_idx     <= '0;
      slot_used   <= '0;
      close_valid <= 1'b0;
      close_slot  <= '0;
      close_count <= '0;
    end else begin
      close_valid <= 1'b0;
      slot_used   <= slot_used & ~slot_release;

      for (int l = 0; l < LANES; l++) begin
        if (pe_valid[l]) begin
          lane_first[l] <= 1'b0;
          lane_rem[l]   <= lane_first[l]
                           ? ((head[lane_grp[l]].info.row_len == '0) ? '0 : head[lane_grp[l]].info.row_len - LEN_W'(1))
                           : lane_rem[l] - LEN_W'(1);
          if (row_end[l]) begin
            lane_busy[l]           <= 1'b0;
            lane_wait[l]           <= 1'b1;
            grp_bound[lane_grp[l]] <= 1'b0;
          end
        end
        if (lane_done[l]) lane_wait[l] <= 1'b0;
      end

      if (last_seen) next_grp <= '0;   // the next layer's rows start at group 0
      if (last_seen && have_sg) begin
        close_valid <= 1'b1;
        close_slot  <= cur_slot;
        close_count <= (IDX_W+1)'(cur_idx) + 1'b1;
        have_sg     <= 1'b0;
      end

      if (bind_fire) begin
        lane_busy[free_lane]  <= 1'b1;
        lane_first[free_lane] <= 1'b1;
        lane_grp[free_lane]   <= next_grp;
        grp_bound[next_grp]   <= 1'b1;
        next_grp              <= (next_grp == 2'(GROUPS-1)) ? '0 : next_grp + 1'b1;
        if (want_src) begin
          if (have_sg) begin
            close_valid <= 1'b1;
            close_slot  <= cur_slot;
            close_count <= (IDX_W+1)'(cur_idx) + 1'b1;
          end
          have_sg              <= 1'b1;
          cur_slot             <= alloc_ptr;
          cur_idx              <= '0;
          slot_used[alloc_ptr] <= 1'b1;
          alloc_ptr            <= (alloc_ptr == SLOT_W'(NSLOT-1)) ? '0 : alloc_ptr + 1'b1;
          lane_tag[free_lane]  <= {alloc_ptr, IDX_W'(0), 1'b1};
        end else begin
          cur_idx              <= cur_idx + 1'b1;
          lane_tag[free_lane]  <= {cur_slot, cur_idx + 1'b1, 1'b0};
        end
      end
    end
  end

  // GCSR rules the schedule relies on
  a_first_is_source: assert property (@(posedge clk) disable iff (!rst_n)
    bind_fire && !want_src |-> have_sg);
  a_sg_fits: assert property (@(posedge clk) disable iff (!rst_n)
    bind_fire && !want_src |-> cur_idx != IDX_W'(MAX_SG-1));

endmodule
