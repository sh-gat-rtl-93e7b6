// sh_gat_top: one graph attention layer engine.
//
// Data flow (one GAT layer, subgraph = a source node and its neighbours):
//   weight stream  -> weight_loader -> SPMM sets (column W_k in set k, duplicated per lane)
//   alpha stream   -> alpha_loader  (alpha_1 / alpha_2 chosen per node by its source flag)
//   three GCSR channel groups -> feature_loader (per-group buffers)
//     -> pe_schedule (binds each node row to a free SP-PE lane, tags it)
//     -> spmm (z = W h, one F_OUT vector per row and lane)
//     -> dmvm_array (e_i = alpha_1 . z_i for the source, e_j = alpha_2 . z_j for neighbours)
//     -> aggregator z_ij buffer (z and e per node, per subgraph slot)
//     -> af_unit (LeakyReLU(e_i + e_j), base-2 softmax -> alpha_ij)
//     -> aggregator (h_i' = act(sum_j alpha_ij z_j), reusing the buffered z_j)
//     -> h stream (to be written back to memory)
//
// Use: pulse start, stream the weights (column-major, in_dim rows per
// column) and the 2*F_OUT attention words; node rows are accepted once both
// are loaded. Feature channels may be fed at any time (their buffers hold
// back). One h vector leaves per subgraph, in subgraph order. The memory
// controller that moves these streams to and from HBM is outside this module.
module sh_gat_top
  import sh_gat_pkg::*;
#(
  parameter int unsigned F_OUT      = 16,    // hidden feature dimension
  parameter int unsigned LANES      = 3,     // channel groups = SP-PEs per set = DMVMs
  parameter int unsigned SM_LANES   = 2,     // softmax / aggregation lanes
  parameter int unsigned NSLOT      = 2,     // subgraphs held in the z_ij buffer
  parameter int unsigned MAX_SG     = 256,   // nodes per subgraph (source + neighbours)
  parameter int unsigned DEPTH      = 4096,  // weight column length (max input feature dimension)
  parameter int unsigned FIFO_DEPTH = 16,    // elements buffered per channel group
  localparam int unsigned SLOT_W    = (NSLOT > 1) ? $clog2(NSLOT) : 1,
  localparam int unsigned IDX_W     = $clog2(MAX_SG),
  localparam int unsigned TAG_W     = SLOT_W + IDX_W + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [$clog2(DEPTH):0]        in_dim,
  input  logic                          act_en,
  // weight stream
  input  logic                          w_valid,
  output logic                          w_ready,
  input  data_t                         w_data,
  // attention vector stream
  input  logic                          a_valid,
  output logic                          a_ready,
  input  data_t                         a_data,
  // feature channel groups: value channel and [node-info, col-index] channel
  input  logic  [LANES-1:0]             val_valid,
  output logic  [LANES-1:0]             val_ready,
  input  data_t [LANES-1:0]             val_data,
  input  logic  [LANES-1:0]             inf_valid,
  output logic  [LANES-1:0]             inf_ready,
  input  logic  [LANES-1:0][31:0]       inf_data,
  input  logic  [LANES-1:0]             inf_last,
  // updated features h(l+1)
  output logic                          h_valid,
  input  logic                          h_ready,
  output data_t [F_OUT-1:0]             h_data,
  // status
  output logic                          weights_loaded,
  output logic                          alpha_loaded,
  output logic                          stall_slot,
  output logic                          bind_fire,
  output logic [1:0]                    bind_lane
);

  // ---------------- loaders ----------------
  logic                     w_we;
  logic [$clog2(F_OUT)-1:0] w_col;
  logic [$clog2(DEPTH)-1:0] w_row;
  data_t                    w_wdata;

  weight_loader #(.F_OUT(F_OUT), .DEPTH(DEPTH)) u_wload (
    .clk(clk), .rst_n(rst_n), .start(start), .in_dim(in_dim),
    .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
    .w_we(w_we), .w_col(w_col), .w_row(w_row), .w_data(w_wdata),
    .loaded(weights_loaded)
  );

  logic  [LANES-1:0]            dm_src_flag;
  data_t [LANES-1:0][F_OUT-1:0] dm_alpha;

  alpha_loader #(.F_OUT(F_OUT), .LANES(LANES)) u_aload (
    .clk(clk), .rst_n(rst_n), .start(start),
    .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .src_flag(dm_src_flag), .alpha(dm_alpha), .loaded(alpha_loaded)
  );

  logic       [LANES-1:0] head_valid, pop;
  gcsr_elem_t [LANES-1:0] head;

  feature_loader #(.GROUPS(LANES), .FIFO_DEPTH(FIFO_DEPTH)) u_fload (
    .clk(clk), .rst_n(rst_n),
    .val_valid(val_valid), .val_ready(val_ready), .val_data(val_data),
    .inf_valid(inf_valid), .inf_ready(inf_ready), .inf_data(inf_data), .inf_last(inf_last),
    .head_valid(head_valid), .head(head), .pop(pop)
  );

  // ---------------- schedule ----------------
  logic  [LANES-1:0]             pe_valid, pe_first, pe_en;
  logic  [LANES-1:0][LEN_W-1:0]  pe_row_len;
  logic  [LANES-1:0][COL_W-1:0]  pe_col;
  data_t [LANES-1:0]             pe_value;
  logic  [LANES-1:0][TAG_W-1:0]  pe_tag;
  logic  [LANES-1:0]             sp_valid;
  data_t [LANES-1:0][F_OUT-1:0]  sp_z;
  logic  [LANES-1:0][TAG_W-1:0]  sp_tag;
  logic  [LANES-1:0][1:0]        sp_addr;
  logic  [NSLOT-1:0]             slot_release;
  logic                          close_valid;
  logic  [SLOT_W-1:0]            close_slot;
  logic  [IDX_W:0]               close_count;

  pe_schedule #(.GROUPS(LANES), .LANES(LANES), .NSLOT(NSLOT), .MAX_SG(MAX_SG)) u_sched (
    .clk(clk), .rst_n(rst_n), .run(weights_loaded && alpha_loaded),
    .head_valid(head_valid), .head(head), .pop(pop),
    .pe_valid(pe_valid), .pe_first(pe_first), .pe_row_len(pe_row_len), .pe_col(pe_col),
    .pe_value(pe_value), .pe_tag(pe_tag), .pe_en(pe_en),
    .done_valid(sp_valid), .done_addr(sp_addr),
    .slot_release(slot_release),
    .close_valid(close_valid), .close_slot(close_slot), .close_count(close_count),
    .stall_slot(stall_slot), .bind_fire(bind_fire), .bind_lane(bind_lane)
  );

  // ---------------- SPMM ----------------
  spmm #(.F_OUT(F_OUT), .LANES(LANES), .DEPTH(DEPTH), .TAG_W(TAG_W)) u_spmm (
    .clk(clk), .rst_n(rst_n), .lane_en(pe_en),
    .w_we(w_we), .w_col(w_col), .w_row(w_row), .w_data(w_wdata),
    .in_valid(pe_valid), .in_first(pe_first), .in_row_len(pe_row_len),
    .in_col(pe_col), .in_value(pe_value), .in_tag(pe_tag),
    .out_valid(sp_valid), .out_z(sp_z), .out_tag(sp_tag), .done_addr(sp_addr)
  );

  // ---------------- DMVM array ----------------
  logic  [LANES-1:0]             dm_valid;
  data_t [LANES-1:0]             dm_e;
  data_t [LANES-1:0][F_OUT-1:0]  dm_z;
  logic  [LANES-1:0][TAG_W-1:0]  dm_tag;

  dmvm_array #(.F_OUT(F_OUT), .LANES(LANES), .TAG_W(TAG_W)) u_dmvm (
    .clk(clk), .rst_n(rst_n),
    .in_valid(sp_valid), .in_z(sp_z), .in_tag(sp_tag),
    .src_flag(dm_src_flag), .alpha(dm_alpha),
    .out_valid(dm_valid), .out_e(dm_e), .out_z(dm_z), .out_tag(dm_tag)
  );

  // ---------------- AF and aggregator ----------------
  logic                        sc_valid, sc_ready, sc_last;
  data_t [SM_LANES-1:0]        sc_score;
  logic  [SM_LANES-1:0]        sc_mask;
  logic                        al_valid, al_ready, al_last;
  data_t [SM_LANES-1:0]        al_alpha;
  logic  [SM_LANES-1:0]        al_mask;

  aggregator #(.F_OUT(F_OUT), .LANES(LANES), .SM_LANES(SM_LANES), .NSLOT(NSLOT), .MAX_SG(MAX_SG)) u_agg (
    .clk(clk), .rst_n(rst_n), .act_en(act_en),
    .wr_valid(dm_valid), .wr_tag(dm_tag), .wr_e(dm_e), .wr_z(dm_z),
    .close_valid(close_valid), .close_slot(close_slot), .close_count(close_count),
    .slot_release(slot_release),
    .sc_valid(sc_valid), .sc_ready(sc_ready), .sc_score(sc_score), .sc_mask(sc_mask), .sc_last(sc_last),
    .al_valid(al_valid), .al_ready(al_ready), .al_alpha(al_alpha), .al_mask(al_mask), .al_last(al_last),
    .h_valid(h_valid), .h_ready(h_ready), .h_data(h_data)
  );

  af_unit #(.LANES(SM_LANES), .MAX_N(MAX_SG)) u_af (
    .clk(clk), .rst_n(rst_n),
    .in_valid(sc_valid), .in_ready(sc_ready), .in_score(sc_score), .in_mask(sc_mask), .in_last(sc_last),
    .out_valid(al_valid), .out_ready(al_ready), .out_alpha(al_alpha), .out_mask(al_mask), .out_last(al_last)
  );

endmodule
