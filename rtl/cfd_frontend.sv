// CFD front end: the hardware that control-flow decoupling adds to an
// out-of-order core, gathered behind one interface.
//
// A loop holding a hard-to-predict but separable branch is split in two: the
// first loop computes the branch predicates (or inner-loop trip counts) and
// pushes them into an architectural queue; the second loop pops them and
// branches on them. Because many pushes separate a push from its pop, the
// predicate is normally already in the queue when the pop is fetched, so the
// branch is resolved in the fetch stage without prediction. This module holds
//   * the branch queue (BQ, predicates, fetch stage),
//   * the trip-count queue and trip-count register (TQ/TCR, fetch stage),
//   * the value-queue renamer (VQ, rename stage),
//   * the Save_VQ / Restore_VQ cracker (decode stage),
// and joins them: one fetch stall covers both fetch-stage queues (a bundle
// stalled by one queue is held in the other), and the core's checkpoint and
// recovery broadcast reaches all three with a single checkpoint id. A late
// Push_BQ whose predicate disagrees with the speculative pop is reported on
// bq_misp with the checkpoint the core must roll back to; the core orders it
// against its other recoveries and answers on rc_*.
//
// Timing is that of the three queues: combinational outputs, state updated on
// the rising clock edge, recovery overriding other inputs in its cycle. The
// checkpoint snapshot of each queue is supplied by the core from the queue's
// *_next output, carried with the checkpointed instruction. The BQ's context
// image port (Save_BQ / Restore_BQ) is brought out for the core's load/store
// path, to be used with the pipeline drained. Save_VQ / Restore_VQ are cracked
// at decode by vq_ctx_cracker into length load/store and (Pop_VQ, store) or
// (load, Push_VQ) micro-operations, which the core renames through the VQ
// ports like any other Pop_VQ / Push_VQ.
//
// The structures and their sizes follow the document (BQ 128 entries, VQ
// renamer 128 x 8 bits, TQ 256 x 4-bit trip counts, 8 checkpoints, 4-wide
// fetch and rename); the shared stall and the port grouping are this design's.
// The branch predictor, BTB, freelist, rename map table, reorder buffer and
// checkpoint allocation belong to the host core and connect through the ports.
module cfd_frontend
  import cfd_pkg::*;
#(
  parameter int unsigned BQ_SIZE  = 128,
  parameter int unsigned TQ_SIZE  = 256,
  parameter int unsigned TQ_N     = 4,
  parameter int unsigned VQ_SIZE  = 128,
  parameter int unsigned PREG_W   = 8,
  parameter int unsigned N_CKPT   = NUM_CKPT,
  parameter int unsigned WIDTH    = 4,
  parameter int unsigned VAL_W    = 32,
  parameter bit          TQ_OVERFLOW = 1'b0,
  parameter int unsigned ADDR_W   = 64,
  parameter int unsigned VAL_BYTES = 4
) (
  input  logic clk,
  input  logic rst_n,

  // ---------------- fetch bundle ----------------
  input  logic [$clog2(WIDTH+1)-1:0]   f_bq_push_cnt,
  input  logic [$clog2(WIDTH+1)-1:0]   f_bq_pop_cnt,
  input  logic [WIDTH-1:0]             f_bp_pred,
  input  logic                         f_mark,
  input  logic                         f_forward,
  input  logic                         f_tq_push,
  input  logic                         f_tq_pop,
  input  logic                         f_tq_bot,
  input  logic                         f_hold,          // held for other reasons (I-cache, ...)
  output logic                         f_stall,         // bundle not accepted by the CFD queues
  output logic [$clog2(BQ_SIZE)-1:0]   f_bq_push_idx [WIDTH],
  output logic [$clog2(BQ_SIZE)-1:0]   f_bq_pop_idx  [WIDTH],
  output logic [WIDTH-1:0]             f_bq_pop_pred,
  output logic [WIDTH-1:0]             f_bq_pop_hit,
  output logic [$clog2(TQ_SIZE)-1:0]   f_tq_push_idx,
  output logic                         f_tq_pop_ovf,
  output logic                         f_tq_bot_taken,
  output logic [TQ_N-1:0]              tcr,
  output logic [3*($clog2(BQ_SIZE)+1)-1:0]      f_bq_next,
  output logic [2*($clog2(TQ_SIZE)+1)+TQ_N-1:0] f_tq_next,

  // ---------------- rename bundle ----------------
  input  vq_op_e                       r_vq_op   [WIDTH],
  input  logic [PREG_W-1:0]            r_vq_push_preg [WIDTH],
  output logic [PREG_W-1:0]            r_vq_pop_preg  [WIDTH],
  output logic                         r_vq_stall,
  output logic [2*($clog2(VQ_SIZE)+1)-1:0] r_vq_next,
  input  logic                         r_bq_ckpt_we,    // speculative pop's checkpoint id
  input  logic [$clog2(BQ_SIZE)-1:0]   r_bq_ckpt_idx,
  input  logic [$clog2(N_CKPT)-1:0]    r_bq_ckpt_id,

  // ---------------- checkpoints ----------------
  input  logic                         ck_we,
  input  logic [$clog2(N_CKPT)-1:0]    ck_id,
  input  logic [3*($clog2(BQ_SIZE)+1)-1:0]      ck_bq,
  input  logic [2*($clog2(TQ_SIZE)+1)+TQ_N-1:0] ck_tq,
  input  logic [2*($clog2(VQ_SIZE)+1)-1:0]      ck_vq,

  // ---------------- execute ----------------
  input  logic                         x_bq_push_valid,
  input  logic [$clog2(BQ_SIZE)-1:0]   x_bq_push_idx,
  input  logic                         x_bq_push_pred,
  output logic                         bq_late,
  output logic                         bq_misp,
  output logic [$clog2(N_CKPT)-1:0]    bq_misp_ckpt,
  input  logic                         x_tq_push_valid,
  input  logic [$clog2(TQ_SIZE)-1:0]   x_tq_push_idx,
  input  logic [VAL_W-1:0]             x_tq_push_val,

  // ---------------- retire ----------------
  input  logic [$clog2(WIDTH+1)-1:0]   rt_bq_push_cnt,
  input  logic [$clog2(WIDTH+1)-1:0]   rt_bq_pop_cnt,
  input  logic                         rt_mark,
  input  logic                         rt_forward,
  input  logic                         rt_tq_push,
  input  logic                         rt_tq_pop,
  input  logic                         rt_tq_bot,
  input  logic [$clog2(WIDTH+1)-1:0]   rt_vq_push_cnt,
  input  logic [$clog2(WIDTH+1)-1:0]   rt_vq_pop_cnt,
  output logic [WIDTH-1:0]             rt_free_valid,
  output logic [PREG_W-1:0]            rt_free_preg [WIDTH],
  output logic [TQ_N-1:0]              com_tcr,

  // ---------------- recovery ----------------
  input  logic                         rc_valid,
  input  recover_kind_e                rc_kind,
  input  logic [$clog2(N_CKPT)-1:0]    rc_ckpt_id,

  // ---------------- context switch: Save_BQ / Restore_BQ image ----------------
  input  logic [$clog2(BQ_SIZE/8+1)-1:0] bq_cx_rd_idx,
  output logic [7:0]                     bq_cx_rd_byte,
  input  logic                           bq_cx_wr_valid,
  input  logic [$clog2(BQ_SIZE/8+1)-1:0] bq_cx_wr_idx,
  input  logic [7:0]                     bq_cx_wr_byte,

  // ---------------- context switch: Save_VQ / Restore_VQ cracking ----------------
  input  logic                           cx_vq_save,
  input  logic                           cx_vq_restore,
  input  logic [ADDR_W-1:0]              cx_vq_base,
  output logic                           cx_vq_busy,      // decode stalls while high
  output logic                           cx_vq_u_valid,
  output cx_uop_e                        cx_vq_u_kind,
  output logic [ADDR_W-1:0]              cx_vq_u_addr,
  output logic [$clog2(VQ_SIZE+1)-1:0]   cx_vq_u_len,
  input  logic                           cx_vq_u_ready,
  input  logic                           cx_vq_ld_len_valid,
  input  logic [$clog2(VQ_SIZE+1)-1:0]   cx_vq_ld_len,

  // ---------------- architectural length registers ----------------
  output logic [$clog2(BQ_SIZE+1)-1:0] bq_length,
  output logic [$clog2(TQ_SIZE+1)-1:0] tq_length,
  output logic [$clog2(VQ_SIZE+1)-1:0] vq_length
);

  logic bq_stall, tq_stall;
  logic [$clog2(BQ_SIZE+1)-1:0] bq_net, bq_pend;
  logic [$clog2(TQ_SIZE+1)-1:0] tq_net, tq_pend;

  // a bundle is accepted only if every fetch-stage queue accepts it
  assign f_stall = bq_stall || tq_stall;

  branch_queue #(
    .SIZE(BQ_SIZE), .N_CKPT(N_CKPT), .FETCH_W(WIDTH)
  ) u_bq (
    .clk, .rst_n,
    .f_push_cnt (f_bq_push_cnt), .f_pop_cnt(f_bq_pop_cnt), .f_bp_pred,
    .f_mark, .f_forward, .f_hold(f_hold || tq_stall),
    .f_stall    (bq_stall),
    .f_push_idx (f_bq_push_idx), .f_pop_idx(f_bq_pop_idx),
    .f_pop_pred (f_bq_pop_pred), .f_pop_hit(f_bq_pop_hit),
    .f_ptrs_next(f_bq_next),
    .r_ckpt_we  (r_bq_ckpt_we), .r_ckpt_idx(r_bq_ckpt_idx), .r_ckpt_id(r_bq_ckpt_id),
    .ck_we, .ck_id, .ck_ptrs(ck_bq),
    .x_push_valid(x_bq_push_valid), .x_push_idx(x_bq_push_idx), .x_push_pred(x_bq_push_pred),
    .x_late     (bq_late), .x_misp(bq_misp), .x_misp_ckpt(bq_misp_ckpt),
    .rt_push_cnt(rt_bq_push_cnt), .rt_pop_cnt(rt_bq_pop_cnt), .rt_mark, .rt_forward,
    .rc_valid, .rc_kind, .rc_ckpt_id,
    .cx_rd_idx  (bq_cx_rd_idx), .cx_rd_byte(bq_cx_rd_byte),
    .cx_wr_valid(bq_cx_wr_valid), .cx_wr_idx(bq_cx_wr_idx), .cx_wr_byte(bq_cx_wr_byte),
    .length     (bq_length), .net_push_ctr(bq_net), .pending_push_ctr(bq_pend)
  );

  trip_count_queue #(
    .SIZE(TQ_SIZE), .N(TQ_N), .N_CKPT(N_CKPT), .VAL_W(VAL_W), .OVERFLOW(TQ_OVERFLOW)
  ) u_tq (
    .clk, .rst_n,
    .f_push(f_tq_push), .f_pop(f_tq_pop), .f_bot(f_tq_bot),
    .f_hold(f_hold || bq_stall),
    .f_stall    (tq_stall),
    .f_push_idx (f_tq_push_idx), .f_pop_ovf(f_tq_pop_ovf), .f_bot_taken(f_tq_bot_taken),
    .tcr, .f_state_next(f_tq_next),
    .ck_we, .ck_id, .ck_state(ck_tq),
    .x_push_valid(x_tq_push_valid), .x_push_idx(x_tq_push_idx), .x_push_val(x_tq_push_val),
    .rt_push(rt_tq_push), .rt_pop(rt_tq_pop), .rt_bot(rt_tq_bot), .com_tcr,
    .rc_valid, .rc_kind, .rc_ckpt_id,
    .length     (tq_length), .net_push_ctr(tq_net), .pending_push_ctr(tq_pend)
  );

  vq_renamer #(
    .SIZE(VQ_SIZE), .PREG_W(PREG_W), .N_CKPT(N_CKPT), .RENAME_W(WIDTH)
  ) u_vq (
    .clk, .rst_n,
    .r_op(r_vq_op), .r_push_preg(r_vq_push_preg), .r_pop_preg(r_vq_pop_preg),
    .r_stall(r_vq_stall), .r_ptrs_next(r_vq_next),
    .ck_we, .ck_id, .ck_ptrs(ck_vq),
    .rt_push_cnt(rt_vq_push_cnt), .rt_pop_cnt(rt_vq_pop_cnt),
    .rt_free_valid, .rt_free_preg,
    .rc_valid, .rc_kind, .rc_ckpt_id,
    .length(vq_length)
  );

  vq_ctx_cracker #(
    .VQ_SIZE(VQ_SIZE), .ADDR_W(ADDR_W), .VAL_BYTES(VAL_BYTES)
  ) u_vq_cx (
    .clk, .rst_n,
    .d_save(cx_vq_save), .d_restore(cx_vq_restore), .d_base(cx_vq_base),
    .vq_length, .busy(cx_vq_busy),
    .u_valid(cx_vq_u_valid), .u_kind(cx_vq_u_kind), .u_addr(cx_vq_u_addr), .u_len(cx_vq_u_len),
    .u_ready(cx_vq_u_ready), .ld_len_valid(cx_vq_ld_len_valid), .ld_len(cx_vq_ld_len)
  );

  // the length registers are the sum of the two counters of each queue
  a_bq_len: assert property (@(posedge clk) disable iff (!rst_n)
      int'(bq_length) == int'(bq_net) + int'(bq_pend));
  a_tq_len: assert property (@(posedge clk) disable iff (!rst_n)
      int'(tq_length) == int'(tq_net) + int'(tq_pend));

endmodule
