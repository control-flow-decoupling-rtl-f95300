// Branch queue (BQ): the fetch-unit queue that carries branch predicates from
// Push_BQ instructions to Branch_on_BQ instructions.
//
// How it works. The BQ is a circular buffer with post-incremented head and
// tail pointers. Each entry holds the architectural predicate bit plus three
// microarchitectural fields: a pushed bit, a popped bit and the id of the
// checkpoint taken for a speculative pop (1+1+1+log2(checkpoints) = 6 bits at
// 8 checkpoints, so 128 entries are 96 bytes).
//   * Fetch: each Push_BQ in the bundle is given the entry at the tail, whose
//     pushed and popped bits are cleared. Each Branch_on_BQ in the bundle reads
//     the entry at the head (consecutive entries from the head, read in
//     parallel with the BTB). If the pushed bit is set the pop is a BQ hit and
//     uses the pushed predicate. Otherwise it is a BQ miss: it uses the branch
//     predictor's direction, writes that prediction into the entry and sets the
//     popped bit (speculative pop).
//   * Rename: a speculative pop records the id of its checkpoint in its entry.
//   * Execute: a push reads its entry. If the popped bit is set (late push) it
//     compares its predicate with the predicted one and, on a mismatch, asks
//     for recovery to the recorded checkpoint. It then writes the predicate and
//     sets the pushed bit.
//   * Length = net_push_ctr (retired pushes minus retired pops, less
//     bulk-popped entries) + pending_push_ctr (fetched, unretired pushes).
//     A bundle whose pushes would take the length past SIZE stalls.
//   * Mark copies the tail into the mark pointer; Forward moves the head to the
//     mark (bulk pop). The retired Forward decrements the length by the number
//     of entries it skipped.
//   * Recovery restores head, tail and mark from a checkpoint snapshot or from
//     the committed copies, clears the popped bits between the restored head
//     and tail, and takes the squashed pushes out of pending_push_ctr.
//   * Context switch (Save_BQ / Restore_BQ): the BQ state is a memory image
//     of 1 + SIZE/8 bytes (17 at 128 entries): the length, then the predicates
//     from head to tail, 8 per byte, first predicate in bit 0. The core's
//     load/store path moves the bytes; the BQ offers a combinational read port
//     over the image and a write port. Writing byte 0 (the length) puts head
//     at entry 0 and tail at entry length, makes the length fully retired
//     (net = length, pending = 0) and clears the popped bits; the predicate
//     bytes refill entries 0 .. length-1 and set their pushed bits. Both run
//     with no BQ instruction in flight (assertion).
//
// Interface and timing. All state changes on the rising clock edge; all
// outputs of the fetch and execute ports are combinational from the current
// state and that cycle's inputs. In one cycle and one port group the
// operations take effect in the order pushes, pops, Mark, Forward, so a Mark
// or Forward must be the last BQ operation of its fetch (and retire) bundle,
// with a Mark before a Forward. A stalled fetch bundle changes nothing and
// must be presented again; f_hold holds a bundle for a reason outside the
// BQ (f_stall does not depend on it). A recovery request overrides every other input in
// its cycle. The checkpoint snapshot is supplied by the core (the pointers it
// carried with the checkpointed instruction, taken from f_ptrs_next).
// The checkpoint id of a speculative pop must be written (r_ckpt_we) no later
// than the cycle in which its push executes: a write in that same cycle is
// bypassed to x_misp_ckpt, a later one would leave the push comparing against
// a stale id. A core whose rename stage can trail the push's execution must
// write the id from fetch.
//
// Document versus own choices. Entry fields, the circular buffer, the early and
// late push protocol, speculation on a BQ miss, the two length counters, the
// stall rule, Mark/Forward and the recovery steps follow the document. The
// pointers carry one wrap bit beyond log2(SIZE) so that a full queue and an
// empty one differ; the port shapes, the in-cycle order, the bypass of a push
// executing in the same cycle as its pop is fetched and the reset state are
// this design's choices, as is the bit order of the context image and the
// mark pointer left equal to the tail after a restore.
module branch_queue
  import cfd_pkg::*;
#(
  parameter int unsigned SIZE    = 128,
  parameter int unsigned N_CKPT  = NUM_CKPT,
  parameter int unsigned FETCH_W = 4
) (
  input  logic clk,
  input  logic rst_n,

  // ---- fetch: one bundle per cycle ----
  input  logic [$clog2(FETCH_W+1)-1:0] f_push_cnt,   // Push_BQ in the bundle
  input  logic [$clog2(FETCH_W+1)-1:0] f_pop_cnt,    // Branch_on_BQ in the bundle
  input  logic [FETCH_W-1:0]           f_bp_pred,    // predictor direction per pop
  input  logic                         f_mark,       // Mark in the bundle
  input  logic                         f_forward,    // Forward in the bundle
  input  logic                         f_hold,       // bundle held elsewhere in fetch
  output logic                         f_stall,      // bundle not accepted
  output logic [$clog2(SIZE)-1:0]      f_push_idx [FETCH_W],  // entry of k-th push
  output logic [$clog2(SIZE)-1:0]      f_pop_idx  [FETCH_W],  // entry of k-th pop
  output logic [FETCH_W-1:0]           f_pop_pred,   // direction of k-th pop
  output logic [FETCH_W-1:0]           f_pop_hit,    // 1: pushed predicate, 0: predicted
  output logic [3*($clog2(SIZE)+1)-1:0] f_ptrs_next, // {head,tail,mark} after bundle

  // ---- rename: speculative pop records its checkpoint id ----
  input  logic                         r_ckpt_we,
  input  logic [$clog2(SIZE)-1:0]      r_ckpt_idx,
  input  logic [$clog2(N_CKPT)-1:0]    r_ckpt_id,

  // ---- checkpoint snapshot of {head,tail,mark} ----
  input  logic                         ck_we,
  input  logic [$clog2(N_CKPT)-1:0]    ck_id,
  input  logic [3*($clog2(SIZE)+1)-1:0] ck_ptrs,

  // ---- execute: one Push_BQ per cycle ----
  input  logic                         x_push_valid,
  input  logic [$clog2(SIZE)-1:0]      x_push_idx,
  input  logic                         x_push_pred,
  output logic                         x_late,       // push found its pop already fetched
  output logic                         x_misp,       // late push disagrees with prediction
  output logic [$clog2(N_CKPT)-1:0]    x_misp_ckpt,  // checkpoint to recover to

  // ---- retire ----
  input  logic [$clog2(FETCH_W+1)-1:0] rt_push_cnt,
  input  logic [$clog2(FETCH_W+1)-1:0] rt_pop_cnt,
  input  logic                         rt_mark,
  input  logic                         rt_forward,

  // ---- recovery ----
  input  logic                         rc_valid,
  input  recover_kind_e                rc_kind,
  input  logic [$clog2(N_CKPT)-1:0]    rc_ckpt_id,

  // ---- context switch: Save_BQ / Restore_BQ image, pipeline drained ----
  input  logic [$clog2(SIZE/8+1)-1:0]  cx_rd_idx,    // image byte to read (save)
  output logic [7:0]                   cx_rd_byte,
  input  logic                         cx_wr_valid,  // write one image byte (restore)
  input  logic [$clog2(SIZE/8+1)-1:0]  cx_wr_idx,
  input  logic [7:0]                   cx_wr_byte,

  // ---- status ----
  output logic [$clog2(SIZE+1)-1:0]    length,
  output logic [$clog2(SIZE+1)-1:0]    net_push_ctr,
  output logic [$clog2(SIZE+1)-1:0]    pending_push_ctr
);

  localparam int unsigned IDX_W  = $clog2(SIZE);
  localparam int unsigned PTR_W  = IDX_W + 1;
  localparam int unsigned CNT_W  = $clog2(SIZE + 1);
  localparam int unsigned CK_W   = $clog2(N_CKPT);
  localparam int unsigned FCNT_W = $clog2(FETCH_W + 1);

  typedef logic [PTR_W-1:0] ptr_t;
  typedef struct packed {
    ptr_t head;
    ptr_t tail;
    ptr_t mark;
  } bq_ptrs_t;

  // ---- state ----
  logic [SIZE-1:0]  pred_q, pushed_q, popped_q;
  logic [CK_W-1:0]  ckpt_q [SIZE];
  bq_ptrs_t         cur_q, com_q;         // speculative (fetch) and committed pointers
  bq_ptrs_t         snap_q [N_CKPT];      // per-checkpoint snapshots
  logic [CNT_W-1:0] net_q, pend_q;

  // An entry index is a pointer without its wrap bit: IDX_W'(pointer).

  // ---- fetch side ----
  ptr_t       occ;          // entries between head and tail before this bundle
  bq_ptrs_t   f_next;
  logic [CNT_W:0] room;

  assign length = CNT_W'(net_q + pend_q);
  assign room   = (CNT_W+1)'(SIZE) - (CNT_W+1)'(length);
  assign f_stall = ({{(CNT_W+1-FCNT_W){1'b0}}, f_push_cnt} > room);
  assign occ = cur_q.tail - cur_q.head;

  always_comb begin
    for (int k = 0; k < FETCH_W; k++) begin
      logic [IDX_W-1:0] p;
      logic [IDX_W-1:0] q;
      p = IDX_W'(cur_q.tail) + IDX_W'(k);
      q = IDX_W'(cur_q.head) + IDX_W'(k);
      f_push_idx[k] = p;
      f_pop_idx[k]  = q;
      if (x_push_valid && x_push_idx == q && ptr_t'(k) < occ) begin
        // the push executes in this very cycle: use its predicate directly
        f_pop_hit[k]  = 1'b1;
        f_pop_pred[k] = x_push_pred;
      end else if (ptr_t'(k) < occ && pushed_q[q]) begin
        f_pop_hit[k]  = 1'b1;
        f_pop_pred[k] = pred_q[q];
      end else begin
        f_pop_hit[k]  = 1'b0;
        f_pop_pred[k] = f_bp_pred[k];
      end
    end
    f_next      = cur_q;
    f_next.tail = cur_q.tail + ptr_t'(f_push_cnt);
    f_next.head = cur_q.head + ptr_t'(f_pop_cnt);
    if (f_mark)    f_next.mark = f_next.tail;
    if (f_forward) f_next.head = f_next.mark;
  end
  assign f_ptrs_next = f_next;

  // ---- execute side ----
  assign x_late      = x_push_valid && popped_q[x_push_idx];
  assign x_misp      = x_late && (pred_q[x_push_idx] != x_push_pred);
  assign x_misp_ckpt = (r_ckpt_we && r_ckpt_idx == x_push_idx) ? r_ckpt_id
                                                               : ckpt_q[x_push_idx];

  // ---- retire side: committed pointers and bulk-pop count ----
  bq_ptrs_t       c_next;
  ptr_t           fwd_skip;
  always_comb begin
    c_next      = com_q;
    c_next.tail = com_q.tail + ptr_t'(rt_push_cnt);
    c_next.head = com_q.head + ptr_t'(rt_pop_cnt);
    if (rt_mark) c_next.mark = c_next.tail;
    fwd_skip = '0;
    if (rt_forward) begin
      fwd_skip    = c_next.mark - c_next.head;
      c_next.head = c_next.mark;
    end
  end

  // ---- recovery target ----
  bq_ptrs_t rc_ptrs;
  ptr_t     squashed;
  assign rc_ptrs  = (rc_kind == RC_COMMITTED) ? c_next : snap_q[rc_ckpt_id];
  assign squashed = cur_q.tail - rc_ptrs.tail;

  // ---- context image: byte 0 is the length, byte b >= 1 holds the
  // predicates 8(b-1) .. 8(b-1)+7 counted from the head, bit 0 first ----
  always_comb begin
    ptr_t j;
    j = '0;
    cx_rd_byte = '0;
    if (cx_rd_idx == '0) begin
      cx_rd_byte = 8'(length);
    end else begin
      for (int i = 0; i < 8; i++) begin
        j = ptr_t'((int'(cx_rd_idx) - 1) * 8 + i);
        if (j < ptr_t'(length)) cx_rd_byte[i] = pred_q[IDX_W'(cur_q.head + j)];
      end
    end
  end
  // a restored queue occupies entries 0 .. length-1, all pushed and retired
  bq_ptrs_t cx_ptrs;
  assign cx_ptrs = '{head: '0, tail: ptr_t'(cx_wr_byte), mark: ptr_t'(cx_wr_byte)};

  logic f_go;
  assign f_go = !f_stall && !f_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q    <= '0;
      com_q    <= '0;
      net_q    <= '0;
      pend_q   <= '0;
      pred_q   <= '0;
      pushed_q <= '0;
      popped_q <= '0;
      for (int i = 0; i < SIZE; i++)   ckpt_q[i] <= '0;
      for (int i = 0; i < N_CKPT; i++) snap_q[i] <= '0;
    end else begin
      if (ck_we) snap_q[ck_id] <= bq_ptrs_t'(ck_ptrs);
      if (rc_valid) begin
        cur_q  <= rc_ptrs;
        pend_q <= pend_q - CNT_W'(squashed) - CNT_W'(rt_push_cnt);
        for (int i = 0; i < SIZE; i++) begin
          if (ptr_t'(IDX_W'(i) - IDX_W'(rc_ptrs.head)) < ptr_t'(rc_ptrs.tail - rc_ptrs.head))
            popped_q[i] <= 1'b0;
        end
        // committed state moves on with retirement in the same cycle
        com_q <= c_next;
        net_q <= net_q + CNT_W'(rt_push_cnt) - CNT_W'(rt_pop_cnt) - CNT_W'(fwd_skip);
      end else if (cx_wr_valid) begin
        // Restore_BQ: the length byte resets the pointers and counters, the
        // other bytes fill entries from index 0
        if (cx_wr_idx == '0) begin
          cur_q    <= cx_ptrs;
          com_q    <= cx_ptrs;
          net_q    <= CNT_W'(cx_wr_byte);
          pend_q   <= '0;
          popped_q <= '0;
        end else begin
          for (int i = 0; i < 8; i++) begin
            logic [IDX_W-1:0] e;
            e = IDX_W'((int'(cx_wr_idx) - 1) * 8 + i);
            pred_q[e]   <= cx_wr_byte[i];
            pushed_q[e] <= 1'b1;
          end
        end
      end else begin
        // fetch
        if (f_go) begin
          cur_q <= f_next;
          for (int k = 0; k < FETCH_W; k++) begin
            if (k < int'(f_push_cnt)) begin
              pushed_q[f_push_idx[k]] <= 1'b0;
              popped_q[f_push_idx[k]] <= 1'b0;
            end
          end
          for (int k = 0; k < FETCH_W; k++) begin
            if (k < int'(f_pop_cnt) && !f_pop_hit[k]) begin
              pred_q[f_pop_idx[k]]   <= f_bp_pred[k];
              popped_q[f_pop_idx[k]] <= 1'b1;
            end
          end
        end
        // rename
        if (r_ckpt_we) ckpt_q[r_ckpt_idx] <= r_ckpt_id;
        // execute (a pop bypassed from this push does not write the entry)
        if (x_push_valid) begin
          pred_q[x_push_idx]   <= x_push_pred;
          pushed_q[x_push_idx] <= 1'b1;
        end
        // retire and counters
        com_q  <= c_next;
        net_q  <= net_q + CNT_W'(rt_push_cnt) - CNT_W'(rt_pop_cnt) - CNT_W'(fwd_skip);
        pend_q <= pend_q + (f_go ? CNT_W'(f_push_cnt) : '0) - CNT_W'(rt_push_cnt);
      end
    end
  end

  assign net_push_ctr     = net_q;
  assign pending_push_ctr = pend_q;

  // ---- rules of the ISA and of this interface ----
  initial begin
    assert (SIZE == (1 << IDX_W)) else $error("branch_queue: SIZE must be a power of two");
    assert (SIZE >= 8 && SIZE < 256) else $error("branch_queue: the context image needs 8 <= SIZE < 256");
  end
  // Save_BQ / Restore_BQ run with no BQ instruction in flight
  a_cx_drained: assert property (@(posedge clk) disable iff (!rst_n)
      cx_wr_valid |-> (pend_q == '0 && f_push_cnt == '0 && f_pop_cnt == '0 && !x_push_valid));
  a_cx_len: assert property (@(posedge clk) disable iff (!rst_n)
      (cx_wr_valid && cx_wr_idx == '0) |-> (cx_wr_byte <= 8'(SIZE)));
  a_len_bound: assert property (@(posedge clk) disable iff (!rst_n) length <= CNT_W'(SIZE));
  a_push_exec_valid: assert property (@(posedge clk) disable iff (!rst_n)
      x_push_valid |-> !pushed_q[x_push_idx]);

endmodule
