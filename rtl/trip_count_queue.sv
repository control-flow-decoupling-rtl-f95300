// Trip-count queue (TQ) and trip-count register (TCR): fetch-unit support for
// separable loop-branches.
//
// How it works. A first loop pushes the trip count of each instance of an
// inner loop (Push_TQ); a second loop pops it into the TCR (Pop_TQ) and closes
// the inner loop with Branch_on_TCR, which continues the loop and decrements
// the TCR while the TCR is non-zero and exits when it is zero. A trip count t
// therefore gives t "continue" outcomes followed by one "exit".
//   * The TQ is a circular buffer. Each entry holds an N-bit trip count and a
//     pushed bit (N+1 = 5 bits at N = 4, so 256 entries are 160 bytes). With
//     OVERFLOW = 1 each entry also holds the overflow bit of the extended ISA.
//   * Fetch: Push_TQ is given the tail entry, whose pushed bit is cleared.
//     Pop_TQ reads the head entry: if it has been pushed, its trip count is
//     loaded into the TCR; otherwise (TQ miss) the fetch bundle stalls until
//     the push executes. There is no speculation on a TQ miss. Branch_on_TCR
//     reads and updates the TCR in fetch.
//   * Execute: Push_TQ writes its trip count and sets the pushed bit. With
//     OVERFLOW = 1 a value not below 2^N is not written; the overflow bit is set
//     instead and Pop_TQ_and_Branch_on_Overflow reports it (f_pop_ovf).
//   * Length = net_push_ctr + pending_push_ctr, as for the branch queue; a
//     Push_TQ fetched while the length equals SIZE stalls.
//   * Checkpoints snapshot head, tail and TCR; committed copies of head, tail
//     and TCR follow retirement. Recovery restores one of them and takes the
//     squashed pushes out of pending_push_ctr.
//
// Interface and timing. One Push_TQ, one Pop_TQ and one Branch_on_TCR may be
// fetched per cycle; a Pop_TQ and a Branch_on_TCR of the same bundle act in
// that order (the branch sees the freshly loaded TCR). A Push_TQ and a Pop_TQ
// must not share a bundle (assertion), so that a stalled pop never holds back
// the push it waits for. Outputs are combinational from state and inputs;
// state changes on the rising edge; a recovery overrides the other inputs of
// its cycle; f_hold holds a bundle for a reason outside the TQ (f_stall does
// not depend on it). The checkpoint snapshot is supplied by the core from
// f_state_next, as for the branch queue.
//
// Document versus own choices. Entry fields, N = 4, the TCR semantics, the
// stall on a TQ miss, length tracking, checkpoint and committed TCR copies and
// the overflow extension follow the document. Pointers carry one wrap bit
// beyond log2(SIZE); the width of the pushed value, the one-op-per-kind fetch
// port, the push/pop bundle rule and the reset state are this design's.
module trip_count_queue
  import cfd_pkg::*;
#(
  parameter int unsigned SIZE     = 256,
  parameter int unsigned N        = 4,
  parameter int unsigned N_CKPT   = NUM_CKPT,
  parameter int unsigned VAL_W    = 32,
  parameter bit          OVERFLOW = 1'b0
) (
  input  logic clk,
  input  logic rst_n,

  // ---- fetch ----
  input  logic                      f_push,        // Push_TQ in the bundle
  input  logic                      f_pop,         // Pop_TQ in the bundle
  input  logic                      f_bot,         // Branch_on_TCR in the bundle
  input  logic                      f_hold,        // bundle held elsewhere in fetch
  output logic                      f_stall,       // full on push or TQ miss on pop
  output logic [$clog2(SIZE)-1:0]   f_push_idx,    // entry given to the push
  output logic                      f_pop_ovf,     // popped entry had overflowed
  output logic                      f_bot_taken,   // 1: continue loop, 0: exit
  output logic [N-1:0]              tcr,           // current TCR
  output logic [2*($clog2(SIZE)+1)+N-1:0] f_state_next,  // {head,tail,tcr} after bundle

  // ---- checkpoint snapshot ----
  input  logic                      ck_we,
  input  logic [$clog2(N_CKPT)-1:0] ck_id,
  input  logic [2*($clog2(SIZE)+1)+N-1:0] ck_state,

  // ---- execute ----
  input  logic                      x_push_valid,
  input  logic [$clog2(SIZE)-1:0]   x_push_idx,
  input  logic [VAL_W-1:0]          x_push_val,

  // ---- retire ----
  input  logic                      rt_push,
  input  logic                      rt_pop,
  input  logic                      rt_bot,
  output logic [N-1:0]              com_tcr,       // committed TCR

  // ---- recovery ----
  input  logic                      rc_valid,
  input  recover_kind_e             rc_kind,
  input  logic [$clog2(N_CKPT)-1:0] rc_ckpt_id,

  // ---- status ----
  output logic [$clog2(SIZE+1)-1:0] length,
  output logic [$clog2(SIZE+1)-1:0] net_push_ctr,
  output logic [$clog2(SIZE+1)-1:0] pending_push_ctr
);

  localparam int unsigned IDX_W = $clog2(SIZE);
  localparam int unsigned PTR_W = IDX_W + 1;
  localparam int unsigned CNT_W = $clog2(SIZE + 1);

  typedef logic [PTR_W-1:0] ptr_t;
  typedef struct packed {
    ptr_t         head;
    ptr_t         tail;
    logic [N-1:0] tcr;
  } tq_state_t;

  logic [N-1:0]     cnt_q [SIZE];
  logic [SIZE-1:0]  pushed_q, ovf_q;
  tq_state_t        cur_q, com_q;
  tq_state_t        snap_q [N_CKPT];
  logic [CNT_W-1:0] net_q, pend_q;

  // ---- fetch ----
  logic      head_ready;
  logic      full_stall, miss_stall;
  tq_state_t f_next;
  logic [N-1:0] tcr_for_bot;

  assign length     = CNT_W'(net_q + pend_q);
  assign f_push_idx = cur_q.tail[IDX_W-1:0];
  assign head_ready = (cur_q.head != cur_q.tail) && pushed_q[cur_q.head[IDX_W-1:0]];
  assign full_stall = f_push && (length == CNT_W'(SIZE));
  assign miss_stall = f_pop && !head_ready;
  assign f_stall    = full_stall || miss_stall;
  assign f_pop_ovf  = f_pop && head_ready && ovf_q[cur_q.head[IDX_W-1:0]];

  always_comb begin
    f_next = cur_q;
    if (f_push) f_next.tail = cur_q.tail + 1'b1;
    if (f_pop) begin
      f_next.head = cur_q.head + 1'b1;
      f_next.tcr  = cnt_q[cur_q.head[IDX_W-1:0]];
    end
    tcr_for_bot = f_next.tcr;
    f_bot_taken = (tcr_for_bot != '0);
    if (f_bot && f_bot_taken) f_next.tcr = tcr_for_bot - 1'b1;
  end
  assign f_state_next = f_next;
  assign tcr          = cur_q.tcr;

  // ---- retire: committed copies ----
  tq_state_t c_next;
  always_comb begin
    c_next = com_q;
    if (rt_push) c_next.tail = com_q.tail + 1'b1;
    if (rt_pop) begin
      c_next.head = com_q.head + 1'b1;
      c_next.tcr  = cnt_q[com_q.head[IDX_W-1:0]];
    end
    if (rt_bot && c_next.tcr != '0) c_next.tcr = c_next.tcr - 1'b1;
  end
  assign com_tcr = com_q.tcr;

  // ---- recovery ----
  tq_state_t rc_state;
  ptr_t      squashed;
  assign rc_state = (rc_kind == RC_COMMITTED) ? c_next : snap_q[rc_ckpt_id];
  assign squashed = cur_q.tail - rc_state.tail;

  // ---- execute: trip count or overflow ----
  logic         x_ovf;
  logic [N-1:0] x_cnt;
  assign x_ovf = OVERFLOW && (x_push_val >= VAL_W'(1 << N));
  assign x_cnt = x_ovf ? '0 : x_push_val[N-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q    <= '0;
      com_q    <= '0;
      net_q    <= '0;
      pend_q   <= '0;
      pushed_q <= '0;
      ovf_q    <= '0;
      for (int i = 0; i < SIZE; i++)   cnt_q[i]  <= '0;
      for (int i = 0; i < N_CKPT; i++) snap_q[i] <= '0;
    end else begin
      if (ck_we) snap_q[ck_id] <= tq_state_t'(ck_state);
      com_q <= c_next;
      net_q <= net_q + CNT_W'(rt_push) - CNT_W'(rt_pop);
      if (rc_valid) begin
        cur_q  <= rc_state;
        pend_q <= pend_q - CNT_W'(squashed) - CNT_W'(rt_push);
      end else begin
        if (!f_stall && !f_hold) begin
          cur_q <= f_next;
          if (f_push) pushed_q[f_push_idx] <= 1'b0;
        end
        if (x_push_valid) begin
          cnt_q[x_push_idx]    <= x_cnt;
          ovf_q[x_push_idx]    <= x_ovf;
          pushed_q[x_push_idx] <= 1'b1;
        end
        pend_q <= pend_q + CNT_W'(f_push && !f_stall && !f_hold) - CNT_W'(rt_push);
      end
    end
  end

  assign net_push_ctr     = net_q;
  assign pending_push_ctr = pend_q;

  initial begin
    assert (SIZE == (1 << IDX_W)) else $error("trip_count_queue: SIZE must be a power of two");
  end
  a_no_push_with_pop: assert property (@(posedge clk) disable iff (!rst_n)
      !(f_push && f_pop));
  a_len_bound: assert property (@(posedge clk) disable iff (!rst_n) length <= CNT_W'(SIZE));
  // without the overflow extension software guarantees trip counts below 2^N
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
      (x_push_valid && !OVERFLOW) |-> (x_push_val < VAL_W'(1 << N)));

endmodule
