// Value-queue (VQ) renamer: maps the architectural value queue onto the
// physical register file in the rename stage.
//
// How it works. The renamer is a circular buffer of physical register numbers
// with post-incremented head and tail pointers. A Push_VQ is given a free
// physical register by the core's freelist, like any register-writing
// instruction; that register is written at the VQ renamer tail instead of into
// the rename map table. A Pop_VQ takes the mapping at the head as its source
// operand, so it links to its push through a physical register and the
// unchanged issue queue and register file move the value. The register of a
// push is freed when the pop that read it retires: the committed head entry is
// handed back to the freelist. Checkpoints hold head and tail snapshots;
// committed copies of head and tail follow retirement; recovery restores one
// of them. Registers of squashed pushes are reclaimed by the core's own
// freelist recovery.
//
// Interface and timing. Up to RENAME_W slots per cycle, in program order; each
// carries a VQ_PUSH (with its allocated register), a VQ_POP or nothing. A pop
// whose push is in the same bundle receives that push's register (in-bundle
// bypass). r_pop_preg is combinational. The bundle stalls (r_stall) when its
// pushes would overwrite a mapping whose pop has not yet retired. Retirement
// reports, per retired pop, the register to free (combinational from state).
// State changes on the rising edge; a recovery overrides rename inputs.
//
// Document versus own choices. The mapping scheme, entry contents (8-bit
// register numbers for a 236-register file), 128 entries, checkpoint and
// committed pointers and the freeing rule follow the document. The wrap bit on
// the pointers, the stall rule based on the committed head, the in-bundle
// bypass and the port shapes are this design's.
module vq_renamer
  import cfd_pkg::*;
#(
  parameter int unsigned SIZE     = 128,
  parameter int unsigned PREG_W   = 8,
  parameter int unsigned N_CKPT   = NUM_CKPT,
  parameter int unsigned RENAME_W = 4
) (
  input  logic clk,
  input  logic rst_n,

  // ---- rename bundle ----
  input  vq_op_e                         r_op        [RENAME_W],
  input  logic [PREG_W-1:0]              r_push_preg [RENAME_W], // dest of a push
  output logic [PREG_W-1:0]              r_pop_preg  [RENAME_W], // source of a pop
  output logic                           r_stall,
  output logic [2*($clog2(SIZE)+1)-1:0]  r_ptrs_next,            // {head,tail} after bundle

  // ---- checkpoint snapshot ----
  input  logic                           ck_we,
  input  logic [$clog2(N_CKPT)-1:0]      ck_id,
  input  logic [2*($clog2(SIZE)+1)-1:0]  ck_ptrs,

  // ---- retire ----
  input  logic [$clog2(RENAME_W+1)-1:0]  rt_push_cnt,
  input  logic [$clog2(RENAME_W+1)-1:0]  rt_pop_cnt,
  output logic [RENAME_W-1:0]            rt_free_valid,
  output logic [PREG_W-1:0]              rt_free_preg [RENAME_W],

  // ---- recovery ----
  input  logic                           rc_valid,
  input  recover_kind_e                  rc_kind,
  input  logic [$clog2(N_CKPT)-1:0]      rc_ckpt_id,

  // ---- status ----
  output logic [$clog2(SIZE+1)-1:0]      length      // pushed, not yet popped (speculative)
);

  localparam int unsigned IDX_W = $clog2(SIZE);
  localparam int unsigned PTR_W = IDX_W + 1;
  localparam int unsigned CNT_W = $clog2(SIZE + 1);

  typedef logic [PTR_W-1:0] ptr_t;
  typedef struct packed {
    ptr_t head;
    ptr_t tail;
  } vq_ptrs_t;

  logic [PREG_W-1:0] map_q [SIZE];
  vq_ptrs_t          cur_q, com_q;
  vq_ptrs_t          snap_q [N_CKPT];

  // ---- rename: program-order walk over the bundle ----
  ptr_t     push_pos [RENAME_W];
  logic     push_here [RENAME_W];
  vq_ptrs_t r_next;
  ptr_t     live_after;

  always_comb begin
    ptr_t t;
    ptr_t h;
    t = cur_q.tail;
    h = cur_q.head;
    for (int k = 0; k < RENAME_W; k++) begin
      push_here[k]  = (r_op[k] == VQ_PUSH);
      push_pos[k]   = t;
      r_pop_preg[k] = '0;
      if (r_op[k] == VQ_PUSH) begin
        t = t + 1'b1;
      end else if (r_op[k] == VQ_POP) begin
        r_pop_preg[k] = map_q[h[IDX_W-1:0]];
        for (int j = 0; j < k; j++) begin
          if (push_here[j] && push_pos[j] == h) r_pop_preg[k] = r_push_preg[j];
        end
        h = h + 1'b1;
      end
    end
    r_next.head = h;
    r_next.tail = t;
    live_after  = t - com_q.head;
  end

  assign r_stall     = (live_after > ptr_t'(SIZE));
  assign r_ptrs_next = r_next;
  assign length      = CNT_W'(cur_q.tail - cur_q.head);

  // ---- retire ----
  vq_ptrs_t c_next;
  always_comb begin
    c_next      = com_q;
    c_next.tail = com_q.tail + ptr_t'(rt_push_cnt);
    c_next.head = com_q.head + ptr_t'(rt_pop_cnt);
    for (int k = 0; k < RENAME_W; k++) begin
      logic [IDX_W-1:0] p;
      p = IDX_W'(com_q.head) + IDX_W'(k);
      rt_free_valid[k] = (k < int'(rt_pop_cnt));
      rt_free_preg[k]  = map_q[p];
    end
  end

  vq_ptrs_t rc_ptrs;
  assign rc_ptrs = (rc_kind == RC_COMMITTED) ? c_next : snap_q[rc_ckpt_id];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q <= '0;
      com_q <= '0;
      for (int i = 0; i < SIZE; i++)   map_q[i]  <= '0;
      for (int i = 0; i < N_CKPT; i++) snap_q[i] <= '0;
    end else begin
      if (ck_we) snap_q[ck_id] <= vq_ptrs_t'(ck_ptrs);
      com_q <= c_next;
      if (rc_valid) begin
        cur_q <= rc_ptrs;
      end else if (!r_stall) begin
        cur_q <= r_next;
        for (int k = 0; k < RENAME_W; k++) begin
          if (push_here[k]) map_q[push_pos[k][IDX_W-1:0]] <= r_push_preg[k];
        end
      end
    end
  end

  initial begin
    assert (SIZE == (1 << IDX_W)) else $error("vq_renamer: SIZE must be a power of two");
  end
  // ISA rule: a pop never runs ahead of its push
  a_pop_after_push: assert property (@(posedge clk) disable iff (!rst_n)
      (!rc_valid && !r_stall) |-> (ptr_t'(r_next.tail - r_next.head) <= ptr_t'(SIZE)));

endmodule
