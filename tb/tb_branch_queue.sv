// Self-checking testbench for branch_queue (128 entries, 8 checkpoints,
// 4-wide fetch). Directed scenarios, each checked against values worked out
// in the testbench:
//   early push (hit), late push with and without a wrong prediction,
//   same-cycle push/pop bypass, the push stall at a full queue and its release
//   by a retiring pop, Mark/Forward bulk pop with the length update at retire,
//   checkpoint recovery (pointers, popped bits, pending counter) and
//   exception recovery to the committed pointers, and a context switch: the
//   17-byte Save_BQ image of 11 predicates, an empty image restored over it
//   (another process), then the saved image restored and popped.
// Branch resolution in fetch has no latency: a hit is reported in the cycle
// the pop is presented.
module tb_branch_queue;
  import cfd_pkg::*;

  localparam int SIZE = 128;
  localparam int W    = 4;
  localparam int IW   = $clog2(SIZE);
  localparam int PW   = IW + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] f_push_cnt, f_pop_cnt, rt_push_cnt, rt_pop_cnt;
  logic [W-1:0] f_bp_pred, f_pop_pred, f_pop_hit;
  logic f_mark, f_forward, f_hold, f_stall;
  logic [IW-1:0] f_push_idx [W];
  logic [IW-1:0] f_pop_idx [W];
  logic [3*PW-1:0] f_ptrs_next, ck_ptrs;
  logic r_ckpt_we, ck_we, x_push_valid, x_push_pred, x_late, x_misp;
  logic [IW-1:0] r_ckpt_idx, x_push_idx;
  logic [2:0] r_ckpt_id, ck_id, x_misp_ckpt, rc_ckpt_id;
  logic rt_mark, rt_forward, rc_valid;
  recover_kind_e rc_kind;
  logic [IW:0] length, net_push_ctr, pending_push_ctr;
  logic [4:0] cx_rd_idx, cx_wr_idx;
  logic [7:0] cx_rd_byte, cx_wr_byte;
  logic cx_wr_valid;

  branch_queue dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    f_push_cnt = 0; f_pop_cnt = 0; f_bp_pred = 0; f_mark = 0; f_forward = 0; f_hold = 0;
    r_ckpt_we = 0; r_ckpt_idx = 0; r_ckpt_id = 0;
    ck_we = 0; ck_id = 0; ck_ptrs = 0;
    x_push_valid = 0; x_push_idx = 0; x_push_pred = 0;
    rt_push_cnt = 0; rt_pop_cnt = 0; rt_mark = 0; rt_forward = 0;
    rc_valid = 0; rc_kind = RC_CHECKPOINT; rc_ckpt_id = 0;
    cx_rd_idx = 0; cx_wr_valid = 0; cx_wr_idx = 0; cx_wr_byte = 0;
  endtask

  // apply the inputs set by the caller for one clock cycle
  task automatic step();
    @(posedge clk);
    #1;
    idle();
  endtask

  function automatic logic [PW-1:0] head_of(logic [3*PW-1:0] p); return p[3*PW-1:2*PW]; endfunction
  function automatic logic [PW-1:0] tail_of(logic [3*PW-1:0] p); return p[2*PW-1:PW];   endfunction
  function automatic logic [PW-1:0] mark_of(logic [3*PW-1:0] p); return p[PW-1:0];      endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3*PW-1:0] snap;
  int n;
  int preds [$];
  logic [7:0] image [17];

  initial begin
    idle();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------- 1. early push: 3 pushes, executed, then popped ----------
    f_push_cnt = 3; #1;
    check(!f_stall, "no stall on empty queue");
    check(f_push_idx[0] == 0 && f_push_idx[1] == 1 && f_push_idx[2] == 2, "push indices 0,1,2");
    step();
    check(pending_push_ctr == 3 && length == 3, "pending=3 after 3 pushes fetched");
    x_push_valid = 1; x_push_idx = 0; x_push_pred = 1; #1;
    check(!x_late && !x_misp, "early push is not late");
    step();
    x_push_valid = 1; x_push_idx = 1; x_push_pred = 0; step();
    x_push_valid = 1; x_push_idx = 2; x_push_pred = 1; step();
    f_pop_cnt = 3; f_bp_pred = 4'b0010; #1;   // predictor says the opposite of entries 0..2
    check(f_pop_hit[2:0] == 3'b111, "three BQ hits");
    check(f_pop_pred[2:0] == 3'b101, "popped predicates 1,0,1 in order");
    check(f_pop_hit[3] == 1'b0, "fourth slot beyond tail is not a hit");
    step();
    rt_push_cnt = 3; step();
    check(net_push_ctr == 3 && pending_push_ctr == 0 && length == 3, "retired pushes move to net");
    rt_pop_cnt = 3; step();
    check(length == 0, "retired pops empty the queue");

    // ---------- 2. late push, correct prediction and misprediction ----------
    f_push_cnt = 2; step();                 // entries 3 and 4
    f_pop_cnt = 2; f_bp_pred = 4'b0001; #1; // pops fetched before pushes execute
    check(f_pop_hit[1:0] == 2'b00, "both pops miss");
    check(f_pop_idx[0] == 3 && f_pop_idx[1] == 4, "pop indices 3,4");
    check(f_pop_pred[1:0] == 2'b01, "missed pops use predictor directions");
    step();
    r_ckpt_we = 1; r_ckpt_idx = 3; r_ckpt_id = 5; step();
    r_ckpt_we = 1; r_ckpt_idx = 4; r_ckpt_id = 6; step();
    x_push_valid = 1; x_push_idx = 3; x_push_pred = 1; #1;
    check(x_late && !x_misp, "late push agreeing with prediction");
    step();
    x_push_valid = 1; x_push_idx = 4; x_push_pred = 1; #1;
    check(x_late && x_misp && x_misp_ckpt == 6, "late push disagreeing: recover to ckpt 6");
    step();
    rt_push_cnt = 2; rt_pop_cnt = 2; step();
    check(length == 0, "length 0 after scenario 2");

    // ---------- 3. same-cycle push execute and pop fetch ----------
    f_push_cnt = 1; step();                 // entry 5
    f_pop_cnt = 1; f_bp_pred = 4'b0000;
    x_push_valid = 1; x_push_idx = 5; x_push_pred = 1; #1;
    check(f_pop_hit[0] && f_pop_pred[0], "bypass: pop sees the push of the same cycle");
    check(!x_late, "bypassed push is not late");
    step();
    rt_push_cnt = 1; rt_pop_cnt = 1; step();

    // ---------- 4. full queue stall ----------
    for (int i = 0; i < SIZE / 4; i++) begin
      f_push_cnt = 4; step();
    end
    check(int'(length) == SIZE, "length reaches SIZE");
    f_push_cnt = 1; #1;
    check(f_stall, "push into full queue stalls");
    step();
    check(int'(length) == SIZE, "stalled push changed nothing");
    // execute and retire one push, fetch and retire its pop, then the push fits
    x_push_valid = 1; x_push_idx = 6; x_push_pred = 0; step();
    f_pop_cnt = 1; #1;
    check(f_pop_hit[0] && !f_pop_pred[0], "pop of entry 6 hits");
    step();
    rt_push_cnt = 1; step();
    f_push_cnt = 1; #1;
    check(f_stall, "still stalls until a pop retires");
    idle();
    rt_pop_cnt = 1; step();
    f_push_cnt = 1; #1;
    check(!f_stall, "retired pop releases the stalled push");
    check(f_push_idx[0] == 6, "push wraps to entry 6");
    step();
    // drain: execute everything, pop and retire everything
    for (int i = 0; i < SIZE; i++) begin
      x_push_valid = 1; x_push_idx = IW'(7 + i); x_push_pred = i[0]; step();
    end
    n = 0;
    for (int i = 0; i < SIZE / 4; i++) begin
      f_pop_cnt = 4; #1;
      for (int k = 0; k < 4; k++) begin
        if (f_pop_hit[k] && f_pop_pred[k] == 1'((i * 4 + k) & 1)) n++;
      end
      step();
    end
    check(n == SIZE, "all 128 pops hit with the pushed predicates in FIFO order");
    for (int i = 0; i < SIZE / 4; i++) begin
      rt_push_cnt = 4; rt_pop_cnt = 4; step();
    end
    check(length == 0 && net_push_ctr == 0 && pending_push_ctr == 0, "queue drained");

    // ---------- 5. Mark / Forward ----------
    f_push_cnt = 4; step();
    f_push_cnt = 4; step();
    f_push_cnt = 2; f_mark = 1; #1;
    snap = f_ptrs_next;
    check(mark_of(snap) == tail_of(snap), "Mark copies the tail");
    step();
    f_pop_cnt = 3; f_forward = 1; #1;
    check(head_of(f_ptrs_next) == mark_of(snap), "Forward moves head to the mark");
    step();
    rt_push_cnt = 4; step();
    rt_push_cnt = 4; step();
    rt_push_cnt = 2; rt_mark = 1; step();
    check(length == 10, "10 pushes retired");
    rt_pop_cnt = 3; rt_forward = 1; step();
    check(length == 0, "retired Forward removes the 7 skipped entries");

    // ---------- 6. checkpoint recovery ----------
    f_push_cnt = 2; #1; snap = f_ptrs_next; step();
    ck_we = 1; ck_id = 2; ck_ptrs = snap; step();
    f_push_cnt = 3; step();                  // 3 wrong-path pushes
    f_pop_cnt = 2; f_bp_pred = 4'b0011; #1;  // pops of the 2 older entries miss
    check(f_pop_hit[1:0] == 2'b00, "pops miss before recovery");
    step();
    check(pending_push_ctr == 5, "5 pushes pending before recovery");
    rc_valid = 1; rc_kind = RC_CHECKPOINT; rc_ckpt_id = 2; step();
    check(pending_push_ctr == 2, "recovery removes 3 squashed pushes");
    // popped bits of the two surviving entries were cleared: their pushes are early
    x_push_valid = 1; x_push_idx = f_pop_idx[0]; x_push_pred = 0; #1;
    check(!x_late, "popped bit cleared by recovery (entry a)");
    step();
    x_push_valid = 1; x_push_idx = f_pop_idx[0] + 1'b1; x_push_pred = 1; #1;
    check(!x_late, "popped bit cleared by recovery (entry b)");
    step();
    f_pop_cnt = 2; f_bp_pred = 4'b0001; #1;
    check(f_pop_hit[1:0] == 2'b11 && f_pop_pred[1:0] == 2'b10, "refetched pops hit");
    step();

    // ---------- 7. exception recovery ----------
    rt_push_cnt = 1; rt_pop_cnt = 1; step();   // one push/pop pair committed
    f_push_cnt = 4; step();
    // the last older push/pop pair retires in the cycle of the exception
    rc_valid = 1; rc_kind = RC_COMMITTED; rt_push_cnt = 1; rt_pop_cnt = 1; step();
    check(pending_push_ctr == 0, "exception squashes every in-flight push");
    check(length == 0, "empty after exception recovery");
    f_push_cnt = 1; #1;
    check(head_of(f_ptrs_next) + 1'b1 == tail_of(f_ptrs_next), "pointers at committed state");
    step();

    // ---------- 8. context switch: Save_BQ, Restore_BQ ----------
    // execute and retire the push above, then 12 more; pop and retire 2
    x_push_valid = 1; x_push_idx = f_push_idx[0] - 1'b1; x_push_pred = 1; step();
    preds.push_back(1);
    rt_push_cnt = 1; step();
    for (int b = 0; b < 3; b++) begin
      f_push_cnt = 4; step();
    end
    for (int i = 0; i < 12; i++) begin
      x_push_valid = 1; x_push_idx = f_push_idx[0] - IW'(12 - i);
      x_push_pred = ((i % 3) == 0); preds.push_back(int'((i % 3) == 0));
      step();
    end
    for (int b = 0; b < 3; b++) begin rt_push_cnt = 4; step(); end
    f_pop_cnt = 2; #1;
    check(f_pop_hit[1:0] == 2'b11 && f_pop_pred[0] == 1'(preds[0]) && f_pop_pred[1] == 1'(preds[1]),
          "two pops before the context switch");
    step();
    rt_pop_cnt = 2; step();
    void'(preds.pop_front()); void'(preds.pop_front());
    check(int'(length) == 11 && pending_push_ctr == 0, "11 predicates, nothing in flight");
    // Save_BQ: read the 17-byte image
    for (int b = 0; b < 17; b++) begin
      logic [7:0] e;
      cx_rd_idx = 5'(b); #1;
      image[b] = cx_rd_byte;
      e = 0;
      if (b == 0) e = 8'd11;
      else for (int i = 0; i < 8; i++) if ((b - 1) * 8 + i < 11) e[i] = 1'(preds[(b - 1) * 8 + i]);
      check(cx_rd_byte == e, $sformatf("save image byte %0d", b));
    end
    idle();
    // another process with an empty BQ
    cx_wr_valid = 1; cx_wr_idx = 0; cx_wr_byte = 0; step();
    check(length == 0, "empty image restored");
    f_pop_cnt = 1; #1;
    check(!f_pop_hit[0], "nothing to pop after restoring an empty image");
    idle();
    // Restore_BQ of the saved image
    for (int b = 0; b < 17; b++) begin
      cx_wr_valid = 1; cx_wr_idx = 5'(b); cx_wr_byte = image[b]; step();
    end
    check(int'(length) == 11 && net_push_ctr == 11 && pending_push_ctr == 0,
          "restored length 11, all retired");
    n = 0;
    for (int b = 0; b < 3; b++) begin
      f_pop_cnt = (b < 2) ? 3'd4 : 3'd3; #1;
      if (b == 0) check(f_pop_idx[0] == 0, "restored head at entry 0");
      for (int k = 0; k < int'(f_pop_cnt); k++)
        if (f_pop_hit[k] && f_pop_pred[k] == 1'(preds[b * 4 + k])) n++;
      step();
    end
    check(n == 11, "all 11 restored predicates pop in order");
    f_push_cnt = 1; #1;
    check(f_push_idx[0] == 11, "next push goes after the restored entries");
    idle();
    for (int b = 0; b < 3; b++) begin rt_pop_cnt = (b < 2) ? 3'd4 : 3'd3; step(); end
    check(length == 0, "empty after the restored predicates retire");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
