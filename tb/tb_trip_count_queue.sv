// Self-checking testbench for trip_count_queue (256 entries, 4-bit trip
// counts). Scenarios, checked against values worked out in the testbench:
//   a decoupled loop nest: trip counts 3, 0, 9 pushed and executed, then each
//   popped into the TCR and consumed by Branch_on_TCR (t continues, 1 exit);
//   the fetch stall on a TQ miss until the push executes; the push stall at a
//   full queue; checkpoint recovery of head, tail and TCR; exception recovery
//   to the committed head, tail and TCR. A second instance with the overflow
//   extension checks that a trip count of 16 or more sets the overflow bit.
// Branch_on_TCR resolves in fetch: its outcome is valid in the cycle it is
// presented.
module tb_trip_count_queue;
  import cfd_pkg::*;

  localparam int SIZE = 256;
  localparam int IW   = $clog2(SIZE);
  localparam int PW   = IW + 1;
  localparam int N    = 4;
  localparam int SW   = 2 * PW + N;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic f_push, f_pop, f_bot, f_hold, f_stall, f_pop_ovf, f_bot_taken;
  logic [IW-1:0] f_push_idx, x_push_idx;
  logic [N-1:0] tcr, com_tcr;
  logic [SW-1:0] f_state_next, ck_state;
  logic ck_we, x_push_valid, rt_push, rt_pop, rt_bot, rc_valid;
  logic [2:0] ck_id, rc_ckpt_id;
  logic [31:0] x_push_val;
  recover_kind_e rc_kind;
  logic [IW:0] length, net_push_ctr, pending_push_ctr;

  trip_count_queue dut (.*);

  // overflow-enabled instance, driven by the same inputs
  logic o_stall, o_pop_ovf, o_bot_taken;
  logic [IW-1:0] o_push_idx;
  logic [N-1:0] o_tcr, o_com_tcr;
  logic [SW-1:0] o_state_next;
  logic [IW:0] o_length, o_net, o_pend;
  logic [31:0] o_push_val;       // value seen by the overflow instance
  logic        o_big;            // give it a value of 16 or more instead
  assign o_push_val = o_big ? 32'd20 : x_push_val;
  trip_count_queue #(.OVERFLOW(1'b1)) dut_ovf (
    .clk, .rst_n, .f_push, .f_pop, .f_bot, .f_hold,
    .f_stall(o_stall), .f_push_idx(o_push_idx), .f_pop_ovf(o_pop_ovf),
    .f_bot_taken(o_bot_taken), .tcr(o_tcr), .f_state_next(o_state_next),
    .ck_we, .ck_id, .ck_state, .x_push_valid, .x_push_idx, .x_push_val(o_push_val),
    .rt_push, .rt_pop, .rt_bot, .com_tcr(o_com_tcr), .rc_valid, .rc_kind, .rc_ckpt_id,
    .length(o_length), .net_push_ctr(o_net), .pending_push_ctr(o_pend));

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
    f_push = 0; f_pop = 0; f_bot = 0; f_hold = 0;
    ck_we = 0; ck_id = 0; ck_state = 0;
    x_push_valid = 0; x_push_idx = 0; x_push_val = 0;
    rt_push = 0; rt_pop = 0; rt_bot = 0;
    rc_valid = 0; rc_kind = RC_CHECKPOINT; rc_ckpt_id = 0;
    o_big = 0;
  endtask
  task automatic step();
    @(posedge clk);
    #1;
    idle();
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consume one inner loop: Branch_on_TCR until it exits; returns #continues
  task automatic run_inner(output int conts, output bit ok);
    conts = 0;
    ok = 1;
    for (int i = 0; i < 40; i++) begin
      f_bot = 1; #1;
      if (f_stall) ok = 0;
      if (!f_bot_taken) begin
        step();
        return;
      end
      conts++;
      step();
    end
    ok = 0;
  endtask

  int trips [3] = '{3, 0, 9};
  int conts;
  bit ok;
  logic [SW-1:0] snap;

  initial begin
    idle();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------- 1. first loop pushes trip counts, second loop pops them ----------
    for (int i = 0; i < 3; i++) begin
      f_push = 1; #1;
      check(!f_stall && f_push_idx == IW'(i), "push allocates consecutive entries");
      step();
    end
    check(pending_push_ctr == 3 && length == 3, "3 pushes pending");
    // pop before any push executes: TQ miss stalls fetch
    f_pop = 1; #1;
    check(f_stall, "Pop_TQ stalls on a TQ miss");
    step();
    for (int i = 0; i < 3; i++) begin
      x_push_valid = 1; x_push_idx = IW'(i); x_push_val = trips[i]; step();
    end
    for (int i = 0; i < 3; i++) begin
      f_pop = 1; #1;
      check(!f_stall, "Pop_TQ proceeds once pushed");
      step();
      check(tcr == N'(trips[i]), "TCR loaded with the trip count");
      run_inner(conts, ok);
      check(ok && conts == trips[i], $sformatf("inner loop %0d continues %0d times", i, trips[i]));
    end
    // same-bundle Pop_TQ + Branch_on_TCR: the branch sees the new TCR
    f_push = 1; step();
    x_push_valid = 1; x_push_idx = 3; x_push_val = 1; step();
    f_pop = 1; f_bot = 1; #1;
    check(!f_stall && f_bot_taken, "Branch_on_TCR in the pop's bundle sees TCR=1");
    step();
    check(tcr == 0, "TCR decremented in the same bundle");
    // retire the whole nest: 4 pushes, 4 pops, 3+1+10+2 Branch_on_TCR
    for (int i = 0; i < 4; i++) begin rt_push = 1; step(); end
    rt_pop = 1; step();
    for (int i = 0; i < 4; i++) begin rt_bot = 1; step(); end
    check(com_tcr == 0, "committed TCR after first inner loop");
    rt_pop = 1; rt_bot = 1; step();
    rt_pop = 1; step();
    check(com_tcr == 9, "committed TCR loaded with 9");
    for (int i = 0; i < 10; i++) begin rt_bot = 1; step(); end
    rt_pop = 1; rt_bot = 1; step();
    rt_bot = 1; step();
    check(length == 0 && com_tcr == 0, "nest retired, queue empty");

    // ---------- 2. full queue ----------
    for (int i = 0; i < SIZE; i++) begin f_push = 1; step(); end
    check(int'(length) == SIZE, "length reaches SIZE");
    f_push = 1; #1;
    check(f_stall, "Push_TQ into a full TQ stalls");
    step();
    // ---------- 3. exception recovery: all 256 in-flight pushes squashed ----------
    rc_valid = 1; rc_kind = RC_COMMITTED; step();
    check(pending_push_ctr == 0 && length == 0, "exception squashes every pending push");

    // ---------- 4. checkpoint recovery of pointers and TCR ----------
    f_push = 1; step();
    f_push = 1; step();
    x_push_valid = 1; x_push_idx = f_push_idx - IW'(2); x_push_val = 5; step();
    x_push_valid = 1; x_push_idx = f_push_idx - IW'(1); x_push_val = 7; step();
    f_pop = 1; f_bot = 1; #1;
    snap = f_state_next;           // checkpoint after Pop_TQ (TCR=5-1=4)
    step();
    ck_we = 1; ck_id = 3; ck_state = snap; step();
    f_bot = 1; step();             // TCR 3
    f_pop = 1; step();             // wrong path: pops the 7
    f_push = 1; step();            // wrong path push
    check(tcr == 7 && pending_push_ctr == 3, "wrong-path state before recovery");
    rc_valid = 1; rc_kind = RC_CHECKPOINT; rc_ckpt_id = 3; step();
    check(tcr == 4, "TCR restored from checkpoint");
    check(pending_push_ctr == 2, "squashed wrong-path push removed");
    f_pop = 1; #1;
    check(!f_stall, "second entry still available after recovery");
    step();
    check(tcr == 7, "refetched Pop_TQ loads 7");

    // ---------- 5. overflow extension ----------
    f_push = 1; step();
    x_push_valid = 1; x_push_idx = o_push_idx - 1'b1; x_push_val = 4; o_big = 1; step();
    f_push = 1; step();
    x_push_valid = 1; x_push_idx = o_push_idx - 1'b1; x_push_val = 15; step();
    f_pop = 1; #1;
    check(!f_stall && !f_pop_ovf, "without the extension the overflow bit never shows");
    check(!o_stall && o_pop_ovf, "trip count 20 pops with overflow set");
    step();
    f_pop = 1; #1;
    check(!o_stall && !o_pop_ovf, "trip count 15 pops without overflow");
    step();
    check(o_tcr == 15, "TCR holds 15");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
