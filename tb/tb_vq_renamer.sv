// Self-checking testbench for vq_renamer (128 mappings of 8 bits, 4-wide).
//   1. A worked rename example: loop 1 runs "add r5,r5,#1; Push_VQ r5" twice,
//      loop 2 runs "Pop_VQ r5" twice. A small freelist (p99, p2, p35, p7, p51,
//      p22 in that order) and a map table with r5 -> p67 are modelled here.
//      Expected: the pushes take p2 and p7, the pops read p2 and p7 and write
//      p51 and p22; the map table ends with r5 -> p22.
//   2. In-bundle bypass: a pop renamed in the same bundle as its push.
//   3. Randomised bundles of pushes and pops against a FIFO model, with
//      in-order retirement checking the freed registers.
//   4. Stall when the mappings of unretired pops fill the renamer.
//   5. Checkpoint recovery and exception recovery of head and tail.
// Rename is combinational: the mapping is valid in the cycle of the bundle.
module tb_vq_renamer;
  import cfd_pkg::*;

  localparam int SIZE = 128;
  localparam int W    = 4;
  localparam int PW   = $clog2(SIZE) + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  vq_op_e     r_op [W];
  logic [7:0] r_push_preg [W];
  logic [7:0] r_pop_preg [W];
  logic       r_stall;
  logic [2*PW-1:0] r_ptrs_next, ck_ptrs;
  logic       ck_we, rc_valid;
  logic [2:0] ck_id, rc_ckpt_id;
  logic [2:0] rt_push_cnt, rt_pop_cnt;
  logic [W-1:0] rt_free_valid;
  logic [7:0] rt_free_preg [W];
  recover_kind_e rc_kind;
  logic [PW-1:0] length;

  vq_renamer dut (.*);

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
    for (int k = 0; k < W; k++) begin
      r_op[k] = VQ_NONE;
      r_push_preg[k] = '0;
    end
    ck_we = 0; ck_id = 0; ck_ptrs = 0;
    rt_push_cnt = 0; rt_pop_cnt = 0;
    rc_valid = 0; rc_kind = RC_CHECKPOINT; rc_ckpt_id = 0;
  endtask
  task automatic step();
    @(posedge clk);
    #1;
    idle();
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- freelist and map table of the worked example ----
  int freelist [$];
  int rmt_r5;
  int add_src [2], add_dst [2], push_src [2];
  int pop_dst [2];

  // ---- FIFO model for the random test ----
  int model [$];        // mappings pushed, not yet renamed by a pop
  int retire_q [$];     // mappings read by pops, in order, awaiting retire
  int pushes_unret;
  int nfree_ok, nfree;

  initial begin
    idle();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------- 1. worked example ----------
    freelist = '{99, 2, 35, 7, 51, 22};
    rmt_r5 = 67;
    // bundle: add, Push_VQ, add, Push_VQ
    for (int i = 0; i < 2; i++) begin
      add_src[i] = rmt_r5;
      add_dst[i] = freelist.pop_front();
      rmt_r5 = add_dst[i];
      push_src[i] = rmt_r5;
      r_op[2*i] = VQ_NONE;
      r_op[2*i+1] = VQ_PUSH;
      r_push_preg[2*i+1] = 8'(freelist.pop_front());
    end
    check(add_src[0] == 67 && add_dst[0] == 99, "add #1 renamed p99 <- p67");
    check(push_src[0] == 99 && r_push_preg[1] == 2, "Push_VQ #1: VQ tail -> p2, source p99");
    check(add_src[1] == 99 && add_dst[1] == 35, "add #2 renamed p35 <- p99");
    check(push_src[1] == 35 && r_push_preg[3] == 7, "Push_VQ #2: VQ tail -> p7, source p35");
    #1 check(!r_stall, "no stall");
    step();
    // bundle: Pop_VQ r5, Pop_VQ r5
    r_op[0] = VQ_POP; r_op[1] = VQ_POP; #1;
    for (int i = 0; i < 2; i++) begin
      pop_dst[i] = freelist.pop_front();
      rmt_r5 = pop_dst[i];
    end
    check(r_pop_preg[0] == 2 && pop_dst[0] == 51, "Pop_VQ #1: p51 <- VQ head p2");
    check(r_pop_preg[1] == 7 && pop_dst[1] == 22, "Pop_VQ #2: p22 <- VQ head p7");
    check(rmt_r5 == 22, "map table r5 -> p22");
    step();
    check(length == 0, "VQ empty after two pops");
    rt_push_cnt = 2; rt_pop_cnt = 2; #1;
    check(rt_free_valid[1:0] == 2'b11 && rt_free_preg[0] == 2 && rt_free_preg[1] == 7,
          "retiring pops free p2 and p7");
    step();

    // ---------- 2. in-bundle bypass ----------
    r_op[0] = VQ_PUSH; r_push_preg[0] = 8'd10;
    r_op[1] = VQ_POP;
    r_op[2] = VQ_PUSH; r_push_preg[2] = 8'd11;
    r_op[3] = VQ_POP; #1;
    check(r_pop_preg[1] == 10 && r_pop_preg[3] == 11, "pops in the push's bundle get its register");
    step();
    rt_push_cnt = 2; rt_pop_cnt = 2; #1;
    check(rt_free_preg[0] == 10 && rt_free_preg[1] == 11, "bypassed mappings freed at retire");
    step();

    // ---------- 3. randomised bundles against a FIFO model ----------
    pushes_unret = 0;
    nfree = 0; nfree_ok = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int avail;
      int npush;
      int npop;
      int rp;
      int exp_pop [W];
      avail = model.size();
      npush = 0; npop = 0;
      // pops renamed in earlier cycles may retire in this one
      rp = $urandom_range(0, (retire_q.size() < W) ? retire_q.size() : W);
      for (int k = 0; k < W; k++) begin
        int r;
        r = $urandom_range(0, 2);
        exp_pop[k] = -1;
        if (r == 1 && (retire_q.size() + model.size() + npop < SIZE)) begin
          r_op[k] = VQ_PUSH;
          r_push_preg[k] = 8'($urandom_range(0, 235));
          model.push_back(int'(r_push_preg[k]));
          npush++;
        end else if (r == 2 && model.size() > 0) begin
          r_op[k] = VQ_POP;
          exp_pop[k] = model.pop_front();
          npop++;
        end
      end
      #1;
      check(!r_stall, "no stall while the model has room");
      for (int k = 0; k < W; k++) begin
        if (exp_pop[k] >= 0) begin
          check(int'(r_pop_preg[k]) == exp_pop[k], "pop mapping matches FIFO model");
          retire_q.push_back(exp_pop[k]);
        end
      end
      // retire some of the older pushes and pops
      rt_pop_cnt = 3'(rp);
      pushes_unret += npush;
      rt_push_cnt = 3'((pushes_unret < W) ? pushes_unret : W);
      pushes_unret -= int'(rt_push_cnt);
      #1;
      for (int k = 0; k < rp; k++) begin
        nfree++;
        if (rt_free_valid[k] && int'(rt_free_preg[k]) == retire_q[k]) nfree_ok++;
      end
      for (int k = 0; k < rp; k++) void'(retire_q.pop_front());
      step();
      if (avail < 0) break;
    end
    check(nfree == nfree_ok, $sformatf("all %0d freed registers in order", nfree));
    // drain the model
    while (model.size() > 0) begin
      r_op[0] = VQ_POP; #1;
      check(int'(r_pop_preg[0]) == model[0], "drain pop matches model");
      retire_q.push_back(model.pop_front());
      step();
    end
    rt_push_cnt = 3'(pushes_unret); step();
    while (retire_q.size() > 0) begin
      rt_pop_cnt = 1; #1;
      check(int'(rt_free_preg[0]) == retire_q[0], "drain free matches model");
      void'(retire_q.pop_front());
      step();
    end

    // ---------- 4. stall at a full renamer ----------
    for (int i = 0; i < SIZE / W; i++) begin
      for (int k = 0; k < W; k++) begin
        r_op[k] = VQ_PUSH; r_push_preg[k] = 8'(i * W + k);
      end
      rt_push_cnt = 3'(W);      // retire them right away; their pops come later
      step();
    end
    check(int'(length) == SIZE, "128 mappings held");
    r_op[0] = VQ_PUSH; r_push_preg[0] = 8'd200; #1;
    check(r_stall, "129th push stalls");
    step();
    r_op[0] = VQ_POP; #1;
    check(r_pop_preg[0] == 0 && !r_stall, "pop renames while full");
    step();
    r_op[0] = VQ_PUSH; r_push_preg[0] = 8'd200; #1;
    check(r_stall, "push still stalls until the pop retires");
    idle();
    rt_pop_cnt = 1; step();
    r_op[0] = VQ_PUSH; r_push_preg[0] = 8'd200; #1;
    check(!r_stall, "retired pop frees a mapping slot");
    rt_push_cnt = 1;
    step();

    // ---------- 5. checkpoint and exception recovery ----------
    r_op[0] = VQ_POP; #1;
    check(r_pop_preg[0] == 1, "next pop reads mapping 1");
    ck_we = 1; ck_id = 4; ck_ptrs = r_ptrs_next;     // checkpoint after this pop
    step();
    r_op[0] = VQ_POP; r_op[1] = VQ_POP; r_op[2] = VQ_PUSH; r_push_preg[2] = 8'd201; step();
    rc_valid = 1; rc_kind = RC_CHECKPOINT; rc_ckpt_id = 4; step();
    r_op[0] = VQ_POP; #1;
    check(r_pop_preg[0] == 2, "after checkpoint recovery the head is back at mapping 2");
    step();
    rc_valid = 1; rc_kind = RC_COMMITTED; step();
    r_op[0] = VQ_POP; #1;
    check(r_pop_preg[0] == 1, "after exception recovery the head is the committed one");
    check(int'(length) == SIZE, "committed state holds 128 mappings");
    step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
