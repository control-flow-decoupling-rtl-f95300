// End-to-end testbench for cfd_frontend at its default sizes.
//
// A small core model around the front end runs a control-flow-decoupled
// program, generated here, whose expected results are worked out by a
// software model of the three queues while the program is generated:
//   phase 1  strip-mined "first loop pushes predicate and value, second loop
//            pops them" chunks (Push_VQ + Push_BQ, then Branch_on_BQ + Pop_VQ)
//            of 64, 3, 128, 128, 5, 40, 64 (two values per iteration) and 5
//            iterations; a long-latency instruction between the loops of some
//            chunks holds retirement so the queues fill and stall;
//   phase 2  an early-exit pair of loops: 20 pushes and a Mark, 7 pops and a
//            Forward, then a 5-iteration chunk that must see its own pushes,
//            a 30-iteration chunk (predicate and value) with a context switch
//            between its loops: Save_BQ of the 17-byte image, an empty image
//            restored, Restore_BQ, then Save_VQ and Restore_VQ through the
//            cracker, whose micro-operations are renamed, executed against a
//            small memory and retired here; then four one-iteration value
//            loops, so that pops share their push's bundle;
//   phase 3  separable inner loops: trip counts pushed by an outer loop
//            (chunks of 3, 256 and 4), then Pop_TQ and Branch_on_TCR until exit.
// Core model: one fetch/rename bundle per cycle (up to 4 instructions), a
// fetch-to-execute latency of 10 cycles, one Push_BQ and one Push_TQ executed
// per cycle, in-order retirement of up to 4 instructions per cycle, a freelist
// of 236 physical registers, a 50 % branch predictor for BQ misses, random
// checkpointed branches that sometimes mispredict, and one exception.
// Checks: every BQ hit and every retired Branch_on_BQ has the pushed
// predicate; every Pop_VQ reads the pushed value through the physical
// register file and frees that register at retirement; every Branch_on_TCR
// follows the trip count; all queues and the freelist drain at the end.
// Each mechanism (hit, miss, late push right and wrong, stalls of each queue,
// Mark/Forward, TCR continue/exit, bypasses, both recoveries, context switch)
// is counted and must occur at least once.
module tb_cfd_frontend;
  import cfd_pkg::*;

  localparam int W      = 4;
  localparam int LAT    = 10;     // fetch-to-execute latency
  localparam int NPREG  = 236;
  localparam int BQW    = 8;      // BQ pointer width (128 entries + wrap bit)
  localparam int TQW    = 9;
  localparam int VQW    = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #50 clk = ~clk;   // long period: the core model settles several times per cycle

  // ---------------- DUT ports ----------------
  logic [2:0] f_bq_push_cnt, f_bq_pop_cnt;
  logic [W-1:0] f_bp_pred, f_bq_pop_pred, f_bq_pop_hit;
  logic f_mark, f_forward, f_tq_push, f_tq_pop, f_tq_bot, f_hold, f_stall;
  logic [6:0] f_bq_push_idx [W];
  logic [6:0] f_bq_pop_idx [W];
  logic [7:0] f_tq_push_idx;
  logic f_tq_pop_ovf, f_tq_bot_taken;
  logic [3:0] tcr, com_tcr;
  logic [3*BQW-1:0] f_bq_next, ck_bq;
  logic [2*TQW+4-1:0] f_tq_next, ck_tq;
  vq_op_e r_vq_op [W];
  logic [7:0] r_vq_push_preg [W];
  logic [7:0] r_vq_pop_preg [W];
  logic r_vq_stall;
  logic [2*VQW-1:0] r_vq_next, ck_vq;
  logic r_bq_ckpt_we;
  logic [6:0] r_bq_ckpt_idx;
  logic [2:0] r_bq_ckpt_id, ck_id, bq_misp_ckpt, rc_ckpt_id;
  logic ck_we, x_bq_push_valid, x_bq_push_pred, bq_late, bq_misp, x_tq_push_valid;
  logic [6:0] x_bq_push_idx;
  logic [7:0] x_tq_push_idx;
  logic [31:0] x_tq_push_val;
  logic [2:0] rt_bq_push_cnt, rt_bq_pop_cnt, rt_vq_push_cnt, rt_vq_pop_cnt;
  logic rt_mark, rt_forward, rt_tq_push, rt_tq_pop, rt_tq_bot;
  logic [W-1:0] rt_free_valid;
  logic [7:0] rt_free_preg [W];
  logic rc_valid;
  recover_kind_e rc_kind;
  logic [7:0] bq_length, vq_length;
  logic [8:0] tq_length;
  logic [4:0] bq_cx_rd_idx, bq_cx_wr_idx;
  logic [7:0] bq_cx_rd_byte, bq_cx_wr_byte;
  logic bq_cx_wr_valid;
  logic cx_vq_save, cx_vq_restore, cx_vq_busy, cx_vq_u_valid, cx_vq_u_ready, cx_vq_ld_len_valid;
  logic [63:0] cx_vq_base, cx_vq_u_addr;
  logic [7:0] cx_vq_u_len, cx_vq_ld_len;
  cx_uop_e cx_vq_u_kind;

  cfd_frontend dut (.*);

  // ---------------- bookkeeping ----------------
  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  typedef enum int {
    I_PUSH_BQ, I_BR_BQ, I_MARK, I_FWD, I_PUSH_VQ, I_POP_VQ, I_PUSH_TQ, I_POP_TQ, I_BR_TCR,
    I_LONG,     // long-latency instruction (a load missing in the caches)
    I_CTXSW     // context switch: Save_BQ, another process, Restore_BQ
  } kind_e;

  typedef struct {
    kind_e kind;
    int    val;      // pushed predicate / value / trip count; VQ length at a switch
    int    exp;      // expected predicate / value / TCR outcome
  } ins_t;

  ins_t prog [$];

  // mechanism counters
  typedef enum int {
    M_BQ_HIT, M_BQ_MISS, M_LATE_OK, M_LATE_MISP, M_BQ_FULL, M_VQ_STALL, M_TQ_MISS,
    M_TQ_FULL, M_MARK, M_FORWARD_SKIP, M_TCR_CONT, M_TCR_EXIT, M_BR_RECOVER,
    M_EXCEPTION, M_MULTI_POP, M_VQ_BYPASS, M_HOLD, M_CTX, M_VQ_CTX, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"BQ hit", "BQ miss (speculative pop)", "late push, prediction right",
    "late push, prediction wrong", "BQ full stall", "VQ renamer stall", "TQ miss stall",
    "TQ full stall", "Mark", "Forward skipping entries", "Branch_on_TCR continue",
    "Branch_on_TCR exit", "branch checkpoint recovery", "exception recovery",
    "several pops in one bundle", "pop renamed with its push", "bundle held by another queue",
    "context switch (Save_BQ / Restore_BQ)", "value saved and restored (Save_VQ / Restore_VQ)"};

  // ---------------- program generation with a queue model ----------------
  int bqm [$];
  int vqm [$];
  int tqm [$];
  int pushed_total, popped_total, pushed_at_mark;

  function automatic void emit(kind_e k, int v);
    ins_t i;
    i.kind = k; i.val = v; i.exp = 0;
    case (k)
      I_PUSH_BQ: begin bqm.push_back(v); pushed_total++; end
      I_BR_BQ:   begin i.exp = bqm.pop_front(); popped_total++; end
      I_MARK:    pushed_at_mark = pushed_total;
      I_FWD: begin
        i.exp = pushed_at_mark - popped_total;     // entries the Forward skips
        while (popped_total < pushed_at_mark) begin void'(bqm.pop_front()); popped_total++; end
      end
      I_PUSH_VQ: vqm.push_back(v);
      I_POP_VQ:  i.exp = vqm.pop_front();
      I_PUSH_TQ: tqm.push_back(v);
      I_CTXSW:   begin i.exp = bqm.size(); i.val = vqm.size(); end
      default: ;
    endcase
    prog.push_back(i);
  endfunction

  // n iterations; nv values pushed per iteration; a long-latency instruction
  // of long_lat cycles between the loops keeps the pops from retiring
  // ctxsw: a context switch between the loops
  function automatic void soplex_chunk(int n, int nv = 1, int long_lat = 0, bit ctxsw = 0);
    for (int i = 0; i < n; i++) begin
      for (int v = 0; v < nv; v++) emit(I_PUSH_VQ, int'($urandom_range(0, 1_000_000)));
      emit(I_PUSH_BQ, int'($urandom_range(0, 1)));
    end
    if (long_lat > 0) emit(I_LONG, long_lat);
    if (ctxsw) emit(I_CTXSW, 0);
    for (int i = 0; i < n; i++) begin
      emit(I_BR_BQ, 0);
      for (int v = 0; v < nv; v++) emit(I_POP_VQ, 0);
    end
  endfunction

  function automatic void tq_chunk(int n, int fixed [], int long_lat = 0);
    int t [$];
    for (int i = 0; i < n; i++) begin
      int v;
      v = (fixed.size() > i) ? fixed[i] : int'($urandom_range(0, 9));
      t.push_back(v);
      emit(I_PUSH_TQ, v);
    end
    if (long_lat > 0) emit(I_LONG, long_lat);
    for (int i = 0; i < n; i++) begin
      int tc;
      emit(I_POP_TQ, 0);
      tc = t[i];
      while (1) begin
        emit(I_BR_TCR, 0);
        prog[$].exp = int'(tc != 0);
        if (tc == 0) break;
        tc--;
      end
    end
  endfunction

  // ---------------- core model state ----------------
  typedef struct {
    int    seq;
    int    pc;
    kind_e kind;
    int    fcyc;        // fetch cycle
    bit    executed;
    bit    has_ck;
    int    ck;
    bit    rec_pending; // rename record of a speculative pop still to do
    bit    br_mispred;  // random checkpointed branch that will mispredict
    int    idx;         // BQ or TQ entry
    int    preg;        // VQ push destination or pop source
    int    dir;         // direction used for Branch_on_BQ
  } fl_t;

  fl_t  fl [$];          // in flight, oldest first
  int   freelist [$];
  int   prf [NPREG];
  bit   ck_busy [8];
  int   cyc = 0;
  int   seq_ctr = 0;
  int   pc = 0;
  bit   exc_done = 0;
  int   exc_pc;
  int   req_seq = -1;    // oldest pending recovery (sequence number)
  bit   req_bq;          // recovery caused by a late push
  int   req_dir;

  function automatic int free_ck();
    for (int i = 0; i < 8; i++) if (!ck_busy[i]) return i;
    return -1;
  endfunction
  function automatic int n_free_ck();
    int n = 0;
    for (int i = 0; i < 8; i++) if (!ck_busy[i]) n++;
    return n;
  endfunction

  task automatic drive_idle();
    f_bq_push_cnt = 0; f_bq_pop_cnt = 0; f_bp_pred = 0; f_mark = 0; f_forward = 0;
    f_tq_push = 0; f_tq_pop = 0; f_tq_bot = 0; f_hold = 0;
    for (int k = 0; k < W; k++) begin r_vq_op[k] = VQ_NONE; r_vq_push_preg[k] = 0; end
    r_bq_ckpt_we = 0; r_bq_ckpt_idx = 0; r_bq_ckpt_id = 0;
    ck_we = 0; ck_id = 0; ck_bq = 0; ck_tq = 0; ck_vq = 0;
    x_bq_push_valid = 0; x_bq_push_idx = 0; x_bq_push_pred = 0;
    x_tq_push_valid = 0; x_tq_push_idx = 0; x_tq_push_val = 0;
    rt_bq_push_cnt = 0; rt_bq_pop_cnt = 0; rt_vq_push_cnt = 0; rt_vq_pop_cnt = 0;
    rt_mark = 0; rt_forward = 0; rt_tq_push = 0; rt_tq_pop = 0; rt_tq_bot = 0;
    rc_valid = 0; rc_kind = RC_CHECKPOINT; rc_ckpt_id = 0;
    bq_cx_rd_idx = 0; bq_cx_wr_valid = 0; bq_cx_wr_idx = 0; bq_cx_wr_byte = 0;
    cx_vq_save = 0; cx_vq_restore = 0; cx_vq_base = 0; cx_vq_u_ready = 0;
    cx_vq_ld_len_valid = 0; cx_vq_ld_len = 0;
  endtask

  // squash every in-flight instruction younger than seq (or from seq on)
  task automatic squash(int keep_upto_seq);
    while (fl.size() > 0 && fl[$].seq > keep_upto_seq) begin
      fl_t e;
      e = fl.pop_back();
      if (e.has_ck) ck_busy[e.ck] = 0;
      if (e.kind == I_PUSH_VQ) freelist.push_back(e.preg);
    end
  endtask

  // ---------------- one cycle of the core model ----------------
  int ret_pregs [$];
  int push_dir;
  int ctx_step = 0;
  logic [7:0] ctx_img [17];
  int cx_mem [longint];   // memory seen by the Save_VQ / Restore_VQ micro-operations
  bit cx_ret_pop, cx_ret_push, cx_ld_pending;
  int cx_ret_preg;

  task automatic cycle_model();
    bit drained;
    drive_idle();
    ret_pregs.delete();
    drained = (fl.size() == 0);

    // ---- recovery has the cycle to itself ----
    if (req_seq >= 0) begin
      int pos;
      pos = -1;
      foreach (fl[i]) if (fl[i].seq == req_seq) pos = i;
      if (pos >= 0) begin
        rc_valid = 1; rc_kind = RC_CHECKPOINT; rc_ckpt_id = 3'(fl[pos].ck);
        if (req_bq) fl[pos].dir = req_dir;
        fl[pos].br_mispred = 0;
        pc = fl[pos].pc + 1;
        squash(req_seq);
        mech[M_BR_RECOVER] += req_bq ? 0 : 1;
      end
      req_seq = -1;
      return;
    end

    // ---- retire (in order, up to 4) ----
    begin
      int n;
      bit stop;
      bit tq_used;
      n = 0; stop = 0; tq_used = 0;
      while (!stop && n < W && fl.size() > 0) begin
        fl_t e;
        bit done;
        e = fl[0];
        done = (e.kind == I_PUSH_BQ || e.kind == I_PUSH_TQ) ? e.executed :
               (e.kind == I_LONG) ? (cyc >= e.fcyc + LAT + prog[e.pc].val)
                                  : (cyc >= e.fcyc + LAT + 1);
        if (!done || e.rec_pending || e.br_mispred) break;
        if ((e.kind == I_PUSH_TQ || e.kind == I_POP_TQ || e.kind == I_BR_TCR) && tq_used) break;
        if (!exc_done && e.pc == exc_pc) begin
          // exception: older ones retire in this cycle, everything else is squashed
          exc_done = 1;
          rc_valid = 1; rc_kind = RC_COMMITTED;
          squash(e.seq - 1);
          pc = exc_pc;
          mech[M_EXCEPTION]++;
          break;
        end
        void'(fl.pop_front());
        n++;
        if (e.has_ck) ck_busy[e.ck] = 0;
        case (e.kind)
          I_PUSH_BQ: rt_bq_push_cnt++;
          I_BR_BQ: begin
            rt_bq_pop_cnt++;
            check(e.dir == prog[e.pc].exp, "retired Branch_on_BQ has the pushed predicate");
            if (e.dir != prog[e.pc].exp)
              $display("  pc=%0d seq=%0d idx=%0d has_ck=%0d ck=%0d fcyc=%0d cyc=%0d", e.pc, e.seq, e.idx,
                       e.has_ck, e.ck, e.fcyc, cyc);
          end
          I_MARK: begin rt_mark = 1; stop = 1; end
          I_FWD:  begin rt_forward = 1; stop = 1; end
          I_PUSH_VQ: rt_vq_push_cnt++;
          I_POP_VQ: begin
            // the register freed by the renamer must be the one the pop read
            ret_pregs.push_back(e.preg);
            rt_vq_pop_cnt++;
            freelist.push_back(e.preg);
          end
          I_PUSH_TQ: begin rt_tq_push = 1; tq_used = 1; end
          I_POP_TQ:  begin rt_tq_pop = 1; tq_used = 1; end
          I_BR_TCR:  begin rt_tq_bot = 1; tq_used = 1; end
          default: ;
        endcase
      end
      if (rc_valid) begin  // exception cycle: nothing else
        deferred_checks();
        return;
      end
    end

    // ---- execute ----
    begin
      bit bq_port, tq_port;
      bq_port = 0; tq_port = 0;
      foreach (fl[i]) begin
        if (!fl[i].executed && cyc >= fl[i].fcyc + LAT) begin
          case (fl[i].kind)
            I_PUSH_BQ: if (!bq_port) begin
              bq_port = 1;
              x_bq_push_valid = 1; x_bq_push_idx = 7'(fl[i].idx);
              x_bq_push_pred = 1'(prog[fl[i].pc].val);
              fl[i].executed = 1;
              push_dir = prog[fl[i].pc].val;
            end
            I_PUSH_TQ: if (!tq_port) begin
              tq_port = 1;
              x_tq_push_valid = 1; x_tq_push_idx = 8'(fl[i].idx);
              x_tq_push_val = prog[fl[i].pc].val;
              fl[i].executed = 1;
            end
            I_PUSH_VQ: prf[fl[i].preg] = prog[fl[i].pc].val;
            I_POP_VQ: begin
              check(prf[fl[i].preg] == prog[fl[i].pc].exp, "Pop_VQ reads the pushed value");
              fl[i].executed = 1;
            end
            default: ;
          endcase
          if (fl[i].kind == I_PUSH_VQ) fl[i].executed = 1;
          if (fl[i].br_mispred && cyc >= fl[i].fcyc + LAT &&
              (req_seq < 0 || fl[i].seq < req_seq)) begin
            req_seq = fl[i].seq; req_bq = 0;
          end
        end
      end
    end

    // ---- context switch: serialised; the BQ image one byte per cycle, then
    //      Save_VQ / Restore_VQ through the cracker, one micro-operation per cycle ----
    if (pc < prog.size() && prog[pc].kind == I_CTXSW) begin
      if (drained && ctx_step < 35) begin
        if (ctx_step < 17) begin                 // Save_BQ
          bq_cx_rd_idx = 5'(ctx_step); #1;
          ctx_img[ctx_step] = bq_cx_rd_byte;
          if (ctx_step == 0)
            check(int'(bq_cx_rd_byte) == prog[pc].exp, "Save_BQ length byte");
        end else if (ctx_step == 17) begin       // the other process: empty BQ
          bq_cx_wr_valid = 1; bq_cx_wr_idx = 0; bq_cx_wr_byte = 0;
        end else begin                           // Restore_BQ
          if (ctx_step == 18) check(bq_length == 0, "other process sees an empty BQ");
          bq_cx_wr_valid = 1; bq_cx_wr_idx = 5'(ctx_step - 18);
          bq_cx_wr_byte = ctx_img[ctx_step - 18];
        end
        ctx_step++;
      end else if (drained) begin
        // micro-operations renamed in the previous cycle retire now
        if (cx_ret_pop) begin
          rt_vq_pop_cnt = 1; #1;
          check(rt_free_valid[0] && int'(rt_free_preg[0]) == cx_ret_preg,
                "Save_VQ pop frees the register it read");
          freelist.push_back(cx_ret_preg);
          cx_ret_pop = 0;
        end
        if (cx_ret_push) begin rt_vq_push_cnt = 1; cx_ret_push = 0; end
        if (ctx_step == 35) begin                // Save_VQ
          cx_vq_save = 1; cx_vq_base = 64'h1000; ctx_step++;
        end else if (ctx_step == 37) begin       // Restore_VQ
          check(vq_length == 0, "Save_VQ empties the VQ");
          cx_vq_restore = 1; cx_vq_base = 64'h1000; ctx_step++;
        end else if (cx_ld_pending) begin        // the length load returns
          cx_vq_ld_len_valid = 1; cx_vq_ld_len = 8'(cx_mem[64'h1000]);
          cx_ld_pending = 0;
        end else if (cx_vq_u_valid) begin
          cx_vq_u_ready = 1;
          case (cx_vq_u_kind)
            CX_STORE_LEN: begin
              check(int'(cx_vq_u_len) == prog[pc].val, "Save_VQ stores the VQ length");
              cx_mem[cx_vq_u_addr] = int'(cx_vq_u_len);
            end
            CX_POP_STORE: begin
              r_vq_op[0] = VQ_POP; #1;
              cx_ret_preg = int'(r_vq_pop_preg[0]);
              cx_mem[cx_vq_u_addr] = prf[cx_ret_preg];
              cx_ret_pop = 1;
              mech[M_VQ_CTX]++;
            end
            CX_LOAD_LEN: cx_ld_pending = 1;
            CX_LOAD_PUSH: begin
              int p;
              p = freelist.pop_front();
              prf[p] = cx_mem[cx_vq_u_addr];
              r_vq_op[0] = VQ_PUSH; r_vq_push_preg[0] = 8'(p);
              cx_ret_push = 1;
            end
            default: ;
          endcase
        end else if (!cx_vq_busy && !cx_ret_pop && !cx_ret_push) begin
          if (ctx_step == 36) ctx_step = 37;     // save done
          else begin                             // restore done
            check(int'(vq_length) == prog[pc].val, "Restore_VQ restores the VQ length");
            ctx_step = 0; pc++; mech[M_CTX]++;
          end
        end
      end
      deferred_checks();
      return;
    end

    // ---- fetch / rename one bundle ----
    begin
      fl_t  nb [$];
      int   npc;
      int   nbp, nbq_push, nvq;
      bit   end_b;
      bit   want_ck;
      int   vq_push_pos [$];
      int   fl_taken [$];
      npc = pc; nbp = 0; nbq_push = 0; nvq = 0; end_b = 0;
      want_ck = ($urandom_range(0, 39) == 0) && n_free_ck() >= 3;
      #1;
      while (!end_b && nb.size() < W && npc < prog.size()) begin
        fl_t e;
        ins_t in;
        in = prog[npc];
        if (in.kind == I_CTXSW) break;          // handled on its own, above
        e = '{seq: 0, pc: npc, kind: in.kind, fcyc: cyc, executed: 0, has_ck: 0, ck: 0,
              rec_pending: 0, br_mispred: 0, idx: 0, preg: 0, dir: 0};
        if (in.kind inside {I_PUSH_TQ, I_POP_TQ, I_BR_TCR}) begin
          if (nb.size() > 0) break;
          end_b = 1;
          if (in.kind == I_PUSH_TQ) begin f_tq_push = 1; e.idx = int'(f_tq_push_idx); end
          if (in.kind == I_POP_TQ)  f_tq_pop = 1;
          if (in.kind == I_BR_TCR)  f_tq_bot = 1;
        end else if (in.kind == I_BR_BQ) begin
          e.idx = int'(f_bq_pop_idx[nbp]);
          if (f_bq_pop_hit[nbp]) begin
            e.dir = int'(f_bq_pop_pred[nbp]);
          end else begin
            if (free_ck() < 0) break;
            f_bp_pred[nbp] = 1'($urandom_range(0, 1));
            e.dir = int'(f_bp_pred[nbp]);
            e.has_ck = 1; e.ck = free_ck(); ck_busy[e.ck] = 1;
            e.rec_pending = 1;
            end_b = 1;
          end
          nbp++;
          f_bq_pop_cnt = 3'(nbp);
        end else if (in.kind == I_PUSH_BQ) begin
          e.idx = int'(f_bq_push_idx[nbq_push]);
          nbq_push++;
          f_bq_push_cnt = 3'(nbq_push);
        end else if (in.kind == I_MARK) begin
          f_mark = 1; end_b = 1;
        end else if (in.kind == I_FWD) begin
          f_forward = 1; end_b = 1;
        end else if (in.kind == I_PUSH_VQ) begin
          if (freelist.size() == 0) break;
          e.preg = freelist.pop_front();
          r_vq_op[nvq] = VQ_PUSH; r_vq_push_preg[nvq] = 8'(e.preg);
          vq_push_pos.push_back(nvq);
          nvq++;
        end else if (in.kind == I_POP_VQ) begin
          r_vq_op[nvq] = VQ_POP;
          fl_taken.push_back(nb.size());
          e.idx = nvq;          // slot, resolved below
          nvq++;
        end
        nb.push_back(e);
        npc++;
        if (want_ck && !e.has_ck && !end_b) begin
          end_b = 1;
        end
      end
      #1;
      // VQ stall holds the fetch-stage queues; a fetch stall cancels the renames
      if (nb.size() > 0) begin
        bit fs, vs;
        fs = f_stall; vs = r_vq_stall;
        if (vs) begin
          f_hold = 1;
          if (!fs && (f_bq_push_cnt != 0 || f_bq_pop_cnt != 0)) mech[M_HOLD]++;
        end
        if (fs) for (int k = 0; k < W; k++) r_vq_op[k] = VQ_NONE;
        #1;
        if (fs) begin
          // a bundle holds either TQ or BQ/VQ instructions: name the cause
          if (f_tq_pop) mech[M_TQ_MISS]++;
          else if (f_tq_push) begin
            check(tq_length == 9'd256, "TQ stall on a push only when the TQ is full");
            mech[M_TQ_FULL]++;
          end else begin
            check(int'(bq_length) + int'(f_bq_push_cnt) > 128,
                  "BQ stall only when the pushes would overfill it");
            mech[M_BQ_FULL]++;
          end
        end else begin
          check(int'(bq_length) + int'(f_bq_push_cnt) <= 128 && !(f_tq_push && tq_length == 9'd256),
                "bundle accepted only when the queues have room");
        end
        if (vs) mech[M_VQ_STALL]++;
        if (fs || vs) begin
          // give the registers back in their original order
          begin
            int tmp [$];
            foreach (nb[i]) begin
              if (nb[i].has_ck) ck_busy[nb[i].ck] = 0;
              if (nb[i].kind == I_PUSH_VQ) tmp.push_back(nb[i].preg);
            end
            for (int i = tmp.size() - 1; i >= 0; i--) freelist.push_front(tmp[i]);
          end
          f_bq_push_cnt = 0; f_bq_pop_cnt = 0; f_mark = 0; f_forward = 0;
          f_tq_push = 0; f_tq_pop = 0; f_tq_bot = 0;
          for (int k = 0; k < W; k++) r_vq_op[k] = VQ_NONE;
          f_hold = 0;
        end else begin
          // accepted: resolve pops, TCR outcomes, checkpoints
          int vslot;
          vslot = 0;
          if (nbp > 1) mech[M_MULTI_POP]++;
          foreach (nb[i]) begin
            nb[i].seq = seq_ctr++;
            case (nb[i].kind)
              I_BR_BQ: begin
                if (!nb[i].has_ck) begin
                  mech[M_BQ_HIT]++;
                  check(nb[i].dir == prog[nb[i].pc].exp, "BQ hit delivers the pushed predicate");
                end else mech[M_BQ_MISS]++;
              end
              I_POP_VQ: begin
                nb[i].preg = int'(r_vq_pop_preg[nb[i].idx]);
                foreach (nb[j]) if (j < i && nb[j].kind == I_PUSH_VQ) mech[M_VQ_BYPASS]++;
              end
              I_BR_TCR: begin
                check(int'(f_tq_bot_taken) == prog[nb[i].pc].exp, "Branch_on_TCR outcome");
                if (f_tq_bot_taken) mech[M_TCR_CONT]++; else mech[M_TCR_EXIT]++;
              end
              I_MARK: mech[M_MARK]++;
              I_FWD: begin
                check(f_bq_next[23:16] == f_bq_next[7:0], "Forward moves the BQ head to the mark");
                if (prog[nb[i].pc].exp > 0) mech[M_FORWARD_SKIP]++;
              end
              default: ;
            endcase
          end
          // checkpoint: a speculative pop, or a random checkpointed branch.
          // A speculative pop's checkpoint id is recorded in its BQ entry in
          // this cycle, before its push can execute.
          if (nb[$].has_ck) begin
            r_bq_ckpt_we = 1; r_bq_ckpt_idx = 7'(nb[$].idx); r_bq_ckpt_id = 3'(nb[$].ck);
            nb[$].rec_pending = 0;
          end
          if (nb[$].has_ck || want_ck) begin
            if (!nb[$].has_ck) begin
              nb[$].has_ck = 1; nb[$].ck = free_ck(); ck_busy[nb[$].ck] = 1;
              nb[$].br_mispred = ($urandom_range(0, 1) == 1);
            end
            ck_we = 1; ck_id = 3'(nb[$].ck);
            ck_bq = f_bq_next; ck_tq = f_tq_next; ck_vq = r_vq_next;
          end
          foreach (nb[i]) fl.push_back(nb[i]);
          pc = npc;
        end
      end
    end
    deferred_checks();
  endtask

  // checks of combinational outputs, once the cycle's inputs are final
  task automatic deferred_checks();
    #1;
    foreach (ret_pregs[k])
      check(rt_free_valid[k] && int'(rt_free_preg[k]) == ret_pregs[k],
            "retired Pop_VQ frees its push's register");
    if (x_bq_push_valid && bq_late) begin
      if (bq_misp) begin
        mech[M_LATE_MISP]++;
        foreach (fl[j]) if (fl[j].has_ck && fl[j].ck == int'(bq_misp_ckpt) &&
                            fl[j].kind == I_BR_BQ) begin
          if (req_seq < 0 || fl[j].seq < req_seq) begin
            req_seq = fl[j].seq; req_bq = 1; req_dir = push_dir;
          end
        end
      end else mech[M_LATE_OK]++;
    end
  endtask

  // ---------------- main ----------------
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drive_idle();
    // phase 1
    soplex_chunk(64); soplex_chunk(3); soplex_chunk(128); soplex_chunk(128, 1, 400);
    soplex_chunk(5); soplex_chunk(40); soplex_chunk(64, 2, 400); soplex_chunk(5);
    // phase 2: early exit with Mark / Forward
    for (int i = 0; i < 20; i++) emit(I_PUSH_BQ, int'($urandom_range(0, 1)));
    emit(I_MARK, 0);
    for (int i = 0; i < 7; i++) emit(I_BR_BQ, 0);
    emit(I_FWD, 0);
    for (int i = 0; i < 5; i++) emit(I_PUSH_BQ, int'($urandom_range(0, 1)));
    for (int i = 0; i < 5; i++) emit(I_BR_BQ, 0);
    // a context switch between a first loop and its second loop
    soplex_chunk(30, 1, 0, 1);
    // value-only loops of one iteration, so that a pop shares its push's bundle
    for (int i = 0; i < 4; i++) begin
      emit(I_PUSH_VQ, int'($urandom_range(0, 1_000_000)));
      emit(I_POP_VQ, 0);
    end
    // phase 3
    tq_chunk(3, '{3, 0, 9});
    tq_chunk(256, '{}, 3000);
    tq_chunk(4, '{});
    exc_pc = 300;
    for (int i = 0; i < NPREG; i++) freelist.push_back(i);

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (pc < prog.size() || fl.size() > 0) begin
      @(negedge clk);
      cycle_model();
      @(posedge clk);
      cyc++;
      if (cyc > 150000) break;
    end
    @(negedge clk);
    drive_idle();
    #1;
    check(pc == prog.size() && fl.size() == 0, "whole program retired");
    check(bq_length == 0 && tq_length == 0 && vq_length == 0, "all queues empty at the end");
    check(freelist.size() == NPREG, "every physical register returned to the freelist");
    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-32s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism never happened: ", mech_name[m]});
    end
    $display("  program: %0d instructions in %0d cycles", prog.size(), cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
