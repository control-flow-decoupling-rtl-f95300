// Self-checking testbench for vq_ctx_cracker (128-entry VQ, 64-bit
// addresses, 4-byte values). A small memory and VQ model here play the role
// of the core: each micro-operation is applied to them as it is accepted.
//   1. Save_VQ of 5 values at base 0x1000 with u_ready randomly held low:
//      expect CX_STORE_LEN of 5 at 0x1000, then five CX_POP_STORE at 0x1004,
//      0x1008, ... 0x1014, busy throughout and one micro-operation per
//      accepted cycle.
//   2. Restore_VQ from the same base: CX_LOAD_LEN at 0x1000, no
//      micro-operation until the length returns, then five CX_LOAD_PUSH at
//      the same slots; the VQ model then holds the saved values in order.
//   3. Save and restore of an empty VQ: only the length is stored and loaded.
//   4. Save and restore of a full VQ (128 values) at another base.
module tb_vq_ctx_cracker;
  import cfd_pkg::*;

  localparam int SIZE = 128;
  localparam int AW   = 64;
  localparam int LW   = $clog2(SIZE + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d_save, d_restore, busy, u_valid, u_ready, ld_len_valid;
  logic [AW-1:0] d_base, u_addr;
  logic [LW-1:0] vq_length, u_len, ld_len;
  cx_uop_e u_kind;

  vq_ctx_cracker dut (.*);

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // core model: VQ contents and memory, addressed by byte address
  longint vq [$];
  longint mem [longint];

  task automatic idle();
    d_save = 0; d_restore = 0; d_base = '0; u_ready = 0;
    ld_len_valid = 0; ld_len = '0;
  endtask

  // run one macro-instruction to its end, applying each micro-operation
  task automatic run(input bit save, input longint base, output int nuops);
    int cyc;
    bit len_pending;
    longint len_addr;
    nuops = 0; cyc = 0; len_pending = 0; len_addr = 0;
    @(negedge clk);
    vq_length = LW'(vq.size());
    d_base = AW'(base);
    if (save) d_save = 1; else d_restore = 1;
    check(!busy && !u_valid, "idle before the macro-instruction");
    @(negedge clk);
    idle();
    while (busy && cyc < 1000) begin
      cyc++;
      if (len_pending && $urandom_range(0, 2) == 0) begin
        check(!u_valid, "no micro-operation while the length load is outstanding");
        ld_len_valid = 1; ld_len = LW'(mem[len_addr]);
        len_pending = 0;
      end else if (len_pending) begin
        check(!u_valid, "no micro-operation while the length load is outstanding");
      end else if (u_valid && $urandom_range(0, 3) != 0) begin
        u_ready = 1;
        case (u_kind)
          CX_STORE_LEN: begin
            check(save && nuops == 0 && u_addr == AW'(base), "length stored first, at the base");
            check(int'(u_len) == vq.size(), "stored length is the VQ length");
            mem[base] = longint'(u_len);
          end
          CX_POP_STORE: begin
            check(save && u_addr == AW'(base + 4 * nuops), "value i stored at base + 4(i+1)");
            mem[longint'(u_addr)] = vq.pop_front();
          end
          CX_LOAD_LEN: begin
            check(!save && nuops == 0 && u_addr == AW'(base), "length loaded first, from the base");
            len_pending = 1; len_addr = base;
          end
          CX_LOAD_PUSH: begin
            check(!save && u_addr == AW'(base + 4 * nuops), "value i loaded from base + 4(i+1)");
            vq.push_back(mem[longint'(u_addr)]);
          end
          default: ;
        endcase
        nuops++;
      end
      @(negedge clk);
      idle();
    end
    check(!busy && !u_valid, "cracker returns to idle");
  endtask

  longint saved [$];
  int n;

  initial begin
    idle();
    vq_length = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------- 1/2. five values ----------
    for (int i = 0; i < 5; i++) vq.push_back(longint'($urandom));
    saved = vq;
    run(1, 64'h1000, n);
    check(n == 6, "Save_VQ of 5 values: one length store and 5 pairs");
    check(vq.size() == 0, "Save_VQ pops every value");
    check(mem[64'h1000] == 5 && mem[64'h1014] == saved[4], "memory image: length then values");
    run(0, 64'h1000, n);
    check(n == 6, "Restore_VQ of 5 values: one length load and 5 pairs");
    check(vq == saved, "restored VQ holds the saved values in order");

    // ---------- 3. empty VQ ----------
    vq.delete();
    run(1, 64'h2000, n);
    check(n == 1 && mem[64'h2000] == 0, "empty Save_VQ stores only the length");
    vq.push_back(7);         // the other process leaves something behind
    vq.delete();
    run(0, 64'h2000, n);
    check(n == 1 && vq.size() == 0, "empty Restore_VQ loads only the length");

    // ---------- 4. full VQ ----------
    for (int i = 0; i < SIZE; i++) vq.push_back(longint'(i) * 3 + 1);
    saved = vq;
    run(1, 64'h8000, n);
    check(n == SIZE + 1 && vq.size() == 0, "Save_VQ of a full VQ");
    run(0, 64'h8000, n);
    check(n == SIZE + 1 && vq == saved, "Restore_VQ of a full VQ");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
