// Save_VQ / Restore_VQ cracker: the decode-stage sequencer that turns the two
// context-switch macro-instructions of the value queue into micro-operations.
//
// Save_VQ becomes a store of the VQ length register followed by 'length'
// pairs of (Pop_VQ, store), one pair per value from the head. Restore_VQ
// becomes a load of the saved length, then, once the load has returned,
// 'length' pairs of (load, Push_VQ), so the values re-enter the VQ in their
// original order. Each micro-operation (a pair counts as one) carries the
// memory address it uses: the length at the macro-instruction's base address,
// value i at base + VAL_BYTES * (i + 1).
//
// Interface and timing: d_save / d_restore start a macro-instruction when
// the cracker is idle (busy low); decode must stall while busy is high.
// u_valid/u_kind/u_addr present one micro-operation per cycle and advance on
// u_ready. After CX_LOAD_LEN is accepted the cracker waits for ld_len_valid
// with the loaded length. u_len is the length being saved, the data of
// CX_STORE_LEN. vq_length is sampled in the cycle a Save_VQ starts, so the
// core must issue Save_VQ with no older Push_VQ or Pop_VQ still in flight.
//
// The cracking into pairs, the length-first order and the 32-bit values
// (VAL_BYTES = 4) follow the document; the memory layout (the length in its
// own VAL_BYTES slot, then one slot per value), the 64-bit address, one
// micro-operation per cycle and the handshake are this design's choices.
module vq_ctx_cracker
  import cfd_pkg::*;
#(
  parameter int unsigned VQ_SIZE   = 128,
  parameter int unsigned ADDR_W    = 64,
  parameter int unsigned VAL_BYTES = 4
) (
  input  logic clk,
  input  logic rst_n,

  input  logic                          d_save,
  input  logic                          d_restore,
  input  logic [ADDR_W-1:0]             d_base,
  input  logic [$clog2(VQ_SIZE+1)-1:0]  vq_length,
  output logic                          busy,

  output logic                          u_valid,
  output cx_uop_e                       u_kind,
  output logic [ADDR_W-1:0]             u_addr,
  output logic [$clog2(VQ_SIZE+1)-1:0]  u_len,
  input  logic                          u_ready,

  input  logic                          ld_len_valid,
  input  logic [$clog2(VQ_SIZE+1)-1:0]  ld_len
);

  localparam int unsigned LW = $clog2(VQ_SIZE + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_SAVE_LEN, S_SAVE_VAL, S_RST_LEN, S_WAIT_LEN, S_RST_VAL
  } state_e;

  state_e            state_q;
  logic [ADDR_W-1:0] base_q;
  logic [LW-1:0]     len_q;
  logic [LW-1:0]     cnt_q;     // values handled so far

  assign busy    = (state_q != S_IDLE);
  assign u_len   = len_q;
  assign u_valid = (state_q == S_SAVE_LEN) || (state_q == S_SAVE_VAL) ||
                   (state_q == S_RST_LEN)  || (state_q == S_RST_VAL);

  always_comb begin
    case (state_q)
      S_SAVE_VAL: u_kind = CX_POP_STORE;
      S_RST_LEN:  u_kind = CX_LOAD_LEN;
      S_RST_VAL:  u_kind = CX_LOAD_PUSH;
      default:    u_kind = CX_STORE_LEN;
    endcase
    if ((state_q == S_SAVE_VAL) || (state_q == S_RST_VAL))
      u_addr = base_q + ADDR_W'(VAL_BYTES) * (ADDR_W'(cnt_q) + ADDR_W'(1));
    else
      u_addr = base_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      base_q  <= '0;
      len_q   <= '0;
      cnt_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE: begin
          cnt_q  <= '0;
          base_q <= d_base;
          if (d_save) begin
            len_q   <= vq_length;
            state_q <= S_SAVE_LEN;
          end else if (d_restore) begin
            state_q <= S_RST_LEN;
          end
        end
        S_SAVE_LEN: if (u_ready) state_q <= (len_q == '0) ? S_IDLE : S_SAVE_VAL;
        S_RST_LEN:  if (u_ready) state_q <= S_WAIT_LEN;
        S_WAIT_LEN: if (ld_len_valid) begin
          len_q   <= ld_len;
          state_q <= (ld_len == '0) ? S_IDLE : S_RST_VAL;
        end
        S_SAVE_VAL, S_RST_VAL: if (u_ready) begin
          cnt_q <= cnt_q + LW'(1);
          if (cnt_q + LW'(1) == len_q) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // a restored length never exceeds the queue size
  a_ld_len: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == S_WAIT_LEN && ld_len_valid) |-> (int'(ld_len) <= VQ_SIZE));

endmodule
