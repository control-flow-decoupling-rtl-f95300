// Shared types for the control-flow-decoupling (CFD) queue hardware.
//
// The branch queue (BQ), trip-count queue (TQ) and value-queue renamer
// (VQ renamer) share one recovery interface: the core either rolls back to a
// branch checkpoint (misprediction) or to the committed state (exception).
// The checkpoint count (8) is the baseline core's; queue sizes are module
// parameters because the entry widths depend on them.
package cfd_pkg;

  // Number of branch checkpoints in the core (8 in the evaluated core).
  localparam int unsigned NUM_CKPT = 8;

  // Kind of roll-back requested by the core.
  typedef enum logic {
    RC_CHECKPOINT = 1'b0,  // restore from a branch checkpoint
    RC_COMMITTED  = 1'b1   // restore the committed (retired) state
  } recover_kind_e;

  // Value-queue operation carried by one rename slot.
  typedef enum logic [1:0] {
    VQ_NONE = 2'd0,
    VQ_PUSH = 2'd1,  // Push_VQ: implicit destination is the VQ tail
    VQ_POP  = 2'd2   // Pop_VQ: implicit source is the VQ head
  } vq_op_e;

  // Micro-operation issued by the Save_VQ / Restore_VQ cracker.
  typedef enum logic [1:0] {
    CX_STORE_LEN  = 2'd0,  // store the VQ length register
    CX_POP_STORE  = 2'd1,  // Pop_VQ into a temporary, then store it
    CX_LOAD_LEN   = 2'd2,  // load the saved VQ length
    CX_LOAD_PUSH  = 2'd3   // load a saved value, then Push_VQ it
  } cx_uop_e;

endpackage
