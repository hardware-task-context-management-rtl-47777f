// Shared constants and types of the hardware-task context manager.
//
// The CMU is programmed through one 16-bit register whose layout is
//   [15] run  - write 1 to start a transfer, reads 1 until it completes
//   [14] S/R  - 1 = save the task context to memory, 0 = restore it
//   [13:10] CID - context identifier, selects one of 16 context slots
//   [9:0] nb  - number of scan shifts for the transfer
// The layout follows the published register map. The polarity of S/R
// (1 = save) is this design's choice.
package ctx_pkg;

  localparam int unsigned REG_W  = 16;
  localparam int unsigned CID_W  = 4;
  localparam int unsigned NB_W   = 10;

  // Chain counts of the two scanpath organisations.
  localparam int unsigned CHAINS_CSB  = 1;
  localparam int unsigned CHAINS_PCS8 = 8;

  typedef enum logic {
    XFER_RESTORE = 1'b0,
    XFER_SAVE    = 1'b1
  } xfer_dir_e;

  typedef struct packed {
    logic             run;
    xfer_dir_e        dir;
    logic [CID_W-1:0] cid;
    logic [NB_W-1:0]  nb;
  } cmu_ctrl_t;

endpackage
