// CMU control register.
//
// The single 16-bit register through which a processor drives the Context
// Management Unit (layout in ctx_pkg: run, S/R, CID, nb). A processor
// writes it with bus_we / bus_wdata and reads it back on bus_rdata. Writing
// run = 1 starts a transfer; the run bit then stays 1 until the sequencer
// pulses done, when it returns to 0 by itself, so a processor polls run to
// learn that the transfer is over. The field layout and the self-clearing
// run bit follow the published register. This design's own choices: writes
// that arrive while run is 1 are ignored, so a transfer in progress cannot
// be disturbed, and reset (rst_n, asynchronous, active low) clears the
// whole register.
//
// Timing: a write takes effect at the rising edge of clk where bus_we is
// high; run falls at the rising edge where done is high. bus_rdata is the
// register itself (no read latency).
module cmu_reg
  import ctx_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_we,
  input  logic [REG_W-1:0] bus_wdata,
  output logic [REG_W-1:0] bus_rdata,
  input  logic             done,
  output cmu_ctrl_t        ctrl
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0;
    end else if (ctrl.run) begin
      if (done) ctrl.run <= 1'b0;
    end else if (bus_we) begin
      ctrl <= cmu_ctrl_t'(bus_wdata);
    end
  end

  // done may only arrive during a transfer.
  a_done_while_running: assert property (
    @(posedge clk) disable iff (!rst_n) done |-> ctrl.run);

  assign bus_rdata = REG_W'(ctrl);

endmodule
