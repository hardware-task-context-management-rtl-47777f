// Context Management Unit (CMU).
//
// Saves the context of a preemptable hardware task into, or restores it
// from, an on-chip block RAM over the task's scanpaths, on the request of a
// processor. It joins the three parts of the published CMU: the control
// register (cmu_reg), the shift counter (cmu_counter) and the context
// memory (cmu_bram). The register's CID field is the high memory address
// and the counter the low one; the task's chain outputs CSout are written
// to the memory and the memory output drives the chain inputs CSin; CSrs
// puts the task's cells in scan mode. CHAINS = 1 serves a CSB task, 8 a
// PCS8 task.
//
// Beyond the published structure, the CMU drives clk_sel (the register's
// run bit) to switch the task onto the scan clock through its clock
// multiplexer, and waits for clk_ack before shifting; see cmu_counter for
// the cycle-by-cycle sequence. Everything runs on clk, the scan clock.
//
// Processor view: write {run=1, S/R, CID, nb} to start; poll until run
// reads 0.
module cmu
  import ctx_pkg::*;
#(
  parameter int unsigned CHAINS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor bus
  input  logic              bus_we,
  input  logic [REG_W-1:0]  bus_wdata,
  output logic [REG_W-1:0]  bus_rdata,
  // task scanpaths
  output logic              cs_rs,
  output logic [CHAINS-1:0] cs_in,
  input  logic [CHAINS-1:0] cs_out,
  // task clock multiplexer
  output logic              clk_sel,
  input  logic              clk_ack
);

  cmu_ctrl_t       ctrl;
  logic            done;
  logic            mem_we;
  logic [NB_W-1:0] cnt;

  cmu_reg u_reg (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_we    (bus_we),
    .bus_wdata (bus_wdata),
    .bus_rdata (bus_rdata),
    .done      (done),
    .ctrl      (ctrl)
  );

  cmu_counter u_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .run     (ctrl.run),
    .dir     (ctrl.dir),
    .nb      (ctrl.nb),
    .clk_ack (clk_ack),
    .cnt     (cnt),
    .cs_rs   (cs_rs),
    .mem_we  (mem_we),
    .done    (done)
  );

  cmu_bram #(
    .WIDTH (CHAINS),
    .CID_W (CID_W),
    .NB_W  (NB_W)
  ) u_bram (
    .clk      (clk),
    .we       (mem_we),
    .adr_high (ctrl.cid),
    .adr_low  (cnt),
    .din      (cs_out),
    .dout     (cs_in)
  );

  assign clk_sel = ctrl.run;

endmodule
