// Top level: the FIR7 task in both context-transfer organisations.
//
// Two complete preemptable tasks side by side, as in the published
// evaluation: one whose context moves over a single scanpath (CSB, one bit
// per scan clock) and one over eight parallel scanpaths (PCS8, one byte
// per scan clock). Each has its own CMU with its own processor register
// port and its own filter stream; both share the run clock, the scan clock
// and the reset. See ptask for the timing of each.
module ctx_mgmt_top
  import ctx_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  logic             clk_scan,
  input  logic             clk_run,
  input  logic             rst_n,
  // CSB task
  input  logic             csb_bus_we,
  input  logic [REG_W-1:0] csb_bus_wdata,
  output logic [REG_W-1:0] csb_bus_rdata,
  input  logic [DW-1:0]    csb_x,
  output logic [DW+2:0]    csb_y,
  output logic             csb_task_clk,
  output logic             csb_cs_rs,
  // PCS8 task
  input  logic             pcs_bus_we,
  input  logic [REG_W-1:0] pcs_bus_wdata,
  output logic [REG_W-1:0] pcs_bus_rdata,
  input  logic [DW-1:0]    pcs_x,
  output logic [DW+2:0]    pcs_y,
  output logic             pcs_task_clk,
  output logic             pcs_cs_rs
);

  ptask #(.CHAINS(CHAINS_CSB), .DW(DW)) u_csb (
    .clk_scan  (clk_scan),
    .clk_run   (clk_run),
    .rst_n     (rst_n),
    .bus_we    (csb_bus_we),
    .bus_wdata (csb_bus_wdata),
    .bus_rdata (csb_bus_rdata),
    .x         (csb_x),
    .y         (csb_y),
    .task_clk  (csb_task_clk),
    .cs_rs     (csb_cs_rs)
  );

  ptask #(.CHAINS(CHAINS_PCS8), .DW(DW)) u_pcs8 (
    .clk_scan  (clk_scan),
    .clk_run   (clk_run),
    .rst_n     (rst_n),
    .bus_we    (pcs_bus_we),
    .bus_wdata (pcs_bus_wdata),
    .bus_rdata (pcs_bus_rdata),
    .x         (pcs_x),
    .y         (pcs_y),
    .task_clk  (pcs_task_clk),
    .cs_rs     (pcs_cs_rs)
  );

endmodule
