// One preemptable hardware task with its context management.
//
// The evaluated configuration "FIR7 + CMU": the FIR task (fir7_csb) with
// CHAINS scanpaths, the CMU that saves and restores its context in block
// RAM, and the global clock multiplexer that gives the task its run clock
// in normal operation and the CMU's scan clock during a transfer.
// CHAINS = 1 is the CSB configuration, CHAINS = 8 the PCS8 one.
//
// Interface: clk_scan clocks the CMU and its processor bus; clk_run is the
// task's clock in run mode; x / y are the filter's stream, sampled and
// updated on task_clk, which is brought out together with cs_rs so that a
// source and sink of the stream can tell run edges (cs_rs low) from scan
// edges. A transfer of an L-shift context (L = ceil(123 / CHAINS)) needs
// nb = L: 123 shifts for CSB, 16 for PCS8.
module ptask
  import ctx_pkg::*;
#(
  parameter int unsigned CHAINS = 8,
  parameter int unsigned DW     = 8
) (
  input  logic             clk_scan,
  input  logic             clk_run,
  input  logic             rst_n,
  input  logic             bus_we,
  input  logic [REG_W-1:0] bus_wdata,
  output logic [REG_W-1:0] bus_rdata,
  input  logic [DW-1:0]    x,
  output logic [DW+2:0]    y,
  output logic             task_clk,
  output logic             cs_rs
);

  logic [CHAINS-1:0] cs_in, cs_out;
  logic              clk_sel, scan_on;

  cmu #(
    .CHAINS (CHAINS)
  ) u_cmu (
    .clk       (clk_scan),
    .rst_n     (rst_n),
    .bus_we    (bus_we),
    .bus_wdata (bus_wdata),
    .bus_rdata (bus_rdata),
    .cs_rs     (cs_rs),
    .cs_in     (cs_in),
    .cs_out    (cs_out),
    .clk_sel   (clk_sel),
    .clk_ack   (scan_on)
  );

  clk_mux u_clk_mux (
    .clk_run  (clk_run),
    .clk_scan (clk_scan),
    .rst_n    (rst_n),
    .sel      (clk_sel),
    .clk_out  (task_clk),
    .run_on   (),
    .scan_on  (scan_on)
  );

  fir7_csb #(
    .DW     (DW),
    .CHAINS (CHAINS)
  ) u_fir (
    .clk    (task_clk),
    .cs_rs  (cs_rs),
    .x      (x),
    .y      (y),
    .cs_in  (cs_in),
    .cs_out (cs_out)
  );

endmodule
