// Self-checking testbench of ptask in its CSB form (one scanpath, 123
// shifts per transfer), with a run clock of period 14 and a scan clock of
// period 6, so that each switch of the task's clock takes several scan
// cycles.
// The agent tb_task_agent time-shares the task between three filter
// streams over eight save / restore rounds and checks every output; this
// bench adds the watchdog and requires every mechanism to have occurred.
module tb_ptask;
  import ctx_pkg::*;
  localparam int DW = 8;
  logic clk_run = 1'b0, clk_scan = 1'b0, rst_n = 1'b0;
  logic bus_we;
  logic [REG_W-1:0] bus_wdata, bus_rdata;
  logic [DW-1:0] x;
  logic [DW+2:0] y;
  logic task_clk, cs_rs, finished;
  int a_checks, a_failures, n_save, n_restore, n_fresh, n_resume, n_busy;
  int checks = 0, failures = 0;

  always #7 clk_run  = ~clk_run;
  always #3 clk_scan = ~clk_scan;

  ptask #(.CHAINS(CHAINS_CSB), .DW(DW)) dut (
    .clk_scan, .clk_run, .rst_n, .bus_we, .bus_wdata, .bus_rdata,
    .x, .y, .task_clk, .cs_rs);

  tb_task_agent #(.CHAINS(CHAINS_CSB), .ROUNDS(8)) agent (
    .clk_scan, .rst_n, .task_clk, .cs_rs, .bus_we, .bus_wdata, .bus_rdata,
    .x, .y, .finished, .checks(a_checks), .failures(a_failures),
    .n_save, .n_restore, .n_fresh, .n_resume_checks(n_resume), .n_busy_writes(n_busy));

  task automatic report();
    checks += a_checks;
    failures += a_failures;
    $display("saves=%0d restores=%0d fresh=%0d resumed=%0d busy_writes=%0d",
             n_save, n_restore, n_fresh, n_resume, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (20000) @(posedge clk_scan);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    #20 rst_n = 1'b1;
    wait (finished);
    checks += 4;
    if (n_save == 0)    begin failures++; $display("no save"); end
    if (n_restore == 0) begin failures++; $display("no restore"); end
    if (n_fresh == 0)   begin failures++; $display("no fresh start"); end
    if (n_resume == 0)  begin failures++; $display("no check after restore"); end
    report();
    $finish;
  end
endmodule
