// End-to-end testbench of ctx_mgmt_top at its default parameters. Run
// clock period 4, scan clock period 6 (the same 2:3 ratio as a 300 MHz run
// clock against a 200 MHz scan clock). Two agents (tb_task_agent) drive the
// CSB task and the PCS8 task at the same time, each time-sharing its task
// between three filter streams over ten save / restore rounds and checking
// every filter output. The bench requires every mechanism to have occurred
// in both tasks (save, restore, start of a new stream, output check right
// after a restore, write refused during a transfer), and checks that a
// PCS8 transfer moves the 123-bit context in 16 scan edges against 123 for
// CSB (the agents check the edge counts of every transfer).
module tb_ctx_mgmt_top;
  import ctx_pkg::*;
  localparam int DW = 8;
  logic clk_run = 1'b0, clk_scan = 1'b0, rst_n = 1'b0;

  logic             csb_bus_we, pcs_bus_we;
  logic [REG_W-1:0] csb_bus_wdata, csb_bus_rdata, pcs_bus_wdata, pcs_bus_rdata;
  logic [DW-1:0]    csb_x, pcs_x;
  logic [DW+2:0]    csb_y, pcs_y;
  logic             csb_task_clk, csb_cs_rs, pcs_task_clk, pcs_cs_rs;
  logic             csb_fin, pcs_fin;
  int c_checks, c_fail, c_save, c_rest, c_fresh, c_res, c_busy;
  int p_checks, p_fail, p_save, p_rest, p_fresh, p_res, p_busy;
  int checks = 0, failures = 0;
  int csb_scan_edges = 0, pcs_scan_edges = 0;

  always #2 clk_run  = ~clk_run;
  always #3 clk_scan = ~clk_scan;

  ctx_mgmt_top dut (
    .clk_scan, .clk_run, .rst_n,
    .csb_bus_we, .csb_bus_wdata, .csb_bus_rdata, .csb_x, .csb_y, .csb_task_clk, .csb_cs_rs,
    .pcs_bus_we, .pcs_bus_wdata, .pcs_bus_rdata, .pcs_x, .pcs_y, .pcs_task_clk, .pcs_cs_rs);

  tb_task_agent #(.CHAINS(CHAINS_CSB), .ROUNDS(10)) a_csb (
    .clk_scan, .rst_n, .task_clk(csb_task_clk), .cs_rs(csb_cs_rs),
    .bus_we(csb_bus_we), .bus_wdata(csb_bus_wdata), .bus_rdata(csb_bus_rdata),
    .x(csb_x), .y(csb_y), .finished(csb_fin), .checks(c_checks), .failures(c_fail),
    .n_save(c_save), .n_restore(c_rest), .n_fresh(c_fresh), .n_resume_checks(c_res),
    .n_busy_writes(c_busy));

  tb_task_agent #(.CHAINS(CHAINS_PCS8), .ROUNDS(10)) a_pcs (
    .clk_scan, .rst_n, .task_clk(pcs_task_clk), .cs_rs(pcs_cs_rs),
    .bus_we(pcs_bus_we), .bus_wdata(pcs_bus_wdata), .bus_rdata(pcs_bus_rdata),
    .x(pcs_x), .y(pcs_y), .finished(pcs_fin), .checks(p_checks), .failures(p_fail),
    .n_save(p_save), .n_restore(p_rest), .n_fresh(p_fresh), .n_resume_checks(p_res),
    .n_busy_writes(p_busy));

  // scan edges seen by each task (cs_rs is stable across the low phase)
  always @(negedge clk_scan) begin
    if (csb_cs_rs) csb_scan_edges++;
    if (pcs_cs_rs) pcs_scan_edges++;
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("never happened: %s", what); end
  endtask

  task automatic report();
    checks += c_checks + p_checks;
    failures += c_fail + p_fail;
    $display("CSB : saves=%0d restores=%0d fresh=%0d resumed=%0d busy_writes=%0d scan_edges=%0d",
             c_save, c_rest, c_fresh, c_res, c_busy, csb_scan_edges);
    $display("PCS8: saves=%0d restores=%0d fresh=%0d resumed=%0d busy_writes=%0d scan_edges=%0d",
             p_save, p_rest, p_fresh, p_res, p_busy, pcs_scan_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (30000) @(posedge clk_scan);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    #20 rst_n = 1'b1;
    wait (csb_fin && pcs_fin);
    need(c_save, "CSB save");       need(p_save, "PCS8 save");
    need(c_rest, "CSB restore");    need(p_rest, "PCS8 restore");
    need(c_fresh, "CSB new stream"); need(p_fresh, "PCS8 new stream");
    need(c_res, "CSB resumed output"); need(p_res, "PCS8 resumed output");
    need(c_busy, "CSB refused write"); need(p_busy, "PCS8 refused write");
    // transfer cost: 123 shifts per CSB transfer, 16 per PCS8 transfer
    checks++;
    if (csb_scan_edges != 123 * (c_save + c_rest) || pcs_scan_edges != 16 * (p_save + p_rest)) begin
      failures++; $display("scan edge totals wrong");
    end
    report();
    $finish;
  end
endmodule
