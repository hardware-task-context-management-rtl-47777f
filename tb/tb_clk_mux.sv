// Self-checking testbench of clk_mux with a 14 ns run clock and a 10 ns
// scan clock. It switches the selection back and forth and checks that
// after each switch has settled the output follows the selected clock
// (edge-for-edge, sampled every nanosecond), that run_on / scan_on report
// the selection, that the two enables are never set together, and that the
// output never carries a pulse shorter than the shorter half period of
// the two clocks (no glitch).
module tb_clk_mux;
  logic clk_run = 1'b0, clk_scan = 1'b0, rst_n = 1'b0, sel = 1'b0;
  logic clk_out, run_on, scan_on;
  int checks = 0, failures = 0;
  realtime last_edge = 0.0;
  realtime min_pulse = 1.0e9;
  int switches = 0;

  clk_mux dut (.clk_run, .clk_scan, .rst_n, .sel, .clk_out, .run_on, .scan_on);

  always #7 clk_run  = ~clk_run;
  always #5 clk_scan = ~clk_scan;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(clk_out) begin
    if (rst_n && last_edge > 0.0 && ($realtime - last_edge) < min_pulse)
      min_pulse = $realtime - last_edge;
    last_edge = $realtime;
  end

  always @(run_on or scan_on) begin
    checks++;
    if (rst_n && run_on && scan_on) begin failures++; $display("both enables set at %t", $realtime); end
  end

  task automatic follow(input bit want_scan, input int ns);
    for (int t = 0; t < ns; t++) begin
      #1;
      checks++;
      if (clk_out !== (want_scan ? clk_scan : clk_run)) begin
        failures++;
        $display("clk_out does not follow %s at %t", want_scan ? "scan" : "run", $realtime);
      end
    end
    checks++;
    if (scan_on !== want_scan || run_on !== !want_scan) begin
      failures++; $display("status wrong: run_on=%b scan_on=%b", run_on, scan_on);
    end
  endtask

  initial begin
    #23 rst_n = 1'b1;
    #100;
    follow(1'b0, 200);
    for (int i = 0; i < 6; i++) begin
      sel = 1'b1; switches++;
      repeat (6 + i) #10;
      follow(1'b1, 150);
      sel = 1'b0; switches++;
      repeat (6 + i) #11;
      follow(1'b0, 150);
    end
    checks++;
    if (min_pulse < 5.0) begin failures++; $display("glitch: pulse of %0t", min_pulse); end
    checks++;
    if (switches != 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
