// Global clock multiplexer between the task's run clock and scan clock.
//
// A preemptable task runs from its own run clock, which may be faster or
// slower than the scan clock at which the CMU shifts its context. This
// multiplexer hands the task one or the other: sel = 0 selects clk_run,
// sel = 1 selects clk_scan. That such a multiplexer exists is stated in
// the published design; how it switches is this design's choice. It is a
// glitch-free switch: each clock has an enable that is synchronised to that
// clock (rising-edge then falling-edge flip-flop) and that may rise only
// once the other clock's enable has fallen, so the output never carries a
// shortened pulse. During a switch the output stays low for a few cycles.
//
// scan_on / run_on report which enable is set (scan_on changes on a
// falling edge of clk_scan, so it is stable at its rising edges and can be
// sampled by logic clocked from clk_scan). rst_n is asynchronous and
// clears both enables; the output is then low until the run clock's enable
// has been set two edges later.
module clk_mux (
  input  logic clk_run,
  input  logic clk_scan,
  input  logic rst_n,
  input  logic sel,
  output logic clk_out,
  output logic run_on,
  output logic scan_on
);

  logic run_s1, scan_s1;

  always_ff @(posedge clk_run or negedge rst_n)
    if (!rst_n) run_s1 <= 1'b0;
    else        run_s1 <= !sel && !scan_on;

  always_ff @(negedge clk_run or negedge rst_n)
    if (!rst_n) run_on <= 1'b0;
    else        run_on <= run_s1;

  always_ff @(posedge clk_scan or negedge rst_n)
    if (!rst_n) scan_s1 <= 1'b0;
    else        scan_s1 <= sel && !run_on;

  always_ff @(negedge clk_scan or negedge rst_n)
    if (!rst_n) scan_on <= 1'b0;
    else        scan_on <= scan_s1;

  // The two enables are never set together.
  a_one_clock: assert property (
    @(posedge clk_scan) disable iff (!rst_n) !(run_on && scan_on));

  assign clk_out = (clk_run && run_on) || (clk_scan && scan_on);

endmodule
