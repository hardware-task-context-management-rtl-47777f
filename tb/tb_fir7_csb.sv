// Self-checking testbench of fir7_csb, in the PCS8 (8 scanpaths) and the
// CSB (1 scanpath) form. For each: run a sample stream A and compare y with
// the sum of the samples three to ten edges back; shift the whole context
// out (keeping what leaves the chains); run an unrelated stream B; shift
// the kept context back in; and continue stream A, whose outputs must go
// on exactly as if it had never been interrupted. The number of shifts
// per transfer is 16 for PCS8 and 123 for CSB.
module tb_fir7_csb;
  localparam int DW = 8, N = 123;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rs8, rs1;
  logic [DW-1:0] x8, x1;
  logic [DW+2:0] y8, y1;
  logic [7:0] si8, so8;
  logic [0:0] si1, so1;

  fir7_csb #(.DW(DW), .CHAINS(8)) dut8 (.clk, .cs_rs(rs8), .x(x8), .y(y8), .cs_in(si8), .cs_out(so8));
  fir7_csb #(.DW(DW), .CHAINS(1)) dut1 (.clk, .cs_rs(rs1), .x(x1), .y(y1), .cs_in(si1), .cs_out(so1));

  // Sample k of stream s.
  function automatic logic [DW-1:0] smp(input int s, input int k);
    return DW'((k * 37 + s * 101 + (k * k) % 13) ^ (s << 3));
  endfunction

  // y after k run edges of stream s (valid for k >= 10).
  function automatic int exp_y(input int s, input int k);
    int sum = 0;
    for (int j = k - 10; j <= k - 3; j++) sum += int'(smp(s, j));
    return sum;
  endfunction

  task automatic drive(input int chains, input logic rs, input logic [DW-1:0] x, input logic [7:0] si);
    if (chains == 8) begin rs8 = rs; x8 = x; si8 = si; end
    else begin rs1 = rs; x1 = x; si1 = si[0]; end
  endtask

  function automatic int get_y(input int chains);
    return (chains == 8) ? int'(y8) : int'(y1);
  endfunction

  function automatic logic [7:0] get_so(input int chains);
    return (chains == 8) ? so8 : {7'b0, so1};
  endfunction

  // Runs n edges of stream s from sample k, checking y where it is known.
  task automatic run(input int chains, input int s, inout int k, input int n, input int known_from);
    for (int i = 0; i < n; i++) begin
      drive(chains, 1'b0, smp(s, k), 8'h00);
      @(negedge clk);
      k++;
      if (k >= known_from) begin
        checks++;
        if (get_y(chains) != exp_y(s, k)) begin
          failures++; $display("chains=%0d stream %0d edge %0d: y=%0d expected %0d", chains, s, k, get_y(chains), exp_y(s, k));
        end
      end
    end
  endtask

  task automatic exercise(input int chains);
    int len = (N + chains - 1) / chains;
    int ka = 0, kb = 0;
    logic [7:0] kept [$];
    run(chains, 1, ka, 30, 10);
    // save: shift out, refill with random bits
    kept.delete();
    for (int s = 0; s < len; s++) begin
      kept.push_back(get_so(chains));
      drive(chains, 1'b1, 8'h00, 8'($urandom));
      @(negedge clk);
    end
    run(chains, 2, kb, 25, 10);
    // restore: the word that left at shift s enters at shift s
    for (int s = 0; s < len; s++) begin
      drive(chains, 1'b1, 8'h00, kept[s]);
      @(negedge clk);
    end
    checks++;
    if (get_y(chains) != exp_y(1, ka)) begin failures++; $display("chains=%0d: y not restored", chains); end
    run(chains, 1, ka, 20, 0);
  endtask

  initial begin
    drive(8, 1'b0, '0, '0);
    drive(1, 1'b0, '0, '0);
    exercise(8);
    exercise(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
