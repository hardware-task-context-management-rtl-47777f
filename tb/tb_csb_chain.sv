// Self-checking testbench of csb_chain, in the PCS8 organisation (123
// state bits, 8 chains of 16 cells) and the CSB one (1 chain of 123).
// Each instance is compared with a cell-level reference model kept in the
// testbench: run-mode loads, full unloads (the bits leaving cs_out must be
// the previous state, last cell first) and full loads through cs_in.
module tb_csb_chain;
  localparam int N = 123;
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

  // PCS8 instance
  localparam int C8 = 8, L8 = (N + C8 - 1) / C8;
  logic rs8; logic [N-1:0] d8, q8; logic [C8-1:0] si8, so8;
  csb_chain #(.N_BITS(N), .CHAINS(C8)) dut8 (.clk, .cs_rs(rs8), .d(d8), .q(q8), .cs_in(si8), .cs_out(so8));

  // CSB instance
  localparam int C1 = 1, L1 = N;
  logic rs1; logic [N-1:0] d1, q1; logic [C1-1:0] si1, so1;
  csb_chain #(.N_BITS(N), .CHAINS(C1)) dut1 (.clk, .cs_rs(rs1), .d(d1), .q(q1), .cs_in(si1), .cs_out(so1));

  function automatic logic [N-1:0] rnd_vec();
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  // Loads a random state in run mode, unloads it, loads another through
  // the chains, and checks both directions. chains/len give the geometry.
  task automatic exercise(input int chains, input int len, input int rounds);
    logic [N-1:0] st, nst;
    for (int r = 0; r < rounds; r++) begin
      st = rnd_vec();
      nst = rnd_vec();
      @(negedge clk);
      if (chains == 8) begin rs8 = 1'b0; d8 = st; end else begin rs1 = 1'b0; d1 = st; end
      @(negedge clk);
      checks++;
      if ((chains == 8 ? q8 : q1) !== st) begin failures++; $display("run load mismatch"); end
      // hold in run mode with d = q, then shift len times
      for (int s = 0; s < len; s++) begin
        // bit entering chain j at shift s ends at cell j*len + len-1-s
        if (chains == 8) begin
          rs8 = 1'b1;
          for (int j = 0; j < 8; j++) begin
            int idx = j*len + len-1-s;
            si8[j] = (idx < N) ? nst[idx] : 1'b0;
            // bit leaving at shift s is cell j*len + len-1-s of old state
            if (idx < N) begin
              checks++;
              if (so8[j] !== st[idx]) begin failures++; $display("pcs8 unload mismatch chain %0d shift %0d", j, s); end
            end
          end
        end else begin
          rs1 = 1'b1;
          si1[0] = nst[len-1-s];
          checks++;
          if (so1[0] !== st[len-1-s]) begin failures++; $display("csb unload mismatch shift %0d", s); end
        end
        @(negedge clk);
      end
      checks++;
      if ((chains == 8 ? q8 : q1) !== nst) begin failures++; $display("scan load mismatch chains=%0d", chains); end
      if (chains == 8) rs8 = 1'b0; else rs1 = 1'b0;
    end
  endtask

  initial begin
    rs8 = 1'b0; rs1 = 1'b0; d8 = '0; d1 = '0; si8 = '0; si1 = '0;
    exercise(8, L8, 6);
    exercise(1, L1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
