// Self-checking testbench of csb_dff: random d, cs_in and cs_rs for many
// cycles; after each rising edge q and cs_out must equal d when cs_rs was
// low and cs_in when it was high.
module tb_csb_dff;
  logic clk = 1'b0;
  logic cs_rs, d, cs_in, q, cs_out;
  int checks = 0, failures = 0;
  logic exp_q;

  csb_dff dut (.clk, .cs_rs, .d, .cs_in, .q, .cs_out);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n_run = 0, n_scan = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      cs_rs = 1'($urandom);
      d     = 1'($urandom);
      cs_in = 1'($urandom);
      exp_q = cs_rs ? cs_in : d;
      if (cs_rs) n_scan++; else n_run++;
      @(negedge clk);
      checks++;
      if (q !== exp_q || cs_out !== exp_q) begin
        failures++;
        $display("mismatch step %0d: rs=%b d=%b si=%b q=%b so=%b", i, cs_rs, d, cs_in, q, cs_out);
      end
    end
    checks++;
    if (n_run == 0 || n_scan == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
