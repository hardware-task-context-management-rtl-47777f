// Self-checking testbench of cmu_bram (8-bit words, 16 x 1024): random
// writes against a reference array, then reads with one cycle of latency,
// and the read-first behaviour of a simultaneous read and write.
module tb_cmu_bram;
  logic clk = 1'b0, we = 1'b0;
  logic [3:0] adr_high = '0;
  logic [9:0] adr_low = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] ref_mem [int];
  int checks = 0, failures = 0;

  cmu_bram #(.WIDTH(8), .CID_W(4), .NB_W(10)) dut (.clk, .we, .adr_high, .adr_low, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    // fill some addresses, including both ends of the space
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      a = (i == 0) ? 0 : (i == 1) ? 16383 : int'($urandom_range(16383));
      {adr_high, adr_low} = 14'(a);
      din = 8'($urandom);
      we = 1'b1;
      ref_mem[a] = din;
    end
    @(negedge clk) we = 1'b0;
    foreach (ref_mem[k]) begin
      {adr_high, adr_low} = 14'(k);
      @(negedge clk);
      checks++;
      if (dout !== ref_mem[k]) begin failures++; $display("addr %0d read %h exp %h", k, dout, ref_mem[k]); end
    end
    // read-first: write a new value and see the old one on dout
    {adr_high, adr_low} = 14'd16383;
    din = ~ref_mem[16383];
    we = 1'b1;
    @(negedge clk);
    we = 1'b0;
    checks++;
    if (dout !== ref_mem[16383]) begin failures++; $display("read-first violated"); end
    @(negedge clk);
    checks++;
    if (dout !== ~ref_mem[16383]) begin failures++; $display("write during read lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
