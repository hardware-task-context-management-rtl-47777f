// Self-checking testbench of cmu_reg: reset value, write and read-back of
// every field with run = 0, start of a transfer, writes ignored while run
// is 1, and run returning to 0 on done while the other fields stay.
module tb_cmu_reg;
  import ctx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, bus_we = 1'b0, done = 1'b0;
  logic [REG_W-1:0] bus_wdata = '0, bus_rdata;
  cmu_ctrl_t ctrl;
  int checks = 0, failures = 0;

  cmu_reg dut (.clk, .rst_n, .bus_we, .bus_wdata, .bus_rdata, .done, .ctrl);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [REG_W-1:0] exp, input string what);
    checks++;
    if (bus_rdata !== exp) begin
      failures++; $display("%s: read %h expected %h", what, bus_rdata, exp);
    end
  endtask

  task automatic write(input logic [REG_W-1:0] v);
    @(negedge clk); bus_we = 1'b1; bus_wdata = v;
    @(negedge clk); bus_we = 1'b0;
  endtask

  initial begin
    logic [REG_W-1:0] v, w;
    #12 rst_n = 1'b1;
    check('0, "reset");
    for (int i = 0; i < 50; i++) begin
      v = 16'($urandom) & 16'h7fff;             // run = 0
      write(v);
      check(v, "plain write");
      // field decoding follows the register map
      checks++;
      if (ctrl.run !== 1'b0 || ctrl.dir !== xfer_dir_e'(v[14]) ||
          ctrl.cid !== v[13:10] || ctrl.nb !== v[9:0]) begin
        failures++; $display("field decode wrong for %h", v);
      end
      v = v | 16'h8000;                          // start
      write(v);
      check(v, "start");
      w = 16'($urandom);
      write(w);                                  // ignored while busy
      check(v, "write while busy");
      repeat (i % 4) @(negedge clk);
      check(v, "busy holds");
      done = 1'b1; @(negedge clk); done = 1'b0;
      check(v & 16'h7fff, "run cleared by done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
