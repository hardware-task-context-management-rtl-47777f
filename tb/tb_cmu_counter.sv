// Self-checking testbench of cmu_counter. For saves and restores with
// random shift counts (and nb = 0, the full 1024), and a random delay before the clock
// acknowledge, it checks cycle by cycle: no scan before clk_ack; exactly
// nb cycles with cs_rs high; the address sequence 0..nb-1 with writes
// during a save, and a prefetch of word 0 followed by words 1..nb without
// writes during a restore; one done pulse right after the last shift.
module tb_cmu_counter;
  import ctx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, clk_ack = 1'b0;
  xfer_dir_e dir = XFER_SAVE;
  logic [NB_W-1:0] nb = '0, cnt;
  logic cs_rs, mem_we, done;
  int checks = 0, failures = 0;

  cmu_counter dut (.clk, .rst_n, .run, .dir, .nb, .clk_ack, .cnt, .cs_rs, .mem_we, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  // One transfer; outputs are sampled at falling edges.
  task automatic transfer(input xfer_dir_e d, input int n, input int ack_delay);
    int shifts = 0, cycles = 0;
    @(negedge clk);
    dir = d; nb = NB_W'(n); run = 1'b1; clk_ack = 1'b0;
    @(negedge clk);           // state enters CLK_WAIT at this edge
    expect_eq(int'(cs_rs) + int'(done) + int'(mem_we), 0, "activity on start");
    for (int i = 0; i < ack_delay; i++) begin
      @(negedge clk);
      expect_eq(int'(cs_rs) + int'(done) + int'(mem_we), 0, "activity before clk_ack");
    end
    clk_ack = 1'b1;
    @(negedge clk);           // state leaves CLK_WAIT at this edge
    if (d == XFER_RESTORE) begin
      expect_eq(int'(cs_rs), 0, "prefetch cs_rs");
      expect_eq(int'(cnt), 0, "prefetch address");
      expect_eq(int'(mem_we), 0, "prefetch write");
      @(negedge clk);
    end
    while (cs_rs) begin
      expect_eq(int'(cnt), ((d == XFER_SAVE) ? shifts : shifts + 1) % 1024, "shift address");
      expect_eq(int'(mem_we), (d == XFER_SAVE) ? 1 : 0, "shift write enable");
      shifts++;
      cycles++;
      if (cycles > 3000) break;
      @(negedge clk);
    end
    expect_eq(shifts, (n == 0) ? 1024 : n, "number of shifts");
    expect_eq(int'(done), 1, "done after last shift");
    run = 1'b0;                // the register clears run on done
    @(negedge clk);
    expect_eq(int'(done), 0, "done is one pulse");
    expect_eq(int'(cs_rs), 0, "idle after done");
  endtask

  initial begin
    automatic int n_save = 0, n_restore = 0;
    #12 rst_n = 1'b1;
    transfer(XFER_SAVE, 0, 1);
    transfer(XFER_RESTORE, 0, 3);
    transfer(XFER_SAVE, 1023, 2);
    transfer(XFER_RESTORE, 1023, 0);
    for (int i = 0; i < 40; i++) begin
      if (i % 2 == 0) begin transfer(XFER_SAVE, int'($urandom_range(1, 130)), i % 5); n_save++; end
      else begin transfer(XFER_RESTORE, int'($urandom_range(1, 130)), i % 4); n_restore++; end
    end
    expect_eq(n_save + n_restore, 40, "transfers done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
