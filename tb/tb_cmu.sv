// Self-checking testbench of the CMU in its PCS8 form (8 scanpaths). The
// task is modelled in the testbench by 8 shift registers of 16 cells that
// shift on clk while cs_rs is high; the clock acknowledge follows clk_sel
// two cycles late, as a clock multiplexer would. Several random contexts
// are saved into different slots (CID 0, 3, 7, 15), the task is scrambled,
// and the contexts are restored in another order and compared bit for bit.
// Then all 16 slots are filled with full-size contexts of 1024 shifts
// (8192 bits each) and restored in another order. It also checks the words
// the CMU stores, the number of scan cycles of
// each transfer (nb), the processor-visible run bit and a write ignored
// during a transfer.
module tb_cmu;
  import ctx_pkg::*;
  localparam int C = 8, L = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_we = 1'b0;
  logic [REG_W-1:0] bus_wdata = '0, bus_rdata;
  logic cs_rs, clk_sel;
  logic [C-1:0] cs_in, cs_out;
  logic ack_d1 = 1'b0, clk_ack = 1'b0;
  localparam int LMAX = 1024;
  int len = L;               // length of the modelled scanpaths
  logic [C-1:0] chain [LMAX]; // chain[p][j]: cell p of scanpath j, p = len-1 at cs_out
  int checks = 0, failures = 0;
  int scan_cycles = 0;

  cmu #(.CHAINS(C)) dut (.clk, .rst_n, .bus_we, .bus_wdata, .bus_rdata,
                         .cs_rs, .cs_in, .cs_out, .clk_sel, .clk_ack);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    ack_d1  <= clk_sel;
    clk_ack <= ack_d1;
    if (cs_rs) begin
      chain[0] <= cs_in;
      for (int p = 1; p < LMAX; p++) chain[p] <= chain[p-1];
      scan_cycles <= scan_cycles + 1;
    end
  end
  assign cs_out = chain[len-1];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic transfer(input xfer_dir_e d, input logic [3:0] cid, input int nb, output int lat);
    int start;
    @(negedge clk);
    bus_we = 1'b1;
    bus_wdata = {1'b1, d, cid, NB_W'(nb)};   // nb = 1024 is written as 0
    start = scan_cycles;
    lat = 0;
    @(negedge clk);
    // a second write during the transfer must be ignored
    bus_wdata = {1'b1, ~d, ~cid, NB_W'(5)};
    @(negedge clk);
    bus_we = 1'b0;
    checks++;
    if (bus_rdata !== {1'b1, d, cid, NB_W'(nb)}) begin failures++; $display("register disturbed while busy"); end
    lat = 2;
    while (bus_rdata[15]) begin
      @(negedge clk);
      lat++;
      if (lat > 3000) break;
    end
    checks++;
    if (scan_cycles - start != nb) begin failures++; $display("scan cycles %0d, expected %0d", scan_cycles - start, nb); end
  endtask

  logic [C-1:0] ctx [4][L];
  logic [3:0]   slot [4] = '{4'd0, 4'd3, 4'd7, 4'd15};

  initial begin
    int lat;
    #12 rst_n = 1'b1;
    for (int c = 0; c < 4; c++) begin
      for (int p = 0; p < L; p++) begin
        ctx[c][p] = C'($urandom);
        chain[p] = ctx[c][p];
      end
      transfer(XFER_SAVE, slot[c], L, lat);
      checks++;
      if (lat > L + 8) begin failures++; $display("save took %0d cycles", lat); end
      // stored word k is the bit that left at shift k: cell L-1-k
      for (int k = 0; k < L; k++) begin
        checks++;
        if (dut.u_bram.mem[{slot[c], NB_W'(k)}] !== ctx[c][L-1-k]) begin
          failures++; $display("slot %0d word %0d wrong", slot[c], k);
        end
      end
    end
    for (int r = 0; r < 8; r++) begin
      int c;
      c = (r * 3 + 1) % 4;
      for (int p = 0; p < L; p++) chain[p] = C'($urandom);
      transfer(XFER_RESTORE, slot[c], L, lat);
      checks++;
      if (lat > L + 9) begin failures++; $display("restore took %0d cycles", lat); end
      for (int p = 0; p < L; p++) begin
        checks++;
        if (chain[p] !== ctx[c][p]) begin failures++; $display("restore ctx %0d cell %0d: %h vs %h", c, p, chain[p], ctx[c][p]); end
      end
    end
    // Capacity: all 16 slots hold a full 1024-shift context (8192 bits).
    len = LMAX;
    for (int c = 0; c < 16; c++) begin
      for (int p = 0; p < LMAX; p++) chain[p] = C'((p * 7 + c * 13 + p / 5) ^ c);
      transfer(XFER_SAVE, 4'(c), LMAX, lat);
    end
    for (int r = 0; r < 16; r++) begin
      int c, bad;
      c = (r * 5 + 3) % 16;
      bad = 0;
      for (int p = 0; p < LMAX; p++) chain[p] = C'($urandom);
      transfer(XFER_RESTORE, 4'(c), LMAX, lat);
      for (int p = 0; p < LMAX; p++)
        if (chain[p] !== C'((p * 7 + c * 13 + p / 5) ^ c)) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("full slot %0d: %0d words wrong", c, bad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
