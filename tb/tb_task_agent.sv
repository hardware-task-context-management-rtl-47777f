// Testbench agent for one preemptable FIR task (ptask): plays the
// processor that schedules several filter streams on the task, and checks
// the filter output and the CMU's behaviour.
//
// NCTX streams share the task. Each round the agent runs the current
// stream for RUN_EDGES run edges, saves it into its context slot, then
// either restores the next stream from its slot or, the first time that
// stream is scheduled, starts it from whatever state the task holds. The
// streams' samples are a fixed function of stream number and sample index,
// so the expected y after k run edges of a stream is known; after each run
// edge (and right after each restore) y is compared with it. The agent
// tells run edges from scan edges by the value of cs_rs during the task
// clock's low phase. Per transfer it checks the number of scan edges (nb),
// the latency seen by the processor and that a write during the transfer
// is ignored. It counts saves, restores, fresh starts and checks made just
// after a restore.
module tb_task_agent
  import ctx_pkg::*;
#(
  parameter int CHAINS    = 8,
  parameter int ROUNDS    = 8,
  parameter int RUN_EDGES = 14,
  parameter int NCTX      = 3,
  parameter int DW        = 8
) (
  input  logic             clk_scan,
  input  logic             rst_n,
  input  logic             task_clk,
  input  logic             cs_rs,
  output logic             bus_we,
  output logic [REG_W-1:0] bus_wdata,
  input  logic [REG_W-1:0] bus_rdata,
  output logic [DW-1:0]    x,
  input  logic [DW+2:0]    y,
  output logic             finished,
  output int               checks,
  output int               failures,
  output int               n_save,
  output int               n_restore,
  output int               n_fresh,
  output int               n_resume_checks,
  output int               n_busy_writes
);

  localparam int NB = (123 + CHAINS - 1) / CHAINS;
  localparam logic [CID_W-1:0] SLOT [4] = '{4'd0, 4'd5, 4'd15, 4'd9};

  int  cur = -1;          // stream now in the task, -1 = none
  int  k = 0;             // run edges done by cur
  int  saved_k [NCTX];
  bit  saved [NCTX];
  int  fresh_pending = -1;
  xfer_dir_e op_dir = XFER_SAVE;
  int  op_target = 0;
  int  op_shifts = 0;
  bit  rs_next = 1'b0;    // cs_rs at the coming task clock edge
  bit  last_was_run = 1'b0;
  bit  just_restored = 1'b0;

  function automatic logic [DW-1:0] smp(input int s, input int i);
    return DW'((i * 29 + s * 71 + (i * i) % 11) ^ (s << 4));
  endfunction

  function automatic int exp_y(input int s, input int kk);
    int sum = 0;
    for (int j = kk - 10; j <= kk - 3; j++) sum += int'(smp(s, j));
    return sum;
  endfunction

  always @(posedge task_clk) begin
    last_was_run = 1'b0;
    if (!rs_next) begin
      if (cur >= 0) begin
        k++;
        last_was_run = 1'b1;
      end
    end else begin
      op_shifts++;
      if (op_dir == XFER_SAVE && op_shifts == 1 && cur >= 0) begin
        saved_k[cur] = k;
        saved[cur] = 1'b1;
        cur = -1;
      end
      if (op_dir == XFER_RESTORE && op_shifts == NB) begin
        cur = op_target;
        k = saved_k[op_target];
        just_restored = 1'b1;
      end
    end
  end

  always @(negedge task_clk) begin
    rs_next = cs_rs;
    if (fresh_pending >= 0) begin
      cur = fresh_pending;
      k = 0;
      fresh_pending = -1;
    end
    if (cur >= 0 && k >= 10 && (last_was_run || just_restored)) begin
      checks++;
      if (int'(y) != exp_y(cur, k)) begin
        failures++;
        $display("%m: stream %0d after %0d edges: y=%0d expected %0d", cur, k, y, exp_y(cur, k));
      end
      if (just_restored) n_resume_checks++;
    end
    just_restored = 1'b0;
    x = (cur >= 0) ? smp(cur, k) : '0;
  end

  task automatic transfer(input xfer_dir_e d, input int stream);
    int lat = 0;
    logic [REG_W-1:0] word;
    word = {1'b1, d, SLOT[stream], NB_W'(NB)};
    op_dir = d;
    op_target = stream;
    op_shifts = 0;
    @(negedge clk_scan);
    bus_we = 1'b1;
    bus_wdata = word;
    @(negedge clk_scan);
    bus_wdata = word ^ 16'h7fff;   // ignored: a transfer is running
    n_busy_writes++;
    @(negedge clk_scan);
    bus_we = 1'b0;
    checks++;
    if (bus_rdata !== word) begin failures++; $display("%m: register changed during transfer"); end
    lat = 2;
    while (bus_rdata[15] && lat < 4 * NB + 100) begin
      @(negedge clk_scan);
      lat++;
    end
    checks++;
    if (op_shifts != NB) begin failures++; $display("%m: %0d scan edges, expected %0d", op_shifts, NB); end
    checks++;
    if (lat > NB + 14) begin failures++; $display("%m: transfer took %0d scan cycles", lat); end
  endtask

  initial begin
    int nxt;
    bus_we = 1'b0; bus_wdata = '0; x = '0; finished = 1'b0;
    checks = 0; failures = 0; n_save = 0; n_restore = 0; n_fresh = 0;
    n_resume_checks = 0; n_busy_writes = 0;
    for (int c = 0; c < NCTX; c++) begin saved[c] = 1'b0; saved_k[c] = 0; end
    @(posedge rst_n);
    fresh_pending = 0;
    n_fresh++;
    for (int r = 0; r < ROUNDS; r++) begin
      int k0;
      wait (cur >= 0);
      k0 = k;
      wait (k >= k0 + RUN_EDGES);
      nxt = (cur + 1) % NCTX;
      transfer(XFER_SAVE, cur);
      n_save++;
      checks++;
      if (cur != -1) begin failures++; $display("%m: save did not reach the task"); end
      if (saved[nxt]) begin
        transfer(XFER_RESTORE, nxt);
        n_restore++;
        checks++;
        if (cur != nxt) begin failures++; $display("%m: restore did not complete"); end
      end else begin
        fresh_pending = nxt;
        n_fresh++;
      end
    end
    wait (cur >= 0);
    wait (k >= 12);
    finished = 1'b1;
  end

endmodule
