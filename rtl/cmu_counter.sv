// Shift counter and sequencer of the CMU.
//
// Counts the scan shifts of one context transfer and drives the scanpath
// mode line CSrs and the memory. It starts when the register's run bit is
// set, counts nb shifts (the register's nb field is the counter's
// maximum), presents the running count as the low memory address, and
// pulses done after the last shift so that the register clears run. That a
// counter with these inputs and output produces the low address is the
// published structure; the state machine around it is this design's own,
// and so is the meaning of nb = 0: it stands for 2**NB_W (1024) shifts, so
// that a context may fill its whole memory slot of 1024 words.
//
// Sequence, one state per clk cycle:
//   IDLE     wait for run.
//   CLK_WAIT wait until the task's clock multiplexer reports that the task
//            now runs from the scan clock (clk_ack).
//   PREFETCH restore only: read word 0 so that it is on the memory output
//            when the first shift happens (the memory has one cycle of read
//            latency).
//   SHIFT    nb cycles with cs_rs high. Save: word k of the slot is written
//            with the chain outputs at shift k. Restore: the memory output
//            (word k) feeds the chain inputs at shift k while word k+1 is
//            read.
//   DONE     one cycle with done high.
// A save therefore takes nb shift cycles and a restore nb shift cycles
// plus one prefetch cycle, besides the clock-switch wait.
module cmu_counter
  import ctx_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  xfer_dir_e       dir,
  input  logic [NB_W-1:0] nb,       // number of shifts, 0 = 2**NB_W
  input  logic            clk_ack,  // task clock is the scan clock
  output logic [NB_W-1:0] cnt,      // low memory address
  output logic            cs_rs,    // scan mode for the task's cells
  output logic            mem_we,
  output logic            done
);

  typedef enum logic [2:0] {
    S_IDLE, S_CLK_WAIT, S_PREFETCH, S_SHIFT, S_DONE
  } state_e;

  state_e          state;
  logic [NB_W-1:0] shifts;   // shifts done so far in S_SHIFT

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      shifts <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (run) state <= S_CLK_WAIT;
        S_CLK_WAIT:
          if (clk_ack) begin
            shifts <= '0;
            if (dir == XFER_SAVE) state <= S_SHIFT;
            else                  state <= S_PREFETCH;
          end
        S_PREFETCH:
          state <= S_SHIFT;
        S_SHIFT: begin
          shifts <= shifts + 1'b1;
          if (shifts == nb - 1'b1) state <= S_DONE;
        end
        S_DONE:
          state <= S_IDLE;
        default:
          state <= S_IDLE;
      endcase
    end
  end

  // Scan edges reach the task only once its clock is the scan clock, and
  // a transfer never writes memory outside its shift cycles.
  a_shift_on_scan_clock: assert property (
    @(posedge clk) disable iff (!rst_n) (state == S_SHIFT) |-> clk_ack);
  a_done_one_cycle: assert property (
    @(posedge clk) disable iff (!rst_n) done |=> !done);

  assign cs_rs  = (state == S_SHIFT);
  assign mem_we = (state == S_SHIFT) && (dir == XFER_SAVE);
  assign done   = (state == S_DONE);
  // A restore reads one word ahead of the shift that uses it.
  assign cnt    = (state == S_SHIFT && dir == XFER_RESTORE) ? shifts + 1'b1 : shifts;

endmodule
