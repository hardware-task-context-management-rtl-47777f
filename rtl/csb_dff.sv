// CSB flip-flop: the basic cell of the Configuration Scan Bus.
//
// One 2:1 multiplexer in front of one D flip-flop. With CSrs low the cell
// behaves as the task's ordinary register and loads D; with CSrs high it
// loads CSin, the previous cell's output, so that a row of cells becomes a
// shift register through which the context is read out or written in. The
// flip-flop output drives both the task (Q) and the next cell (CSout).
// All of this, including the single control signal CSrs, follows the
// published cell. There is no reset, as in the published cell: a task's
// state is set by running it or by restoring a context.
//
// Timing: Q and CSout change on the rising edge of clk.
module csb_dff (
  input  logic clk,
  input  logic cs_rs,   // 0 = run (load d), 1 = scan (load cs_in)
  input  logic d,
  input  logic cs_in,
  output logic q,
  output logic cs_out
);

  logic mux_o;

  assign mux_o = cs_rs ? cs_in : d;

  always_ff @(posedge clk)
    q <= mux_o;

  assign cs_out = q;

endmodule
