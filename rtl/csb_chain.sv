// Scanpath register bank of a preemptable task.
//
// Holds every flip-flop of a task as CSB cells (csb_dff) and chains them
// into CHAINS parallel scanpaths. CHAINS = 1 is the single-scanpath CSB
// organisation; CHAINS = 8 is PCS8, where eight scanpaths shift at once so
// that one shift moves one byte of context. The task's N_BITS state bits
// are split into CHAINS chains of LEN = ceil(N_BITS / CHAINS) cells each:
// chain j holds state bits j*LEN .. j*LEN+LEN-1, with the cell of the lowest
// index next to the chain's input cs_in[j] and the highest at its output
// cs_out[j]. If N_BITS is not a multiple of CHAINS, the last chain is
// padded with cells that hold their value in run mode, so that every chain
// has the same length and one count of LEN shifts moves the whole context.
// Equal lengths and the padding are this design's choice; the one and
// eight scanpath organisations are the published ones.
//
// Interface: d / q are the task's next-state and state vectors; cs_rs
// selects scan mode for all cells. In scan mode each rising edge of clk
// moves every chain by one cell: cs_out[j] shows the bit that leaves next.
module csb_chain #(
  parameter int unsigned N_BITS = 123,
  parameter int unsigned CHAINS = 8,
  localparam int unsigned LEN   = (N_BITS + CHAINS - 1) / CHAINS
) (
  input  logic              clk,
  input  logic              cs_rs,
  input  logic [N_BITS-1:0] d,
  output logic [N_BITS-1:0] q,
  input  logic [CHAINS-1:0] cs_in,
  output logic [CHAINS-1:0] cs_out
);

  localparam int unsigned CELLS = CHAINS * LEN;

  logic [CELLS-1:0] cell_d;
  logic [CELLS-1:0] cell_q;
  logic [CELLS-1:0] cell_si;
  logic [CELLS-1:0] cell_so;

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    if (i < N_BITS) begin : g_state
      assign cell_d[i] = d[i];
    end else begin : g_pad
      assign cell_d[i] = cell_q[i];
    end

    if (i % LEN == 0) begin : g_head
      assign cell_si[i] = cs_in[i / LEN];
    end else begin : g_link
      assign cell_si[i] = cell_so[i - 1];
    end

    csb_dff u_ff (
      .clk   (clk),
      .cs_rs (cs_rs),
      .d     (cell_d[i]),
      .cs_in (cell_si[i]),
      .q     (cell_q[i]),
      .cs_out(cell_so[i])
    );
  end

  for (genvar j = 0; j < CHAINS; j++) begin : g_out
    assign cs_out[j] = cell_so[j * LEN + LEN - 1];
  end

  assign q = cell_q[N_BITS-1:0];

endmodule
