// Preemptable 7th-order FIR filter, the evaluation task.
//
// An 8-tap (7th-order) fully pipelined FIR filter with every coefficient
// equal to one, so y is the sum of the last eight input samples. All its
// flip-flops are CSB cells (csb_chain), so its whole state can be shifted
// out and back in through CHAINS scanpaths: 1 for the CSB organisation, 8
// for PCS8. The filter kind, order, pipelining, 8-bit samples and unit
// coefficients follow the published test case; its exact pipeline is this
// design's choice:
//   delay line  7 x DW       x[n-1] .. x[n-7]
//   stage 1     4 x (DW+1)   pairwise sums of x[n] .. x[n-7]
//   stage 2     2 x (DW+2)
//   output      1 x (DW+3)   y
// 123 state bits in all for DW = 8. The delay line holds the lowest state
// bits, then stage 1, stage 2 and y.
//
// Timing: x is sampled at each rising clk edge with cs_rs low; y equals
// x[n-2] + ... + x[n-9], where x[n] is the sample taken at the latest such
// edge (three register stages from x to y). Edges with cs_rs high shift
// the scanpaths instead and leave the filter's history untouched only when
// the shifted-in context equals the shifted-out one.
module fir7_csb #(
  parameter int unsigned DW     = 8,
  parameter int unsigned CHAINS = 8,
  localparam int unsigned TAPS  = 8,
  localparam int unsigned N_BITS = (TAPS-1)*DW + 4*(DW+1) + 2*(DW+2) + (DW+3)
) (
  input  logic              clk,
  input  logic              cs_rs,
  input  logic [DW-1:0]     x,
  output logic [DW+2:0]     y,
  input  logic [CHAINS-1:0] cs_in,
  output logic [CHAINS-1:0] cs_out
);

  localparam int unsigned OFS_S1 = (TAPS-1)*DW;
  localparam int unsigned OFS_S2 = OFS_S1 + 4*(DW+1);
  localparam int unsigned OFS_Y  = OFS_S2 + 2*(DW+2);

  logic [N_BITS-1:0] st_d, st_q;

  // Current view of the state.
  logic [DW-1:0] tap   [TAPS];   // tap[0] = x[n], tap[k] = x[n-k]
  logic [DW:0]   s1_q  [4];
  logic [DW+1:0] s2_q  [2];

  always_comb begin
    tap[0] = x;
    for (int k = 1; k < TAPS; k++)
      tap[k] = st_q[(k-1)*DW +: DW];
    for (int i = 0; i < 4; i++)
      s1_q[i] = st_q[OFS_S1 + i*(DW+1) +: DW+1];
    for (int i = 0; i < 2; i++)
      s2_q[i] = st_q[OFS_S2 + i*(DW+2) +: DW+2];
  end

  assign y = st_q[OFS_Y +: DW+3];

  // Next state.
  always_comb begin
    for (int k = 1; k < TAPS; k++)
      st_d[(k-1)*DW +: DW] = tap[k-1];
    for (int i = 0; i < 4; i++)
      st_d[OFS_S1 + i*(DW+1) +: DW+1] = {1'b0, tap[2*i]} + {1'b0, tap[2*i+1]};
    for (int i = 0; i < 2; i++)
      st_d[OFS_S2 + i*(DW+2) +: DW+2] = {1'b0, s1_q[2*i]} + {1'b0, s1_q[2*i+1]};
    st_d[OFS_Y +: DW+3] = {1'b0, s2_q[0]} + {1'b0, s2_q[1]};
  end

  csb_chain #(
    .N_BITS (N_BITS),
    .CHAINS (CHAINS)
  ) u_state (
    .clk    (clk),
    .cs_rs  (cs_rs),
    .d      (st_d),
    .q      (st_q),
    .cs_in  (cs_in),
    .cs_out (cs_out)
  );

endmodule
