// Context memory of the CMU (one block RAM).
//
// Stores the saved contexts: 2**CID_W slots, one per context identifier,
// of 2**NB_W words each. The word is as wide as the number of scanpaths,
// one bit for CSB and one byte for PCS8, so each scan shift reads or
// writes one word. The context identifier is the high part of the address
// and the shift count the low part, as in the published CMU; the published
// sizes give 16 contexts of 1024 shifts. The memory is a plain synchronous
// single-port RAM written as an array: a write happens at the rising edge
// of clk where we is high; dout shows, one cycle after an address is
// presented, the word stored there before that edge (read-first). It has
// no reset; contents are undefined until written.
module cmu_bram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned CID_W = 4,
  parameter int unsigned NB_W  = 10
) (
  input  logic             clk,
  input  logic             we,
  input  logic [CID_W-1:0] adr_high,
  input  logic [NB_W-1:0]  adr_low,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned DEPTH = 1 << (CID_W + NB_W);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [CID_W+NB_W-1:0] adr;

  assign adr = {adr_high, adr_low};

  always_ff @(posedge clk) begin
    if (we) mem[adr] <= din;
    dout <= mem[adr];
  end

endmodule
