// rf4r1w: register file with four read ports and one write port (RF_nx32).
//
// The four read ports deliver the four operands of A(B+D)+C in one cycle.
// Reads are asynchronous (the word is visible in the cycle its address is
// presented); a write takes effect at the clock edge, and the mask lets the
// data bus controller write one 32-bit part of a word. Entry 0 is also wired
// to p_out: it holds the reduction polynomial P that every MALU instruction
// uses. The four-read/one-write organisation follows the document; the
// asynchronous read, the bit mask and the fixed location of P are this
// design's choices. Contents are not reset.
module rf4r1w #(
  parameter int unsigned W     = cp_pkg::SLICE_W,
  parameter int unsigned DEPTH = cp_pkg::RF_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr [4],
  output logic [W-1:0]  rdata [4],
  output logic [W-1:0]  p_out,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [W-1:0]  wmask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= (mem[waddr] & ~wmask) | (wdata & wmask);
  end

  always_comb begin
    for (int i = 0; i < 4; i++) rdata[i] = mem[raddr[i]];
  end

  assign p_out = mem[0];

endmodule
