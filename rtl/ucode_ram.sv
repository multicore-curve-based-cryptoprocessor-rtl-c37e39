// ucode_ram: micro-code RAM, 256 words of 32 bits (1 Kbyte).
//
// It holds the MALU() sequences of the point and divisor operations. The
// host writes it word by word; the instruction bus controller reads it with
// one read per cycle and one cycle of latency (synchronous read), so a routine
// streams out at one instruction per cycle. Size follows the document; the
// port arrangement is this design's choice.
module ucode_ram #(
  parameter int unsigned DEPTH = cp_pkg::UC_WORDS,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
