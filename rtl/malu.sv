// malu: one slice of the reconfigurable digit-serial GF(2^n) data path.
//
// It computes R = A(B+D)+C mod P, MSB first, D_W bits of A per clock. Each of
// the D_W unrolled steps does T = x*T + a_i*(B+D) + m_i*P, where m_i is the
// coefficient pushed out of the top of T (Algorithms 1 and 2). The result is
// T+C after ceil(N/d) steps.
//
// Slices chain into a wider data path. A slice whose m_ext is 0 is the top
// (most significant) slice of its group: it makes the reduction vector m from
// its own top bit and the digit of A from its own A register, and passes both
// down to the next slice (m_out, digit_out). A slice with m_ext=1 uses m_in and
// digit_in instead. The bit shifted out of each slice step by step (q_out) is
// shifted into the bottom of the slice above (q_in), and the top d bits of the
// A register move into the slice above in the same way (a_top_out, a_chain_in),
// so the A registers of a group act as one shift register.
//
// Operand alignment (this design's choice; the document does not say how a
// field smaller than the data path is handled): every value of a group of g
// slices is stored multiplied by x^s, s = g*W-N, so that the x^N term of P
// sits just above the top slice. The A register is then scanned from its top
// for exactly N bits: the first cycle shifts by sh = d-pad (pad = d*ceil(N/d)-N)
// and its digit carries pad leading zeros, later cycles shift by d.
//
// Interface: load latches A, B+D, C and P; step performs one cycle of d steps.
// result is valid after the last step. The chain ports are combinational:
// within a cycle m flows down and q flows up the group bit by bit, with no
// loop at bit level, so a lint tool may see a vector-level loop between slices.
module malu #(
  parameter int unsigned W   = cp_pkg::SLICE_W,
  parameter int unsigned D_W = cp_pkg::DIGIT,
  localparam int unsigned SHW = $clog2(D_W + 1)
) (
  input  logic           clk,
  input  logic           load,
  input  logic [W-1:0]   a_in,
  input  logic [W-1:0]   bd_in,      // B + D
  input  logic [W-1:0]   c_in,
  input  logic [W-1:0]   p_in,
  input  logic           step,
  input  logic [SHW-1:0] sh,         // A shift of this cycle, 1..D_W
  input  logic           m_ext,      // cfg1
  input  logic [D_W-1:0] m_in,       // m vector of the upper slice, step 0 in bit 0
  output logic [D_W-1:0] m_out,
  input  logic [D_W-1:0] q_in,       // top bits of the lower slice, step 0 in bit 0
  output logic [D_W-1:0] q_out,
  input  logic [D_W-1:0] a_chain_in, // top d bits of the lower slice's A register
  output logic [D_W-1:0] a_top_out,
  input  logic [D_W-1:0] digit_in,   // digit of A used by the upper slice
  output logic [D_W-1:0] digit_out,
  output logic [W-1:0]   result
);

  logic [W-1:0] areg, breg, creg, preg, treg;
  logic [W-1:0] t_next, a_next;
  logic [D_W-1:0] digit_own;

  assign a_top_out = areg[W-1 -: D_W];
  assign digit_own = a_top_out >> (SHW'(D_W) - sh);
  assign digit_out = m_ext ? digit_in : digit_own;

  always_comb begin
    logic [W-1:0] t;
    t = treg;
    for (int j = 0; j < D_W; j++) begin
      q_out[j] = t[W-1];
      m_out[j] = m_ext ? m_in[j] : t[W-1];
      t = {t[W-2:0], q_in[j]}
          ^ (digit_out[D_W-1-j] ? breg : '0)
          ^ (m_out[j] ? preg : '0);
    end
    t_next = t;
    a_next = (areg << sh) | W'(a_chain_in >> (SHW'(D_W) - sh));
  end

  always_ff @(posedge clk) begin
    if (load) begin
      areg <= a_in;
      breg <= bd_in;
      creg <= c_in;
      preg <= p_in;
      treg <= '0;
    end else if (step) begin
      areg <= a_next;
      treg <= t_next;
    end
  end

  assign result = treg ^ creg;

endmodule
