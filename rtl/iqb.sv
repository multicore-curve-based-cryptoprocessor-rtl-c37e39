// iqb: Instruction Queue Buffer.
//
// Holds MALU instructions in program order; entry 0 is the oldest. All
// entries are visible to the dependency check, which may take any subset of
// them in one cycle (out-of-order issue): pop_mask removes those entries, the
// rest close up towards entry 0 in their original order, and an instruction
// pushed in the same cycle goes behind them. full is raised when every entry
// is occupied; a push is accepted only when full is low. The depth equals the
// issue window (ILP_D), this design's choice: the document gives the window
// but not the buffer size.
module iqb
  import cp_pkg::*;
#(
  parameter int unsigned DEPTH = ILP_D,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  malu_instr_t push_data,
  output logic        full,
  output logic [CW-1:0] count,
  output malu_instr_t entry [DEPTH],
  output logic [DEPTH-1:0] valid,
  input  logic [DEPTH-1:0] pop_mask
);

  malu_instr_t       q [DEPTH];
  logic [CW-1:0]     cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      int unsigned k;
      k = 0;
      for (int i = 0; i < DEPTH; i++) begin
        if (i < int'(cnt) && !pop_mask[i]) begin
          q[k] <= q[i];
          k++;
        end
      end
      if (push && !full) begin
        q[k] <= push_data;
        k++;
      end
      cnt <= CW'(k);
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      entry[i] = q[i];
      valid[i] = (i < int'(cnt));
    end
  end

  assign full  = (cnt == CW'(DEPTH));
  assign count = cnt;

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (pop_mask & ~valid) == '0);

endmodule
