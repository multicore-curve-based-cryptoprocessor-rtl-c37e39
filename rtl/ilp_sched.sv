// ilp_sched: dependency check over the instruction window (combinational).
//
// Entry 0, the oldest, is issued whenever a unit is free. A later entry j
// is issued with the others unless
//   - an older entry i (issued or not) writes a register j reads
//     (&R_i = &A_j, &B_j, &C_j or &D_j: RAW check for in-order execution), or
//   - an older entry i that is not issued reads the register j writes
//     (&R_j = &A_i, &B_i, &C_i or &D_i: the check for out-of-order execution),
// and at most `units` entries are issued. As in the document, write-after-write
// is not checked: a MALU program must not write one register twice within a
// window without a read of it in between. issue_mask marks the entries taken;
// count is the bundle size l; ooo is set when an entry is taken while an older
// one is left behind, blocked when a valid entry is held back by a dependency.
module ilp_sched
  import cp_pkg::*;
#(
  parameter int unsigned DEPTH = ILP_D,
  parameter int unsigned LM    = LMAX,
  localparam int unsigned CW   = $clog2(LM + 1)
) (
  input  malu_instr_t      entry [DEPTH],
  input  logic [DEPTH-1:0] valid,
  input  logic [CW-1:0]    units,
  output logic [DEPTH-1:0] issue_mask,
  output logic [CW-1:0]    count,
  output logic             ooo,
  output logic             blocked
);

  function automatic logic reads(malu_instr_t x, raddr_t r);
    return (x.a == r) || (x.b == r) || (x.c == r) || (x.d == r);
  endfunction

  always_comb begin
    logic dep;
    logic left_behind;
    issue_mask  = '0;
    count       = '0;
    ooo         = 1'b0;
    blocked     = 1'b0;
    left_behind = 1'b0;
    for (int j = 0; j < DEPTH; j++) begin
      dep = 1'b0;
      for (int i = 0; i < j; i++) begin
        if (reads(entry[j], entry[i].r)) dep = 1'b1;
        if (!issue_mask[i] && reads(entry[i], entry[j].r)) dep = 1'b1;
      end
      if (valid[j] && count < units) begin
        if (!dep) begin
          issue_mask[j] = 1'b1;
          count         = count + 1'b1;
          if (left_behind) ooo = 1'b1;
        end else begin
          blocked     = 1'b1;
          left_behind = 1'b1;
        end
      end
    end
  end

endmodule
