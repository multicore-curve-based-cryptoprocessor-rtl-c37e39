// ibc: Instruction Bus Controller.
//
// Fills the instruction queue buffer either with MALU instructions handed
// over by the main controller or, after a CALL, by streaming a routine out of
// the micro-code RAM at one instruction per cycle (a read is only started
// while the buffer is sure to have room). Whenever every MALU core can take
// work in the next cycle, the dependency check (ilp_sched) picks a bundle of
// up to l = min(LMAX, number of MALU units) instructions from the window.
// The k-th instruction of the bundle, in program order, goes to the k-th
// unit and gets write slot k, so the results are written back one per cycle
// in program order.
//
// A unit is a group of chained cores: core c is the top of its group when
// is_top[c] is set (core 0 always is), and every core of a group receives
// the instruction and slot of its top. Bundles are not overlapped: the next
// bundle is issued in the cycle of the previous bundle's last write, so its
// reads see every result of the previous one. Dependency rules and window
// follow the document; the slot scheme and the refill rules are this design's.
module ibc
  import cp_pkg::*;
#(
  parameter int unsigned NCORE = ALPHA,
  parameter int unsigned WIN   = ILP_D,
  parameter int unsigned LM    = LMAX,
  parameter int unsigned UAW   = UC_AW,
  localparam int unsigned CW   = $clog2(LM + 1),
  localparam int unsigned SLOTW = (LM > 1) ? $clog2(LM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the main controller
  input  logic             host_push,
  input  malu_instr_t      host_instr,
  output logic             host_ready,
  input  logic             call_start,
  input  logic [UAW-1:0]   call_addr,
  input  logic [UAW:0]     call_len,
  output logic             idle,        // queue empty and no routine running
  // micro-code RAM read port
  output logic             uc_re,
  output logic [UAW-1:0]   uc_raddr,
  input  logic [31:0]      uc_rdata,
  // MALU cores
  input  logic [NCORE-1:0] is_top,
  input  logic [NCORE-1:0] core_free_next,
  output logic [NCORE-1:0] core_start,
  output malu_instr_t      core_instr [NCORE],
  output logic [SLOTW-1:0] core_slot [NCORE],
  // activity, for observation
  output logic             issue_fire,
  output logic [CW-1:0]    issue_count,
  output logic             issue_ooo,
  output logic             issue_blocked,
  output logic             iqb_full,
  output logic             waiting      // the oldest queue entry is valid
);

  localparam int unsigned QCW = $clog2(WIN + 1);

  // ---------------- micro-code streaming ----------------
  logic [UAW:0]   rem;
  logic [UAW-1:0] uaddr;
  logic           pend;
  logic [QCW-1:0] qcount;

  assign uc_re    = (rem != '0) && ((32'(qcount) + 32'(pend)) < WIN);
  assign uc_raddr = uaddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      uaddr <= '0;
      pend  <= 1'b0;
    end else begin
      pend <= uc_re;
      if (call_start && rem == '0 && !pend) begin
        rem   <= call_len;
        uaddr <= call_addr;
      end else if (uc_re) begin
        rem   <= rem - 1'b1;
        uaddr <= uaddr + 1'b1;
      end
    end
  end

  // ---------------- instruction queue ----------------
  malu_instr_t    win [WIN];
  logic [WIN-1:0] wvalid, pop_mask;
  logic           q_push;
  malu_instr_t    q_data;

  assign q_push     = pend || (host_push && host_ready);
  assign q_data     = pend ? instr_fields(uc_rdata) : host_instr;
  assign host_ready = !iqb_full && rem == '0 && !pend;
  assign idle       = qcount == '0 && rem == '0 && !pend;

  iqb #(.DEPTH(WIN)) u_iqb (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (q_push),
    .push_data (q_data),
    .full      (iqb_full),
    .count     (qcount),
    .entry     (win),
    .valid     (wvalid),
    .pop_mask  (pop_mask)
  );

  // ---------------- dependency check and issue ----------------
  logic [CW-1:0]  units;
  logic [WIN-1:0] sel;
  logic [CW-1:0]  nsel;
  logic           ooo, blocked;

  always_comb begin
    int unsigned t;
    t = 1;
    for (int c = 1; c < NCORE; c++) if (is_top[c]) t++;
    units = (t > LM) ? CW'(LM) : CW'(t);
  end

  ilp_sched #(.DEPTH(WIN), .LM(LM)) u_sched (
    .entry      (win),
    .valid      (wvalid),
    .units      (units),
    .issue_mask (sel),
    .count      (nsel),
    .ooo        (ooo),
    .blocked    (blocked)
  );

  assign waiting       = wvalid[0];
  assign issue_fire    = wvalid[0] && (&core_free_next);
  assign pop_mask      = issue_fire ? sel : '0;
  assign issue_count   = issue_fire ? nsel : '0;
  assign issue_ooo     = issue_fire && ooo;
  assign issue_blocked = issue_fire && blocked;

  // bundle in program order, then unit -> cores
  always_comb begin
    malu_instr_t bundle [LM];
    int unsigned k, u;
    for (int b = 0; b < LM; b++) bundle[b] = '0;
    k = 0;
    for (int j = 0; j < WIN; j++) begin
      if (sel[j] && k < LM) begin
        bundle[k] = win[j];
        k++;
      end
    end
    u = 0;
    for (int c = 0; c < NCORE; c++) begin
      if (c != 0 && is_top[c]) u++;
      core_start[c] = issue_fire && (u < 32'(nsel));
      core_instr[c] = (u < LM) ? bundle[u] : '0;
      core_slot[c]  = SLOTW'(u);
    end
  end

endmodule
