// malu_core: one MALU core, the FSM around a malu slice plus the core's
// configuration register.
//
// An instruction MALU(&R,&A,&B,&C,&D) arrives with start, together with the
// write slot it was given by the instruction bus controller. The core then
//   READ   drives the four source addresses to its register file and latches
//          A, B+D, C and P (P is register 0),
//   EXEC   runs the data path for ceil(N/d) cycles,
//   WAIT   waits `slot` cycles, because only one result may be written per
//          cycle (the bundle's results are written one after another),
//   WRITE  presents the result and &R on the write-back outputs for one cycle.
// For a bundle of l instructions issued together the last write happens
// 1+ceil(N/d)+l cycles after the issue cycle; free_next tells the issue logic
// that the core can take a new instruction in the next cycle, so bundles
// follow each other every ceil(N/d)+l+1 cycles.
//
// The configuration register (CFG) holds cfg1 (chain this core below its upper
// neighbour) and the field size N. All cores of one group must hold the same
// N and receive the same instruction and slot; they then move in lock step.
// The FSM states and the slot scheme follow the document's timing (Fig. 7,
// "l-way parallel execution takes l+1 cycles"); the encodings are this
// design's own.
module malu_core
  import cp_pkg::*;
#(
  parameter int unsigned W     = SLICE_W,
  parameter int unsigned D_W   = DIGIT,
  parameter int unsigned AW    = RF_AW,
  parameter int unsigned SLOTW = 2,
  localparam int unsigned SHW  = $clog2(D_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration register
  input  logic              cfg_we,
  input  core_cfg_t         cfg_wdata,
  output core_cfg_t         cfg,
  // issue
  input  logic              start,
  input  malu_instr_t       instr,
  input  logic [SLOTW-1:0]  slot,
  output logic              busy,
  output logic              free_next,
  // register file read side
  output logic [AW-1:0]     rf_raddr [4],   // &A, &B, &C, &D
  input  logic [W-1:0]      rf_rdata [4],
  input  logic [W-1:0]      rf_p,
  // write-back
  output logic              wb_valid,
  output logic [AW-1:0]     wb_addr,
  output logic [W-1:0]      wb_data,
  // chain to neighbouring cores
  input  logic [D_W-1:0]    m_in,
  output logic [D_W-1:0]    m_out,
  input  logic [D_W-1:0]    q_in,
  output logic [D_W-1:0]    q_out,
  input  logic [D_W-1:0]    a_chain_in,
  output logic [D_W-1:0]    a_top_out,
  input  logic [D_W-1:0]    digit_in,
  output logic [D_W-1:0]    digit_out,
  input  logic              chain_en      // cfg1 as seen by the chain (0 for core 0)
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_EXEC, S_WAIT, S_WRITE} state_t;

  state_t           state;
  malu_instr_t      ins;
  logic [SLOTW-1:0] slot_q, wcnt;
  logic [NFW-1:0]   ecnt;
  logic             first;
  logic [NFW-1:0]   ecycles;
  logic [SHW-1:0]   pad, sh;

  // ceil(N/d) cycles; pad leading zero bits in the first digit
  assign ecycles = NFW'((32'(cfg.nfield) + D_W - 1) / D_W);
  assign pad     = SHW'(32'(ecycles) * D_W - 32'(cfg.nfield));
  assign sh      = first ? SHW'(D_W) - pad : SHW'(D_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '{cfg1: 1'b0, nfield: NFW'(N_MALU)};
    end else if (cfg_we) begin
      cfg <= cfg_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ins    <= '0;
      slot_q <= '0;
      wcnt   <= '0;
      ecnt   <= '0;
      first  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_WRITE: begin
          if (start) begin
            ins    <= instr;
            slot_q <= slot;
            state  <= S_READ;
          end else begin
            state  <= S_IDLE;
          end
        end
        S_READ: begin
          ecnt  <= ecycles;
          first <= 1'b1;
          state <= S_EXEC;
        end
        S_EXEC: begin
          first <= 1'b0;
          ecnt  <= ecnt - 1'b1;
          if (ecnt == NFW'(1)) begin
            wcnt  <= slot_q;
            state <= (slot_q == '0) ? S_WRITE : S_WAIT;
          end
        end
        S_WAIT: begin
          wcnt <= wcnt - 1'b1;
          if (wcnt == SLOTW'(1)) state <= S_WRITE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign free_next = (state == S_IDLE) || (state == S_WRITE);

  assign rf_raddr[0] = ins.a;
  assign rf_raddr[1] = ins.b;
  assign rf_raddr[2] = ins.c;
  assign rf_raddr[3] = ins.d;

  malu #(.W(W), .D_W(D_W)) u_malu (
    .clk        (clk),
    .load       (state == S_READ),
    .a_in       (rf_rdata[0]),
    .bd_in      (rf_rdata[1] ^ rf_rdata[3]),
    .c_in       (rf_rdata[2]),
    .p_in       (rf_p),
    .step       (state == S_EXEC),
    .sh         (sh),
    .m_ext      (chain_en),
    .m_in       (m_in),
    .m_out      (m_out),
    .q_in       (q_in),
    .q_out      (q_out),
    .a_chain_in (a_chain_in),
    .a_top_out  (a_top_out),
    .digit_in   (digit_in),
    .digit_out  (digit_out),
    .result     (wb_data)
  );

  assign wb_valid = (state == S_WRITE);
  assign wb_addr  = ins.r;

  // a group must not start a new instruction before its field size is set
  a_nfield_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> cfg.nfield != '0);

endmodule
