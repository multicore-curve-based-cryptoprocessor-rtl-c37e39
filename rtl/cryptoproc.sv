// cryptoproc: multicore curve-based cryptoprocessor over GF(2^n).
//
// A host sends instructions over a 32-bit instruction port with a 32-bit data
// word and reads results over a 32-bit data output. The main controller
// buffers and decodes the instructions; the instruction bus controller (IBC)
// queues MALU(&R,&A,&B,&C,&D) instructions, from the host or streamed from
// the micro-code RAM, and issues bundles of independent ones to the MALU
// cores; the data bus controller (DBC) moves data between host and register
// files. Every core has its own 4R1W register file. Writes, from the cores or
// the DBC, go to every file that holds the same slice, so the files are copies
// of one another and every core can read all four operands locally.
//
// Cores are numbered 0..NCORE-1. A core whose cfg1 is set is chained below
// core c-1: it takes the reduction vector m and the A digit from core c-1
// and gives it its shift-out bits q and the top of its A register. A chain of
// g cores is one MALU of g*(n+1) bits holding fields up to g*(n+1)-1 bits;
// core 0 always heads a group. The i-th core of a group holds slice i (slice
// 0 most significant). A group's cores write their slices in the same cycle.
//
// The chain is combinational within a cycle and has no loop at bit level:
// bit j of m in a core depends only on the q bits below j from the core
// underneath, and bit j of q only on the m bits up to j. The digit is taken
// from registers at the group's head and passes down unchanged. m_out, q_out
// and dig_out are arrays indexed by core, and each core's inputs come from
// neighbouring entries of the same array. A simulator that schedules whole
// variables therefore reports them as circular logic. That report stands:
// the values settle in one evaluation pass down and up the group, and the
// array form keeps the wiring as regular as the hardware's.
//
// With the defaults (six MALU_97x12 cores, six RF_98x32, window 6, up to
// four instructions per bundle, 1-Kbyte micro-code RAM) this is the document's
// CONFIG-I with alpha = 6. A bundle of l instructions takes ceil(N/d)+l+1
// cycles. The activity output reports what the issue logic does each cycle,
// for performance monitoring. The slice width n+1, the operand alignment and the chain ports for
// A are this design's own; see the sub-modules.
module cryptoproc
  import cp_pkg::*;
#(
  parameter int unsigned NCORE = ALPHA,
  parameter int unsigned W     = SLICE_W,
  parameter int unsigned D_W   = DIGIT,
  parameter int unsigned DEPTH = RF_DEPTH,
  parameter int unsigned WIN   = ILP_D,
  parameter int unsigned LM    = LMAX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_valid,
  input  logic [31:0] host_instr,
  input  logic [31:0] host_data,
  output logic        host_full,
  output logic [31:0] host_dout,
  output logic        host_dout_valid,
  output logic        busy,
  output activity_t   activity
);

  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned SLOTW = (LM > 1) ? $clog2(LM) : 1;
  localparam int unsigned CIW   = (NCORE > 1) ? $clog2(NCORE) : 1;
  localparam int unsigned CW    = $clog2(LM + 1);

  // ---------------- controllers ----------------
  logic             ibc_push, ibc_ready, call_start, ibc_idle, cores_busy;
  malu_instr_t      ibc_instr;
  logic [UC_AW-1:0] call_addr;
  logic [UC_AW:0]   call_len;
  logic [NCORE-1:0] cfg_we;
  core_cfg_t        cfg_wdata;
  logic             dbc_req, dbc_is_load;
  logic [2:0]       dbc_slice, dbc_word;
  logic [AW-1:0]    dbc_addr;
  logic [31:0]      dbc_wdata;
  logic             uc_we, uc_re;
  logic [UC_AW-1:0] uc_waddr, uc_raddr;
  logic [31:0]      uc_wdata, uc_rdata;

  main_ctrl #(.NCORE(NCORE), .AW(AW)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .host_valid  (host_valid),
    .host_instr  (host_instr),
    .host_data   (host_data),
    .host_full   (host_full),
    .busy        (busy),
    .ibc_push    (ibc_push),
    .ibc_instr   (ibc_instr),
    .ibc_ready   (ibc_ready),
    .call_start  (call_start),
    .call_addr   (call_addr),
    .call_len    (call_len),
    .ibc_idle    (ibc_idle),
    .cores_busy  (cores_busy),
    .cfg_we      (cfg_we),
    .cfg_wdata   (cfg_wdata),
    .dbc_req     (dbc_req),
    .dbc_is_load (dbc_is_load),
    .dbc_slice   (dbc_slice),
    .dbc_word    (dbc_word),
    .dbc_addr    (dbc_addr),
    .dbc_wdata   (dbc_wdata),
    .uc_we       (uc_we),
    .uc_waddr    (uc_waddr),
    .uc_wdata    (uc_wdata)
  );

  ucode_ram u_ucode (
    .clk   (clk),
    .we    (uc_we),
    .waddr (uc_waddr),
    .wdata (uc_wdata),
    .re    (uc_re),
    .raddr (uc_raddr),
    .rdata (uc_rdata)
  );

  logic [NCORE-1:0] is_top, chain_en, free_next, core_start, core_busy;
  malu_instr_t      core_instr [NCORE];
  logic [SLOTW-1:0] core_slot [NCORE];
  logic             issue_fire, issue_ooo, issue_blocked, iqb_full, ibc_waiting;
  logic [CW-1:0]    issue_count;

  ibc #(.NCORE(NCORE), .WIN(WIN), .LM(LM)) u_ibc (
    .clk            (clk),
    .rst_n          (rst_n),
    .host_push      (ibc_push),
    .host_instr     (ibc_instr),
    .host_ready     (ibc_ready),
    .call_start     (call_start),
    .call_addr      (call_addr),
    .call_len       (call_len),
    .idle           (ibc_idle),
    .uc_re          (uc_re),
    .uc_raddr       (uc_raddr),
    .uc_rdata       (uc_rdata),
    .is_top         (is_top),
    .core_free_next (free_next),
    .core_start     (core_start),
    .core_instr     (core_instr),
    .core_slot      (core_slot),
    .issue_fire     (issue_fire),
    .issue_count    (issue_count),
    .issue_ooo      (issue_ooo),
    .issue_blocked  (issue_blocked),
    .iqb_full       (iqb_full),
    .waiting        (ibc_waiting)
  );

  assign cores_busy = |core_busy;

  assign activity = '{issue: issue_fire, l: 3'(issue_count), ooo: issue_ooo,
                      blocked: issue_blocked, waiting: ibc_waiting,
                      iqb_full: iqb_full, stream: uc_re};

  // ---------------- chain topology ----------------
  core_cfg_t  cfg [NCORE];
  logic [2:0] slice [NCORE];

  always_comb begin
    for (int c = 0; c < NCORE; c++) begin
      chain_en[c] = (c != 0) && cfg[c].cfg1;
      is_top[c]   = !chain_en[c];
    end
  end

  // slice index: position of the core below the head of its group
  for (genvar c = 0; c < NCORE; c++) begin : g_slice
    if (c == 0) begin : g_head
      assign slice[c] = 3'd0;
    end else begin : g_next
      assign slice[c] = chain_en[c] ? slice[c-1] + 3'd1 : 3'd0;
    end
  end

  // ---------------- register files ----------------
  logic [AW-1:0] core_raddr [NCORE][4];
  logic [AW-1:0] rf_raddr   [NCORE][4];
  logic [W-1:0]  rf_rdata   [NCORE][4];
  logic [W-1:0]  rf_p       [NCORE];
  logic [W-1:0]  rd0        [NCORE];
  logic [NCORE-1:0] wb_valid, rf_we, dbc_we;
  logic [AW-1:0] wb_addr [NCORE];
  logic [W-1:0]  wb_data [NCORE];
  logic [AW-1:0] rf_waddr [NCORE];
  logic [W-1:0]  rf_wdata [NCORE];
  logic [W-1:0]  rf_wmask [NCORE];
  logic [AW-1:0] dbc_waddr, dbc_raddr;
  logic [W-1:0]  dbc_wd, dbc_wm;
  logic          dbc_rd_en;
  logic [CIW-1:0] dbc_rd_rf;

  dbc #(.NCORE(NCORE), .W(W), .AW(AW)) u_dbc (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (dbc_req),
    .is_load    (dbc_is_load),
    .slice      (dbc_slice),
    .word       (dbc_word),
    .addr       (dbc_addr),
    .wdata      (dbc_wdata),
    .core_slice (slice),
    .rf_we      (dbc_we),
    .rf_waddr   (dbc_waddr),
    .rf_wdata   (dbc_wd),
    .rf_wmask   (dbc_wm),
    .rd_en      (dbc_rd_en),
    .rd_rf      (dbc_rd_rf),
    .rd_addr    (dbc_raddr),
    .rd_data    (rd0),
    .dout       (host_dout),
    .dout_valid (host_dout_valid)
  );

  // write bus: one value per cycle; file k takes the slice it holds from the
  // writing core that has the same slice index
  always_comb begin
    for (int k = 0; k < NCORE; k++) begin
      rf_we[k]    = dbc_we[k];
      rf_waddr[k] = dbc_waddr;
      rf_wdata[k] = dbc_wd;
      rf_wmask[k] = dbc_wm;
      for (int j = 0; j < NCORE; j++) begin
        if (wb_valid[j] && slice[j] == slice[k]) begin
          rf_we[k]    = 1'b1;
          rf_waddr[k] = wb_addr[j];
          rf_wdata[k] = wb_data[j];
          rf_wmask[k] = '1;
        end
      end
      for (int p = 0; p < 4; p++) rf_raddr[k][p] = core_raddr[k][p];
      if (dbc_rd_en && 32'(dbc_rd_rf) == k) rf_raddr[k][0] = dbc_raddr;
      rd0[k] = rf_rdata[k][0];
    end
  end

  for (genvar k = 0; k < NCORE; k++) begin : g_rf
    rf4r1w #(.W(W), .DEPTH(DEPTH)) u_rf (
      .clk   (clk),
      .raddr (rf_raddr[k]),
      .rdata (rf_rdata[k]),
      .p_out (rf_p[k]),
      .we    (rf_we[k]),
      .waddr (rf_waddr[k]),
      .wdata (rf_wdata[k]),
      .wmask (rf_wmask[k])
    );
  end

  // ---------------- MALU cores ----------------
  logic [D_W-1:0] m_out [NCORE], q_out [NCORE], a_top [NCORE], dig_out [NCORE];
  logic [D_W-1:0] m_in  [NCORE], q_in  [NCORE], a_chn [NCORE], dig_in  [NCORE];

  always_comb begin
    for (int c = 0; c < NCORE; c++) begin
      m_in[c]   = (c == 0) ? '0 : m_out[(c == 0) ? 0 : c-1];
      dig_in[c] = (c == 0) ? '0 : dig_out[(c == 0) ? 0 : c-1];
      if (c + 1 < NCORE && chain_en[(c + 1 < NCORE) ? c+1 : c]) begin
        q_in[c]  = q_out[(c + 1 < NCORE) ? c+1 : c];
        a_chn[c] = a_top[(c + 1 < NCORE) ? c+1 : c];
      end else begin
        q_in[c]  = '0;
        a_chn[c] = '0;
      end
    end
  end

  for (genvar c = 0; c < NCORE; c++) begin : g_core
    malu_core #(.W(W), .D_W(D_W), .AW(AW), .SLOTW(SLOTW)) u_core (
      .clk        (clk),
      .rst_n      (rst_n),
      .cfg_we     (cfg_we[c]),
      .cfg_wdata  (cfg_wdata),
      .cfg        (cfg[c]),
      .start      (core_start[c]),
      .instr      (core_instr[c]),
      .slot       (core_slot[c]),
      .busy       (core_busy[c]),
      .free_next  (free_next[c]),
      .rf_raddr   (core_raddr[c]),
      .rf_rdata   (rf_rdata[c]),
      .rf_p       (rf_p[c]),
      .wb_valid   (wb_valid[c]),
      .wb_addr    (wb_addr[c]),
      .wb_data    (wb_data[c]),
      .m_in       (m_in[c]),
      .m_out      (m_out[c]),
      .q_in       (q_in[c]),
      .q_out      (q_out[c]),
      .a_chain_in (a_chn[c]),
      .a_top_out  (a_top[c]),
      .digit_in   (dig_in[c]),
      .digit_out  (dig_out[c]),
      .chain_en   (chain_en[c])
    );
  end

  // only one value may be written per cycle: the writing cores form one group
  a_one_group_writes: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(wb_valid & is_top));

endmodule
