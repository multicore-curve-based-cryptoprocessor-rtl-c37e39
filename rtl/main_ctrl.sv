// main_ctrl: main controller and host instruction buffer.
//
// The host sends a 32-bit instruction with a 32-bit data word (used by CFG,
// STORE and UWRITE) while host_full is low. The pair waits in a small FIFO;
// the controller decodes the oldest one and dispatches it:
//   MALU   handed to the instruction bus controller when its queue has room,
//   CALL   starts a micro-code routine in the instruction bus controller,
//   CFG    writes the configuration register of one core,
//   STORE / LOAD  go to the data bus controller,
//   UWRITE writes one micro-code word.
// CFG, STORE, LOAD and UWRITE wait until all queued MALU work has finished,
// so the host sees the instructions take effect in the order it sent them.
// busy is high while anything is queued or running. The three host signals
// (instruction, data, buffer full) follow the document; the FIFO depth and the
// encodings (see cp_pkg) are this design's choices.
module main_ctrl
  import cp_pkg::*;
#(
  parameter int unsigned NCORE = ALPHA,
  parameter int unsigned FDEPTH = 4,
  parameter int unsigned UAW   = UC_AW,
  parameter int unsigned AW    = RF_AW
) (
  input  logic             clk,
  input  logic             rst_n,
  // host
  input  logic             host_valid,
  input  logic [31:0]      host_instr,
  input  logic [31:0]      host_data,
  output logic             host_full,
  output logic             busy,
  // instruction bus controller
  output logic             ibc_push,
  output malu_instr_t      ibc_instr,
  input  logic             ibc_ready,
  output logic             call_start,
  output logic [UAW-1:0]   call_addr,
  output logic [UAW:0]     call_len,
  input  logic             ibc_idle,
  input  logic             cores_busy,
  // configuration registers
  output logic [NCORE-1:0] cfg_we,
  output core_cfg_t        cfg_wdata,
  // data bus controller
  output logic             dbc_req,
  output logic             dbc_is_load,
  output logic [2:0]       dbc_slice,
  output logic [2:0]       dbc_word,
  output logic [AW-1:0]    dbc_addr,
  output logic [31:0]      dbc_wdata,
  // micro-code RAM write port
  output logic             uc_we,
  output logic [UAW-1:0]   uc_waddr,
  output logic [31:0]      uc_wdata
);

  logic [63:0] head;
  logic        empty, pop, quiet;
  logic [31:0] hi, hd;
  opcode_t     op;

  sync_fifo #(.DW(64), .DEPTH(FDEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (host_valid),
    .wdata ({host_instr, host_data}),
    .full  (host_full),
    .pop   (pop),
    .rdata (head),
    .empty (empty)
  );

  assign hi    = head[63:32];
  assign hd    = head[31:0];
  assign op    = opcode_t'(hi[31:28]);
  assign quiet = ibc_idle && !cores_busy;

  always_comb begin
    pop = 1'b0;
    if (!empty) begin
      unique case (op)
        OP_MALU, OP_CALL:                    pop = ibc_ready;
        OP_CFG, OP_STORE, OP_LOAD, OP_UWRITE: pop = quiet;
        default:                             pop = 1'b1;
      endcase
    end
  end

  assign ibc_push   = pop && op == OP_MALU;
  assign ibc_instr  = instr_fields(hi);
  assign call_start = pop && op == OP_CALL;
  assign call_addr  = hi[UAW-1:0];
  assign call_len   = hi[8 + UAW:8];

  always_comb begin
    for (int k = 0; k < NCORE; k++)
      cfg_we[k] = pop && op == OP_CFG && 32'(hi[26:24]) == k;
  end
  assign cfg_wdata = '{cfg1: hd[0], nfield: hd[16 +: NFW]};

  assign dbc_req     = pop && (op == OP_STORE || op == OP_LOAD);
  assign dbc_is_load = op == OP_LOAD;
  assign dbc_slice   = hi[26:24];
  assign dbc_word    = hi[10:8];
  assign dbc_addr    = hi[AW-1:0];
  assign dbc_wdata   = hd;

  assign uc_we    = pop && op == OP_UWRITE;
  assign uc_waddr = hi[UAW-1:0];
  assign uc_wdata = hd;

  assign busy = !empty || !quiet;

endmodule
