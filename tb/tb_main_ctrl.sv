// tb_main_ctrl: sends a random mix of host instructions to the main
// controller while the instruction bus controller and the cores are modelled
// with random ready/idle/busy behaviour. Every dispatch must appear once, in
// the order sent, with the right fields; CFG, STORE, LOAD and UWRITE only
// while everything is quiet; MALU and CALL only when the IBC is ready; the
// host buffer must report full and lose nothing.
module tb_main_ctrl;
  import cp_pkg::*;
  localparam int unsigned NC = ALPHA;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic host_valid = 0, host_full, busy;
  logic [31:0] host_instr = '0, host_data = '0;
  logic ibc_push, ibc_ready, call_start, ibc_idle, cores_busy;
  malu_instr_t ibc_instr;
  logic [7:0] call_addr, uc_waddr;
  logic [8:0] call_len;
  logic [NC-1:0] cfg_we;
  core_cfg_t cfg_wdata;
  logic dbc_req, dbc_is_load, uc_we;
  logic [2:0] dbc_slice, dbc_word;
  logic [4:0] dbc_addr;
  logic [31:0] dbc_wdata, uc_wdata;

  main_ctrl dut (.clk(clk), .rst_n(rst_n), .host_valid(host_valid), .host_instr(host_instr),
    .host_data(host_data), .host_full(host_full), .busy(busy), .ibc_push(ibc_push),
    .ibc_instr(ibc_instr), .ibc_ready(ibc_ready), .call_start(call_start),
    .call_addr(call_addr), .call_len(call_len), .ibc_idle(ibc_idle), .cores_busy(cores_busy),
    .cfg_we(cfg_we), .cfg_wdata(cfg_wdata), .dbc_req(dbc_req), .dbc_is_load(dbc_is_load),
    .dbc_slice(dbc_slice), .dbc_word(dbc_word), .dbc_addr(dbc_addr), .dbc_wdata(dbc_wdata),
    .uc_we(uc_we), .uc_waddr(uc_waddr), .uc_wdata(uc_wdata));

  int checks = 0, failures = 0, full_seen = 0;
  logic [63:0] sent [$];
  int got = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // random environment
  always @(negedge clk) begin
    ibc_ready  = $urandom_range(0, 2) != 0;
    ibc_idle   = $urandom_range(0, 2) != 0;
    cores_busy = $urandom_range(0, 3) == 0;
  end

  // dispatch checker
  always @(posedge clk) begin
    if (rst_n) begin
      int n;
      bit quiet;
      quiet = ibc_idle && !cores_busy;
      n = int'(ibc_push) + int'(call_start) + int'(|cfg_we) + int'(dbc_req) + int'(uc_we);
      check(n <= 1, "one dispatch per cycle");
      if (n == 1) begin
        logic [31:0] i, d;
        {i, d} = sent[got];
        got++;
        case (opcode_t'(i[31:28]))
          OP_MALU:   check(ibc_push && ibc_ready && ibc_instr == i[24:0], "MALU dispatch");
          OP_CALL:   check(call_start && ibc_ready && call_addr == i[7:0] && call_len == i[16:8],
                           "CALL dispatch");
          OP_CFG:    check(quiet && cfg_we == NC'(1) << i[26:24] && cfg_wdata.cfg1 == d[0] &&
                           cfg_wdata.nfield == d[25:16], "CFG dispatch");
          OP_STORE, OP_LOAD:
                     check(quiet && dbc_req && dbc_is_load == (i[31:28] == 4'(OP_LOAD)) &&
                           dbc_slice == i[26:24] && dbc_word == i[10:8] && dbc_addr == i[4:0] &&
                           dbc_wdata == d, "STORE/LOAD dispatch");
          OP_UWRITE: check(quiet && uc_we && uc_waddr == i[7:0] && uc_wdata == d, "UWRITE dispatch");
          default:   check(0, "unexpected dispatch");
        endcase
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_t ops [6] = '{OP_MALU, OP_CALL, OP_CFG, OP_STORE, OP_LOAD, OP_UWRITE};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (400) begin
      logic [31:0] i;
      @(negedge clk);
      i = $urandom;
      i[31:28] = ops[$urandom_range(0, 5)];
      if (i[31:28] == 4'(OP_CFG) || i[31:28] == 4'(OP_STORE) || i[31:28] == 4'(OP_LOAD))
        i[26:24] = 3'($urandom_range(0, NC - 1));
      while (host_full) begin full_seen++; @(negedge clk); end
      host_valid = 1; host_instr = i; host_data = $urandom;
      sent.push_back({host_instr, host_data});
      @(negedge clk);
      host_valid = 0;
    end
    repeat (200) @(negedge clk);
    check(got == sent.size(), $sformatf("all dispatched (%0d of %0d)", got, sent.size()));
    check(full_seen > 0, "host buffer full seen");
    check(!busy || cores_busy || !ibc_idle, "not busy at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
