// tb_malu_core: one MALU core with a register file modelled in the
// testbench. Checks the configuration register, the result of random
// instructions against a software model, the write-back address, and the
// timing: the write happens exactly 2+ceil(N/d)+slot cycles after start, and
// free_next is high only when idle or writing.
module tb_malu_core;
  import cp_pkg::*;
  localparam int unsigned W  = SLICE_W;
  localparam int unsigned XW = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cfg_we = 0, start = 0, busy, free_next, wb_valid;
  core_cfg_t   cfg_wdata, cfg;
  malu_instr_t instr;
  logic [1:0]  slot;
  logic [RF_AW-1:0] raddr [4], wb_addr;
  logic [W-1:0] rdata [4], rf_p, wb_data;
  logic [DIGIT-1:0] mo, qo, ato, dgo;
  logic [W-1:0] mem [RF_DEPTH];

  always_comb begin
    for (int i = 0; i < 4; i++) rdata[i] = mem[raddr[i]];
    rf_p = mem[0];
  end

  malu_core dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_wdata(cfg_wdata), .cfg(cfg),
    .start(start), .instr(instr), .slot(slot), .busy(busy), .free_next(free_next),
    .rf_raddr(raddr), .rf_rdata(rdata), .rf_p(rf_p), .wb_valid(wb_valid),
    .wb_addr(wb_addr), .wb_data(wb_data), .m_in('0), .m_out(mo), .q_in('0), .q_out(qo),
    .a_chain_in('0), .a_top_out(ato), .digit_in('0), .digit_out(dgo), .chain_en(1'b0));

  int checks = 0, failures = 0;

  function automatic logic [XW-1:0] mulmod(logic [XW-1:0] x, logic [XW-1:0] y,
                                           logic [XW-1:0] pp, int unsigned n);
    logic [XW-1:0] r = '0, msk;
    msk = (XW'(1) << n) - 1;
    for (int i = int'(n) - 1; i >= 0; i--) begin
      logic top;
      top = r[n-1];
      r = (r << 1) & msk;
      if (top) r ^= pp;
      if (x[i]) r ^= y;
    end
    return r;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(int unsigned n, int unsigned sl);
    logic [XW-1:0] v [RF_DEPTH];
    logic [XW-1:0] exp_v;
    int unsigned e, s, cyc;
    s = W - n;
    for (int r = 0; r < RF_DEPTH; r++) begin
      v[r] = {$urandom, $urandom, $urandom, $urandom};
      v[r] &= (XW'(1) << n) - 1;
      mem[r] = W'(v[r] << s);
    end
    v[0][0] = 1'b1;
    mem[0] = W'(v[0] << s);
    @(negedge clk);
    cfg_we = 1; cfg_wdata = '{cfg1: 1'b0, nfield: NFW'(n)};
    @(negedge clk);
    cfg_we = 0;
    check(cfg.nfield == NFW'(n) && !cfg.cfg1, "configuration register");
    instr = '{r: 5'($urandom_range(1, 31)), a: 5'($urandom), b: 5'($urandom),
              c: 5'($urandom), d: 5'($urandom)};
    exp_v = mulmod(v[instr.a], v[instr.b] ^ v[instr.d], v[0], n) ^ v[instr.c];
    slot = 2'(sl);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    e = (n + DIGIT - 1) / DIGIT;
    while (!wb_valid && cyc < 500) begin
      check(busy && !free_next, "busy and not free before the write");
      @(negedge clk);
      cyc++;
    end
    check(cyc == 2 + e + sl, $sformatf("write at cycle %0d, expected %0d", cyc, 2 + e + sl));
    check(free_next, "free_next while writing");
    check(wb_addr == instr.r, "write address");
    check(XW'(wb_data) >> s == exp_v, $sformatf("result n=%0d", n));
    @(negedge clk);
    check(!busy && free_next, "idle after the write");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0; slot = '0; cfg_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.nfield == NFW'(N_MALU) && !busy, "reset state");
    run(97, 0); run(97, 3); run(83, 1); run(98, 2); run(1, 0); run(24, 1);
    repeat (30) run($urandom_range(2, W), $urandom_range(0, 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
