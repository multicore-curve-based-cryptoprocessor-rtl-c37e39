// tb_cryptoproc: end-to-end test of the cryptoprocessor at its default size
// (six MALU_97x12 cores, six 32-entry register files, window 6, 4-way issue).
//
// The testbench plays the host. For each data-path configuration it sets the
// cores' configuration registers, stores a random reduction polynomial and
// random register contents, runs a random MALU program (partly sent
// instruction by instruction, partly written to the micro-code RAM and
// started with CALL), loads every register back and compares it with a
// sequential software model of R = A(B+D)+C mod P. Configurations:
//   6 independent cores, N = 97 and N = 83     (up to 4-way bundles)
//   3 groups of 2 cores, N = 163               (3-way)
//   2 groups of 3 cores, N = 283               (2-way)
//   1 group of 6 cores,  N = 571               (1-way)
// Programs never write a register twice within 31 instructions, so the
// unchecked write-after-write case cannot arise. A monitor checks that a new
// bundle is issued exactly ceil(N/d)+l+1 cycles after a bundle of l whenever
// an instruction is waiting, and counts how often each mechanism occurred:
// bundle sizes 1..4, out-of-order issue, dependency stalls, a full
// instruction queue, a full host buffer, micro-code streaming and each chain.
module tb_cryptoproc;
  import cp_pkg::*;

  localparam int unsigned W  = SLICE_W;
  localparam int unsigned XW = 640;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        host_valid = 1'b0;
  logic [31:0] host_instr = '0, host_data = '0;
  logic        host_full, host_dout_valid, busy;
  logic [31:0] host_dout;
  activity_t   act;

  always #5 clk = ~clk;

  cryptoproc dut (
    .clk(clk), .rst_n(rst_n), .host_valid(host_valid), .host_instr(host_instr),
    .host_data(host_data), .host_full(host_full), .host_dout(host_dout),
    .host_dout_valid(host_dout_valid), .busy(busy),
    .activity(act)
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // ---------------- reference model ----------------
  logic [XW-1:0] ref_rf [RF_DEPTH];
  logic [XW-1:0] pmask;     // low N coefficients of P
  int unsigned   nf, grp;   // field size and cores per group

  function automatic logic [XW-1:0] mulmod(logic [XW-1:0] a, logic [XW-1:0] b,
                                           logic [XW-1:0] p, int unsigned n);
    logic [XW-1:0] r = '0, msk;
    msk = (XW'(1) << n) - 1;
    for (int i = int'(n) - 1; i >= 0; i--) begin
      logic top;
      top = r[n-1];
      r = (r << 1) & msk;
      if (top) r ^= p;
      if (a[i]) r ^= b;
    end
    return r;
  endfunction

  function automatic logic [XW-1:0] rnd_elem(int unsigned n);
    logic [XW-1:0] v = '0;
    for (int i = 0; i < XW / 32; i++) v[i*32 +: 32] = $urandom;
    return v & ((XW'(1) << n) - 1);
  endfunction

  // ---------------- host side ----------------
  task automatic send(input logic [31:0] ins, input logic [31:0] dat);
    @(negedge clk);
    while (host_full) begin
      host_full_seen++;
      @(negedge clk);
    end
    host_valid = 1'b1;
    host_instr = ins;
    host_data  = dat;
    @(negedge clk);
    host_valid = 1'b0;
  endtask

  function automatic logic [31:0] op_word(opcode_t op, int unsigned sl, int unsigned wd,
                                          int unsigned ad);
    return {op, 1'b0, 3'(sl), 13'd0, 3'(wd), 3'd0, 5'(ad)};
  endfunction

  function automatic logic [31:0] malu_word(malu_instr_t m);
    return {OP_MALU, 3'd0, m};
  endfunction

  // slice sl (0 = most significant) of the stored (left-aligned) form of v
  function automatic logic [W-1:0] slice_of(logic [XW-1:0] v, int unsigned sl);
    logic [XW-1:0] sc;
    sc = v << (grp * W - nf);
    return W'(sc >> ((grp - 1 - sl) * W));
  endfunction

  task automatic store_reg(int unsigned ad, logic [XW-1:0] v);
    for (int sl = 0; sl < int'(grp); sl++) begin
      logic [W-1:0] s;
      logic [127:0] s128;
      s = slice_of(v, sl);
      s128 = 128'(s);
      for (int wd = 0; wd < (W + 31) / 32; wd++)
        send(op_word(OP_STORE, sl, wd, ad), s128[wd*32 +: 32]);
    end
  endtask

  task automatic load_reg(int unsigned ad, output logic [XW-1:0] v);
    logic [XW-1:0] sc = '0;
    for (int sl = 0; sl < int'(grp); sl++) begin
      logic [127:0] s128 = '0;
      for (int wd = 0; wd < (W + 31) / 32; wd++) begin
        send(op_word(OP_LOAD, sl, wd, ad), 32'd0);
        do @(posedge clk); while (!host_dout_valid);
        s128[wd*32 +: 32] = host_dout;
      end
      sc = (sc << W) | XW'(s128[W-1:0]);
    end
    v = sc >> (grp * W - nf);
  endtask

  task automatic configure(int unsigned g, int unsigned n);
    grp = g;
    nf  = n;
    for (int c = 0; c < ALPHA; c++)
      send(op_word(OP_CFG, c, 0, 0), {6'd0, 10'(n), 15'd0, 1'((c % g) != 0)});
  endtask

  // ---------------- program generation ----------------
  malu_instr_t prog [$];
  int unsigned next_dst;

  function automatic raddr_t pick_src(int unsigned recent);
    if (recent > 0 && $urandom_range(0, 99) < 35) begin
      int unsigned back = $urandom_range(1, (recent < 3) ? recent : 3);
      int unsigned r = next_dst - back;
      while (r < 1) r += 31;
      return raddr_t'(r);
    end
    return raddr_t'($urandom_range(1, 31));
  endfunction

  task automatic make_prog(int unsigned len);
    prog.delete();
    for (int i = 0; i < int'(len); i++) begin
      malu_instr_t m;
      m.a = pick_src(i);
      m.b = pick_src(i);
      m.c = pick_src(i);
      m.d = pick_src(i);
      m.r = raddr_t'(next_dst);
      next_dst = (next_dst == 31) ? 1 : next_dst + 1;
      prog.push_back(m);
    end
  endtask

  task automatic model_prog();
    foreach (prog[i]) begin
      malu_instr_t m = prog[i];
      ref_rf[m.r] = mulmod(ref_rf[m.a], ref_rf[m.b] ^ ref_rf[m.d], pmask, nf) ^ ref_rf[m.c];
    end
  endtask

  task automatic run_config(int unsigned g, int unsigned n, int unsigned n_direct,
                            int unsigned n_ucode);
    logic [XW-1:0] got;
    configure(g, n);
    pmask = rnd_elem(n) | XW'(1);
    ref_rf[0] = pmask;
    store_reg(0, pmask);
    for (int r = 1; r < RF_DEPTH; r++) begin
      ref_rf[r] = rnd_elem(n);
      store_reg(r, ref_rf[r]);
    end
    // instructions sent one by one
    make_prog(n_direct);
    model_prog();
    foreach (prog[i]) send(malu_word(prog[i]), 32'd0);
    // a routine in micro-code, started twice
    if (n_ucode > 0) begin
      make_prog(n_ucode);
      foreach (prog[i]) send(op_word(OP_UWRITE, 0, 0, 0) | 32'(i), malu_word(prog[i]));
      send({OP_CALL, 11'd0, 9'(n_ucode), 8'd0}, 32'd0);
      model_prog();
      send({OP_CALL, 11'd0, 9'(n_ucode), 8'd0}, 32'd0);
      model_prog();
    end
    for (int r = 0; r < RF_DEPTH; r++) begin
      load_reg(r, got);
      checks++;
      if (got !== ref_rf[r]) begin
        failures++;
        $display("FAIL g=%0d N=%0d r%0d got %h exp %h", g, n, r, got[W*6-1:0], ref_rf[r][W*6-1:0]);
      end
    end
    $display("config %0d x MALU, N=%0d done at cycle %0d", ALPHA / g, n, cycles);
  endtask

  // ---------------- monitor ----------------
  int host_full_seen = 0;
  int l_seen [5] = '{default: 0};
  int ooo_seen = 0, blocked_seen = 0, iqbfull_seen = 0, stream_seen = 0;
  int period_ok = 0, period_bad = 0;
  int since = 0, last_l = 0, ecyc = 0;
  bit have_last = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (act.stream) stream_seen++;
      if (act.iqb_full) iqbfull_seen++;
      since++;
      if (have_last && since == ecyc + last_l + 1 && act.waiting) begin
        if (act.issue) period_ok++;
        else begin
          period_bad++;
          $display("FAIL bundle not issued %0d cycles after a %0d-way bundle", since, last_l);
        end
      end
      if (act.issue) begin
        if (have_last && since < ecyc + last_l + 1) begin
          period_bad++;
          $display("FAIL bundle issued after %0d cycles", since);
        end
        l_seen[act.l]++;
        if (act.ooo) ooo_seen++;
        if (act.blocked) blocked_seen++;
        last_l = int'(act.l);
        ecyc = (nf + DIGIT - 1) / DIGIT;
        since = 0;
        have_last = 1;
      end
    end
  end

  task automatic need(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g3_before, g6_before, g2_before;

  initial begin
    next_dst = 1;
    grp = 1;
    nf = 97;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_config(1, 97, 90, 40);
    run_config(1, 83, 40, 0);
    g2_before = l_seen[3];
    run_config(2, 163, 30, 30);
    run_config(3, 283, 16, 0);
    g3_before = l_seen[1];
    run_config(6, 571, 6, 0);
    $display("mechanisms:");
    need("1-way bundles", l_seen[1]);
    need("2-way bundles", l_seen[2]);
    need("3-way bundles", l_seen[3]);
    need("4-way bundles", l_seen[4]);
    need("out-of-order issue", ooo_seen);
    need("dependency stalls", blocked_seen);
    need("instruction queue full", iqbfull_seen);
    need("host buffer full", host_full_seen);
    need("micro-code streaming", stream_seen);
    need("3-way issue with 2-core groups", l_seen[3] - g2_before);
    need("6-core chain executions", l_seen[1] - g3_before);
    need("bundle period = ceil(N/d)+l+1", period_ok);
    checks++;
    if (period_bad != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
