// tb_ibc: the instruction bus controller with MALU cores and the micro-code
// RAM modelled in the testbench. Random programs, without a register written
// twice, reach it partly through the host path and partly through CALL. For
// every bundle it checks: the oldest queued instruction is in it; no
// instruction in it reads a result of an older instruction still pending or
// in the same bundle; none overwrites a register an older pending instruction
// still reads; the size is at most min(LMAX, units); slots follow program
// order; every core of a group gets its head's instruction and slot; only
// instructions of the window are taken. At the end every instruction must
// have been issued once, with 1- to 4-way bundles and out-of-order issue seen.
module tb_ibc;
  import cp_pkg::*;
  localparam int unsigned NC = ALPHA;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic host_push = 0, host_ready, call_start = 0, idle, uc_re;
  malu_instr_t host_instr;
  logic [7:0] call_addr = '0, uc_raddr;
  logic [8:0] call_len = '0;
  logic [31:0] uc_rdata;
  logic [NC-1:0] is_top, free_next, core_start;
  malu_instr_t core_instr [NC];
  logic [1:0] core_slot [NC];
  logic issue_fire, issue_ooo, issue_blocked, iqb_full, waiting;
  logic [2:0] issue_count;

  ibc dut (.clk(clk), .rst_n(rst_n), .host_push(host_push), .host_instr(host_instr),
    .host_ready(host_ready), .call_start(call_start), .call_addr(call_addr),
    .call_len(call_len), .idle(idle), .uc_re(uc_re), .uc_raddr(uc_raddr),
    .uc_rdata(uc_rdata), .is_top(is_top), .core_free_next(free_next),
    .core_start(core_start), .core_instr(core_instr), .core_slot(core_slot),
    .issue_fire(issue_fire), .issue_count(issue_count), .issue_ooo(issue_ooo),
    .issue_blocked(issue_blocked), .iqb_full(iqb_full), .waiting(waiting));

  // micro-code RAM model
  logic [31:0] ucode [256];
  always_ff @(posedge clk) if (uc_re) uc_rdata <= ucode[uc_raddr];

  // core model: busy for 2 + E + slot cycles after start
  localparam int unsigned E = 3;
  int timer [NC];
  always_ff @(posedge clk) begin
    for (int c = 0; c < NC; c++) begin
      if (core_start[c]) timer[c] <= 2 + E + int'(core_slot[c]);
      else if (timer[c] > 0) timer[c] <= timer[c] - 1;
    end
  end
  always_comb for (int c = 0; c < NC; c++) free_next[c] = timer[c] <= 1;

  int checks = 0, failures = 0;
  int l_seen [5] = '{default: 0};
  int ooo_seen = 0;
  malu_instr_t prog [$];
  bit issued [31];
  int n_issued;

  function automatic bit rd(malu_instr_t x, raddr_t r);
    return x.a == r || x.b == r || x.c == r || x.d == r;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // bundle checker
  always @(posedge clk) begin
    if (rst_n && issue_fire) begin
      int idx [4];
      int l, units, oldest, pos;
      l = 0; units = 0; oldest = -1;
      for (int c = 0; c < NC; c++) if (is_top[c]) units++;
      if (units > 4) units = 4;
      for (int c = 0; c < NC; c++) begin
        int t;
        t = c;
        while (!is_top[t]) t--;
        check(core_start[c] == core_start[t] && (!core_start[c] ||
              (core_instr[c] == core_instr[t] && core_slot[c] == core_slot[t])), "group follows head");
        if (is_top[c] && core_start[c]) begin
          check(int'(core_slot[c]) == l, "slot numbering");
          idx[l] = int'(core_instr[c].r) - 1;
          l++;
        end
      end
      check(l == int'(issue_count) && l >= 1 && l <= units, "bundle size");
      l_seen[l]++;
      if (issue_ooo) ooo_seen++;
      for (int i = 0; i < prog.size(); i++) if (!issued[i]) begin oldest = i; break; end
      check(idx[0] == oldest, "oldest instruction issued");
      for (int k = 0; k < l; k++) begin
        int j;
        j = idx[k];
        check(!issued[j], "issued once");
        if (k > 0) check(idx[k] > idx[k-1], "program order of slots");
        pos = 0;
        for (int i = 0; i < j; i++) begin
          bit in_b;
          in_b = 0;
          if (issued[i]) continue;
          pos++;
          for (int m = 0; m < l; m++) if (idx[m] == i) in_b = 1;
          check(!rd(prog[j], prog[i].r), $sformatf("RAW %0d -> %0d", i, j));
          if (!in_b) check(!rd(prog[i], prog[j].r), $sformatf("overwrite %0d by %0d", i, j));
        end
        check(pos < ILP_D, "inside the window");
      end
      for (int k = 0; k < l; k++) begin issued[idx[k]] = 1; n_issued++; end
    end
  end

  task automatic run_prog(logic [NC-1:0] tops, int n);
    is_top = tops;
    prog.delete();
    for (int i = 0; i < 31; i++) issued[i] = 0;
    n_issued = 0;
    for (int i = 0; i < n; i++) begin
      malu_instr_t m;
      m.r = 5'(i + 1);
      m.a = 5'($urandom_range(1, 31)); m.b = 5'($urandom_range(1, 31));
      m.c = 5'($urandom_range(1, 31)); m.d = 5'($urandom_range(1, 31));
      prog.push_back(m);
    end
    // first half through the host path, the rest from micro-code
    for (int i = 0; i < n / 2; i++) begin
      @(negedge clk);
      while (!host_ready) @(negedge clk);
      host_push = 1; host_instr = prog[i];
      @(negedge clk);
      host_push = 0;
    end
    for (int i = n / 2; i < n; i++) ucode[i + 7] = {4'h1, 3'd0, prog[i]};
    while (!host_ready) @(negedge clk);
    call_start = 1; call_addr = 8'(n / 2 + 7); call_len = 9'(n - n / 2);
    @(negedge clk);
    call_start = 0;
    while (!idle) @(negedge clk);
    repeat (20) @(negedge clk);
    check(n_issued == n, $sformatf("all issued (%0d of %0d)", n_issued, n));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_instr = '0;
    is_top = '1;
    for (int c = 0; c < NC; c++) timer[c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (6) run_prog(6'b111111, 30);
    repeat (2) run_prog(6'b010101, 30);
    run_prog(6'b000001, 12);
    for (int l = 1; l <= 4; l++) check(l_seen[l] > 0, $sformatf("%0d-way bundle seen", l));
    check(ooo_seen > 0, "out-of-order issue seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
