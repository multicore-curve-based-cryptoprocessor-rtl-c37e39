// tb_malu: checks the digit-serial data path slice, alone and as a chain of
// two slices (the wide mode), against a bit-serial software model of
// R = A(B+D)+C mod P for random field sizes. Operands are stored left-aligned
// as the data path expects. The result must be ready after exactly
// ceil(N/d) step cycles.
module tb_malu;
  localparam int unsigned W  = cp_pkg::SLICE_W;
  localparam int unsigned DW = cp_pkg::DIGIT;
  localparam int unsigned SHW = $clog2(DW + 1);
  localparam int unsigned XW = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           load = 0, step = 0, chain = 0;
  logic [SHW-1:0] sh;
  logic [W-1:0]   a [2], bd [2], c [2], p [2], res [2];
  logic [DW-1:0]  m0, m1, q0, q1, at0, at1, d0, d1;

  malu u0 (.clk(clk), .load(load), .a_in(a[0]), .bd_in(bd[0]), .c_in(c[0]), .p_in(p[0]),
           .step(step), .sh(sh), .m_ext(1'b0), .m_in('0), .m_out(m0),
           .q_in(chain ? q1 : '0), .q_out(q0), .a_chain_in(chain ? at1 : '0),
           .a_top_out(at0), .digit_in('0), .digit_out(d0), .result(res[0]));
  malu u1 (.clk(clk), .load(load), .a_in(a[1]), .bd_in(bd[1]), .c_in(c[1]), .p_in(p[1]),
           .step(step), .sh(sh), .m_ext(chain), .m_in(m0), .m_out(m1),
           .q_in('0), .q_out(q1), .a_chain_in('0), .a_top_out(at1),
           .digit_in(d0), .digit_out(d1), .result(res[1]));

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

  function automatic logic [XW-1:0] rnd(int unsigned n);
    logic [XW-1:0] v;
    for (int i = 0; i < XW / 32; i++) v[i*32 +: 32] = $urandom;
    return v & ((XW'(1) << n) - 1);
  endfunction

  task automatic run(int unsigned g, int unsigned n);
    logic [XW-1:0] va, vb, vc, vd, vp, exp_v, got, sa, sbd, sc, sp;
    int unsigned e, pad, s;
    va = rnd(n); vb = rnd(n); vc = rnd(n); vd = rnd(n); vp = rnd(n) | 1;
    exp_v = mulmod(va, vb ^ vd, vp, n) ^ vc;
    s = g * W - n;
    sa = va << s; sbd = (vb ^ vd) << s; sc = vc << s; sp = vp << s;
    for (int k = 0; k < 2; k++) begin
      int unsigned sl = (g == 2) ? (1 - k) : 0;
      a[k]  = (g == 2 || k == 0) ? W'(sa  >> (sl * W)) : '0;
      bd[k] = (g == 2 || k == 0) ? W'(sbd >> (sl * W)) : '0;
      c[k]  = (g == 2 || k == 0) ? W'(sc  >> (sl * W)) : '0;
      p[k]  = (g == 2 || k == 0) ? W'(sp  >> (sl * W)) : '0;
    end
    chain = (g == 2);
    e = (n + DW - 1) / DW;
    pad = e * DW - n;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    for (int i = 0; i < int'(e); i++) begin
      step = 1;
      sh = (i == 0) ? SHW'(DW - pad) : SHW'(DW);
      @(negedge clk);
    end
    step = 0;
    got = (g == 2) ? XW'({res[0], res[1]}) : XW'(res[0]);
    got = got >> s;
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL g=%0d n=%0d got %h exp %h", g, n, got, exp_v);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sh = SHW'(DW);
    for (int i = 0; i < 2; i++) begin a[i] = '0; bd[i] = '0; c[i] = '0; p[i] = '0; end
    run(1, 97); run(1, 98); run(1, 83); run(1, 12); run(1, 13);
    run(2, 195); run(2, 163); run(2, 193); run(2, 196); run(2, 99);
    repeat (40) run(1, $urandom_range(1, W));
    repeat (40) run(2, $urandom_range(W + 1, 2 * W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
