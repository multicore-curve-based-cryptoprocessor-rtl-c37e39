// tb_ecc: complete ECC scalar multiplications run on the cryptoprocessor at
// its default size, for the four binary fields of the ECC evaluation, one
// after another, with two programs each:
//
//   N = 163, P = x^163 + x^7 + x^6 + x^3 + 1   three chained pairs    (3-way)
//   N = 193, P = x^193 + x^15 + 1              three chained pairs    (3-way)
//   N = 283, P = x^283 + x^12 + x^7 + x^5 + 1  two chained triples    (2-way)
//   N = 571, P = x^571 + x^10 + x^5 + x^2 + 1  one chain of six cores (1-way)
//
// The polynomials are the usual standard ones for these sizes (the 193-bit
// trinomial is also the architecture's own example). For each field the host
// reconfigures the cores with CFG and stores P, the curve constant b, the
// base point and the constants 0 and 1.
//
// ECC_M: the Montgomery ladder in Lopez-Dahab projective x-coordinates. Two
// ladder-step routines (for key bits 0 and 1; each a point addition of six
// MALU instructions followed by a doubling of six) go to the micro-code RAM
// and the host calls one per key bit.
//
// ECC: double-and-add over the non-adjacent form (NAF) of the key in
// Lopez-Dahab projective coordinates (x = X/Z, y = Y/Z^2). A doubling routine
// of 10 MALU words and two mixed-addition routines of 13 words (for +P and
// -P, which differ only in which of y and x+y they read) go to the micro-code
// RAM; the host calls a doubling per digit and an addition per non-zero
// digit.
//
// Both end with the Itoh-Tsujii inversion of Z, sent as direct MALU
// instructions (squarings are MALU(s,s,s,0,0)), and the conversion to affine
// coordinates. The routines are this design's own sequences; the
// architecture fixes only their lengths, which these are close to.
//
// The reference is independent of both: a random point on
// y^2 + xy = x^3 + x^2 + b (b random) is found with the half-trace, and kP is
// computed by affine double-and-add over the binary key with the textbook
// formulas and a binary extended-Euclid inversion. The cycle counts of the
// point arithmetic and of the inversion, and the bundles of each width, are
// printed; the ladder must issue bundles as wide as the number of groups
// (at most four) and no wider.
module tb_ecc;
  import cp_pkg::*;

  localparam int unsigned W    = SLICE_W;
  localparam int unsigned GMAX = ALPHA;
  localparam int unsigned XW   = 576;
  localparam int unsigned SW   = GMAX * W;
  typedef logic [XW-1:0] fe_t;

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
    .host_dout_valid(host_dout_valid), .busy(busy), .activity(act)
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  int bundles [5] = '{default: 0};
  always @(posedge clk) if (rst_n && act.issue) bundles[act.l]++;

  // current field: degree and P without its x^N term
  int unsigned nf;
  fe_t         plow;

  function automatic fe_t fmask();
    return (fe_t'(1) << nf) - 1;
  endfunction

  // ---------------- reference arithmetic in GF(2^nf) ----------------
  function automatic fe_t fmul(fe_t a, fe_t b);
    fe_t r;
    logic top;
    r = '0;
    for (int i = int'(nf) - 1; i >= 0; i--) begin
      top = r[nf-1];
      r = (r << 1) & fmask();
      if (top) r ^= plow;
      if (a[i]) r ^= b;
    end
    return r;
  endfunction

  function automatic fe_t fsq(fe_t a);
    return fmul(a, a);
  endfunction

  // binary extended Euclid: invariants g1*a = u, g2*a = v (mod P)
  function automatic fe_t finv(fe_t a);
    fe_t u, v, g1, g2, f;
    f  = plow | (fe_t'(1) << nf);
    u  = a;
    v  = f;
    g1 = fe_t'(1);
    g2 = '0;
    while (u != fe_t'(1) && v != fe_t'(1)) begin
      while (!u[0]) begin
        u = u >> 1;
        g1 = g1[0] ? (g1 ^ f) >> 1 : g1 >> 1;
      end
      while (!v[0]) begin
        v = v >> 1;
        g2 = g2[0] ? (g2 ^ f) >> 1 : g2 >> 1;
      end
      if (u > v) begin u ^= v; g1 ^= g2; end
      else       begin v ^= u; g2 ^= g1; end
    end
    return (u == fe_t'(1)) ? g1 : g2;
  endfunction

  function automatic fe_t ftrace(fe_t c);
    fe_t t, s;
    t = c;
    s = c;
    for (int i = 1; i < int'(nf); i++) begin t = fsq(t); s ^= t; end
    return s;
  endfunction

  function automatic fe_t fhalftrace(fe_t c);
    fe_t t, s;
    t = c;
    s = c;
    for (int i = 1; i <= (int'(nf) - 1) / 2; i++) begin t = fsq(fsq(t)); s ^= t; end
    return s;
  endfunction

  function automatic fe_t frand();
    fe_t v;
    for (int i = 0; i < int'(XW / 32); i++) v[i*32 +: 32] = $urandom;
    return v & fmask();
  endfunction

  // affine double and add, a = 1
  task automatic ref_mult(fe_t k, fe_t px, fe_t py, output fe_t qx, output fe_t qy);
    fe_t x1, y1, lam, x3, y3;
    int top;
    x1 = px;
    y1 = py;
    top = int'(nf) - 1;
    while (!k[top]) top--;
    for (int i = top - 1; i >= 0; i--) begin
      lam = x1 ^ fmul(y1, finv(x1));
      x3  = fsq(lam) ^ lam ^ fe_t'(1);
      y3  = fmul(x1 ^ x3, lam) ^ x3 ^ y1;
      x1 = x3; y1 = y3;
      if (k[i]) begin
        lam = fmul(y1 ^ py, finv(x1 ^ px));
        x3  = fsq(lam) ^ lam ^ x1 ^ px ^ fe_t'(1);
        y3  = fmul(x1 ^ x3, lam) ^ x3 ^ y1;
        x1 = x3; y1 = y3;
      end
    end
    qx = x1;
    qy = y1;
  endtask

  // ---------------- host side ----------------
  task automatic send(input logic [31:0] ins, input logic [31:0] dat);
    @(negedge clk);
    while (host_full) @(negedge clk);
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

  function automatic logic [31:0] mw(int r, int a, int b, int c, int d);
    malu_instr_t m;
    m = '{r: 5'(r), a: 5'(a), b: 5'(b), c: 5'(c), d: 5'(d)};
    return {OP_MALU, 3'd0, m};
  endfunction

  // values are kept left-aligned in g slices: stored as v * x^(g*W - N)
  task automatic store_reg(int unsigned g, int unsigned ad, fe_t v);
    logic [SW-1:0]  sc;
    logic [127:0]   s128;
    sc = SW'(v) << (g * W - nf);
    for (int sl = 0; sl < int'(g); sl++) begin
      s128 = 128'(sc[(int'(g) - 1 - sl) * int'(W) +: W]);
      for (int wd = 0; wd < int'((W + 31) / 32); wd++)
        send(op_word(OP_STORE, sl, wd, ad), s128[wd*32 +: 32]);
    end
  endtask

  task automatic load_reg(int unsigned g, int unsigned ad, output fe_t v);
    logic [SW-1:0]  sc;
    logic [127:0]   s128;
    sc = '0;
    for (int sl = 0; sl < int'(g); sl++) begin
      s128 = '0;
      for (int wd = 0; wd < int'((W + 31) / 32); wd++) begin
        send(op_word(OP_LOAD, sl, wd, ad), 32'd0);
        do @(posedge clk); while (!host_dout_valid);
        s128[wd*32 +: 32] = host_dout;
      end
      sc = (sc << W) | SW'(s128[W-1:0]);
    end
    v = fe_t'(sc >> (g * W - nf));
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (busy);
  endtask

  // register map
  localparam int RZ = 1, RONE = 2, RX = 3, RB = 4, X1 = 5, Z1 = 6, X2 = 7, Z2 = 8;

  // one ladder step: Madd(Xa,Za,Xb,Zb) then Mdouble(Xb,Zb)
  task automatic write_step(int base, int xa, int za, int xb, int zb);
    logic [31:0] p [12];
    p[0]  = mw(9,  xa, zb, RZ, RZ);     // T1 = Xa*Zb
    p[1]  = mw(10, xb, za, RZ, RZ);     // T2 = Xb*Za
    p[2]  = mw(11, 9, 10, RZ, RZ);      // M  = T1*T2
    p[3]  = mw(12, RONE, 9, RZ, 10);    // S  = T1+T2
    p[4]  = mw(za, 12, 9, RZ, 10);      // Za = (T1+T2)^2
    p[5]  = mw(xa, RX, za, 11, RZ);     // Xa = x*Za + M
    p[6]  = mw(13, xb, xb, RZ, RZ);     // T  = Xb^2
    p[7]  = mw(14, zb, zb, RZ, RZ);     // U  = Zb^2
    p[8]  = mw(15, 14, 14, RZ, RZ);     // U^2
    p[9]  = mw(zb, 13, 14, RZ, RZ);     // Zb = T*U
    p[10] = mw(16, 13, 13, RZ, RZ);     // T^2
    p[11] = mw(xb, RB, 15, 16, RZ);     // Xb = b*U^2 + T^2
    for (int i = 0; i < 12; i++) send(op_word(OP_UWRITE, 0, 0, 0) | 32'(base + i), p[i]);
  endtask

  // Itoh-Tsujii inversion of register src into register 19, sent as direct
  // MALU instructions: beta_m = src^(2^m - 1) for m following the bits of N-1
  // from the top, beta_2m = beta_m^(2^m) * beta_m, beta_(m+1) = beta_m^2 * src,
  // and src^-1 = beta_(N-1)^2. nb returns the final m.
  task automatic send_inv(int unsigned n, int src, output int nb);
    int hb;
    hb = 0;
    while (((n - 1) >> (hb + 1)) != 0) hb++;
    send(mw(17, src, RZ, src, RZ), 0);  // beta_1 = src (0*0 + src)
    nb = 1;
    for (int i = hb - 1; i >= 0; i--) begin
      send(mw(18, 17, RZ, 17, RZ), 0);  // s = beta
      for (int j = 0; j < nb; j++) send(mw(18, 18, 18, RZ, RZ), 0);
      send(mw(17, 18, 17, RZ, RZ), 0);  // beta_2m = s * beta_m
      nb = 2 * nb;
      if ((((n - 1) >> i) & 1) != 0) begin
        send(mw(18, 17, 17, RZ, RZ), 0);
        send(mw(17, 18, src, RZ, RZ), 0);
        nb = nb + 1;
      end
    end
    send(mw(19, 17, 17, RZ, RZ), 0);
  endtask

  // ECC register map: affine P (x, y, x+y) and projective Q = (X : Y : Z)
  localparam int RY = 5, RXY = 6, QX = 7, QY = 8, QZ = 9;
  localparam int UPD = 32, UPA = 48, UPS = 64;

  // point doubling in Lopez-Dahab coordinates, a = 1 (10 MALU words)
  task automatic write_pd(int base);
    logic [31:0] p [10];
    p[0] = mw(10, QZ, QZ, RZ, RZ);      // Z^2
    p[1] = mw(11, QX, QX, RZ, RZ);      // X^2
    p[2] = mw(QZ, 11, 10, RZ, RZ);      // Z3 = X^2 Z^2
    p[3] = mw(12, 10, 10, RZ, RZ);      // Z^4
    p[4] = mw(13, RB, 12, RZ, RZ);      // b Z^4
    p[5] = mw(QX, 11, 11, 13, RZ);      // X3 = X^4 + b Z^4
    p[6] = mw(14, QY, QY, RZ, RZ);      // Y^2
    p[7] = mw(15, RONE, QZ, 14, 13);    // Z3 + Y^2 + b Z^4
    p[8] = mw(16, QX, 15, RZ, RZ);      // X3 (Z3 + Y^2 + b Z^4)
    p[9] = mw(QY, 13, QZ, 16, RZ);      // Y3 = b Z^4 Z3 + that
    for (int i = 0; i < 10; i++) send(op_word(OP_UWRITE, 0, 0, 0) | 32'(base + i), p[i]);
  endtask

  // mixed addition Q + (x2, y2), a = 1 (13 MALU words); ry holds y2 and
  // rxy x2 + y2, so swapping them adds -P = (x2, x2 + y2) instead
  task automatic write_pa(int base, int ry, int rxy);
    logic [31:0] p [13];
    p[0]  = mw(10, QZ, QZ, RZ, RZ);     // Z1^2
    p[1]  = mw(11, ry, 10, QY, RZ);     // A = y2 Z1^2 + Y1
    p[2]  = mw(12, RX, QZ, QX, RZ);     // B = x2 Z1 + X1
    p[3]  = mw(13, QZ, 12, RZ, RZ);     // C = Z1 B
    p[4]  = mw(14, 12, 12, RZ, RZ);     // B^2
    p[5]  = mw(15, 14, 13, RZ, 10);     // D = B^2 (C + Z1^2)
    p[6]  = mw(QZ, 13, 13, RZ, RZ);     // Z3 = C^2
    p[7]  = mw(QX, 11, 11, 15, 13);     // X3 = A (A + C) + D
    p[8]  = mw(16, 11, 13, RZ, RZ);     // E = A C
    p[9]  = mw(17, RX, QZ, QX, RZ);     // F = x2 Z3 + X3
    p[10] = mw(18, QZ, QZ, RZ, RZ);     // Z3^2
    p[11] = mw(19, 18, rxy, RZ, RZ);    // G = (x2 + y2) Z3^2
    p[12] = mw(QY, 17, 16, 19, QZ);     // Y3 = F (E + Z3) + G
    for (int i = 0; i < 13; i++) send(op_word(OP_UWRITE, 0, 0, 0) | 32'(base + i), p[i]);
  endtask

  // one complete scalar multiplication on groups of g cores
  task automatic run_field(int unsigned n, fe_t pl, int unsigned g);
    fe_t b, px, py, c, z, k, qx, qy, got, e;
    longint t0, t1, t2;
    int nb, groups, widest, nd, nadd;
    fe_t kk;
    int naf [XW + 1];
    nf   = n;
    plow = pl;
    groups = int'(GMAX / g);
    for (int i = 0; i < 5; i++) bundles[i] = 0;

    // the reference inversion itself
    for (int i = 0; i < 4; i++) begin
      e = frand() | fe_t'(1);
      checks++;
      if (fmul(e, finv(e)) != fe_t'(1)) begin
        failures++;
        $display("FAIL N=%0d reference inversion", n);
      end
    end

    // random curve and point
    b = frand() | fe_t'(1);
    do begin
      px = frand();
      c  = px ^ fe_t'(1) ^ fmul(b, finv(fsq(px)));
    end while (px == '0 || ftrace(c)[0]);
    z  = fhalftrace(c);
    py = fmul(px, z);
    checks++;
    if ((fsq(py) ^ fmul(px, py)) != (fmul(fsq(px), px) ^ fsq(px) ^ b)) begin
      failures++;
      $display("FAIL N=%0d point not on the curve", n);
    end
    k = frand() | (fe_t'(1) << (n - 1));
    ref_mult(k, px, py, qx, qy);

    // configure groups of g cores for this N and load the data
    for (int cc = 0; cc < int'(GMAX); cc++)
      send(op_word(OP_CFG, cc, 0, 0), {6'd0, 10'(n), 15'd0, 1'(cc % int'(g) != 0)});
    store_reg(g, 0, plow);
    store_reg(g, RZ, '0);
    store_reg(g, RONE, fe_t'(1));
    store_reg(g, RX, px);
    store_reg(g, RB, b);
    store_reg(g, X1, px);
    store_reg(g, Z1, fe_t'(1));
    store_reg(g, X2, fsq(fsq(px)) ^ b);
    store_reg(g, Z2, fsq(px));
    write_step(0, X2, Z2, X1, Z1);     // key bit 0
    write_step(16, X1, Z1, X2, Z2);    // key bit 1
    wait_idle();

    // ladder over the key bits below the top one
    t0 = cycles;
    for (int i = int'(n) - 2; i >= 0; i--)
      send({OP_CALL, 11'd0, 9'd12, 8'(k[i] ? 16 : 0)}, 32'd0);
    wait_idle();
    t1 = cycles;

    send_inv(n, Z1, nb);                // register 19 = Z1^-1
    send(mw(20, X1, 19, RZ, RZ), 0);    // x(kP) = X1 / Z1
    wait_idle();
    t2 = cycles;
    checks++;
    if (nb != int'(n - 1)) begin failures++; $display("FAIL N=%0d chain ends at %0d", n, nb); end

    load_reg(g, 20, got);
    checks++;
    if (got !== qx) begin
      failures++;
      $display("FAIL N=%0d x(kP) got %h expected %h", n, got, qx);
    end else $display("N=%0d on %0d group(s) of %0d core(s): x(kP) matches the affine reference",
                      n, groups, g);
    $display("  ladder: %0d cycles for %0d steps; inversion and final product: %0d cycles",
             t1 - t0, n - 1, t2 - t1);
    $display("  bundles: 1-way %0d, 2-way %0d, 3-way %0d, 4-way %0d",
             bundles[1], bundles[2], bundles[3], bundles[4]);
    widest = 0;
    for (int i = 1; i < 5; i++) if (bundles[i] != 0) widest = i;
    checks++;
    if (widest != ((groups < int'(LMAX)) ? groups : int'(LMAX))) begin
      failures++;
      $display("FAIL N=%0d widest bundle %0d with %0d groups", n, widest, groups);
    end

    // ---- ECC: NAF double-and-add in Lopez-Dahab coordinates, same k and P ----
    kk = k;
    nd = 0;
    while (kk != '0) begin
      if (kk[0]) begin
        naf[nd] = kk[1] ? -1 : 1;
        kk = kk[1] ? kk + fe_t'(1) : kk - fe_t'(1);
      end else naf[nd] = 0;
      kk = kk >> 1;
      nd++;
    end
    store_reg(g, RY, py);
    store_reg(g, RXY, px ^ py);
    store_reg(g, QX, px);
    store_reg(g, QY, py);
    store_reg(g, QZ, fe_t'(1));
    write_pd(UPD);
    write_pa(UPA, RY, RXY);
    write_pa(UPS, RXY, RY);
    wait_idle();
    for (int i = 0; i < 5; i++) bundles[i] = 0;
    nadd = 0;
    t0 = cycles;
    for (int i = nd - 2; i >= 0; i--) begin
      send({OP_CALL, 11'd0, 9'd10, 8'(UPD)}, 32'd0);
      if (naf[i] != 0) begin
        send({OP_CALL, 11'd0, 9'd13, 8'(naf[i] > 0 ? UPA : UPS)}, 32'd0);
        nadd++;
      end
    end
    wait_idle();
    t1 = cycles;
    send_inv(n, QZ, nb);                // register 19 = Z^-1
    send(mw(20, QX, 19, RZ, RZ), 0);    // x = X / Z
    send(mw(21, 19, 19, RZ, RZ), 0);    // Z^-2
    send(mw(22, QY, 21, RZ, RZ), 0);    // y = Y / Z^2
    wait_idle();
    t2 = cycles;
    load_reg(g, 20, got);
    load_reg(g, 22, e);
    checks++;
    if (got !== qx || e !== qy) begin
      failures++;
      $display("FAIL N=%0d ECC kP got (%h, %h) expected (%h, %h)", n, got, e, qx, qy);
    end else $display("N=%0d ECC (NAF, %0d doublings, %0d additions): kP matches the affine reference",
                      n, nd - 1, nadd);
    $display("  doublings and additions: %0d cycles; inversion and conversion: %0d cycles",
             t1 - t0, t2 - t1);
    $display("  bundles: 1-way %0d, 2-way %0d, 3-way %0d, 4-way %0d",
             bundles[1], bundles[2], bundles[3], bundles[4]);
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_field(163, fe_t'((1 << 7) | (1 << 6) | (1 << 3) | 1), 2);
    run_field(193, fe_t'((1 << 15) | 1), 2);
    run_field(283, fe_t'((1 << 12) | (1 << 7) | (1 << 5) | 1), 3);
    run_field(571, fe_t'((1 << 10) | (1 << 5) | (1 << 2) | 1), 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
