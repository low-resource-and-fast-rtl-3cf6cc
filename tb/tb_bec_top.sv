// tb_bec_top: end-to-end test of the point multiplier in a small field.
//
// Runs bec_top in GF(2^11) (type-2 Gaussian normal basis) on a complete curve
// with d1 = d2 = d and a base point on it, for a set of random scalars plus the
// all-zero and all-one key patterns. Each result is compared with
// k*P computed by the reference model (affine addition law, double-and-add);
// x and y may each come out complemented (the half-trace picks one root of
// z^2 + z = c), so x_out must be x or x+1 and y_out y or y+1, and the pair
// must lie on the curve whenever the reference pair does.
// Also checked: exactly M-2 key requests per run, a fixed number of cycles
// between key requests (3 + 25 ladder instructions + 3 + 1 = 64 + 6M), the same
// total run time for every key, and that each mechanism happens: key-dependent
// swap taken and not taken, MULT result forwarding, LOOP, REPEAT, subroutine
// call and return.
`timescale 1ns/1ps
module tb_bec_top;

  localparam int M = 11;
  localparam int T = 2;
  localparam logic [M-1:0] D      = 11'h567;
  localparam logic [M-1:0] X0     = 11'h386;
  localparam logic [M-1:0] Y0     = 11'h04b;
  localparam logic [M-1:0] INV_W0 = 11'h1d9;
  localparam int NRUNS = 24;
  localparam int EXP_CYCLES = 1802;      // whole run, data-independent
  localparam int STEP_CYCLES = 64 + 6 * M;


  // ---------------- reference model ----------------
  // GF(2^M) arithmetic in the type-T Gaussian normal basis done the textbook
  // way, independent of the hardware's serial multiplier: the coefficient of
  // beta in beta^(2^u) beta^(2^v) is lam[u][v], the parity of the number of k
  // in 1..p-2 with F(k+1) = u and F(p-k) = v (p = T*M+1); product coefficient
  // e is the same bilinear form on both operands rotated by e. Vectors use the
  // hardware layout: bit i is the coefficient of beta^(2^(-i mod M)).
  // Inversion is a^(2^M-2); points are added with the affine binary Edwards
  // addition law and k*P is computed by double-and-add from (0,0).
  typedef logic [M-1:0] elem_t;
  bit lam [M][M];

  task automatic ref_init();
    int p, u, w, n;
    int f [T*M+1];
    bit ok;
    p = T * M + 1;
    for (u = 2; u < p; u++) begin
      w = 1;
      ok = 1;
      for (int e = 1; e <= T; e++) begin
        w = (w * u) % p;
        if (w == 1 && e < T) ok = 0;
      end
      if (ok && w == 1) break;
    end
    w = 1;
    for (int s = 0; s < T; s++) begin
      n = w;
      for (int i = 0; i < M; i++) begin
        f[n] = i;
        n = (n * 2) % p;
      end
      w = (w * u) % p;
    end
    for (int a = 0; a < M; a++)
      for (int b = 0; b < M; b++) lam[a][b] = 0;
    for (int k = 1; k <= p - 2; k++) lam[f[k+1]][f[p-k]] ^= 1'b1;
  endtask

  function automatic bit co(elem_t a, int e);
    return a[(M - (e % M)) % M];
  endfunction

  // slow textbook product, used only to build the log tables
  function automatic elem_t gmul_slow(elem_t a, elem_t b);
    elem_t c;
    bit t;
    c = '0;
    for (int e = 0; e < M; e++) begin
      t = 0;
      for (int u = 0; u < M; u++)
        if (co(a, u + e))
          for (int v = 0; v < M; v++)
            if (lam[u][v] && co(b, v + e)) t ^= 1'b1;
      c[(M - e) % M] = t;
    end
    return c;
  endfunction

  localparam int NQ = (1 << M) - 1;
  elem_t exp_t [NQ];
  int    log_t [1 << M];

  // find a generator g of the multiplicative group and tabulate its powers
  task automatic log_init();
    elem_t g, x;
    int ord;
    for (int gi = 2; gi < (1 << M); gi++) begin
      g = elem_t'(gi);
      x = g;
      ord = 1;
      while (x != '1) begin
        x = gmul_slow(x, g);
        ord++;
      end
      if (ord == NQ) break;
    end
    x = '1;
    for (int i = 0; i < NQ; i++) begin
      exp_t[i] = x;
      log_t[x] = i;
      x = gmul_slow(x, g);
    end
  endtask

  function automatic elem_t gmul(elem_t a, elem_t b);
    if (a == '0 || b == '0) return '0;
    return exp_t[(log_t[a] + log_t[b]) % NQ];
  endfunction

  function automatic elem_t gsq(elem_t a);
    return {a[0], a[M-1:1]};
  endfunction

  function automatic elem_t ginv(elem_t a);
    return exp_t[(NQ - log_t[a]) % NQ];
  endfunction

  task automatic padd(elem_t d, elem_t x1, elem_t y1, elem_t x2, elem_t y2,
                      output elem_t x3, output elem_t y3);
    elem_t x12, y12, s2, num, den;
    x12 = x1 ^ gsq(x1);
    y12 = y1 ^ gsq(y1);
    s2  = x2 ^ y2;
    num = gmul(d, x1 ^ x2) ^ gmul(d, gmul(x1 ^ y1, s2)) ^
          gmul(x12, gmul(x2, y1 ^ y2 ^ '1) ^ gmul(y1, y2));
    den = d ^ gmul(x12, s2);
    x3  = gmul(num, ginv(den));
    num = gmul(d, y1 ^ y2) ^ gmul(d, gmul(x1 ^ y1, s2)) ^
          gmul(y12, gmul(y2, x1 ^ x2 ^ '1) ^ gmul(x1, x2));
    den = d ^ gmul(y12, s2);
    y3  = gmul(num, ginv(den));
  endtask

  // k given as nbits bits, most significant first
  task automatic smul(elem_t d, elem_t x, elem_t y, logic [63:0] k, int nbits,
                      output elem_t xq, output elem_t yq);
    elem_t rx, ry;
    rx = '0;
    ry = '0;
    // one padd call site: even steps double, odd steps add P when k[i] = 1
    for (int st = 0; st < 2 * nbits; st++) begin
      if (st % 2 == 0 || k[nbits - 1 - st / 2])
        padd(d, rx, ry, (st % 2 == 0) ? rx : x, (st % 2 == 0) ? ry : y, rx, ry);
    end
    xq = rx;
    yq = ry;
  endtask

  function automatic bit on_curve(elem_t d, elem_t x, elem_t y);
    elem_t l, r;
    l = gmul(d, x ^ y) ^ gmul(d, gsq(x) ^ gsq(y));
    r = gmul(x, y) ^ gmul(gmul(x, y), x ^ y) ^ gmul(gsq(x), gsq(y));
    return l == r;
  endfunction

  logic clk = 0, rst_n = 0, start = 0, k_i, key_req, done;
  logic [M-1:0] x_out, y_out;
  logic [M-3:0] key;
  int kidx;
  int checks = 0, failures = 0;
  int n_swap1 = 0, n_swap0 = 0, n_fwd = 0, n_loop = 0, n_rep = 0, n_call = 0, n_ret = 0;

  always #5 clk = ~clk;

  bec_top #(.M(M), .T(T), .INV_W0(INV_W0), .D(D), .X0(X0), .Y0(Y0)) dut (
    .clk, .rst_n, .start, .k_i, .key_req, .done, .x_out, .y_out
  );

  // master device: next key bit, most significant first
  assign k_i = (kidx < M - 2) ? key[M-3-kidx] : 1'b0;

  int cyc_count, last_req, n_req;
  always @(posedge clk) begin
    cyc_count <= cyc_count + 1;
    if (key_req) begin
      kidx <= kidx + 1;
      n_req <= n_req + 1;
      if (n_req > 0) begin
        checks++;
        if (cyc_count - last_req != STEP_CYCLES) begin
          failures++;
          $display("FAIL step length %0d, expected %0d", cyc_count - last_req, STEP_CYCLES);
        end
      end
      last_req <= cyc_count;
      if (k_i) n_swap1++; else n_swap0++;
    end
    // mechanism counters, observed inside the controller
    if (dut.u_ctrl.state != 1'b0) begin
      if (dut.u_ctrl.wb_pending && dut.u_ctrl.is_op && dut.u_ctrl.cyc == 0 &&
          dut.u_ctrl.wb_dst == dut.u_ctrl.ra && dut.u_ctrl.ins.op != bec_pkg::OP_MULT) n_fwd++;
      if (!dut.u_ctrl.is_op && dut.u_ctrl.ins.src == bec_pkg::LOOP_SRC) n_loop++;
      if (!dut.u_ctrl.is_op && dut.u_ctrl.ins.src == bec_pkg::REPEAT_SRC) n_rep++;
      if (!dut.u_ctrl.is_op && dut.u_ctrl.ins.src == bec_pkg::CTRL_SRC &&
          (dut.u_ctrl.ins.dst == bec_pkg::C_CALL_INV || dut.u_ctrl.ins.dst == bec_pkg::C_CALL_HT)) n_call++;
      if (!dut.u_ctrl.is_op && dut.u_ctrl.ins.src == bec_pkg::CTRL_SRC &&
          dut.u_ctrl.ins.dst == bec_pkg::C_RET) n_ret++;
    end
  end

  task automatic run_one(input logic [M-3:0] k);
    logic [M-1:0] xr, yr;
    logic [63:0] kk;
    int t0;
    key = k;
    @(negedge clk);
    kidx = 0;
    n_req = 0;
    start = 1;
    t0 = cyc_count;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    kk = 64'(k) | (64'd1 << (M - 2));
    smul(D, X0, Y0, kk, M - 1, xr, yr);
    checks++;
    if (!((x_out == xr || x_out == ~xr) && (y_out == yr || y_out == ~yr))) begin
      failures++;
      $display("FAIL k=%h: got (%h,%h) expected (%h,%h) up to +1", kk, x_out, y_out, xr, yr);
    end
    checks++;
    if (n_req != M - 2) begin
      failures++;
      $display("FAIL %0d key requests", n_req);
    end
    checks++;
    if (cyc_count - t0 != EXP_CYCLES + 1) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cyc_count - t0 - 1, EXP_CYCLES);
    end
  endtask

  initial begin
    cyc_count = 0;
    kidx = 0;
    key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ref_init();
    log_init();
    checks++;
    if (!on_curve(D, X0, Y0)) begin
      failures++;
      $display("FAIL base point not on the curve");
    end
    run_one('0);
    run_one('1);
    for (int r = 0; r < NRUNS; r++) run_one((M-2)'($urandom));
    $display("mechanisms: swap1=%0d swap0=%0d forward=%0d loop=%0d repeat=%0d call=%0d ret=%0d",
             n_swap1, n_swap0, n_fwd, n_loop, n_rep, n_call, n_ret);
    checks++;
    if (n_swap1 == 0 || n_swap0 == 0 || n_fwd == 0 || n_loop == 0 || n_rep == 0 ||
        n_call == 0 || n_ret != n_call) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
