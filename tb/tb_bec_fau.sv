// tb_bec_fau: field arithmetic unit at the default size (GF(2^283)).
//
// The testbench plays the register file (two rotating registers T0/T1 and a
// read value r_out) and sequences the FAU selects exactly as the controller
// does: addition and squaring in 3 cycles, multiplication in M cycles.
// Results are checked against properties every correct GF(2^M) product in a
// normal basis must have, with no reference multiplier: a*1 = a, a*a = a^2
// (a right rotation), commutativity, distributivity a(b+c) = ab + ac,
// associativity (ab)c = a(bc), and the Fermat identity a^(2^M-1) = 1 for a
// sample a computed by square-and-multiply on the FAU itself. Also checks the
// multiplication latency (result in Z after exactly M cycles) and that T0 and
// T1 are back to their starting values after the M rotations.
`timescale 1ns/1ps
module tb_bec_fau;
  localparam int M = 283;
  localparam int T = 6;
  logic clk = 0;
  logic [1:0] s1, s2;
  logic [M-1:0] t0, t1, r_out, r_in;
  logic rot;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bec_fau #(.M(M), .T(T)) dut (
    .clk, .s1, .s2, .t0_rot({t0[0], t0[M-1:1]}), .t1_rot({t1[0], t1[M-1:1]}),
    .r_out, .r_in
  );

  always @(posedge clk) if (rot) begin
    t0 <= {t0[0], t0[M-1:1]};
    t1 <= {t1[0], t1[M-1:1]};
  end

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i++) r[i] = 1'($urandom_range(0, 1));
    return r;
  endfunction

  task automatic fmul(input logic [M-1:0] a, input logic [M-1:0] b, output logic [M-1:0] c);
    @(negedge clk);
    t0 = a;
    t1 = b;
    rot = 1;
    s1 = 2'd0;
    s2 = 2'd0;
    for (int i = 1; i < M; i++) begin
      @(negedge clk);
      s2 = 2'd2;
    end
    @(negedge clk);   // M clock edges have passed
    rot = 0;
    s1 = 2'd2;
    s2 = 2'd1;        // hold
    c = r_in;
    checks++;
    if (t0 !== a || t1 !== b) begin
      failures++;
      $display("FAIL operands not restored after M rotations");
    end
  endtask

  task automatic fadd(input logic [M-1:0] a, input logic [M-1:0] b, output logic [M-1:0] c);
    @(negedge clk);
    r_out = a; s1 = 2'd1; s2 = 2'd0;
    @(negedge clk);
    r_out = b; s1 = 2'd1; s2 = 2'd1;
    @(negedge clk);
    s1 = 2'd2; s2 = 2'd1;
    c = r_in;
  endtask

  task automatic fsq(input logic [M-1:0] a, output logic [M-1:0] c);
    @(negedge clk);
    r_out = a; s1 = 2'd1; s2 = 2'd0;
    @(negedge clk);
    s1 = 2'd2; s2 = 2'd2;
    @(negedge clk);
    s1 = 2'd2; s2 = 2'd1;
    c = r_in;
  endtask

  task automatic expect_eq(input logic [M-1:0] got, input logic [M-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [M-1:0] a, b, c, p, q, r, s, u;
    rot = 0; s1 = 2'd2; s2 = 2'd0; r_out = '0; t0 = '0; t1 = '0;
    for (int it = 0; it < 6; it++) begin
      a = rnd(); b = rnd(); c = rnd();
      fmul(a, '1, p);           expect_eq(p, a, "a*1 != a");
      fmul(a, a, p);            expect_eq(p, {a[0], a[M-1:1]}, "a*a != a^2");
      fsq(a, q);                expect_eq(q, {a[0], a[M-1:1]}, "SQ != rotation");
      fadd(a, b, q);            expect_eq(q, a ^ b, "ADD != xor");
      fmul(a, b, p);
      fmul(b, a, q);            expect_eq(p, q, "not commutative");
      fadd(b, c, r);
      fmul(a, r, s);
      fmul(a, c, u);            expect_eq(s, p ^ u, "not distributive");
      fmul(p, c, r);
      fmul(b, c, s);
      fmul(a, s, u);            expect_eq(r, u, "not associative");
    end
    // a^(2^M - 1) = 1: r = a^(2^i - 1) built by r = r^2 * a
    a = rnd();
    r = a;
    for (int i = 1; i < M; i++) begin
      fsq(r, s);
      fmul(s, a, r);
    end
    expect_eq(r, '1, "a^(2^M-1) != 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
