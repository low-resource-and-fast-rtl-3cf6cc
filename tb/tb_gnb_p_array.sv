// tb_gnb_p_array: checks the GNB multiplier's XOR network at the default
// size (M = 283, T = 6).
//
// The network computes y = beta * b. Checked against facts of any normal
// basis, not against the wiring formula: b = 1 (all ones) gives beta (bit 0
// only); b = beta (bit 0) gives beta^2 (bit M-1); every row has between 1 and
// T ones (probed with unit vectors); the map is linear (random pairs); and
// the sum of all outputs over the unit inputs equals beta * 1 = beta.
`timescale 1ns/1ps
module tb_gnb_p_array;
  localparam int M = 283;
  localparam int T = 6;
  logic [M-1:0] b, y, ya, yb, acc;
  int checks = 0, failures = 0;
  int rowcnt [M];

  gnb_p_array #(.M(M), .T(T)) dut (.b(b), .y(y));

  task automatic expect_eq(input logic [M-1:0] got, input logic [M-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i++) r[i] = $urandom_range(0, 1);
    return r;
  endfunction

  initial begin
    b = '1;
    #1 expect_eq(y, M'(1), "beta * 1 != beta");
    b = M'(1);
    #1 expect_eq(y, M'(1) << (M - 1), "beta * beta != beta^2");
    acc = '0;
    for (int j = 0; j < M; j++) rowcnt[j] = 0;
    for (int q = 0; q < M; q++) begin
      b = M'(1) << q;
      #1;
      acc ^= y;
      for (int j = 0; j < M; j++) rowcnt[j] += int'(y[j]);
    end
    expect_eq(acc, M'(1), "sum over unit vectors != beta");
    for (int j = 0; j < M; j++) begin
      checks++;
      if (rowcnt[j] < 1 || rowcnt[j] > T) begin
        failures++;
        $display("FAIL row %0d has %0d ones", j, rowcnt[j]);
      end
    end
    for (int r = 0; r < 50; r++) begin
      logic [M-1:0] u, v;
      u = rnd();
      v = rnd();
      b = u;
      #1 ya = y;
      b = v;
      #1 yb = y;
      b = u ^ v;
      #1 expect_eq(y, ya ^ yb, "not linear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
