// tb_bec_run: testbench helper that runs one point multiplication on a
// bec_top instance of a given field size and checks it.
//
// Instantiates bec_top with the field size M, basis type T and curve
// constants passed as parameters, resets it, pulses start, serves the M-2 key
// bits of KEY (most significant first) one per key_req, and waits for done.
// Checks made (all counted in checks/failures):
//   - result equals (XQ, YQ), each coordinate allowed to be complemented;
//   - exactly M-2 key requests;
//   - every ladder step (key_req to key_req) lasts 64 + 6M cycles;
//   - the run from start to done lasts EXP_CYCLES cycles.
// The expected values come from an independent affine model of the curve.
// finished rises when the run is over (or after WATCHDOG cycles, counted as a
// failure). The clock is generated here; this is a verification helper, not
// part of the design.
`timescale 1ns/1ps
module tb_bec_run #(
  parameter int           M          = 163,
  parameter int           T          = 4,
  parameter logic [M-1:0] INV_W0     = '0,
  parameter logic [M-1:0] D          = '0,
  parameter logic [M-1:0] X0         = '0,
  parameter logic [M-1:0] Y0         = '0,
  parameter logic [M-3:0] KEY        = '0,
  parameter logic [M-1:0] XQ         = '0,
  parameter logic [M-1:0] YQ         = '0,
  parameter int           EXP_CYCLES = 0,
  parameter int           WATCHDOG   = 600000
) (
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int STEP_CYCLES = 64 + 6 * M;

  logic clk = 0, rst_n = 0, start = 0, k_i, key_req, done;
  logic [M-1:0] x_out, y_out;
  int kidx = 0, cyc_count = 0, last_req = 0, n_req = 0, t0;
  int step_fail = 0, step_checks = 0;

  always #5 clk = ~clk;

  bec_top #(.M(M), .T(T), .INV_W0(INV_W0), .D(D), .X0(X0), .Y0(Y0)) dut (
    .clk, .rst_n, .start, .k_i, .key_req, .done, .x_out, .y_out
  );

  assign k_i = (kidx < M - 2) ? KEY[M-3-kidx] : 1'b0;

  always @(posedge clk) begin
    cyc_count <= cyc_count + 1;
    if (key_req) begin
      kidx  <= kidx + 1;
      n_req <= n_req + 1;
      if (n_req > 0) begin
        step_checks++;
        if (cyc_count - last_req != STEP_CYCLES) begin
          step_fail++;
          $display("FAIL M=%0d step length %0d", M, cyc_count - last_req);
        end
      end
      last_req <= cyc_count;
    end
  end

  initial begin
    checks   = 0;
    failures = 0;
    finished = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    t0 = cyc_count;
    @(negedge clk);
    start = 0;
    while (!done && cyc_count < WATCHDOG) @(negedge clk);
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL M=%0d watchdog", M);
    end
    checks++;
    if (!((x_out == XQ || x_out == ~XQ) && (y_out == YQ || y_out == ~YQ))) begin
      failures++;
      $display("FAIL M=%0d got x=%h y=%h", M, x_out, y_out);
    end
    checks++;
    if (n_req != M - 2) begin
      failures++;
      $display("FAIL M=%0d %0d key requests", M, n_req);
    end
    checks++;
    if (cyc_count - t0 - 1 != EXP_CYCLES) begin
      failures++;
      $display("FAIL M=%0d run took %0d cycles, expected %0d", M, cyc_count - t0 - 1, EXP_CYCLES);
    end
    $display("M=%0d run took %0d cycles", M, cyc_count - t0 - 1);
    checks   += step_checks;
    failures += step_fail;
    finished = 1;
  end
endmodule
