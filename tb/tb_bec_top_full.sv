// tb_bec_top_full: one complete point multiplication at the default size.
//
// bec_top with all parameters at their defaults (GF(2^283), type-6 Gaussian
// normal basis, the built-in curve and base point). The 281 key bits are
// served one per key_req; the result must equal k*P, computed beforehand
// with an independent affine double-and-add model, with x and y each allowed
// to come out complemented (half-trace root choice). Also checks the number
// of key requests, the ladder step length (6 multiplications of 283 cycles
// plus 64 cycles: 1762) and the total run time (513,172 cycles).
`timescale 1ns/1ps
module tb_bec_top_full;
  localparam int M = 283;
  localparam logic [M-3:0] KEY = 281'h1125f20d23f0824128b2f330c5c7fd0a6a3a4506513270e269e0d37f2a74de452e6b438;
  localparam logic [M-1:0] XQ  = 283'h698af39081fb328acfa39d7f99717e76bfb974ce0b6192454016ad67f590c3952c5b730;
  localparam logic [M-1:0] YQ  = 283'h760609db9106b55d0dd6b8f0bb61a9483b1a35bd10dca067e77eb4d09007db8cc73db7b;
  localparam int EXP_CYCLES  = 513172;
  localparam int STEP_CYCLES = 64 + 6 * M;

  logic clk = 0, rst_n = 0, start = 0, k_i, key_req, done;
  logic [M-1:0] x_out, y_out;
  int kidx = 0, checks = 0, failures = 0;
  int cyc_count = 0, last_req = 0, n_req = 0, t0;

  always #5 clk = ~clk;

  bec_top dut (.clk, .rst_n, .start, .k_i, .key_req, .done, .x_out, .y_out);

  assign k_i = (kidx < M - 2) ? KEY[M-3-kidx] : 1'b0;

  always @(posedge clk) begin
    cyc_count <= cyc_count + 1;
    if (key_req) begin
      kidx  <= kidx + 1;
      n_req <= n_req + 1;
      if (n_req > 0) begin
        checks++;
        if (cyc_count - last_req != STEP_CYCLES) begin
          failures++;
          $display("FAIL step length %0d", cyc_count - last_req);
        end
      end
      last_req <= cyc_count;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    t0 = cyc_count;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (!((x_out == XQ || x_out == ~XQ) && (y_out == YQ || y_out == ~YQ))) begin
      failures++;
      $display("FAIL got x=%h y=%h", x_out, y_out);
    end
    checks++;
    if (n_req != M - 2) begin
      failures++;
      $display("FAIL %0d key requests", n_req);
    end
    checks++;
    if (cyc_count - t0 - 1 != EXP_CYCLES) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cyc_count - t0 - 1, EXP_CYCLES);
    end
    $display("run took %0d cycles", cyc_count - t0 - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
