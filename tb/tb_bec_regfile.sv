// tb_bec_regfile: register file at the default size (M = 283).
//
// Writes random values to T0, T1, R0, R1, R2 and reads them back through the
// 9-input mux; checks that the constants read their parameter values and
// ignore writes; that s_t0/s_t1 rotate T0/T1 right by one per cycle while
// the other registers hold; that t0_rot/t1_rot are the rotated values; and
// that a write wins over a rotation. A behavioural model (an array of five
// registers) gives the expected contents.
`timescale 1ns/1ps
module tb_bec_regfile;
  localparam int M = 283;
  localparam logic [M-1:0] INV_W0 = 283'h4ee56605ec7e99a5ce94e39564b537484ab7931ae71061c6c7d0ddae3f2454c55f495b3;
  localparam logic [M-1:0] D      = 283'h15e382e067360d274dcd2fabb14153c6614b93766e7081d9a19324c39a8e2623b40a200;
  localparam logic [M-1:0] X0     = 283'h1a58444db4a7204ec2bc74227f1b6d1dac7e22b38c94095c832baae94542bf8f1e3a8b0;
  localparam logic [M-1:0] Y0     = 283'haed699a65b81c2eefe5bb9aad516b369a75dbcf9b0e008c0c0f7e04b8cbf4138f15da2;

  logic clk = 0, s_t0 = 0, s_t1 = 0, we = 0;
  logic [3:0] write_sel = 0, read_sel = 0;
  logic [M-1:0] r_in = '0, r_out, t0_rot, t1_rot, t0, t1;
  logic [M-1:0] model [9];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bec_regfile dut (.clk, .s_t0, .s_t1, .we, .write_sel, .read_sel, .r_in, .r_out,
                   .t0_rot, .t1_rot, .t0, .t1);

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i++) r[i] = 1'($urandom_range(0, 1));
    return r;
  endfunction

  function automatic logic [M-1:0] rr(input logic [M-1:0] v);
    return {v[0], v[M-1:1]};
  endfunction

  task automatic check_all();
    for (int i = 0; i < 10; i++) begin
      read_sel = 4'(i);
      #1;
      checks++;
      if (r_out !== ((i < 9) ? model[i] : '0)) begin
        failures++;
        $display("FAIL read %0d", i);
      end
    end
    checks++;
    if (t0 !== model[0] || t1 !== model[1] || t0_rot !== rr(model[0]) || t1_rot !== rr(model[1])) begin
      failures++;
      $display("FAIL T0/T1 outputs");
    end
  endtask

  initial begin
    model[5] = INV_W0; model[6] = D; model[7] = X0; model[8] = Y0;
    // fill all writable registers (and try the constants)
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      we = 1; write_sel = 4'(i); r_in = rnd();
      if (i < 5) model[i] = r_in;
    end
    @(negedge clk);
    we = 0;
    check_all();
    for (int it = 0; it < 40; it++) begin
      @(negedge clk);
      s_t0 = 1'($urandom_range(0, 1));
      s_t1 = 1'($urandom_range(0, 1));
      we = 1'($urandom_range(0, 1));
      write_sel = 4'($urandom_range(0, 9));
      r_in = rnd();
      @(posedge clk);
      if (s_t0) model[0] = rr(model[0]);
      if (s_t1) model[1] = rr(model[1]);
      if (we && write_sel < 5) model[write_sel] = r_in;
      @(negedge clk);
      we = 0; s_t0 = 0; s_t1 = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
