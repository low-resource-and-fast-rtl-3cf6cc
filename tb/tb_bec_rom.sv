// tb_bec_rom: program ROM at the default size (M = 283).
//
// Reads every address and checks the program's structure rather than its
// bit patterns: the first words (load x0, add y0: w0 = x0 + y0), one LOOP
// before the ladder step with KSWAP1 first and KSWAP0/ENDLOOP last, the 25
// ladder instructions holding 5 ADD, 4 SQ, 6 MULT and 10 SWAP, no two MULTs
// in a row anywhere, the inversion subroutine holding 11 MULTs (the
// Itoh-Tsujii chain for 282 = M-1) and seven REPEATs whose counts are
// 1,3,7,16,34,69,140, a HALT at the end of the main program, RET at the
// end of both subroutines, and HALT for every address past the program.
`timescale 1ns/1ps
module tb_bec_rom;
  import bec_pkg::*;
  localparam int M = 283;
  logic [PC_W-1:0] pc;
  logic [9:0] instr;
  instr_t w [PROG_MAX];
  int checks = 0, failures = 0;
  int n_add, n_sq, n_mul, n_swap, n_inv_mul, n_rep, k;
  int exp_rep [7] = '{1, 3, 7, 16, 34, 69, 140};

  bec_rom #(.M(M)) dut (.pc(pc), .instr(instr));

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit is_ctrl(instr_t i, logic [3:0] sub);
    return i.op == OP_SWAP && i.src == CTRL_SRC && i.dst == sub;
  endfunction

  initial begin
    for (int a = 0; a < PROG_MAX; a++) begin
      pc = PC_W'(a);
      #1 w[a] = instr_t'(instr);
    end
    pc = PC_W'(2000);
    #1 expect_true(is_ctrl(instr_t'(instr), C_HALT), "HALT past the program");
    expect_true(w[0].op == OP_SWAP && w[0].src == 4'(REG_R5) && w[0].dst == 4'(REG_T0), "first word loads x0");
    expect_true(w[1].op == OP_ADD && w[1].src == 4'(REG_R6) && w[1].dst == 4'(REG_T0), "second word adds y0");
    expect_true(w[9].op == OP_SWAP && w[9].src == LOOP_SRC && w[9].dst == 4'd0, "LOOP before the ladder");
    expect_true(is_ctrl(w[10], C_KSWAP1), "KSWAP1 starts the step");
    expect_true(is_ctrl(w[36], C_KSWAP0) && is_ctrl(w[37], C_ENDLOOP), "KSWAP0, ENDLOOP end the step");
    n_add = 0; n_sq = 0; n_mul = 0; n_swap = 0;
    for (int a = 11; a < 36; a++)
      unique case (w[a].op)
        OP_ADD:  n_add++;
        OP_SQ:   n_sq++;
        OP_MULT: n_mul++;
        default: n_swap++;
      endcase
    expect_true(n_add == 5 && n_sq == 4 && n_mul == 6 && n_swap == 10, "ladder step operation mix");
    expect_true(is_ctrl(w[MAIN_LEN-1], C_HALT), "main program ends with HALT");
    expect_true(is_ctrl(w[INV_ADDR-1], C_RET), "half-trace ends with RET");
    expect_true(is_ctrl(w[program_length(M)-1], C_RET), "inversion ends with RET");
    for (int a = 1; a < program_length(M); a++)
      expect_true(!(w[a].op == OP_MULT && w[a-1].op == OP_MULT), "no MULT after MULT");
    n_inv_mul = 0; n_rep = 0;
    for (int a = INV_ADDR; a < program_length(M); a++) begin
      if (w[a].op == OP_MULT) n_inv_mul++;
      if (w[a].op == OP_SWAP && w[a].src == REPEAT_SRC) begin
        k = loop_count(M, int'(w[a].dst));
        if (n_rep < 7) expect_true(k == exp_rep[n_rep], "repeat count");
        n_rep++;
      end
    end
    expect_true(n_inv_mul == 11, "inversion uses 11 multiplications");
    expect_true(n_rep == 7, "seven squaring runs");
    expect_true(loop_count(M, 0) == 281 && loop_count(M, 1) == 140, "ladder and half-trace counts");
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
