// tb_bec_controller: program sequencer with a small test program (M = 11).
//
// The testbench is the ROM: it returns the words of a 13-instruction program
// that uses every instruction kind once (ADD, SQ, MULT, a SQ that reads the
// MULT result at once, SWAP, LOOP with KSWAP1/KSWAP0 inside, REPEAT, CALL and
// RET, HALT). It records every register file write (write_sel) and compares
// the list with the one worked out by hand from the instruction semantics,
// including the key-dependent swap targets for key bits 1,0,1,1. It also
// checks the latencies (ADD/SQ/SWAP 3 cycles, MULT M cycles with T0/T1
// rotating, control words 1 cycle: 68 cycles in all), the selects of the
// MULT cycles, the forwarding of a pending MULT result, the four key
// requests, the jump to the half-trace entry and done.
`timescale 1ns/1ps
module tb_bec_controller;
  import bec_pkg::*;
  localparam int M = 11;

  logic clk = 0, rst_n = 0, start = 0, k_i, key_req, done;
  logic [PC_W-1:0] pc;
  logic [9:0] instr;
  logic s_t0, s_t1, we;
  logic [3:0] write_sel, read_sel;
  logic [1:0] s1, s2;
  int checks = 0, failures = 0;
  logic [3:0] keybits = 4'b1101;   // served LSB first here: 1,0,1,1
  int kidx = 0;
  int writes [$];
  int cycles = 0, mult_cycles = 0, n_req = 0, fwd_seen = 0, ht_seen = 0;
  bit running = 0;

  always #5 clk = ~clk;

  bec_controller #(.M(M)) dut (.clk, .rst_n, .start, .k_i, .key_req, .done, .pc, .instr,
                               .s_t0, .s_t1, .we, .write_sel, .read_sel, .s1, .s2);

  function automatic logic [9:0] w(opcode_e op, int s, int d);
    return {op, 4'(s), 4'(d)};
  endfunction

  always_comb begin
    unique case (int'(pc))
      0:  instr = w(OP_ADD, 3, 1);
      1:  instr = w(OP_SQ, 2, 4);
      2:  instr = w(OP_MULT, 0, 0);
      3:  instr = w(OP_SQ, 0, 3);
      4:  instr = w(OP_SWAP, 3, 4);
      5:  instr = w(OP_SWAP, 14, 1);          // LOOP, count 4 for M = 11
      6:  instr = w(OP_SWAP, 15, C_KSWAP1);
      7:  instr = w(OP_SWAP, 15, C_KSWAP0);
      8:  instr = w(OP_SWAP, 15, C_ENDLOOP);
      9:  instr = w(OP_SWAP, 13, 3);          // REPEAT, count 4
      10: instr = w(OP_SQ, 1, 1);
      11: instr = w(OP_SWAP, 15, C_CALL_HT);
      12: instr = w(OP_SWAP, 15, C_HALT);
      HT_ADDR: instr = w(OP_SWAP, 15, C_RET);
      default: instr = w(OP_SWAP, 15, C_HALT);
    endcase
  end

  assign k_i = keybits[kidx];

  always @(posedge clk) if (running) begin
    cycles++;
    if (we) writes.push_back(int'(write_sel));
    if (s_t0 && s_t1) begin
      mult_cycles++;
      checks++;
      if (s1 != 2'd0 || s2 != ((mult_cycles == 1) ? 2'd0 : 2'd2)) begin
        failures++;
        $display("FAIL MULT selects");
      end
    end
    if (int'(pc) == 3 && we && write_sel == 4'd0) begin
      fwd_seen++;
      checks++;
      if (!(s1 == 2'd2 && s2 == 2'd1)) begin
        failures++;
        $display("FAIL forwarding selects");
      end
    end
    if (int'(pc) == HT_ADDR) ht_seen++;
    if (key_req) begin
      n_req++;
      kidx <= kidx + 1;
    end
  end

  initial begin
    int exp_w [$];
    exp_w = '{1, 4, 0, 3, 4, 3,
              1, 0, 0, 0,    // key 1: KSWAP1 swaps (T1 then T0), KSWAP0 does not
              0, 0, 1, 0,    // key 0
              1, 0, 0, 0,    // key 1
              1, 0, 0, 0,    // key 1
              1, 1, 1, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    running = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    running = 0;
    checks++;
    if (writes.size() != exp_w.size()) begin
      failures++;
      $display("FAIL %0d writes, expected %0d", writes.size(), exp_w.size());
    end else begin
      foreach (exp_w[i]) begin
        checks++;
        if (writes[i] != exp_w[i]) begin
          failures++;
          $display("FAIL write %0d went to %0d, expected %0d", i, writes[i], exp_w[i]);
        end
      end
    end
    checks++;
    if (cycles != 68 + 1) begin   // +1: the start cycle itself
      failures++;
      $display("FAIL %0d cycles", cycles - 1);
    end
    checks++;
    if (mult_cycles != M) begin
      failures++;
      $display("FAIL MULT took %0d cycles", mult_cycles);
    end
    checks++;
    if (n_req != 4 || fwd_seen != 1 || ht_seen != 1) begin
      failures++;
      $display("FAIL key requests %0d, forwards %0d, half-trace entries %0d", n_req, fwd_seen, ht_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
