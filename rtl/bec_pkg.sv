// bec_pkg: shared definitions for the binary Edwards curve point multiplier.
//
// Holds the 10-bit instruction format, the register numbering of the register
// file, and two constant functions that depend only on the field size M:
//   * loop_count(M, idx): the counts used by the LOOP and REPEAT control words
//     (ladder steps, half-trace iterations, Itoh-Tsujii squaring runs);
//   * build_program(M): the complete program held in the instruction ROM.
//
// Instruction word: [9:8] opcode, [7:4] source ("input") register, [3:0]
// destination ("output") register, as in the paper. Register numbers 0..8 are
// T0, T1, R0, R1, R2 and the constants 1/w0 (R3), d (R4), x0 (R5), y0 (R6).
// The paper does not say how subroutine calls, loops and the key-dependent
// swaps are encoded; this design uses SWAP words whose source field is 13, 14
// or 15 (numbers no register uses) as control words:
//   src=15: dst selects HALT, KSWAP1, KSWAP0, ENDLOOP, CALL_INV, CALL_HT, RET
//   src=14: LOOP, body repeated loop_count(M, dst) times (one loop level)
//   src=13: REPEAT, the next instruction executed loop_count(M, dst) times
// Each control word takes one clock cycle; KSWAP1/KSWAP0 are full 3-cycle swaps.
//
// Program semantics: ADD s d: d <= d + s; SQ s d: d <= s^2; MULT x d:
// d <= T0 * T1 (source ignored); SWAP a b: exchange (a write to a constant is
// dropped, so SWAP const Tn loads the constant).
package bec_pkg;

  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,
    OP_SQ   = 2'd1,
    OP_MULT = 2'd2,
    OP_SWAP = 2'd3
  } opcode_e;

  typedef enum logic [3:0] {
    REG_T0 = 4'd0, REG_T1 = 4'd1, REG_R0 = 4'd2, REG_R1 = 4'd3, REG_R2 = 4'd4,
    REG_R3 = 4'd5, REG_R4 = 4'd6, REG_R5 = 4'd7, REG_R6 = 4'd8
  } reg_e;

  // control sub-operations (dst field when src == CTRL_SRC)
  localparam logic [3:0] CTRL_SRC   = 4'd15;
  localparam logic [3:0] LOOP_SRC   = 4'd14;
  localparam logic [3:0] REPEAT_SRC = 4'd13;
  localparam logic [3:0] C_HALT     = 4'd0;
  localparam logic [3:0] C_KSWAP1   = 4'd1;  // fetch key bit, swap T0/T1 if it is 1
  localparam logic [3:0] C_KSWAP0   = 4'd2;  // swap T0/T1 if the fetched bit is 0
  localparam logic [3:0] C_ENDLOOP  = 4'd3;
  localparam logic [3:0] C_CALL_INV = 4'd4;
  localparam logic [3:0] C_CALL_HT  = 4'd5;
  localparam logic [3:0] C_RET      = 4'd6;

  typedef struct packed {
    opcode_e    op;
    logic [3:0] src;
    logic [3:0] dst;
  } instr_t;

  localparam int PC_W     = 11;   // Fig. 1(b): PC is 11 bits
  localparam int PROG_MAX = 256;  // ROM words generated (rest read as HALT)
  localparam int NCNT     = 16;   // entries of the loop-count table (4-bit index)

  // Program layout: the main program is the same for every M, the half-trace
  // subroutine follows it and the inversion subroutine comes last.
  localparam int MAIN_LEN = 91;
  localparam int HT_ADDR  = MAIN_LEN;
  localparam int INV_ADDR = MAIN_LEN + 9;

  function automatic int bitlen(input int n);
    int l = 0;
    while (n > 0) begin
      l++;
      n = n >> 1;
    end
    return l;
  endfunction

  // idx 0: ladder steps (M-2); idx 1: extra half-trace iterations ((M-3)/2);
  // idx 2..: squaring runs k-1 of the Itoh-Tsujii chain built from the bits of
  // M-1 (for M=283: 1,3,7,16,34,69,140, i.e. the chain 1,2,4,8,16,17,34,35,70,
  // 140,141,282).
  function automatic int loop_count(input int m, input int idx);
    int n, l, k, i;
    n = m - 1;
    l = bitlen(n);
    if (idx == 0) return m - 2;
    if (idx == 1) return (m - 3) / 2;
    k = ((n >> (l - 2)) & 1) != 0 ? 3 : 2;
    i = 2;
    for (int j = l - 3; j >= 0; j--) begin
      if (i == idx) return k - 1;
      k = 2 * k;
      if (((n >> j) & 1) != 0) k = k + 1;
      i++;
    end
    return 0;
  endfunction

  function automatic logic [9:0] mk(input opcode_e op, input reg_e s, input reg_e d);
    return {op, 4'(s), 4'(d)};
  endfunction

  function automatic logic [9:0] mkc(input logic [3:0] src, input logic [3:0] sub);
    return {OP_SWAP, src, sub};
  endfunction

  function automatic logic [PROG_MAX-1:0][9:0] build_program(input int m);
    logic [PROG_MAX-1:0][9:0] p;
    int a, n, l, idx;
    p = '0;  // all-zero words beyond the program are never reached
    a = 0;
    // ---- initialisation: W1 = w0*Z, W2 = W4 (double of P), common Z = Z4
    p[a++] = mk(OP_SWAP, REG_R5, REG_T0);   // T0 = x0
    p[a++] = mk(OP_ADD,  REG_R6, REG_T0);   // T0 = w0 = x0 + y0
    p[a++] = mk(OP_SQ,   REG_T0, REG_T1);   // T1 = w0^2
    p[a++] = mk(OP_ADD,  REG_T0, REG_T1);   // T1 = w0^2 + w0
    p[a++] = mk(OP_SQ,   REG_T1, REG_R0);   // R0 = W4 = (w0(w0+1))^2
    p[a++] = mk(OP_SWAP, REG_R4, REG_T1);   // T1 = d
    p[a++] = mk(OP_ADD,  REG_R0, REG_T1);   // T1 = Z4 = W4 + d
    p[a++] = mk(OP_MULT, REG_T1, REG_T0);   // T0 = w0 * Z4
    p[a++] = mk(OP_SWAP, REG_T1, REG_R0);   // T0,T1,R0 = W1, W2, Z
    // ---- Montgomery ladder, one step per key bit
    p[a++] = mkc(LOOP_SRC, 4'd0);
    p[a++] = mkc(CTRL_SRC, C_KSWAP1);
    p[a++] = mk(OP_ADD,  REG_T0, REG_T1);   //  1  T1 = W1 + W2
    p[a++] = mk(OP_SQ,   REG_T1, REG_R1);   //  2  R1 = C
    p[a++] = mk(OP_SWAP, REG_T1, REG_R0);   //  3
    p[a++] = mk(OP_SQ,   REG_T1, REG_R0);   //  4  R0 = D = Z^2
    p[a++] = mk(OP_ADD,  REG_T0, REG_T1);   //  5  T1 = W1 + Z
    p[a++] = mk(OP_MULT, REG_T1, REG_T0);   //  6  T0 = W1 (W1 + Z)
    p[a++] = mk(OP_SQ,   REG_T0, REG_R2);   //  7  R2 = S
    p[a++] = mk(OP_SWAP, REG_R1, REG_T1);   //  8  T1 = C
    p[a++] = mk(OP_SWAP, REG_R3, REG_T0);   //  9  T0 = 1/w0
    p[a++] = mk(OP_MULT, REG_T0, REG_R1);   // 10  R1 = E
    p[a++] = mk(OP_ADD,  REG_R1, REG_T1);   // 11  T1 = U = E + C
    p[a++] = mk(OP_ADD,  REG_R0, REG_R1);   // 12  R1 = V = E + D
    p[a++] = mk(OP_SQ,   REG_R0, REG_R0);   // 13  R0 = D^2
    p[a++] = mk(OP_SWAP, REG_R0, REG_T1);   // 14  T1 = D^2, R0 = U
    p[a++] = mk(OP_SWAP, REG_R4, REG_T0);   // 15  T0 = d
    p[a++] = mk(OP_MULT, REG_T1, REG_T0);   // 16  T0 = d D^2
    p[a++] = mk(OP_ADD,  REG_R2, REG_T0);   // 17  T0 = T = S + d D^2
    p[a++] = mk(OP_SWAP, REG_R0, REG_T1);   // 18  T1 = U
    p[a++] = mk(OP_MULT, REG_T0, REG_T1);   // 19  T1 = W3 = U T
    p[a++] = mk(OP_SWAP, REG_T1, REG_R1);   // 20  T1 = V, R1 = W3
    p[a++] = mk(OP_MULT, REG_T0, REG_T0);   // 21  T0 = Z' = V T
    p[a++] = mk(OP_SWAP, REG_T0, REG_R2);   // 22  T0 = S, R2 = Z'
    p[a++] = mk(OP_MULT, REG_T0, REG_T1);   // 23  T1 = W4 = V S
    p[a++] = mk(OP_SWAP, REG_R0, REG_R2);   // 24  R0 = Z'
    p[a++] = mk(OP_SWAP, REG_T0, REG_R1);   // 25  T0 = W3
    p[a++] = mkc(CTRL_SRC, C_KSWAP0);
    p[a++] = mkc(CTRL_SRC, C_ENDLOOP);
    // ---- affine w2 = W1/Z and w3 = W2/Z
    p[a++] = mk(OP_SWAP, REG_T0, REG_R1);   // R1 = W1
    p[a++] = mk(OP_SWAP, REG_T1, REG_R2);   // R2 = W2
    p[a++] = mk(OP_SWAP, REG_R0, REG_T0);   // T0 = Z
    p[a++] = mkc(CTRL_SRC, C_CALL_INV);     // T0 = 1/Z
    p[a++] = mk(OP_SWAP, REG_R2, REG_T1);   // T1 = W2
    p[a++] = mk(OP_MULT, REG_T0, REG_R2);   // R2 = w3
    p[a++] = mk(OP_SWAP, REG_R1, REG_T1);   // T1 = W1
    p[a++] = mk(OP_MULT, REG_T0, REG_T1);   // T1 = w2
    // ---- x recovery, numerator w3(d+P+P(w0+w2+P)) + d(w0+w2) + (y0^2+y0)(w2^2+w2), P = w0 w2
    p[a++] = mk(OP_SWAP, REG_R5, REG_T0);
    p[a++] = mk(OP_ADD,  REG_R6, REG_T0);   // T0 = w0
    p[a++] = mk(OP_MULT, REG_T0, REG_R0);   // R0 = P
    p[a++] = mk(OP_ADD,  REG_T1, REG_T0);   // T0 = w0 + w2
    p[a++] = mk(OP_ADD,  REG_R0, REG_T0);   // T0 = w0 + w2 + P
    p[a++] = mk(OP_SWAP, REG_R0, REG_T1);   // T1 = P, R0 = w2
    p[a++] = mk(OP_MULT, REG_T0, REG_T0);   // T0 = P (w0 + w2 + P)
    p[a++] = mk(OP_ADD,  REG_T1, REG_T0);
    p[a++] = mk(OP_ADD,  REG_R4, REG_T0);   // T0 = d + P + P(w0 + w2 + P)
    p[a++] = mk(OP_SWAP, REG_T1, REG_R2);   // T1 = w3
    p[a++] = mk(OP_MULT, REG_T0, REG_R2);   // R2 = first term
    p[a++] = mk(OP_SWAP, REG_R5, REG_T0);
    p[a++] = mk(OP_ADD,  REG_R6, REG_T0);
    p[a++] = mk(OP_ADD,  REG_R0, REG_T0);   // T0 = w0 + w2
    p[a++] = mk(OP_SWAP, REG_R4, REG_T1);   // T1 = d
    p[a++] = mk(OP_MULT, REG_T0, REG_T0);
    p[a++] = mk(OP_ADD,  REG_T0, REG_R2);   // R2 += d (w0 + w2)
    p[a++] = mk(OP_SQ,   REG_R6, REG_T0);
    p[a++] = mk(OP_ADD,  REG_R6, REG_T0);   // T0 = y0^2 + y0
    p[a++] = mk(OP_SQ,   REG_R0, REG_T1);
    p[a++] = mk(OP_ADD,  REG_R0, REG_T1);   // T1 = w2^2 + w2
    p[a++] = mk(OP_MULT, REG_T0, REG_T0);
    p[a++] = mk(OP_ADD,  REG_T0, REG_R2);   // R2 = numerator
    p[a++] = mk(OP_SWAP, REG_R5, REG_T0);
    p[a++] = mk(OP_ADD,  REG_R6, REG_T0);
    p[a++] = mk(OP_SQ,   REG_T0, REG_T1);
    p[a++] = mk(OP_ADD,  REG_T1, REG_T0);   // T0 = w0^2 + w0
    p[a++] = mkc(CTRL_SRC, C_CALL_INV);
    p[a++] = mk(OP_SWAP, REG_R2, REG_T1);
    p[a++] = mk(OP_MULT, REG_T0, REG_T0);   // T0 = x2^2 + x2
    p[a++] = mkc(CTRL_SRC, C_CALL_HT);      // T0 = x2 (or x2 + 1)
    // ---- y recovery: y2^2 + y2 = d (x2 + x2^2) / (d + x2 + x2^2)
    p[a++] = mk(OP_SQ,   REG_T0, REG_R2);
    p[a++] = mk(OP_ADD,  REG_T0, REG_R2);   // R2 = x2 + x2^2
    p[a++] = mk(OP_SWAP, REG_T0, REG_R1);   // R1 = x2
    p[a++] = mk(OP_SWAP, REG_R4, REG_T0);
    p[a++] = mk(OP_ADD,  REG_R2, REG_T0);   // T0 = d + x2 + x2^2
    p[a++] = mkc(CTRL_SRC, C_CALL_INV);
    p[a++] = mk(OP_SWAP, REG_T1, REG_R2);   // T1 = x2 + x2^2
    p[a++] = mk(OP_MULT, REG_T1, REG_T0);
    p[a++] = mk(OP_SWAP, REG_R4, REG_T1);
    p[a++] = mk(OP_MULT, REG_T0, REG_T0);
    p[a++] = mkc(CTRL_SRC, C_CALL_HT);      // T0 = y2 (or y2 + 1)
    p[a++] = mk(OP_SWAP, REG_T0, REG_T1);   // T1 = y2
    p[a++] = mk(OP_SWAP, REG_R1, REG_T0);   // T0 = x2
    p[a++] = mkc(CTRL_SRC, C_HALT);
    // ---- half-trace of T0, sum of T0^(4^i), i = 0..(M-1)/2 (uses T1)
    p[a++] = mk(OP_SQ,   REG_T0, REG_T1);
    p[a++] = mk(OP_SQ,   REG_T1, REG_T1);
    p[a++] = mk(OP_ADD,  REG_T1, REG_T0);
    p[a++] = mkc(LOOP_SRC, 4'd1);
    p[a++] = mk(OP_SQ,   REG_T1, REG_T1);
    p[a++] = mk(OP_SQ,   REG_T1, REG_T1);
    p[a++] = mk(OP_ADD,  REG_T1, REG_T0);
    p[a++] = mkc(CTRL_SRC, C_ENDLOOP);
    p[a++] = mkc(CTRL_SRC, C_RET);
    // ---- Itoh-Tsujii inversion of T0 (uses T1 and R0), T0 = beta_k = T0^(2^k-1)
    p[a++] = mk(OP_SQ,   REG_T0, REG_T1);
    p[a++] = mk(OP_MULT, REG_T0, REG_T1);   // T1 = beta_2
    p[a++] = mk(OP_SWAP, REG_T0, REG_R0);   // R0 = a
    p[a++] = mk(OP_SWAP, REG_T1, REG_T0);   // T0 = beta_2
    n = m - 1;
    l = bitlen(n);
    if (((n >> (l - 2)) & 1) != 0) begin
      p[a++] = mk(OP_SQ,   REG_T0, REG_T0);
      p[a++] = mk(OP_SWAP, REG_R0, REG_T1);
      p[a++] = mk(OP_MULT, REG_T0, REG_T0);  // beta_(2k+1) = beta_2k^2 * a
      p[a++] = mk(OP_SWAP, REG_R0, REG_T1);
    end
    idx = 2;
    for (int j = l - 3; j >= 0; j--) begin
      p[a++] = mk(OP_SQ,   REG_T0, REG_T1);
      p[a++] = mkc(REPEAT_SRC, 4'(idx));
      p[a++] = mk(OP_SQ,   REG_T1, REG_T1);   // T1 = beta_k^(2^k)
      p[a++] = mk(OP_MULT, REG_T0, REG_T0);   // beta_2k
      idx++;
      if (((n >> j) & 1) != 0) begin
        p[a++] = mk(OP_SQ,   REG_T0, REG_T0);
        p[a++] = mk(OP_SWAP, REG_R0, REG_T1);
        p[a++] = mk(OP_MULT, REG_T0, REG_T0);
        p[a++] = mk(OP_SWAP, REG_R0, REG_T1);
      end
    end
    p[a++] = mk(OP_SQ,   REG_T0, REG_T0);     // a^-1 = beta_(m-1)^2
    p[a++] = mkc(CTRL_SRC, C_RET);
    return p;
  endfunction

  // number of words build_program(m) fills
  function automatic int program_length(input int m);
    int n, l, len;
    n = m - 1;
    l = bitlen(n);
    len = INV_ADDR + 4 + 2;
    if (((n >> (l - 2)) & 1) != 0) len += 4;
    for (int j = l - 3; j >= 0; j--) begin
      len += 4;
      if (((n >> j) & 1) != 0) len += 4;
    end
    return len;
  endfunction

endpackage
