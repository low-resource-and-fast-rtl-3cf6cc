// gnb_p_array: the XOR network ("P' array") of the bit-serial Gaussian normal
// basis (GNB) multiplier.
//
// Field elements are M-bit vectors in a type-T Gaussian normal basis
// {beta^(2^i)}. Bit p of a vector is the coefficient of beta^(2^(-p mod M)), so
// squaring is a right circular shift, as in the field arithmetic unit.
// Output bit j is the XOR of the input bits q for which the product
// beta * beta^(2^-q) has a 1 at bit j: y = (beta * b) expressed row by row, a
// linear map with at most T ones per row. The multiplier ANDs these M outputs
// with one bit of the other operand and accumulates while both operands and the
// accumulator rotate (see bec_fau).
//
// The wiring is computed at elaboration from the standard GNB construction: with
// p = T*M + 1 prime and u of order T modulo p, F(2^i u^s mod p) = i, and the
// coefficient of beta in beta^(2^a) beta^(2^b) is the parity of the number of
// n in 2..p-1 with F(n) = a and F(p+1-n) = b. T must be even (true for the
// NIST binary fields 163, 233, 283: T = 4, 2, 6).
//
// Purely combinational. The paper names this block and its place in the datapath
// only; its inside is this design's own.
module gnb_p_array #(
  parameter int M = 283,
  parameter int T = 6
) (
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);

  localparam int P = T * M + 1;

  // matrix row j, column q: b[q] contributes to y[j]
  function automatic logic [M-1:0][M-1:0] build_matrix();
    logic [M-1:0][M-1:0] mat;
    int f [P];
    int u, x, n, v, q, w;
    bit found;
    for (int j = 0; j < M; j++) mat[j] = '0;
    // element of order exactly T modulo P
    u = 2;
    found = 0;
    while (!found) begin
      w = 1;
      found = 1;
      for (int e = 1; e <= T; e++) begin
        w = (w * u) % P;
        if (w == 1 && e < T) found = 0;
        if (e == T && w != 1) found = 0;
      end
      if (!found) u++;
    end
    for (int i = 0; i < P; i++) f[i] = 0;
    w = 1;
    for (int s = 0; s < T; s++) begin
      n = w;
      for (int i = 0; i < M; i++) begin
        f[n] = i;
        n = (n * 2) % P;
      end
      w = (w * u) % P;
    end
    for (int j = 0; j < M; j++) begin
      // all n with F(n) = j
      w = 1;
      for (int i = 0; i < j; i++) w = (w * 2) % P;
      for (int s = 0; s < T; s++) begin
        if (w != 1) begin
          x = P + 1 - w;
          v = f[x];
          q = (j - v + M) % M;
          mat[j][q] = ~mat[j][q];
        end
        w = (w * u) % P;
      end
    end
    return mat;
  endfunction

  localparam logic [M-1:0][M-1:0] MAT = build_matrix();

  always_comb begin
    for (int j = 0; j < M; j++) y[j] = ^(MAT[j] & b);
  end

  initial begin
    assert (T % 2 == 0) else $error("gnb_p_array: type T must be even");
  end

endmodule
