// bec_fau: field arithmetic unit of the point multiplier (GF(2^M), Gaussian
// normal basis).
//
// One M-bit accumulator Z and one XOR row do all the field work. Each clock:
//     Z <= mux1(s1) ^ mux2(s2)
//     s1: 0 = J (multiplier partial product), 1 = r_out (register file read), 2 = 0
//     s2: 0 = 0, 1 = Z, 2 = Z >> 1 (circular; this is squaring)
// and Z drives r_in, the register file's write data.
//   add      : Z <= r_out (s1=1,s2=0); Z <= r_out ^ Z (s1=1,s2=1)
//   square   : Z <= r_out; Z <= Z >> 1 (s1=2,s2=2)
//   multiply : the register file rotates T0 and T1 every cycle and supplies
//              T0>>1, T1>>1; J = (T0>>1)[0] & P'(T1>>1). The first cycle loads
//              Z <= J (s1=0,s2=0), the next M-1 cycles Z <= J ^ (Z >> 1)
//              (s1=0,s2=2). After M cycles Z = T0*T1.
// The select encodings, the 3:2 muxes and the 2-bit selects follow the paper.
// The paper's text gives s2 = "01" (unrotated Z) for the multiply accumulation
// cycles; with rotating operands a bit-serial parallel-output normal basis
// product needs the accumulator to rotate as well, so this design uses s2 = "10"
// there. The J array uses one bit of T0>>1 per cycle (the paper draws all M
// bits entering it; its inside is not described). Lint reports bits [M-1:1] of
// t0_rot as unused: the full-width port keeps the block diagram's connection,
// and synthesis removes the unused bits.
module bec_fau #(
  parameter int M = 283,
  parameter int T = 6
) (
  input  logic         clk,
  input  logic [1:0]   s1,
  input  logic [1:0]   s2,
  input  logic [M-1:0] t0_rot,   // T0 >> 1 from the register file
  input  logic [M-1:0] t1_rot,   // T1 >> 1 from the register file
  input  logic [M-1:0] r_out,    // register file read port
  output logic [M-1:0] r_in      // Z, register file write data
);

  logic [M-1:0] z, p_out, j_out, m1, m2;

  gnb_p_array #(.M(M), .T(T)) u_p (.b(t1_rot), .y(p_out));

  // J AND array
  assign j_out = p_out & {M{t0_rot[0]}};

  always_comb begin
    unique case (s1)
      2'd0:    m1 = j_out;
      2'd1:    m1 = r_out;
      default: m1 = '0;
    endcase
    unique case (s2)
      2'd1:    m2 = z;
      2'd2:    m2 = {z[0], z[M-1:1]};
      default: m2 = '0;
    endcase
  end

  always_ff @(posedge clk) z <= m1 ^ m2;

  assign r_in = z;

endmodule
