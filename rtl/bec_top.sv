// bec_top: point multiplication co-processor for a binary Edwards curve
// (d1 = d2 = d) over GF(2^M) in a type-T Gaussian normal basis.
//
// Computes Q = kP for the hardwired base point P = (X0, Y0) with a Montgomery
// ladder in mixed w-coordinates (w = x + y) with a common Z, then recovers the
// affine x and y of Q. The scalar is not stored: after start, the co-processor
// asks for M-2 key bits one at a time (key_req high for one cycle, k_i sampled
// at that clock edge), most significant first, after an implicit leading 1; the
// scalar is therefore k = 1 k_(M-3) ... k_0 (M-1 bits). When done rises,
// x_out/y_out hold Q, each possibly complemented (x+1 or y+1), since the
// coordinates are taken from the solutions of z^2 + z = c found by the
// half-trace.
//
// Structure (as in the paper's block diagram): a controller fetching 10-bit
// instructions from a program ROM (11-bit PC), a register file of five working
// registers and four constants, and a field arithmetic unit whose Z register
// writes back to the register file. Here the ROM is inside the top.
// x_out and y_out are the register file's T0 and T1; they are valid while done
// is high.
//
// Latency for M = 283: ADD/SQ/SWAP 3 cycles, MULT M cycles, control words one
// cycle; a full run takes about 0.51 million cycles (see the README).
module bec_top
  import bec_pkg::*;
#(
  parameter int           M      = 283,
  parameter int           T      = 6,
  parameter logic [M-1:0] INV_W0 = 283'h4ee56605ec7e99a5ce94e39564b537484ab7931ae71061c6c7d0ddae3f2454c55f495b3,
  parameter logic [M-1:0] D      = 283'h15e382e067360d274dcd2fabb14153c6614b93766e7081d9a19324c39a8e2623b40a200,
  parameter logic [M-1:0] X0     = 283'h1a58444db4a7204ec2bc74227f1b6d1dac7e22b38c94095c832baae94542bf8f1e3a8b0,
  parameter logic [M-1:0] Y0     = 283'haed699a65b81c2eefe5bb9aad516b369a75dbcf9b0e008c0c0f7e04b8cbf4138f15da2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         k_i,
  output logic         key_req,
  output logic         done,
  output logic [M-1:0] x_out,
  output logic [M-1:0] y_out
);

  logic [PC_W-1:0] pc;
  logic [9:0]      instr;
  logic            s_t0, s_t1, we;
  logic [3:0]      write_sel, read_sel;
  logic [1:0]      s1, s2;
  logic [M-1:0]    r_in, r_out, t0_rot, t1_rot;

  bec_rom #(.M(M)) u_rom (.pc(pc), .instr(instr));

  bec_controller #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .k_i, .key_req, .done, .pc, .instr,
    .s_t0, .s_t1, .we, .write_sel, .read_sel, .s1, .s2
  );

  bec_regfile #(.M(M), .INV_W0(INV_W0), .D(D), .X0(X0), .Y0(Y0)) u_rf (
    .clk, .s_t0, .s_t1, .we, .write_sel, .read_sel, .r_in, .r_out,
    .t0_rot, .t1_rot, .t0(x_out), .t1(y_out)
  );

  bec_fau #(.M(M), .T(T)) u_fau (
    .clk, .s1, .s2, .t0_rot, .t1_rot, .r_out, .r_in
  );

endmodule
