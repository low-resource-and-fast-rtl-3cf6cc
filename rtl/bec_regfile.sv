// bec_regfile: register file of the point multiplier.
//
// Five M-bit working registers and four hardwired curve constants share one
// 9-input read multiplexer (read_sel): 0 T0, 1 T1, 2 R0, 3 R1, 4 R2,
// 5 1/w0, 6 d, 7 x0, 8 y0 (numbering of the paper's figure). Selects 9..15 read 0.
// T0 and T1 are the multiplication registers: when s_t0 / s_t1 is 1 they load
// their own value circularly shifted right by one (T >> 1), and those shifted
// values are also brought out to the field arithmetic unit. A register loads
// r_in when we is high and write_sel names it; a write to a constant or to an
// unused number is dropped. A write to T0/T1 takes priority over rotation (the
// controller never asks for both).
// The constants are parameters: the paper hardwires the base point and d for a
// standardised curve but prints no values, so the defaults here are a complete
// curve (Tr(d) = 1) with d1 = d2 = d and a point on it, chosen for this design
// (M = 283, T = 6 GNB). Registers are not reset: the program initialises every
// register before it reads it.
module bec_regfile #(
  parameter int           M      = 283,
  parameter logic [M-1:0] INV_W0 = 283'h4ee56605ec7e99a5ce94e39564b537484ab7931ae71061c6c7d0ddae3f2454c55f495b3,
  parameter logic [M-1:0] D      = 283'h15e382e067360d274dcd2fabb14153c6614b93766e7081d9a19324c39a8e2623b40a200,
  parameter logic [M-1:0] X0     = 283'h1a58444db4a7204ec2bc74227f1b6d1dac7e22b38c94095c832baae94542bf8f1e3a8b0,
  parameter logic [M-1:0] Y0     = 283'haed699a65b81c2eefe5bb9aad516b369a75dbcf9b0e008c0c0f7e04b8cbf4138f15da2
) (
  input  logic         clk,
  input  logic         s_t0,
  input  logic         s_t1,
  input  logic         we,
  input  logic [3:0]   write_sel,
  input  logic [3:0]   read_sel,
  input  logic [M-1:0] r_in,
  output logic [M-1:0] r_out,
  output logic [M-1:0] t0_rot,
  output logic [M-1:0] t1_rot,
  output logic [M-1:0] t0,
  output logic [M-1:0] t1
);

  logic [M-1:0] r0, r1, r2;

  assign t0_rot = {t0[0], t0[M-1:1]};
  assign t1_rot = {t1[0], t1[M-1:1]};

  always_ff @(posedge clk) begin
    if (we && write_sel == 4'd0) t0 <= r_in;
    else if (s_t0)               t0 <= t0_rot;
    if (we && write_sel == 4'd1) t1 <= r_in;
    else if (s_t1)               t1 <= t1_rot;
    if (we && write_sel == 4'd2) r0 <= r_in;
    if (we && write_sel == 4'd3) r1 <= r_in;
    if (we && write_sel == 4'd4) r2 <= r_in;
  end

  always_comb begin
    unique case (read_sel)
      4'd0:    r_out = t0;
      4'd1:    r_out = t1;
      4'd2:    r_out = r0;
      4'd3:    r_out = r1;
      4'd4:    r_out = r2;
      4'd5:    r_out = INV_W0;
      4'd6:    r_out = D;
      4'd7:    r_out = X0;
      4'd8:    r_out = Y0;
      default: r_out = '0;
    endcase
  end

endmodule
