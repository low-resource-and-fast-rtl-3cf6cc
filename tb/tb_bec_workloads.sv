// tb_bec_workloads: point multiplication over the two other NIST binary field
// sizes the design is meant for, GF(2^163) (type-4 Gaussian normal basis) and
// GF(2^233) (type-2), run side by side.
//
// bec_top is the same RTL as at the default size (GF(2^283)); only M, T and
// the curve constants are set per instance. Each instance is driven by
// tb_bec_run, which serves a fixed key, compares the result with a point
// computed beforehand by an independent affine model (coordinates may come
// out complemented), and checks the key-request count, the ladder step length
// 64 + 6M and the total run time. The curves (d1 = d2 = d, Tr(d) = 1) and base
// points are this testbench's own; the run times it expects are 177,253
// cycles for 163 bits and 351,920 for 233 bits.
`timescale 1ns/1ps
module tb_bec_workloads;
  int c163, f163, c233, f233;
  logic d163, d233;
  int checks, failures;

  tb_bec_run #(
    .M(163), .T(4),
    .D     (163'hf254f78503b7c7d6f41d4aa2bb622a715cccd1de),
    .X0    (163'h6f95086d6d162c013f895df775e8d9ef9a2cf0363),
    .Y0    (163'h2b32217620d11b282e8649c0595716348801051f0),
    .INV_W0(163'h12282e23b8418506aa39c85d83c2a50c625277e2d),
    .KEY   (161'ha6a3a4506513270e269e0d37f2a74de452e6b438),
    .XQ    (163'hd0d559c05feda705d78fd8d7435d6a5e48f1cc18),
    .YQ    (163'h2a170af110ec8d75f4d6ea45810fed5434d7bb579),
    .EXP_CYCLES(177253), .WATCHDOG(250000)
  ) u163 (.checks(c163), .failures(f163), .finished(d163));

  tb_bec_run #(
    .M(233), .T(2),
    .D     (233'h864c930e6a38988d9681440069611136d29c813b0af1d089fc6db47567),
    .X0    (233'h325025720caeaba5150afe3fe3c75162733f0d9f26230a28edf4af8341),
    .Y0    (233'h103cfeab94ebc31f3809982461e5f5941da7919afaea37abe5d575883c0),
    .INV_W0(233'h1b28d890352d84e246eb9d45fde6a22f42d9f86a27a1e04f8d3f39fe148),
    .KEY   (231'h69128b2f330c5c7fd0a6a3a4506513270e269e0d37f2a74de452e6b438),
    .XQ    (233'h1872e389fc4213b534bb7bbb20db81c6369bd168020f95b2d86b870323a),
    .YQ    (233'hfa14488cc35554ba490dd35306fc3a2459a9c19af6f0885ffff1177fb),
    .EXP_CYCLES(351920), .WATCHDOG(450000)
  ) u233 (.checks(c233), .failures(f233), .finished(d233));

  initial begin
    wait (d163 === 1'b1 && d233 === 1'b1);
    checks   = c163 + c233;
    failures = f163 + f233;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // overall watchdog (each run also has its own)
  initial begin
    #10ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c163 + c233, f163 + f233 + 1);
    $finish;
  end
endmodule
