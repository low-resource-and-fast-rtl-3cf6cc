// bec_rom: instruction ROM of the point multiplier.
//
// Returns the 10-bit instruction at the 11-bit program counter, combinationally
// (an asynchronous-read ROM, so the controller sees the word of the current PC
// in the same cycle). The contents are generated at elaboration by
// bec_pkg::build_program(M): the main program (initialisation, Montgomery
// ladder step, recovery of w2/w3 and of the affine x and y), then the half-trace
// and the Itoh-Tsujii inversion subroutines. The inversion addition chain is
// derived from the binary expansion of M-1. Addresses past the program read as
// HALT. The paper keeps this ROM outside the co-processor and gives its program
// as listings; the control-word encoding is this design's own (see bec_pkg).
module bec_rom
  import bec_pkg::*;
#(
  parameter int M = 283
) (
  input  logic [PC_W-1:0] pc,
  output logic [9:0]      instr
);

  localparam int LEN = program_length(M);
  localparam logic [PROG_MAX-1:0][9:0] PROG = build_program(M);

  always_comb begin
    if (int'(pc) < LEN) instr = PROG[pc[7:0]];
    else                instr = {OP_SWAP, CTRL_SRC, C_HALT};
  end

  initial begin
    assert (LEN <= PROG_MAX) else $error("bec_rom: program longer than PROG_MAX");
  end

endmodule
