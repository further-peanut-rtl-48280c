// peanut_agu: operand address generation.
//
// Combinational. For an accumulator instruction it gives the memory
// address of the operand and says whether the operand must be read from
// memory at all:
//   immediate (000): the operand is the opspec itself, sign-extended;
//                    no memory access.
//   direct    (001): the operand is mem[opspec].
//   indexed   (011): the operand is mem[XR + opspec], the sum taken
//                    modulo the 1024-word memory.
// Indexed mode and its adder follow the document; direct mode, the
// sign extension of immediates and the wrap-around of the sum are this
// design's choices. Because the sum wraps at 1024, XR bits above bit 9
// never affect the address and go unused here.
module peanut_agu
  import peanut_pkg::*;
(
  input  logic [2:0] mode,
  input  logic [9:0] opspec,
  input  word_t      xr,
  output addr_t      ea,        // effective address
  output word_t      imm,       // immediate operand
  output logic       use_mem    // operand comes from memory
);
  always_comb begin
    imm     = sext_opspec(opspec);
    use_mem = (mode != MODE_IMM);
    if (mode == MODE_INDEX) ea = addr_t'(xr) + addr_t'(opspec);
    else                    ea = addr_t'(opspec);
  end
endmodule
