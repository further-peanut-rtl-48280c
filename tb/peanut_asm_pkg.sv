// peanut_asm_pkg: instruction-word builders for the PeANUt testbenches.
//
// Each function returns the 16-bit word of one instruction, laid out as
// class/mode [15:13], operation [12:10], opspec [9:0]. Addresses and
// numbers in the test programs are written in octal, as in the usual
// PeANUt listings (a10 = 8'o10).
package peanut_asm_pkg;
  function automatic logic [15:0] ins(logic [2:0] c, logic [2:0] o, logic [9:0] s);
    return {c, o, s};
  endfunction
  // accumulator instructions: mode 0 immediate, 1 direct, 3 indexed
  function automatic logic [15:0] load (logic [2:0] m, logic [9:0] s); return ins(m, 3'b001, s); endfunction
  function automatic logic [15:0] store(logic [2:0] m, logic [9:0] s); return ins(m, 3'b010, s); endfunction
  function automatic logic [15:0] add  (logic [2:0] m, logic [9:0] s); return ins(m, 3'b011, s); endfunction
  function automatic logic [15:0] sub  (logic [2:0] m, logic [9:0] s); return ins(m, 3'b100, s); endfunction
  function automatic logic [15:0] mul  (logic [2:0] m, logic [9:0] s); return ins(m, 3'b101, s); endfunction
  function automatic logic [15:0] div  (logic [2:0] m, logic [9:0] s); return ins(m, 3'b110, s); endfunction
  function automatic logic [15:0] comp (logic [2:0] m, logic [9:0] s); return ins(m, 3'b111, s); endfunction
  // branches
  function automatic logic [15:0] jmp(logic [9:0] a); return ins(3'b101, 3'b000, a); endfunction
  function automatic logic [15:0] beq(logic [9:0] a); return ins(3'b101, 3'b001, a); endfunction
  function automatic logic [15:0] bne(logic [9:0] a); return ins(3'b101, 3'b010, a); endfunction
  function automatic logic [15:0] bgt(logic [9:0] a); return ins(3'b101, 3'b011, a); endfunction
  function automatic logic [15:0] ble(logic [9:0] a); return ins(3'b101, 3'b100, a); endfunction
  function automatic logic [15:0] bov(logic [9:0] a); return ins(3'b101, 3'b101, a); endfunction
  // index register and traps
  function automatic logic [15:0] setxr(logic [9:0] v); return ins(3'b110, 3'b001, v); endfunction
  function automatic logic [15:0] incxr(logic [9:0] v); return ins(3'b110, 3'b010, v); endfunction
  function automatic logic [15:0] trap (logic [9:0] n); return ins(3'b110, 3'b101, n); endfunction
  function automatic logic [15:0] ldxr();  return ins(3'b111, 3'b001, 10'd0); endfunction
  function automatic logic [15:0] cmpxr(); return 16'b111010_1_000_000_000; endfunction
  function automatic logic [15:0] stxr();  return ins(3'b111, 3'b011, 10'd0); endfunction
endpackage
