// tb_peanut_agu: test of operand address generation.
//
// Includes the document's example of indexed mode (opspec a20, XR = 3
// gives address a23) and random opspec/XR pairs for each mode, checked
// against mem[XR + opspec] modulo 1024, mem[opspec] and the
// sign-extended immediate.
module tb_peanut_agu;
  import peanut_pkg::*;
  logic [2:0] mode;
  logic [9:0] opspec;
  word_t      xr, imm;
  addr_t      ea;
  logic       use_mem;
  int checks = 0, failures = 0;

  peanut_agu dut (.mode, .opspec, .xr, .ea, .imm, .use_mem);

  task automatic check_one(logic [2:0] m, logic [9:0] s, word_t x);
    int e_ea;
    mode = m; opspec = s; xr = x;
    #1;
    e_ea = (m == 3'b011) ? (int'(x) + int'(s)) % 1024 : int'(s);
    checks++;
    if (int'(ea) != e_ea && m != 3'b000 || use_mem !== (m != 3'b000) ||
        imm !== word_t'(int'(signed'(s)))) begin
      failures++;
      $display("FAIL mode=%b opspec=%o xr=%0d ea=%o imm=%h use_mem=%b", m, s, x, ea, imm, use_mem);
    end
  endtask

  initial begin
    // document example: a20 + XR(3) = a23 (octal)
    check_one(3'b011, 10'o020, 16'd3);
    checks++;
    if (ea !== 10'o023) begin failures++; $display("FAIL a20+3"); end
    repeat (3000) begin
      logic [2:0] m;
      case ($urandom_range(2)) 0: m = 3'b000; 1: m = 3'b001; default: m = 3'b011; endcase
      check_one(m, 10'($urandom), word_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
