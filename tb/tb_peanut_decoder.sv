// tb_peanut_decoder: test of instruction classification.
//
// Checks the words of the published programs (load/comp/add immediate,
// indexed load, jump, beq, bne, set-XR, inc-XR, compare-XR, trap) and then
// all 64 class/operation codes against an independent table of which
// codes are legal, which are illegal instructions and which illegal
// modes. Field extraction (mode, opspec, operation) is checked too.
module tb_peanut_decoder;
  import peanut_pkg::*;
  word_t      instr;
  kind_t      kind;
  alu_op_t    alu_op;
  br_cond_t   br_cond;
  logic [2:0] mode;
  logic [9:0] opspec;
  int checks = 0, failures = 0;

  peanut_decoder dut (.instr, .kind, .alu_op, .br_cond, .mode, .opspec);

  task automatic expect_kind(word_t w, kind_t k, string what);
    instr = w;
    #1;
    checks++;
    if (kind !== k || opspec !== w[9:0] || mode !== w[15:13]) begin
      failures++;
      $display("FAIL %s: %b -> %s, expected %s", what, w, kind.name(), k.name());
    end
  endtask

  initial begin
    // words from the program listings
    expect_kind(16'b000_001_0_001_000_010, K_ALU,    "load 102 imm");
    checks++; if (alu_op !== ALU_LOAD) failures++;
    expect_kind(16'b000_111_0_001_011_010, K_ALU,    "comp 132 imm");
    checks++; if (alu_op !== ALU_COMP) failures++;
    expect_kind(16'b000_011_0_000_000_010, K_ALU,    "add 2 imm");
    checks++; if (alu_op !== ALU_ADD) failures++;
    expect_kind(16'b011_001_0_000_101_000, K_ALU,    "load a50+XR");
    checks++; if (mode !== 3'b011) failures++;
    expect_kind(16'b101000_0_000_001_001,  K_BRANCH, "jump a11");
    checks++; if (br_cond !== BR_JUMP) failures++;
    expect_kind(16'b101001_0_000_001_110,  K_BRANCH, "beq a16");
    checks++; if (br_cond !== BR_EQ) failures++;
    expect_kind(16'b101010_0_000_001_001,  K_BRANCH, "bne a11");
    checks++; if (br_cond !== BR_NE) failures++;
    expect_kind(16'b110001_0_000_000_000,  K_SETXR,  "set XR 0");
    expect_kind(16'b110010_0_000_000_001,  K_INCXR,  "inc XR 1");
    expect_kind(16'b111010_1_000_000_000,  K_CMPXR,  "comp XR");
    expect_kind(16'b110101_0_000_000_011,  K_TRAP,   "trap 3");

    // every class/operation code with a random opspec
    for (int c = 0; c < 8; c++) begin
      for (int o = 0; o < 8; o++) begin
        kind_t k;
        if (c == 0 || c == 1 || c == 3) begin
          if (o == 0) k = K_ILL_INSTR;
          else if (c == 0 && o == 2) k = K_ILL_MODE;
          else k = K_ALU;
        end else if (c == 2 || c == 4) k = K_ILL_MODE;
        else if (c == 5) k = (o < 6) ? K_BRANCH : K_ILL_INSTR;
        else if (c == 6) k = (o == 1) ? K_SETXR : (o == 2) ? K_INCXR : (o == 5) ? K_TRAP : K_ILL_INSTR;
        else k = (o == 1) ? K_LDXR : (o == 2) ? K_CMPXR : (o == 3) ? K_STXR : K_ILL_INSTR;
        expect_kind({3'(c), 3'(o), 10'($urandom)}, k, "table");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
