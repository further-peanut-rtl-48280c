// peanut_decoder: classifies one PeANUt instruction word.
//
// Purely combinational. The word is split into class/mode [15:13],
// operation [12:10] and opspec [9:0] (see peanut_pkg). Classes 000, 001
// and 011 are accumulator instructions whose class field is the
// addressing mode (immediate, direct, indexed); classes 010 and 100 name
// no mode this machine has and give K_ILL_MODE (exception 6). Class 101
// holds the branches, 110 the index-register set/increment and the trap,
// 111 the operand-less index-register instructions. Any code with no
// meaning gives K_ILL_INSTR (exception 5).
//
// The immediate/indexed modes, load/add/compare, the branch, XR and trap
// codes used in the published programs follow the document; the other
// codes (direct mode, store, sub, mul, div, the remaining branches,
// load-XR and store-XR) and the split of illegal codes between the two
// exceptions are this design's choice.
module peanut_decoder
  import peanut_pkg::*;
(
  input  word_t        instr,
  output kind_t        kind,
  output alu_op_t      alu_op,    // valid for K_ALU
  output br_cond_t     br_cond,   // valid for K_BRANCH
  output logic [2:0]   mode,      // addressing mode for K_ALU
  output logic [9:0]   opspec
);
  instr_t i;
  assign i      = instr_t'(instr);
  assign alu_op = alu_op_t'(i.op);
  assign br_cond = br_cond_t'(i.op);
  assign mode   = i.cls;
  assign opspec = i.opspec;

  always_comb begin
    kind = K_ILL_INSTR;
    unique case (i.cls)
      MODE_IMM, MODE_DIR, MODE_INDEX: begin
        if (alu_op_t'(i.op) == ALU_NONE) kind = K_ILL_INSTR;
        // storing into an immediate operand has no meaning
        else if (i.cls == MODE_IMM && alu_op_t'(i.op) == ALU_STORE) kind = K_ILL_MODE;
        else kind = K_ALU;
      end
      3'b010, 3'b100: kind = K_ILL_MODE;
      CLS_BRANCH: kind = (i.op inside {3'b110, 3'b111}) ? K_ILL_INSTR : K_BRANCH;
      CLS_XRTRAP: begin
        case (i.op)
          OP_SETXR: kind = K_SETXR;
          OP_INCXR: kind = K_INCXR;
          OP_TRAP:  kind = K_TRAP;
          default:  kind = K_ILL_INSTR;
        endcase
      end
      CLS_NOARG: begin
        case (i.op)
          OP_LDXR:  kind = K_LDXR;
          OP_CMPXR: kind = K_CMPXR;
          OP_STXR:  kind = K_STXR;
          default:  kind = K_ILL_INSTR;
        endcase
      end
      default: kind = K_ILL_INSTR;
    endcase
  end
endmodule
