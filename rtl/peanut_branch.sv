// peanut_branch: decides whether a branch is taken.
//
// Combinational. Reads the condition codes from the PSW (GT bit 12,
// EQ bit 11, OV bit 10) and evaluates the branch condition:
//   jump: always, beq: EQ=1, bne: EQ=0, bgt: GT=1, ble: GT=0, bov: OV=1.
// The conditions and PSW bit positions follow the document; the 3-bit
// codes of bgt, ble and bov are this design's choice. Codes 110 and 111
// are never taken (the decoder makes them illegal instructions).
module peanut_branch
  import peanut_pkg::*;
(
  input  br_cond_t cond,
  input  word_t    psw,
  output logic     taken
);
  always_comb begin
    unique case (cond)
      BR_JUMP: taken = 1'b1;
      BR_EQ:   taken =  psw[PSW_EQ];
      BR_NE:   taken = !psw[PSW_EQ];
      BR_GT:   taken =  psw[PSW_GT];
      BR_LE:   taken = !psw[PSW_GT];
      BR_OV:   taken =  psw[PSW_OV];
      default: taken = 1'b0;
    endcase
  end
endmodule
