// tb_peanut_alu: self-checking test of the accumulator ALU.
//
// Drives every operation with directed corner cases (overflow limits,
// -32768 / -1, divide by zero) and 4000 random operand pairs, and
// compares result, GT, EQ, OV and divide-by-zero with a reference
// computed in 32-bit integer arithmetic.
module tb_peanut_alu;
  import peanut_pkg::*;
  alu_op_t op;
  word_t   a, b, result;
  logic    gt, eq, ov, div_zero;
  int checks = 0, failures = 0;

  peanut_alu dut (.op, .a, .b, .result, .gt, .eq, .ov, .div_zero);

  task automatic check_one(alu_op_t o, word_t x, word_t y);
    int sx, sy, full;
    word_t er;
    logic eov, edz;
    op = o; a = x; b = y;
    #1;
    sx = int'(signed'(x));
    sy = int'(signed'(y));
    edz = 1'b0;
    case (o)
      ALU_ADD:  full = sx + sy;
      ALU_SUB:  full = sx - sy;
      ALU_MUL:  full = sx * sy;
      ALU_DIV:  begin full = (sy == 0) ? sx : sx / sy; edz = (sy == 0); end
      ALU_LOAD: full = sy;
      default:  full = sx;
    endcase
    er  = full[15:0];
    eov = (o inside {ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV}) && (full > 32767 || full < -32768);
    checks++;
    if (result !== er || ov !== eov || div_zero !== edz ||
        gt !== (sx > sy) || eq !== (sx == sy)) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d res=%0d(exp %0d) ov=%b(%b) dz=%b(%b) gt=%b eq=%b",
               o.name(), sx, sy, signed'(result), signed'(er), ov, eov, div_zero, edz, gt, eq);
    end
  endtask

  initial begin
    alu_op_t ops[7];
    word_t corner[8];
    ops    = '{ALU_LOAD, ALU_STORE, ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV, ALU_COMP};
    corner = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h0002, 16'h00FF, 16'h8001};
    foreach (ops[k]) foreach (corner[i]) foreach (corner[j]) check_one(ops[k], corner[i], corner[j]);
    repeat (4000) check_one(ops[$urandom_range(6)], word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
