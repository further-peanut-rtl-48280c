// tb_peanut_branch: exhaustive test of the branch-condition unit.
//
// Every condition code against every combination of GT, EQ and OV
// (plus random noise in the other PSW bits), checked against the
// document's table: jump always, beq EQ=1, bne EQ=0, bgt GT=1,
// ble GT=0, bov OV=1; codes 110/111 never taken.
module tb_peanut_branch;
  import peanut_pkg::*;
  br_cond_t cond;
  word_t    psw;
  logic     taken;
  int checks = 0, failures = 0;

  peanut_branch dut (.cond, .psw, .taken);

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int f = 0; f < 8; f++) begin
        logic g, e, o, exp_t;
        g = f[2]; e = f[1]; o = f[0];
        cond = br_cond_t'(c);
        psw  = word_t'($urandom);
        psw[12] = g; psw[11] = e; psw[10] = o;
        #1;
        case (c)
          0: exp_t = 1'b1;
          1: exp_t = e;
          2: exp_t = !e;
          3: exp_t = g;
          4: exp_t = !g;
          5: exp_t = o;
          default: exp_t = 1'b0;
        endcase
        checks++;
        if (taken !== exp_t) begin
          failures++;
          $display("FAIL cond=%0d GT=%b EQ=%b OV=%b taken=%b", c, g, e, o, taken);
        end
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
