// tb_peanut_top: end-to-end runs of the PeANUt machine at its full size.
//
// A host task loads each program through the load port while reset is
// held, releases reset and collects what the machine prints. The
// display accepts characters after a pseudo-random delay and the
// keyboard answers a get after a delay, so the core stalls on both.
// Programs:
//   printletter      straight-line code printing the even letters B..Z
//                    (27 instructions)
//   printletter-rep  the same with a compare/branch/add/jump loop
//                    (7 words; 65 instructions executed)
//   printword-index  prints 23 characters from a50..a76 with the index
//                    register and indexed mode (140 instructions)
//   grade            if-then-else: reads a grade, prints PASS or FAIL,
//                    stores the grade, run with two different inputs
//   overflow / divide-by-zero / illegal instruction / illegal mode
//                    programs that must stop with exceptions 7, 8, 5, 6
// Each mechanism (output stall, input wait, branch taken and not taken,
// indexed access, direct store, each exception, halt) is counted and a
// mechanism that never happened counts as a failure.
module tb_peanut_top;
  import peanut_pkg::*;
  import peanut_asm_pkg::*;

  logic clk = 0, rst_n = 0, en_init = 0;
  addr_t start_pc = 10'o10;
  logic load_we = 0; addr_t load_addr = '0; word_t load_data = '0, load_rdata;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, halted, retire;
  logic [7:0] in_data = 0, out_data;
  logic [3:0] stop_code;
  addr_t pc; word_t ac, xr, psw;
  int checks = 0, failures = 0;
  int retired, cycles;
  string outs;
  byte key;
  // mechanism counters
  int n_out_stall = 0, n_in_wait = 0, n_taken = 0, n_not_taken = 0, n_indexed = 0,
      n_store = 0, n_halt = 0;
  int n_exc [5:8] = '{0, 0, 0, 0};

  peanut_top dut (
    .clk, .rst_n, .start_pc, .en_init,
    .load_we, .load_addr, .load_data, .load_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .halted, .stop_code, .retire, .pc, .ac, .xr, .psw
  );

  always #5 clk = ~clk;

  // display: ready after 0..3 cycles; keyboard: key after 2 cycles
  int dly = 0, kdly = 0;
  always @(posedge clk) begin
    out_ready <= 1'b0;
    if (out_valid && !out_ready) begin
      if (dly == 0) begin out_ready <= 1'b1; dly <= $urandom_range(3); end
      else begin dly <= dly - 1; n_out_stall++; end
    end
    if (out_valid && out_ready) outs = {outs, string'(out_data)};
    in_valid <= 1'b0;
    if (in_ready && !in_valid) begin
      if (kdly == 2) begin in_valid <= 1'b1; in_data <= key; kdly <= 0; end
      else begin kdly <= kdly + 1; n_in_wait++; end
    end
  end

  // mechanism probes on the core's decode
  always @(posedge clk) if (rst_n && dut.u_cpu.state == dut.u_cpu.S_EXEC) begin
    if (dut.u_cpu.kind == K_BRANCH) begin
      if (dut.u_cpu.taken) n_taken++; else n_not_taken++;
    end
    if (dut.u_cpu.kind == K_ALU && dut.u_cpu.mode == MODE_INDEX) n_indexed++;
    if (dut.mem_we) n_store++;
  end

  task automatic poke(addr_t a, word_t d);
    @(negedge clk);
    load_we = 1; load_addr = a; load_data = d;
    @(negedge clk);
    load_we = 0;
  endtask

  task automatic peek(addr_t a, output word_t d);
    @(negedge clk);
    load_addr = a;
    @(negedge clk);
    d = load_rdata;
  endtask

  // load prog at base, start at start, run to the stop
  task automatic run(addr_t base, word_t prog[], bit en, int limit = 20000);
    rst_n = 0;
    foreach (prog[i]) poke(base + addr_t'(i), prog[i]);
    outs = "";
    en_init = en;
    @(negedge clk);
    rst_n = 1;
    retired = 0; cycles = 0;
    while (!halted && cycles < limit) begin
      @(posedge clk); #1;
      cycles++;
      if (retire) retired++;
    end
    if (halted) begin
      if (stop_code == 1) n_halt++;
      else if (stop_code >= 5 && stop_code <= 8) n_exc[stop_code]++;
    end
  endtask

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (out=\"%s\" retired=%0d code=%0d ac=%h)", what, outs, retired, stop_code, ac);
    end
  endtask

  // put the character c: load c immediate, trap 3
  function automatic void put_char(ref word_t p[$], input byte c);
    p.push_back(load(0, 10'(c)));
    p.push_back(trap(3));
  endfunction

  initial begin
    word_t p[$];
    word_t w;
    string word23, evens;
    word23 = "COMPUTER ORGANISATION!!";
    evens  = "BDFHJLNPRTVXZ";

    // printletter: straight-line
    p = {};
    for (int c = 'o102; c <= 'o132; c += 2) put_char(p, byte'(c));
    p.push_back(trap(1));
    chk(p.size() == 27, "printletter is 27 words");
    run(10'o10, p, 0);
    chk(halted && stop_code == 1, "printletter halts");
    chk(outs == evens, "printletter output");
    chk(retired == 27, "printletter executes 27 instructions");

    // printletter-rep: the loop
    run(10'o10, '{16'b000_001_0_001_000_010,   // a10 load 'B' imm
                  16'b110101_0_000_000_011,    // a11 trap 3
                  16'b000_111_0_001_011_010,   // a12 comp 'Z' imm
                  16'b101001_0_000_001_110,    // a13 beq a16
                  16'b000_011_0_000_000_010,   // a14 add 2 imm
                  16'b101000_0_000_001_001,    // a15 jump a11
                  16'b110101_0_000_000_001},   // a16 trap 1
        0);
    chk(halted && stop_code == 1, "printletter-rep halts");
    chk(outs == evens, "printletter-rep output");
    // 1 load + 12 x (put, comp, beq, add, jump) + (put, comp, beq) + halt
    chk(retired == 65, "printletter-rep executes 65 instructions");

    // printword-index: data first, then the code
    for (int i = 0; i < 23; i++) poke(10'o50 + addr_t'(i), word_t'(word23[i]));
    run(10'o10, '{setxr(10'd0),                  // a10
                  load(3, 10'o50),                // a11 load mem[a50+XR]
                  trap(3),                        // a12
                  incxr(10'd1),                   // a13
                  load(0, 10'o27),                // a14 load 27_8 imm
                  cmpxr(),                        // a15
                  bne(10'o11),                    // a16
                  trap(1)},                       // a17
        0);
    chk(halted && stop_code == 1, "printword-index halts");
    chk(outs == word23, "printword-index output");
    chk(retired == 2 + 23 * 6, "printword-index executes 140 instructions");
    chk(xr == 16'd23, "printword-index leaves XR = 23");

    // grade: if (grade == 'F') print FAIL else print PASS; grade stored at a100
    // layout: a14..a23 print FAIL, a24 jmp lab2, a25..a34 lab1: print PASS,
    // a35 lab2: halt
    begin
      p = {};
      p.push_back(trap(2));
      p.push_back(store(1, 10'o100));
      p.push_back(comp(0, 10'd70));
      p.push_back(bne(10'o25));            // a13 bne lab1
      put_char(p, "F"); put_char(p, "A"); put_char(p, "I"); put_char(p, "L");
      p.push_back(jmp(10'o35));           // a24 jmp lab2
      put_char(p, "P"); put_char(p, "A"); put_char(p, "S"); put_char(p, "S");
      p.push_back(trap(1));               // a35 lab2
    end
    chk(p.size() == 'o26, "grade program layout");
    key = "F";
    run(10'o10, p, 0);
    chk(halted && outs == "FAIL", "grade F prints FAIL");
    peek(10'o100, w);
    chk(w == 16'd70, "grade F stored at a100");
    key = "B";
    run(10'o10, p, 0);
    chk(halted && outs == "PASS", "grade B prints PASS");
    peek(10'o100, w);
    chk(w == 16'd66, "grade B stored at a100");

    // exceptions
    poke(10'o100, 16'h7FFF);
    run(10'o10, '{load(1, 10'o100), add(0, 10'd1), trap(1)}, 1);
    chk(halted && stop_code == 7, "overflow with EN stops with 7");
    run(10'o10, '{load(0, 10'd5), div(0, 10'd0), trap(1)}, 0);
    chk(halted && stop_code == 8, "divide by zero stops with 8");
    run(10'o10, '{16'h0000}, 0);
    chk(halted && stop_code == 5, "illegal instruction stops with 5");
    run(10'o10, '{ins(3'b100, 3'b011, 10'd1)}, 0);
    chk(halted && stop_code == 6, "illegal mode stops with 6");

    // every mechanism must have happened
    chk(n_out_stall > 0, "display stall happened");
    chk(n_in_wait > 0, "keyboard wait happened");
    chk(n_taken > 0, "branch taken happened");
    chk(n_not_taken > 0, "branch not taken happened");
    chk(n_indexed > 0, "indexed access happened");
    chk(n_store > 0, "store happened");
    chk(n_halt > 0, "halt happened");
    for (int e = 5; e <= 8; e++) chk(n_exc[e] > 0, $sformatf("exception %0d happened", e));
    $display("mechanisms: out_stall=%0d in_wait=%0d taken=%0d not_taken=%0d indexed=%0d store=%0d halt=%0d exc5..8=%0d,%0d,%0d,%0d",
             n_out_stall, n_in_wait, n_taken, n_not_taken, n_indexed, n_store, n_halt,
             n_exc[5], n_exc[6], n_exc[7], n_exc[8]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
