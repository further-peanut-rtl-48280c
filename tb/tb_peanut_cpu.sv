// tb_peanut_cpu: directed programs for the processor core.
//
// The core runs against a behavioural 1024-word memory (one-cycle
// synchronous read, like the real one) kept in this testbench. Each test
// loads a short program, releases reset and runs to the stop, then
// checks AC, XR, PSW, memory, the stop code and the cycle count:
//   arithmetic and data movement (store, direct mode, sub, mul, div,
//     load-XR, store-XR, set-XR, inc-XR with a negative step)
//   every branch condition, taken and not taken
//   the four exceptions raised by the machine (5 illegal instruction,
//     6 illegal mode, 7 overflow with EN set, 8 divide by zero), trap 6
//     used as an exception, an unknown trap number, and overflow with
//     EN clear (no stop, OV set)
//   get and put with a console that makes the core wait
//   3 cycles for an immediate instruction, 4 for a memory operand.
module tb_peanut_cpu;
  import peanut_pkg::*;
  import peanut_asm_pkg::*;

  logic clk = 0, rst_n = 0, en_init = 0;
  addr_t start_pc = 10'o10;
  addr_t mem_addr; logic mem_we; word_t mem_wdata, mem_rdata;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, halted, retire;
  logic [7:0] in_data = 0, out_data;
  logic [3:0] stop_code;
  addr_t pc; word_t ac, xr, psw;
  word_t mem [1024];
  int checks = 0, failures = 0;
  int cycles, retired;
  string outs;

  peanut_cpu dut (
    .clk, .rst_n, .start_pc, .en_init,
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .halted, .stop_code, .retire, .pc_o(pc), .ac_o(ac), .xr_o(xr), .psw_o(psw)
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  // console model: keyboard offers 'K' after a delay; display accepts
  // each character two cycles after it is offered.
  int out_wait = 0, in_wait = 0;
  always @(posedge clk) begin
    out_ready <= 1'b0;
    if (out_valid && !out_ready) begin
      if (out_wait == 2) begin out_ready <= 1'b1; out_wait <= 0; end
      else out_wait <= out_wait + 1;
    end
    if (out_valid && out_ready) outs = {outs, string'(out_data)};
    in_valid <= 1'b0;
    if (in_ready && !in_valid) begin
      if (in_wait == 3) begin in_valid <= 1'b1; in_data <= 8'h4B; in_wait <= 0; end
      else in_wait <= in_wait + 1;
    end
  end

  // Loads prog at a10 (other words keep what earlier tests left) and runs it.
  task automatic run(input word_t prog[], input bit en);
    foreach (prog[i]) mem[32'o10 + i] = prog[i];
    outs = "";
    en_init = en;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cycles = 0; retired = 0;
    while (!halted && cycles < 2000) begin
      @(posedge clk);
      #1;
      cycles++;
      if (retire) retired++;
    end
  endtask

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (ac=%0d xr=%0d psw=%h code=%0d cycles=%0d)",
                                           what, signed'(ac), signed'(xr), psw, stop_code, cycles); end
  endtask

  initial begin
    foreach (mem[i]) mem[i] = '0;
    // 1. data movement and arithmetic
    run('{load(0, 10'd100), store(1, 10'o200), load(0, 10'd7), sub(1, 10'o200),
          mul(0, 10'd3), div(0, 10'h3FC), stxr(), incxr(10'h3FE), ldxr(), trap(1)}, 0);
    chk(halted && stop_code == 1, "arith: halts with code 1");
    chk(mem[10'o200] == 16'd100, "arith: store direct");
    chk(xr == 16'd67, "arith: XR = 69 - 2");
    chk(ac == 16'd67, "arith: AC <- XR");
    chk(retired == 10, "arith: 10 instructions retired");
    // 9 register/immediate instructions at 3 cycles, one direct sub at 4
    chk(cycles == 9*3 + 4, "arith: cycle count");

    // 2. branches: a wrong decision lands on a trap 5 or at a77 (an
    // illegal word); mem[a100] holds the largest positive word
    mem[10'o100] = 16'h7FFF;
    run('{load(0, 10'd5), comp(0, 10'd5),          // EQ=1 GT=0
          bne(10'o77), beq(10'o15), trap(5),          // a12 bne nt, a13 beq t
          bgt(10'o77),                                // a15 not taken
          ble(10'o20), trap(5),                       // a16 taken to a20
          comp(0, 10'd3),                             // a20: GT=1 EQ=0
          beq(10'o77), bgt(10'o24), trap(5),          // a21 nt, a22 t
          bov(10'o77),                                // a24 OV=0: nt
          load(1, 10'o100), add(0, 10'd1),            // a25, a26: overflow, EN=0
          bov(10'o31), trap(5),                       // a27 taken
          jmp(10'o33), trap(5),                       // a31 taken
          setxr(10'd4), load(0, 10'd4), cmpxr(), bne(10'o77),
          trap(1)}, 0);
    chk(halted && stop_code == 1, "branch: all paths correct");
    chk(psw[PSW_OV] == 1'b1, "branch: OV set, no exception with EN clear");
    chk(psw[PSW_EQ] == 1'b1, "branch: comp XR sets EQ");

    // 3. exceptions
    run('{load(0, 10'd1), 16'h0000}, 0);
    chk(halted && stop_code == 5, "illegal instruction -> 5");
    chk(pc == 10'o12, "illegal instruction: PC past it");
    run('{load(0, 10'd1), ins(3'b010, 3'b001, 10'd0)}, 0);
    chk(halted && stop_code == 6, "illegal mode -> 6");
    run('{store(0, 10'd1)}, 0);
    chk(halted && stop_code == 6, "store immediate -> 6");
    mem[10'o100] = 16'h7FFF;
    run('{load(1, 10'o100), add(0, 10'd1), trap(1)}, 1);
    chk(halted && stop_code == 7 && ac == 16'h8000 && psw[PSW_OV], "overflow with EN -> 7");
    run('{load(0, 10'd9), div(0, 10'd0), trap(1)}, 0);
    chk(halted && stop_code == 8 && ac == 16'd9, "divide by zero -> 8");
    run('{trap(6)}, 0);
    chk(halted && stop_code == 6, "trap 6 acts as exception 6");
    run('{trap(4)}, 0);
    chk(halted && stop_code == 5, "unknown trap 4 -> 5");

    // 4. console: get 'K', add 1, put -> "L"; waits on both directions
    run('{trap(2), add(0, 10'd1), trap(3), trap(1)}, 0);
    chk(halted && stop_code == 1, "console: halts");
    chk(outs == "L", "console: put after get");
    // get: 3 + 4 wait + 1; add 3; put 3 + 3 wait; halt 3; stop 1
    chk(cycles > 4*3 + 1, "console: waited on handshakes");

    // 5. indexed load from an array
    mem[10'o55] = 16'd321;
    run('{setxr(10'd5), load(3, 10'o50), trap(1)}, 0);
    chk(ac == 16'd321, "indexed load mem[a50+5]");
    chk(cycles == 3 + 4 + 3, "indexed: memory operand takes 4 cycles");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
