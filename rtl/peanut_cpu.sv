// peanut_cpu: the PeANUt processor core (controller and registers).
//
// An accumulator machine with the registers of the document: program
// counter PC, current instruction CI, accumulator AC, index register XR
// and program status word PSW (condition codes GT bit 12, EQ bit 11,
// OV bit 10; overflow enable EN bit 9). Each instruction runs through a
// small state machine:
//   FETCH   present PC to memory
//   DECODE  CI <- memory word, PC <- PC + 1
//   EXEC    execute; an accumulator instruction with a direct or indexed
//           operand instead presents the operand address (peanut_agu)
//   OPREAD  execute with the operand word just read
//   GET/PUT wait for the console handshake of trap 2 / trap 3
//   HALT    stopped; stop_code tells why
// So immediate, branch and index-register instructions take 3 cycles,
// memory-operand instructions and stores 4 (store writes in EXEC), and
// get/put 4 or more, depending on the console.
//
// Traps (opcode 110101, trap number in the opspec): 1 halts, 2 reads a
// character from in_data into AC (zero-extended), 3 sends AC[7:0] on
// out_data. The machine raises exceptions itself for an illegal
// instruction (5), an illegal mode (6), an overflow while EN is set (7)
// and a divide by zero (8); a trap with number 5 to 8 has the same
// effect. All of that follows the document. What an exception does
// next is not given there: here the machine stops in HALT with
// stop_code = the exception number, PC pointing past the culprit.
// Trap numbers other than 1-3 and 5-8 are treated as illegal
// instructions. The overflowing result is still written to AC and OV
// set before the stop. Compare sets GT and EQ and leaves OV alone;
// add/sub/mul/div set OV and leave GT and EQ. Load, store and the XR
// instructions leave the PSW alone. EN is loaded from en_init while
// rst_n is low, since no instruction to set it is given. The other
// PSW bits are always 0, so those bits of psw_o are constant.
//
// Console handshakes: in_ready is high in GET and a character is taken
// in the cycle in_valid is also high; out_valid is high in PUT with
// out_data held until out_ready. retire pulses for one cycle as each
// instruction completes (including the one that stops the machine).
// Reset is synchronous and active low; PC starts at start_pc.
module peanut_cpu
  import peanut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  addr_t      start_pc,
  input  logic       en_init,
  // memory port
  output addr_t      mem_addr,
  output logic       mem_we,
  output word_t      mem_wdata,
  input  word_t      mem_rdata,
  // console
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  // status
  output logic       halted,
  output logic [3:0] stop_code,
  output logic       retire,
  output addr_t      pc_o,
  output word_t      ac_o,
  output word_t      xr_o,
  output word_t      psw_o
);
  typedef enum logic [2:0] {S_FETCH, S_DECODE, S_EXEC, S_OPREAD, S_GET, S_PUT, S_HALT} state_t;

  state_t state, state_n;
  addr_t  pc, pc_n;
  word_t  ci, ci_n, ac, ac_n, xr, xr_n, psw, psw_n;
  logic [3:0] code, code_n;
  logic   retire_n;

  // decode of CI
  kind_t      kind;
  alu_op_t    alu_op;
  br_cond_t   br_cond;
  logic [2:0] mode;
  logic [9:0] opspec;
  peanut_decoder u_dec (
    .instr(ci), .kind, .alu_op, .br_cond, .mode, .opspec
  );

  addr_t ea;
  word_t imm;
  logic  use_mem;
  peanut_agu u_agu (.mode, .opspec, .xr, .ea, .imm, .use_mem);

  logic taken;
  peanut_branch u_br (.cond(br_cond), .psw, .taken);

  // The ALU serves accumulator instructions and compare-XR (XR vs AC).
  alu_op_t alu_op_m;
  word_t   alu_a, alu_b, alu_res;
  logic    alu_gt, alu_eq, alu_ov, alu_dz;
  always_comb begin
    if (kind == K_CMPXR) begin
      alu_op_m = ALU_COMP;
      alu_a    = xr;
      alu_b    = ac;
    end else begin
      alu_op_m = alu_op;
      alu_a    = ac;
      alu_b    = (state == S_OPREAD) ? mem_rdata : imm;
    end
  end
  peanut_alu u_alu (
    .op(alu_op_m), .a(alu_a), .b(alu_b), .result(alu_res),
    .gt(alu_gt), .eq(alu_eq), .ov(alu_ov), .div_zero(alu_dz)
  );

  function automatic logic [3:0] trap_action(input logic [9:0] n);
    // returns the stop code for trap numbers that stop the machine
    if (n == TRAP_HALT) return 4'(TRAP_HALT);
    if (n >= EXC_ILL_INSTR && n <= EXC_DIV_ZERO) return 4'(n);
    return 4'(EXC_ILL_INSTR);
  endfunction

  always_comb begin
    state_n  = state;
    pc_n     = pc;
    ci_n     = ci;
    ac_n     = ac;
    xr_n     = xr;
    psw_n    = psw;
    code_n   = code;
    retire_n = 1'b0;
    mem_addr  = pc;
    mem_we    = 1'b0;
    mem_wdata = ac;
    in_ready  = (state == S_GET);
    out_valid = (state == S_PUT);
    out_data  = ac[7:0];

    // completion of an accumulator instruction (shared by EXEC and OPREAD)
    unique case (state)
      S_FETCH: begin
        mem_addr = pc;
        state_n  = S_DECODE;
      end
      S_DECODE: begin
        ci_n    = mem_rdata;
        pc_n    = pc + 1'b1;
        state_n = S_EXEC;
      end
      S_EXEC, S_OPREAD: begin
        state_n  = S_FETCH;
        retire_n = 1'b1;
        if (state == S_EXEC && kind == K_ALU && alu_op == ALU_STORE) begin
          mem_addr = ea;
          mem_we   = 1'b1;
        end else if (state == S_EXEC && kind == K_ALU && use_mem) begin
          mem_addr = ea;
          state_n  = S_OPREAD;
          retire_n = 1'b0;
        end else if (kind == K_ALU) begin
          unique case (alu_op)
            ALU_COMP: begin
              psw_n[PSW_GT] = alu_gt;
              psw_n[PSW_EQ] = alu_eq;
            end
            ALU_LOAD: ac_n = alu_res;
            default: begin   // add, sub, mul, div
              psw_n[PSW_OV] = alu_ov;
              if (alu_dz) begin
                code_n  = 4'(EXC_DIV_ZERO);
                state_n = S_HALT;
              end else begin
                ac_n = alu_res;
                if (alu_ov && psw[PSW_EN]) begin
                  code_n  = 4'(EXC_OVERFLOW);
                  state_n = S_HALT;
                end
              end
            end
          endcase
        end else begin
          unique case (kind)
            K_BRANCH: if (taken) pc_n = addr_t'(opspec);
            K_SETXR:  xr_n = imm;
            K_INCXR:  xr_n = xr + imm;
            K_LDXR:   ac_n = xr;
            K_STXR:   xr_n = ac;
            K_CMPXR: begin
              psw_n[PSW_GT] = alu_gt;
              psw_n[PSW_EQ] = alu_eq;
            end
            K_TRAP: begin
              if (opspec == TRAP_GET) begin
                state_n  = S_GET;
                retire_n = 1'b0;
              end else if (opspec == TRAP_PUT) begin
                state_n  = S_PUT;
                retire_n = 1'b0;
              end else begin
                code_n  = trap_action(opspec);
                state_n = S_HALT;
              end
            end
            K_ILL_MODE: begin
              code_n  = 4'(EXC_ILL_MODE);
              state_n = S_HALT;
            end
            default: begin   // K_ILL_INSTR
              code_n  = 4'(EXC_ILL_INSTR);
              state_n = S_HALT;
            end
          endcase
        end
      end
      S_GET: if (in_valid) begin
        ac_n     = {8'h00, in_data};
        state_n  = S_FETCH;
        retire_n = 1'b1;
      end
      S_PUT: if (out_ready) begin
        state_n  = S_FETCH;
        retire_n = 1'b1;
      end
      default: state_n = S_HALT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_FETCH;
      pc     <= start_pc;
      ci     <= '0;
      ac     <= '0;
      xr     <= '0;
      psw    <= '0;
      psw[PSW_EN] <= en_init;
      code   <= '0;
      retire <= 1'b0;
    end else begin
      state  <= state_n;
      pc     <= pc_n;
      ci     <= ci_n;
      ac     <= ac_n;
      xr     <= xr_n;
      psw    <= psw_n;
      code   <= code_n;
      retire <= retire_n;
    end
  end

  assign halted    = (state == S_HALT);
  assign stop_code = code;
  assign pc_o  = pc;
  assign ac_o  = ac;
  assign xr_o  = xr;
  assign psw_o = psw;

  // Console handshake rules: a character offered stays put until taken,
  // and the machine never waits on both directions at once.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
  a_one_dir: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_ready && out_valid));
endmodule
