// peanut_top: the PeANUt machine, processor core plus main memory.
//
// peanut_cpu runs programs out of peanut_mem (1024 words of 16 bits).
// A host loads the program and its data through the load port while
// rst_n is low, then releases reset; the processor starts at start_pc
// (the START address of a program listing) and runs until a halt trap
// or an exception, when halted rises and stop_code gives the trap or
// exception number. The host port can also read memory back (rdata one
// cycle after load_addr). Console characters (trap 2 get, trap 3 put)
// travel on valid/ready handshakes: a keyboard drives in_valid/in_data,
// a display takes out_valid/out_data. The keyboard and display
// themselves are outside this design. The partition into core, memory
// and host port is this design's choice.
module peanut_top
  import peanut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  addr_t      start_pc,
  input  logic       en_init,
  // host load / read-back port
  input  logic       load_we,
  input  addr_t      load_addr,
  input  word_t      load_data,
  output word_t      load_rdata,
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
  output addr_t      pc,
  output word_t      ac,
  output word_t      xr,
  output word_t      psw
);
  addr_t mem_addr;
  logic  mem_we;
  word_t mem_wdata, mem_rdata;

  peanut_cpu u_cpu (
    .clk, .rst_n, .start_pc, .en_init,
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .halted, .stop_code, .retire,
    .pc_o(pc), .ac_o(ac), .xr_o(xr), .psw_o(psw)
  );

  peanut_mem #(.WIDTH(WORD_W), .DEPTH(MEM_WORDS)) u_mem (
    .clk,
    .a_addr(mem_addr), .a_we(mem_we), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .b_addr(load_addr), .b_we(load_we), .b_wdata(load_data), .b_rdata(load_rdata)
  );
endmodule
