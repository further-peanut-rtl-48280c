// peanut_mem: PeANUt main memory.
//
// DEPTH words of WIDTH bits (default 1024 x 16: every address a 10-bit
// opspec can name). Two synchronous ports on one array:
//   port A, the processor's: read data appears on a_rdata the cycle
//     after a_addr is presented; a_we writes a_wdata at the clock edge.
//   port B, the host's: loads a program before the processor is let out
//     of reset (b_we) and reads memory back (b_rdata, one cycle later).
// If both ports write one address in the same cycle port A wins.
// The document shows memory only as a column of addressed words; the
// ports, the synchronous timing and the host port are this design's.
module peanut_mem #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    a_addr,
  input  logic             a_we,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic [AW-1:0]    b_addr,
  input  logic             b_we,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
