// tb_peanut_mem: test of the two-port main memory at its full
// 1024 x 16 size.
//
// Fills every word through the host port, reads all back through the
// processor port, then mixes random writes and reads on both ports
// against a reference array, checking the one-cycle read latency.
module tb_peanut_mem;
  logic        clk = 0;
  logic [9:0]  a_addr, b_addr;
  logic        a_we, b_we;
  logic [15:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [15:0] model [1024];
  int checks = 0, failures = 0;

  peanut_mem dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata,
                  .b_addr, .b_we, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      b_we = 1; b_addr = 10'(i); b_wdata = 16'(i * 37 + 11);
      model[i] = 16'(i * 37 + 11);
    end
    @(negedge clk); b_we = 0;
    for (int i = 0; i < 1024; i++) begin
      a_addr = 10'(i);
      @(negedge clk);
      checks++;
      if (a_rdata !== model[i]) begin failures++; $display("FAIL fill read %0d", i); end
    end
    repeat (3000) begin
      logic [9:0] ra, rb;
      ra = 10'($urandom); rb = 10'($urandom);
      a_addr = ra; b_addr = rb;
      a_we = $urandom_range(1) == 1; b_we = ($urandom_range(1) == 1) && (ra != rb);
      a_wdata = 16'($urandom); b_wdata = 16'($urandom);
      @(negedge clk);
      checks += 2;
      if (a_rdata !== model[ra]) begin failures++; $display("FAIL a read %0d", ra); end
      if (b_rdata !== model[rb]) begin failures++; $display("FAIL b read %0d", rb); end
      if (a_we) model[ra] = a_wdata;
      if (b_we) model[rb] = b_wdata;
      a_we = 0; b_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
