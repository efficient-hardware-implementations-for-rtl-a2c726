// Testbench of the dual-port RAM (16-bit words, 448 deep).
// Fills the RAM through port A with an address-dependent pattern, then
// reads it through both ports at different addresses; read data must
// appear one cycle after the address. Also checks that a write-and-read of
// the same address returns the old word.
module tb_dp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        a_we;
  logic [8:0]  a_addr, b_addr;
  logic [15:0] a_wdata, a_rdata, b_rdata;

  dp_ram dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_addr, .b_rdata);

  function automatic logic [15:0] pat(input int i, input int s);
    return 16'((i * 40503 + s * 977) ^ (i << 7));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0;
    for (int i = 0; i < 448; i++) begin
      @(negedge clk); a_we = 1; a_addr = 9'(i); a_wdata = pat(i, 1);
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 448; i++) begin
      a_addr = 9'(i); b_addr = 9'(447 - i);
      @(negedge clk);
      checks += 2;
      if (a_rdata !== pat(i, 1))       begin failures++; $display("FAIL A %0d", i); end
      if (b_rdata !== pat(447 - i, 1)) begin failures++; $display("FAIL B %0d", i); end
    end
    // overwrite with a second pattern, reading the old word on port A
    for (int i = 0; i < 448; i++) begin
      a_we = 1; a_addr = 9'(i); a_wdata = pat(i, 2); b_addr = 9'(i);
      @(negedge clk);
      checks += 2;
      if (a_rdata !== pat(i, 1)) begin failures++; $display("FAIL old A %0d", i); end
      if (b_rdata !== pat(i, 1)) begin failures++; $display("FAIL old B %0d", i); end
    end
    a_we = 0;
    for (int i = 0; i < 448; i++) begin
      b_addr = 9'(i); @(negedge clk);
      checks++;
      if (b_rdata !== pat(i, 2)) begin failures++; $display("FAIL new %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
