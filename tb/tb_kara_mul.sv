// Testbench of the recursive Karatsuba multiplier (225 bits, four levels).
// A new random operand pair is applied every cycle; each product must
// appear after the next clock edge, so the tree is checked at full throughput.
module tb_kara_mul;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [224:0] a, b, pa, pb;
  logic [449:0] p;

  kara_mul dut (.clk, .a, .b, .p);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [224:0] r225();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v[224:0];
  endfunction

  initial begin
    a = '1; b = '1;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      a = (t % 7 == 3) ? '1 : r225();
      b = (t % 5 == 2) ? '1 : r225();
      pa = a; pb = b;
      @(negedge clk);
      checks++;
      if (p !== 450'(pa) * 450'(pb)) begin failures++; $display("FAIL %h * %h", pa, pb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
