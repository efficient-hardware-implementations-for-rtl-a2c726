// Testbench of the digit-serial modular adder/subtractor, W = 16 and W = 112.
// Random and corner-case operands (0, 1, p-1) are added and subtracted and
// compared with the reference; the latency must be 448/W + 1 cycles.
module tb_fp_addsub_serial;
  import c448_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, op_sub;
  logic [447:0]  a, b;
  logic          done16, done112;
  logic [447:0]  c16, c112;

  fp_addsub_serial #(.W(16))  dut16  (.clk, .rst_n, .start, .op_sub, .a, .b, .done(done16),  .c(c16));
  fp_addsub_serial #(.W(112)) dut112 (.clk, .rst_n, .start, .op_sub, .a, .b, .done(done112), .c(c112));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic sub, input logic [447:0] x, input logic [447:0] y);
    logic [447:0] exp;
    int n16, n112, n;
    exp = sub ? fsub(x, y) : fadd(x, y);
    @(negedge clk); start = 1; op_sub = sub; a = x; b = y;
    @(negedge clk); start = 0;
    n = 1; n16 = -1; n112 = -1;
    while (n16 < 0 || n112 < 0) begin
      if (done16  && n16  < 0) begin n16  = n; checks++; if (c16  !== exp) begin failures++; $display("FAIL W16 sub=%0d", sub); end end
      if (done112 && n112 < 0) begin n112 = n; checks++; if (c112 !== exp) begin failures++; $display("FAIL W112 sub=%0d", sub); end end
      @(negedge clk); n++;
    end
    checks += 2;
    if (n16 != 29) begin failures++; $display("FAIL latency16 %0d", n16); end
    if (n112 != 5) begin failures++; $display("FAIL latency112 %0d", n112); end
  endtask

  initial begin
    logic [447:0] corner [4];
    start = 0; op_sub = 0; a = '0; b = '0;
    corner[0] = '0; corner[1] = 448'd1; corner[2] = P - 448'd1; corner[3] = P - 448'd2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        run(0, corner[i], corner[j]);
        run(1, corner[i], corner[j]);
      end
    for (int t = 0; t < 300; t++) begin
      run(0, randfe(), randfe());
      run(1, randfe(), randfe());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
