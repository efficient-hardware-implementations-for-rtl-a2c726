// Testbench of the Design III modular adder/subtractor (224-bit adder
// used in four phases). Corner cases (0, 1, p-1, 2^224, and values that
// carry or borrow across the half boundary) and random operands are
// compared with the reference arithmetic; done must pulse exactly LAT = 5
// cycles after start, for every operand.
module tb_d3_modadd;
  import c448_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         start, op_sub, done;
  logic [447:0] a, b, c;

  d3_modadd dut (.clk, .rst_n, .start, .op_sub, .a, .b, .done, .c);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LAT = 5;
  int n;

  task automatic run(input logic sub, input logic [447:0] x, input logic [447:0] y);
    @(negedge clk); start = 1; op_sub = sub; a = x; b = y;
    @(negedge clk); start = 0;
    n = 1;
    while (!done && n < 50) begin @(negedge clk); n++; end
    checks += 2;
    if (n != LAT) begin failures++; $display("FAIL latency %0d", n); end
    if (c !== (sub ? fsub(x, y) : fadd(x, y))) begin failures++; $display("FAIL sub=%0d", sub); end
  endtask

  initial begin
    logic [447:0] corner [6];
    start = 0; op_sub = 0; a = '0; b = '0;
    corner[0] = '0; corner[1] = 448'd1; corner[2] = P - 448'd1; corner[3] = 448'd1 << 224;
    corner[4] = (448'd1 << 224) - 448'd1; corner[5] = P - (448'd1 << 224);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) begin run(0, corner[i], corner[j]); run(1, corner[i], corner[j]); end
    for (int t = 0; t < 1000; t++) begin run(0, randfe(), randfe()); run(1, randfe(), randfe()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
