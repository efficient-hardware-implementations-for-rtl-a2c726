// Testbench of the Design III five-level Karatsuba multiplier.
// Random and corner-case operands are multiplied and compared with
// a*b mod p from the reference; every multiplication must take LAT cycles.
module tb_d3_modmul;
  import c448_ref_pkg::*;
  localparam int LAT = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, done;
  logic [447:0]  a, b, c;

  d3_modmul dut (.clk, .rst_n, .start, .a, .b, .done, .c);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [447:0] x, input logic [447:0] y);
    logic [447:0] exp;
    int n;
    exp = fmul(x, y);
    @(negedge clk); start = 1; a = x; b = y;
    @(negedge clk); start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks += 2;
    if (c !== exp) begin failures++; $display("FAIL %h * %h = %h, expected %h", x, y, c, exp); end
    if (n != LAT) begin failures++; $display("FAIL latency %0d", n); end
  endtask

  initial begin
    logic [447:0] corner [5];
    start = 0; a = '0; b = '0;
    corner[0] = '0; corner[1] = 448'd1; corner[2] = P - 448'd1;
    corner[3] = {448{1'b1}} >> 224; corner[4] = P - (448'd1 << 224);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) run(corner[i], corner[j]);
    for (int t = 0; t < 300; t++) run(randfe(), randfe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
