// Testbench of the 128x128 multiplier built on one 64x64 multiplier.
// Random and all-ones operands; the product must appear after 5 cycles
// (one to load, four multiply steps).
module tb_mul128_seq;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         start, done;
  logic [127:0] x, y;
  logic [255:0] p;

  mul128_seq dut (.clk, .rst_n, .start, .x, .y, .done, .p);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] a, input logic [127:0] b);
    int n;
    @(negedge clk); start = 1; x = a; y = b;
    @(negedge clk); start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks += 2;
    if (p !== 256'(a) * 256'(b)) begin failures++; $display("FAIL %h * %h", a, b); end
    if (n != 5) begin failures++; $display("FAIL latency %0d", n); end
  endtask

  initial begin
    start = 0; x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('1, '1); run('0, '1); run(128'd1, '1);
    for (int t = 0; t < 500; t++)
      run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
