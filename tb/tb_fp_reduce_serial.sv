// Testbench of the digit-serial reducer, W = 16 and W = 112.
// Products of random field elements, random 896-bit words and all-ones
// words (which force the extra carry-fold pass) are reduced and compared
// with x mod p. Latency: 4*448/W + 1 cycles whatever the data.
module tb_fp_reduce_serial;
  import c448_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, carry_passes = 0;

  logic          start;
  logic [895:0]  x;
  logic          done16, done112;
  logic [447:0]  r16, r112;

  fp_reduce_serial #(.W(16))  dut16  (.clk, .rst_n, .start, .x, .done(done16),  .r(r16));
  fp_reduce_serial #(.W(112)) dut112 (.clk, .rst_n, .start, .x, .done(done112), .r(r112));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count carry passes that fold a non-zero carry
  always @(posedge clk) if (dut16.st == 2'd2 && dut16.cnt == 0 && dut16.k != 0) carry_passes++;

  task automatic run(input logic [895:0] v);
    logic [447:0] exp;
    int n16, n112, n;
    exp = 448'(v % 896'(P));
    @(negedge clk); start = 1; x = v;
    @(negedge clk); start = 0;
    n = 1; n16 = -1; n112 = -1;
    while (n16 < 0 || n112 < 0) begin
      if (done16  && n16  < 0) begin n16  = n; checks++; if (r16  !== exp) begin failures++; $display("FAIL W16 %h", v); end end
      if (done112 && n112 < 0) begin n112 = n; checks++; if (r112 !== exp) begin failures++; $display("FAIL W112 %h", v); end end
      @(negedge clk); n++;
    end
    checks++;
    if (n16 != 113 || n112 != 17) begin failures++; $display("FAIL latency16 %0d", n16); end
  endtask

  initial begin
    start = 0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0);
    run(896'(P));
    run(896'(P) - 1);
    run({896{1'b1}});
    run({448'd0, {448{1'b1}}});
    run({{447{1'b1}}, 449'd0});
    for (int t = 0; t < 300; t++) begin
      logic [447:0] a, b;
      a = randfe(); b = randfe();
      run(896'(a) * 896'(b));
      run({rand448(), rand448()});
    end
    checks++;
    if (carry_passes == 0) begin failures++; $display("FAIL carry pass never taken"); end
    $display("carry passes: %0d", carry_passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
