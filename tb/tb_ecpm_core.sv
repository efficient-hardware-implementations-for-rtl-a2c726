// Testbench of the point-multiplication core in its three variants:
// Design I with an 8-bit scalar, Design II with 16 bits and Design III
// with 32 bits (short scalars keep the run short; the inversion is always
// the full one). Results are compared with the reference X448 ladder, with
// and without point randomisation, and every run of a core must take the
// same number of cycles whatever the scalar.
module tb_ecpm_core;
  import c448_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]   start, busy, done;
  logic [31:0]  k;
  logic [447:0] u, lambda;
  logic [447:0] x1, x2, x3;

  ecpm_core #(.DESIGN(1), .KBITS(8))  c1 (.clk, .rst_n, .start(start[0]), .k(k[7:0]),  .u, .lambda,
                                          .busy(busy[0]), .done(done[0]), .x_out(x1));
  ecpm_core #(.DESIGN(2), .KBITS(16)) c2 (.clk, .rst_n, .start(start[1]), .k(k[15:0]), .u, .lambda,
                                          .busy(busy[1]), .done(done[1]), .x_out(x2));
  ecpm_core #(.DESIGN(3), .KBITS(32)) c3 (.clk, .rst_n, .start(start[2]), .k(k),       .u, .lambda,
                                          .busy(busy[2]), .done(done[2]), .x_out(x3));

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc [3], cyc0 [3];
    logic [2:0] got;
    start = '0; k = '0; u = '0; lambda = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      k = (t == 0) ? 32'hffffffff : $urandom;
      u = randfe();
      lambda = (t == 1) ? randfe() | 448'd1 : 448'd1;
      start = '1;
      @(negedge clk); start = '0;
      got = '0; cyc = '{0, 0, 0};
      while (got != 3'b111) begin
        for (int d = 0; d < 3; d++) if (!got[d]) begin
          cyc[d]++;
          if (done[d]) got[d] = 1'b1;
        end
        @(negedge clk);
      end
      checks += 6;
      if (x1 !== x448(448'(k[7:0]), u, 8))   begin failures++; $display("FAIL D1 run %0d", t); end
      if (x2 !== x448(448'(k[15:0]), u, 16)) begin failures++; $display("FAIL D2 run %0d", t); end
      if (x3 !== x448(448'(k), u, 32))       begin failures++; $display("FAIL D3 run %0d", t); end
      if (t == 0) cyc0 = cyc;
      for (int d = 0; d < 3; d++)
        if (cyc[d] != cyc0[d]) begin failures++; $display("FAIL D%0d run time %0d vs %0d", d + 1, cyc[d], cyc0[d]); end
      $display("run %0d cycles: D1 %0d, D2 %0d, D3 %0d", t, cyc[0], cyc[1], cyc[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
