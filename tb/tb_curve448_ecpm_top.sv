// End-to-end testbench of the three Curve448 cores at full size
// (448-bit scalars, all parameters at their defaults).
// Two point multiplications run on all three cores in parallel:
//   run 0: clamped random scalar, random base point, no randomisation
//   run 1: random scalar, random base point, random lambda (point
//          randomisation), so the projective intermediates differ
// Each result is compared with the reference X448 ladder, both runs of a
// core must take equal time, and the mechanisms of the design are counted:
// swapped and unswapped ladder steps, additions, subtractions and
// multiplications, inversion multiply lines, randomised start points,
// non-zero carries left by Design I's interleaved reduction and non-zero
// carry folds in Design II's reducer. Each must occur.
module tb_curve448_ecpm_top;
  import c448_pkg::*;
  import c448_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]   start, busy, done;
  logic [447:0] k [3];
  logic [447:0] u [3], lambda [3], x_out [3];

  curve448_ecpm_top dut (.clk, .rst_n, .start, .k, .u, .lambda, .busy, .done, .x_out);

  // mechanism counters, per core
  int n_swap [3], n_noswap [3], n_add [3], n_sub [3], n_mul [3], n_mulz [3], n_rand [3];
  int n_fold1 = 0, n_fold2 = 0;
  always @(posedge clk) begin
    if (dut.g_core[0].u_core.fau_start) count(0, dut.g_core[0].u_core.rom_addr, dut.g_core[0].u_core.fau_op, dut.g_core[0].u_core.u_ctrl.swap);
    if (dut.g_core[1].u_core.fau_start) count(1, dut.g_core[1].u_core.rom_addr, dut.g_core[1].u_core.fau_op, dut.g_core[1].u_core.u_ctrl.swap);
    if (dut.g_core[2].u_core.fau_start) count(2, dut.g_core[2].u_core.rom_addr, dut.g_core[2].u_core.fau_op, dut.g_core[2].u_core.u_ctrl.swap);
    if (dut.g_core[0].u_core.g_d1.u_mul.red_start
        && dut.g_core[0].u_core.g_d1.u_mul.red_x[895:448] != 0) n_fold1++;
    if (dut.g_core[1].u_core.g_d2.u_mul.u_red.st == 2'd2 && dut.g_core[1].u_core.g_d2.u_mul.u_red.cnt == 0
        && dut.g_core[1].u_core.g_d2.u_mul.u_red.k != 0) n_fold2++;
  end

  function automatic void count(input int d, input logic [4:0] pc, input fop_e op, input logic sw);
    if (pc == 5'd1) begin if (sw) n_swap[d]++; else n_noswap[d]++; end
    if (pc == 5'd0 && lambda[d] != 448'd1) n_rand[d]++;
    if (pc == 5'd21) n_mulz[d]++;
    unique case (op)
      OP_ADD:  n_add[d]++;
      OP_SUB:  n_sub[d]++;
      default: n_mul[d]++;
    endcase
  endfunction

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_nz(input string what, input int v);
    checks++;
    if (v == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    int cyc [3], cyc0 [3];
    logic [2:0] got;
    logic [447:0] kk, uu, ll, exp;
    start = '0;
    for (int d = 0; d < 3; d++) begin
      k[d] = '0; u[d] = '0; lambda[d] = '0;
      n_swap[d] = 0; n_noswap[d] = 0; n_add[d] = 0; n_sub[d] = 0; n_mul[d] = 0; n_mulz[d] = 0; n_rand[d] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      kk = rand448();
      if (t == 0) begin kk[1:0] = 2'b00; kk[447] = 1'b1; end
      uu = randfe();
      ll = (t == 1) ? (randfe() | 448'd1) : 448'd1;
      exp = x448(kk, uu, 448);
      @(negedge clk);
      for (int d = 0; d < 3; d++) begin k[d] = kk; u[d] = uu; lambda[d] = ll; end
      start = '1;
      @(negedge clk); start = '0;
      got = '0; cyc = '{0, 0, 0};
      while (got != 3'b111) begin
        for (int d = 0; d < 3; d++) if (!got[d]) begin
          cyc[d]++;
          if (done[d]) begin
            got[d] = 1'b1;
            checks++;
            if (x_out[d] !== exp) begin failures++; $display("FAIL design %0d run %0d: %h, expected %h", d + 1, t, x_out[d], exp); end
          end
        end
        @(negedge clk);
      end
      if (t == 0) cyc0 = cyc;
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (cyc[d] != cyc0[d]) begin failures++; $display("FAIL design %0d run time %0d vs %0d", d + 1, cyc[d], cyc0[d]); end
      end
      $display("run %0d cycles: Design I %0d, Design II %0d, Design III %0d", t, cyc[0], cyc[1], cyc[2]);
    end
    for (int d = 0; d < 3; d++) begin
      $display("design %0d: steps swapped %0d unswapped %0d, add %0d sub %0d mul %0d, inversion multiplies %0d, randomised starts %0d",
               d + 1, n_swap[d], n_noswap[d], n_add[d], n_sub[d], n_mul[d], n_mulz[d], n_rand[d]);
      expect_nz("swapped ladder step", n_swap[d]);
      expect_nz("unswapped ladder step", n_noswap[d]);
      expect_nz("addition", n_add[d]);
      expect_nz("subtraction", n_sub[d]);
      expect_nz("multiplication", n_mul[d]);
      expect_nz("inversion multiply", n_mulz[d]);
      expect_nz("point randomisation", n_rand[d]);
    end
    $display("non-zero carries: Design I after interleaved reduction %0d, Design II carry folds %0d", n_fold1, n_fold2);
    expect_nz("carry after interleaved reduction (Design I)", n_fold1);
    expect_nz("carry fold (Design II)", n_fold2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
