// Testbench of the program ROM.
// Interprets the ROM lines on a model register file of 16 slots with the
// reference field operations and compares the result with the
// add-and-double formulas of the Montgomery ladder written out directly:
// the initialisation line, the 18-line step (for random points) and the
// inversion and conversion lines.
module tb_c448_prog_rom;
  import c448_pkg::*;
  import c448_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] addr;
  instr_t     instr;
  logic [447:0] rf [16];

  c448_prog_rom dut (.addr, .instr);

  task automatic exec(input int line);
    addr = 5'(line);
    #1;
    unique case (instr.op)
      OP_ADD:  rf[instr.dst] = fadd(rf[instr.srca], rf[instr.srcb]);
      OP_SUB:  rf[instr.dst] = fsub(rf[instr.srca], rf[instr.srcb]);
      default: rf[instr.dst] = fmul(rf[instr.srca], rf[instr.srcb]);
    endcase
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [447:0] x1, x2, z2, x3, z3, aa, bb, e, da, cb, inv;
    for (int t = 0; t < 50; t++) begin
      for (int s = 0; s < 16; s++) rf[s] = randfe();
      rf[S_A24] = 448'd39081; rf[S_ZERO] = '0;
      x1 = rf[S_X1]; x2 = rf[S_X2]; z2 = rf[S_Z2]; x3 = rf[S_X3]; z3 = rf[S_Z3];
      // line 0: X3 = X1 * Z3
      exec(0);
      checks++;
      if (rf[S_X3] !== fmul(x1, z3)) begin failures++; $display("FAIL init"); end
      x3 = rf[S_X3];
      for (int l = 1; l <= 18; l++) exec(l);
      aa = fmul(fadd(x2, z2), fadd(x2, z2));
      bb = fmul(fsub(x2, z2), fsub(x2, z2));
      e  = fsub(aa, bb);
      da = fmul(fsub(x3, z3), fadd(x2, z2));
      cb = fmul(fadd(x3, z3), fsub(x2, z2));
      checks += 4;
      if (rf[S_X2] !== fmul(aa, bb)) begin failures++; $display("FAIL X2"); end
      if (rf[S_Z2] !== fmul(e, fadd(aa, fmul(448'd39081, e)))) begin failures++; $display("FAIL Z2"); end
      if (rf[S_X3] !== fmul(fadd(da, cb), fadd(da, cb))) begin failures++; $display("FAIL X3"); end
      if (rf[S_Z3] !== fmul(x1, fmul(fsub(da, cb), fsub(da, cb)))) begin failures++; $display("FAIL Z3"); end
      // inversion lines driven by the fixed exponent p-2, then X2/Z2
      if (t < 3) begin
        logic [447:0] ex;
        ex = P - 448'd2;
        exec(19);
        for (int i = 446; i >= 0; i--) begin
          exec(20);
          if (ex[i]) exec(21);
        end
        exec(22);
        inv = finv(rf[S_Z2]);
        checks += 2;
        if (rf[S_T0] !== inv) begin failures++; $display("FAIL inverse"); end
        if (rf[S_T1] !== fmul(rf[S_X2], inv)) begin failures++; $display("FAIL affine"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
