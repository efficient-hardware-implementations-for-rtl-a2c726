// Program ROM of a Curve448 point-multiplication core.
//
// Each line is one field operation dst <= srca (op) srcb on logical RAM
// slots (see c448_pkg). Lines 1..18 are one Montgomery-ladder step with
// ten multiplications and eight additions/subtractions, in the order of
// the differential add-and-double formulas:
//   A=X2+Z2  B=X2-Z2  C=X3+Z3  D=X3-Z3  AA=A^2  BB=B^2  DA=D*A  CB=C*B
//   X2=AA*BB  E=AA-BB  Z2=E*(AA+a24*E)  X3=(DA+CB)^2  Z3=X1*(DA-CB)^2
// Line 0 randomises the projective start point, lines 19..22 are the
// building blocks of the Fermat inversion and the final affine conversion;
// the controller loops over them. The ROM is combinational (one read port).
// The line set and its order are this design's own; only the formulas and
// the constant a24 come from the ladder definition.
module c448_prog_rom
  import c448_pkg::*;
(
  input  logic [4:0] addr,
  output instr_t     instr
);
  always_comb begin
    unique case (addr)
      5'd0:  instr = '{OP_MUL, S_X3, S_X1, S_Z3};   // X3 = u * lambda
      // ladder step
      5'd1:  instr = '{OP_ADD, S_T0, S_X2, S_Z2};   // A
      5'd2:  instr = '{OP_SUB, S_T1, S_X2, S_Z2};   // B
      5'd3:  instr = '{OP_ADD, S_T2, S_X3, S_Z3};   // C
      5'd4:  instr = '{OP_SUB, S_T3, S_X3, S_Z3};   // D
      5'd5:  instr = '{OP_MUL, S_T4, S_T0, S_T0};   // AA
      5'd6:  instr = '{OP_MUL, S_T5, S_T1, S_T1};   // BB
      5'd7:  instr = '{OP_MUL, S_T6, S_T3, S_T0};   // DA
      5'd8:  instr = '{OP_MUL, S_T7, S_T2, S_T1};   // CB
      5'd9:  instr = '{OP_MUL, S_X2, S_T4, S_T5};   // X2 = AA*BB
      5'd10: instr = '{OP_SUB, S_T8, S_T4, S_T5};   // E
      5'd11: instr = '{OP_MUL, S_T0, S_A24, S_T8};  // a24*E
      5'd12: instr = '{OP_ADD, S_T0, S_T4, S_T0};   // AA + a24*E
      5'd13: instr = '{OP_MUL, S_Z2, S_T8, S_T0};   // Z2
      5'd14: instr = '{OP_ADD, S_T0, S_T6, S_T7};   // DA+CB
      5'd15: instr = '{OP_MUL, S_X3, S_T0, S_T0};   // X3
      5'd16: instr = '{OP_SUB, S_T1, S_T6, S_T7};   // DA-CB
      5'd17: instr = '{OP_MUL, S_T1, S_T1, S_T1};   // (DA-CB)^2
      5'd18: instr = '{OP_MUL, S_Z3, S_X1, S_T1};   // Z3
      // inversion Z2^(p-2) and affine result
      5'd19: instr = '{OP_ADD, S_T0, S_Z2, S_ZERO}; // T0 = Z2
      5'd20: instr = '{OP_MUL, S_T0, S_T0, S_T0};   // square
      5'd21: instr = '{OP_MUL, S_T0, S_T0, S_Z2};   // multiply
      5'd22: instr = '{OP_MUL, S_T1, S_X2, S_T0};   // x = X2 / Z2
      default: instr = '{OP_ADD, S_T8, S_ZERO, S_ZERO};
    endcase
  end
endmodule
