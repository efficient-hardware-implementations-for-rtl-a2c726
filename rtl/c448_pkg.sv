// Shared types and constants for the Curve448 point-multiplication cores.
//
// Field: p = 2^448 - 2^224 - 1 (Goldilocks prime). Field elements are kept
// fully reduced, in [0, p). All three cores run the same macro-instruction
// set: a field addition, subtraction or multiplication whose operands and
// result live in one of 16 RAM slots. The slot map, the instruction word
// and the ladder constant a24 = 39081 are defined here.
package c448_pkg;

  localparam int unsigned FW = 448;               // field element width
  localparam logic [FW-1:0] P448 = {{223{1'b1}}, 1'b0, {224{1'b1}}};
  localparam logic [FW-1:0] A24 = FW'(39081);     // (A-2)/4 for A = 156326

  // Field operations executed by a field arithmetic unit.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } fop_e;

  // RAM slots (logical). Slots 1..4 hold the two ladder points and are
  // remapped by the controller according to the current scalar bit.
  typedef enum logic [3:0] {
    S_X1   = 4'd0,   // affine u-coordinate of the base point
    S_X2   = 4'd1,
    S_Z2   = 4'd2,
    S_X3   = 4'd3,
    S_Z3   = 4'd4,
    S_A24  = 4'd5,
    S_ZERO = 4'd6,
    S_T0   = 4'd7,
    S_T1   = 4'd8,
    S_T2   = 4'd9,
    S_T3   = 4'd10,
    S_T4   = 4'd11,
    S_T5   = 4'd12,
    S_T6   = 4'd13,
    S_T7   = 4'd14,
    S_T8   = 4'd15
  } slot_e;

  localparam int unsigned NSLOTS = 16;

  // One program ROM line: dst <= srcA (op) srcB.
  typedef struct packed {
    fop_e  op;
    slot_e dst;
    slot_e srca;
    slot_e srcb;
  } instr_t;

  // Program ROM layout (entry points used by the controller).
  localparam int unsigned PC_INIT     = 0;   // X3 <- X1 * Z3 (point randomisation)
  localparam int unsigned PC_STEP     = 1;   // first line of a ladder step
  localparam int unsigned STEP_LEN    = 18;  // lines per ladder step
  localparam int unsigned PC_INV      = 19;  // T0 <- Z2 + 0
  localparam int unsigned PC_SQR      = 20;  // T0 <- T0 * T0
  localparam int unsigned PC_MULZ     = 21;  // T0 <- T0 * Z2
  localparam int unsigned PC_FINAL    = 22;  // T1 <- X2 * T0
  localparam int unsigned PROG_LINES  = 23;

  // Fermat inversion exponent p - 2.
  localparam logic [FW-1:0] INV_EXP = P448 - FW'(2);

endpackage
