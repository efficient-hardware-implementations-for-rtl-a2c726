// Design III modular adder/subtractor: one 224-bit adder used four times.
//
// The operands are held in half registers a1/a0 and b1/b0. One 224-bit
// adder computes x + (y or ~y) + cin, where cin is chosen from 1, 0 or the
// stored carry c, so it can add, subtract or chain into a high half:
//   phase 1: r0 = a0 +/- b0             (cin = 1 for a subtraction)
//   phase 2: r1 = a1 +/- b1 + c         (carry out kept as k)
//   phase 3: t0 = r0 -/+ p0             (correction by p, low half)
//   phase 4: t1 = r1 -/+ p1 + c         (high half, carry out co)
// For an addition t = r - p is taken when r >= p (k | co); for a
// subtraction t = r + p is taken when r borrowed (~k). All four phases run
// for every operation, so the latency does not depend on the data.
//
// Interface: pulse start with op_sub, a, b in [0, p); the operands are
// captured at start and c is valid when done pulses, 5 cycles after start.
// The half registers, the 224-bit +/- unit, its carry register and the
// 1/0/c carry-in selection follow the document's Design III adder figure;
// the order of the four phases and the correction step are this design's
// own reading of it.
module d3_modadd
  import c448_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          op_sub,
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  output logic          done,
  output logic [FW-1:0] c
);
  localparam int unsigned HF = FW / 2;

  typedef enum logic [1:0] {CI_ZERO, CI_ONE, CI_C} cin_e;

  logic [HF-1:0] a0, a1, b0, b1;      // operand half registers
  logic [HF-1:0] r0, r1, t0;          // sum halves and low corrected half
  logic          sub, cy, k;          // operation, carry register, sum carry
  logic [2:0]    ph;                  // 0 idle, 1..4 active

  // Shared 224-bit adder and its operand selection
  logic [HF-1:0] x, y;
  logic          inv;
  cin_e          cisel;
  logic          cin;
  logic [HF:0]   sum;

  always_comb begin
    x = a0; y = b0; inv = sub; cisel = sub ? CI_ONE : CI_ZERO;
    unique case (ph)
      3'd2:    begin x = a1; y = b1;            inv = sub;  cisel = CI_C; end
      3'd3:    begin x = r0; y = P448[HF-1:0];  inv = ~sub; cisel = sub ? CI_ZERO : CI_ONE; end
      3'd4:    begin x = r1; y = P448[FW-1:HF]; inv = ~sub; cisel = CI_C; end
      default: ;
    endcase
    unique case (cisel)
      CI_ONE:  cin = 1'b1;
      CI_C:    cin = cy;
      default: cin = 1'b0;
    endcase
    sum = {1'b0, x} + {1'b0, inv ? ~y : y} + (HF + 1)'(cin);
  end

  // use_t at phase 4: addition keeps r - p when r >= p; subtraction keeps
  // r + p when r borrowed.
  logic use_t;
  assign use_t = sub ? ~k : (k | sum[HF]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a0 <= '0; a1 <= '0; b0 <= '0; b1 <= '0;
      r0 <= '0; r1 <= '0; t0 <= '0;
      sub <= 1'b0; cy <= 1'b0; k <= 1'b0; ph <= '0;
      done <= 1'b0; c <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a0 <= a[HF-1:0]; a1 <= a[FW-1:HF];
        b0 <= b[HF-1:0]; b1 <= b[FW-1:HF];
        sub <= op_sub; ph <= 3'd1;
      end else if (ph != 3'd0) begin
        cy <= sum[HF];
        unique case (ph)
          3'd1: r0 <= sum[HF-1:0];
          3'd2: begin r1 <= sum[HF-1:0]; k <= sum[HF]; end
          3'd3: t0 <= sum[HF-1:0];
          default: begin
            c    <= use_t ? {sum[HF-1:0], t0} : {r1, r0};
            done <= 1'b1;
          end
        endcase
        ph <= (ph == 3'd4) ? 3'd0 : ph + 3'd1;
      end
    end
  end
endmodule
