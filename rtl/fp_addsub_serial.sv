// Digit-serial modular adder/subtractor for p = 2^448 - 2^224 - 1.
//
// Used with W = 16 (Design I, 28 digits) and W = 112 (Design II, 4 chunks).
// The operands are shifted through a W-bit adder one digit per cycle, least
// significant digit first, with the carry (or borrow) kept in a flip-flop
// for the next digit. A second W-bit chain works on the digit just produced
// and forms the corrected value in the same pass: (a+b)-p for an addition,
// (a-b)+p for a subtraction. After the last digit the final carry/borrow of
// both chains selects the result in [0, p), so no second pass is needed.
//
// Interface: pulse start with op_sub, a and b (both in [0, p)); c is valid
// and done pulses for one cycle NW + 1 cycles later (NW = 448/W): one
// cycle to load the operands, one per digit.
// Carry propagation digit by digit follows the document; computing the
// corrected value in a parallel chain is this design's choice.
module fp_addsub_serial
  import c448_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          op_sub,
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  output logic          done,
  output logic [FW-1:0] c
);
  localparam int unsigned NW = FW / W;
  localparam int unsigned CW = $clog2(NW + 1);

  logic [FW-1:0] ra, rb, rp, rs, rt;
  logic          sub_q, busy, cy1, cy2;
  logic [CW-1:0] cnt;

  // one digit of both chains
  logic [W:0]   d1, d2;
  logic [W-1:0] pd;
  always_comb begin
    pd = rp[W-1:0];
    if (!sub_q) begin
      d1 = {1'b0, ra[W-1:0]} + {1'b0, rb[W-1:0]} + {{W{1'b0}}, cy1};
      d2 = {1'b0, d1[W-1:0]} - {1'b0, pd} - {{W{1'b0}}, cy2};
    end else begin
      d1 = {1'b0, ra[W-1:0]} - {1'b0, rb[W-1:0]} - {{W{1'b0}}, cy1};
      d2 = {1'b0, d1[W-1:0]} + {1'b0, pd} + {{W{1'b0}}, cy2};
    end
  end

  // selection after the last digit
  logic use_t;
  assign use_t = sub_q ? d1[W] : (d1[W] | ~d2[W]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0; sub_q <= 1'b0;
      cy1 <= 1'b0; cy2 <= 1'b0;
      ra <= '0; rb <= '0; rp <= '0; rs <= '0; rt <= '0; c <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; cnt <= '0; sub_q <= op_sub;
        cy1 <= 1'b0; cy2 <= 1'b0;
        ra <= a; rb <= b; rp <= P448;
      end else if (busy) begin
        ra  <= ra >> W;
        rb  <= rb >> W;
        rp  <= rp >> W;
        rs  <= {d1[W-1:0], rs[FW-1:W]};
        rt  <= {d2[W-1:0], rt[FW-1:W]};
        cy1 <= d1[W];
        cy2 <= d2[W];
        cnt <= cnt + 1'b1;
        if (cnt == CW'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          c    <= use_t ? {d2[W-1:0], rt[FW-1:W]} : {d1[W-1:0], rs[FW-1:W]};
        end
      end
    end
  end
endmodule
