// Digit-serial reduction of a 896-bit product modulo p = 2^448 - 2^224 - 1.
//
// Uses 2^448 = 2^224 + 1 (mod p). With x = L + 2^448*H and H = Hl + 2^224*Hh
//   x = L + H + Hh + (Hl + Hh)*2^224      (mod p)
// Digit i (W bits, NW = 448/W digits, NH = NW/2) of that sum is
//   L[i] + H[i] + H[i+NH]                for i <  NH
//   L[i] + H[i] + H[i-NH] + H[i]         for i >= NH
// which is read from H kept in a rotating register: H[(i+NH) mod NW] sits
// NH digits above the digit that is shifted out. The pass leaves a small
// carry k (< 5) above bit 448, folded back in as k + k*2^224. That pass can
// itself carry out once more (then the value is small), so exactly two carry
// passes always run, even with k = 0: the latency never depends on the data,
// as constant-time operation requires. A last pass subtracts p if the value
// is not below p.
//
// Interface: pulse start with x; r (in [0, p)) is valid when done pulses,
// 4*NW + 1 cycles after start.
// The reduction identity follows the document's choice of the Goldilocks
// prime; the pass structure is this design's own.
module fp_reduce_serial
  import c448_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [2*FW-1:0] x,
  output logic            done,
  output logic [FW-1:0]   r
);
  localparam int unsigned NW = FW / W;
  localparam int unsigned CW = $clog2(NW + 1);
  localparam int unsigned NH = NW / 2;

  typedef enum logic [1:0] {IDLE, FOLD, CARRY, SUBP} state_e;
  state_e st;

  logic [FW-1:0] rl, rh, acc, rp;
  logic [2:0]    cy;        // carry between digits
  logic          bw;        // borrow of the subtract pass
  logic [FW-1:0] tsub;      // value minus p, built during SUBP
  logic [2:0]    k;         // carry out above bit 448
  logic          np;        // second carry pass
  logic [CW-1:0] cnt;

  logic [W+2:0] s_fold, s_carry;
  logic [W:0]   s_sub;
  always_comb begin
    s_fold = {3'b0, rl[W-1:0]} + {3'b0, rh[W-1:0]} + {3'b0, rh[NH*W +: W]}
           + {{W{1'b0}}, cy};
    if (cnt >= CW'(NH)) s_fold = s_fold + {3'b0, rh[W-1:0]};
    s_carry = {3'b0, acc[W-1:0]} + {{W{1'b0}}, cy};
    if (cnt == 0 || cnt == CW'(NH)) s_carry = s_carry + {{W{1'b0}}, k};
    s_sub = {1'b0, acc[W-1:0]} - {1'b0, rp[W-1:0]} - {{W{1'b0}}, bw};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; done <= 1'b0; cnt <= '0; np <= 1'b0; cy <= '0; bw <= 1'b0; k <= '0;
      rl <= '0; rh <= '0; acc <= '0; rp <= '0; tsub <= '0; r <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          rl <= x[FW-1:0]; rh <= x[2*FW-1:FW];
          cnt <= '0; cy <= '0; st <= FOLD;
        end
        FOLD: begin
          rl  <= rl >> W;
          rh  <= {rh[W-1:0], rh[FW-1:W]};
          acc <= {s_fold[W-1:0], acc[FW-1:W]};
          cy  <= s_fold[W+2:W];
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NW - 1)) begin
            k <= s_fold[W+2:W]; cy <= '0; cnt <= '0; np <= 1'b0;
            st <= CARRY;
          end
        end
        CARRY: begin
          acc <= {s_carry[W-1:0], acc[FW-1:W]};
          cy  <= s_carry[W+2:W];
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NW - 1)) begin
            k <= s_carry[W+2:W]; cy <= '0; cnt <= '0; np <= 1'b1;
            if (np) begin st <= SUBP; rp <= P448; bw <= 1'b0; end
          end
        end
        SUBP: begin
          acc  <= {acc[W-1:0], acc[FW-1:W]};
          tsub <= {s_sub[W-1:0], tsub[FW-1:W]};
          rp   <= rp >> W;
          bw   <= s_sub[W];
          cnt  <= cnt + 1'b1;
          if (cnt == CW'(NW - 1)) begin
            // acc has rotated back to its original order
            r    <= s_sub[W] ? {acc[W-1:0], acc[FW-1:W]} : {s_sub[W-1:0], tsub[FW-1:W]};
            done <= 1'b1;
            st   <= IDLE;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
