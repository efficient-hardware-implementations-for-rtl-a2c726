// Design III modular multiplier: full 448-bit, five-level Karatsuba.
//
// Level 1 is the golden-ratio Karatsuba step (phi = 2^224):
//   A*B = (Cl + Ch) + 2^224 * (Cm - Cl)   (mod p)
//   Cl = A0*B0, Ch = A1*B1, Cm = A10*B10, A10 = A0 + A1
// and is pipelined: the three 225-bit products enter one four-level
// Karatsuba tree (81 base multipliers) on three consecutive cycles.
// The combined value (below 2^676) is then reduced at full width with
// 2^448 = 2^224 + 1 in three fold stages and one conditional subtraction
// of p, one register stage each.
//
// Interface: pulse start with a, b in [0, p); c = a*b mod p is valid when
// done pulses, 10 cycles after start. A new start is accepted once done
// has pulsed. Five cycles for the three products follow the document; the
// reduction pipeline is this design's own.
module d3_modmul
  import c448_pkg::*;
#(
  parameter int unsigned LEVELS = 4       // Karatsuba levels below the first
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  output logic          done,
  output logic [FW-1:0] c
);
  localparam int unsigned HF = 224;
  localparam int unsigned PW = 2 * (HF + 1);    // 450-bit half-size products

  logic [FW-1:0]  ra, rb;
  logic [3:0]     ph;                            // pipeline phase, 0 = idle
  logic [HF:0]    ka, kb;
  logic [PW-1:0]  kp;
  logic [PW-1:0]  cl, ch, cm;
  logic [677:0]   rsum;
  logic [FW+2:0]  f1;
  logic [FW:0]    f2, f3;

  always_comb begin
    unique case (ph)
      4'd1:    begin ka = {1'b0, ra[HF-1:0]}; kb = {1'b0, rb[HF-1:0]}; end
      4'd2:    begin ka = {1'b0, ra[FW-1:HF]}; kb = {1'b0, rb[FW-1:HF]}; end
      default: begin ka = (HF+1)'(ra[HF-1:0]) + (HF+1)'(ra[FW-1:HF]);
                     kb = (HF+1)'(rb[HF-1:0]) + (HF+1)'(rb[FW-1:HF]); end
    endcase
  end

  kara_mul #(.W(HF + 1), .LEVELS(LEVELS)) u_tree (.clk, .a(ka), .b(kb), .p(kp));

  // fold x = L + 2^448*H  ->  L + H + Hh + (Hl + Hh)*2^224
  function automatic logic [FW+2:0] fold(input logic [677:0] x);
    logic [229:0] hv;
    logic [HF-1:0] hl;
    logic [5:0]    hh;
    hv = x[677:FW];
    hl = hv[HF-1:0];
    hh = hv[229:HF];
    return (FW+3)'(x[FW-1:0]) + (FW+3)'(hv) + (FW+3)'(hh)
         + (((FW+3)'(hl) + (FW+3)'(hh)) << HF);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; done <= 1'b0; ra <= '0; rb <= '0; c <= '0;
      cl <= '0; ch <= '0; cm <= '0; rsum <= '0; f1 <= '0; f2 <= '0; f3 <= '0;
    end else begin
      done <= 1'b0;
      if (ph == 0) begin
        if (start) begin ra <= a; rb <= b; ph <= 4'd1; end
      end else begin
        ph <= (ph == 4'd9) ? 4'd0 : ph + 1'b1;
      end
      // tree output for the operands applied in the previous phase
      if (ph == 4'd2) cl <= kp;
      if (ph == 4'd3) ch <= kp;
      if (ph == 4'd4) cm <= kp;
      if (ph == 4'd5) rsum <= 678'(cl) + 678'(ch) + ((678'(cm) - 678'(cl)) << HF);
      if (ph == 4'd6) f1 <= fold(rsum);
      if (ph == 4'd7) f2 <= (FW+1)'(f1[FW-1:0])
                           + (((FW+1)'(f1[FW+2:FW])) << HF) + (FW+1)'(f1[FW+2:FW]);
      if (ph == 4'd8) f3 <= (FW+1)'(f2[FW-1:0])
                           + (((FW+1)'(f2[FW])) << HF) + (FW+1)'(f2[FW]);
      if (ph == 4'd9) begin
        c    <= (f3[FW-1:0] >= P448) ? f3[FW-1:0] - P448 : f3[FW-1:0];
        done <= 1'b1;
      end
    end
  end
endmodule
