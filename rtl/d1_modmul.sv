// Design I modular multiplier: product scanning with interleaved reduction
// on a single 16 x 17-bit multiplier.
//
// The operands are NW = 448/W digits (W = 16: 28 digits, the input width of
// one DSP block). With 2^448 = 2^224 + 1 (mod p) every column j of the full
// product folds onto output digits below 28, so the output digits are
// formed directly, least significant first (NH = NW/2):
//   digit i <  NH:  col(i) + col(i+NW) + col(i+NW+NH)       (last if i+NW+NH <= 2NW-2)
//   digit i >= NH:  col(i) + col(i+NH) + 2*col(i+NW)        (last if i+NW    <= 2NW-2)
// where col(j) is the sum of a[m]*b[j-m]. One partial product per cycle is
// added to a 40-bit accumulator; for the doubled column the multiplier takes
// b shifted left by one, hence its 17-bit second input. When a digit is
// complete its low W bits are shifted into the result register and the
// accumulator moves down W bits. The small carry left above bit 448 and the
// final correction into [0, p) are done by the serial reducer, fed with
// r + carry*2^448.
//
// Interface: pulse start with a, b in [0, p); c = a*b mod p is valid when
// done pulses 1276 cycles after start for W = 16 (1,162 partial products:
// columns 28..54 of the upper half are each visited twice; then 4*NW + 1 cycles of
// carry folding and correction), independent of the operand values. One multiplier, product scanning,
// interleaved reduction and the doubled-B multiplier input follow the
// document; the term order and the reuse of the serial reducer for the last
// carry are this design's own.
module d1_modmul
  import c448_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  output logic          done,
  output logic [FW-1:0] c
);
  localparam int unsigned NW = FW / W;
  localparam int unsigned NH = NW / 2;
  localparam int unsigned IW = $clog2(NW);
  localparam int unsigned KW = $clog2(2 * NW);
  localparam int unsigned AW = 2 * W + 8;                  // accumulator width

  logic [FW-1:0]   ra, rb, racc;
  logic [AW-1:0]   acc;
  logic [IW-1:0]   i, m;          // output digit, index into a
  logic [1:0]      t;             // term of the digit
  logic            busy, red_start;
  logic [2*FW-1:0] red_x;

  // column and doubling of term t of digit i
  logic [KW-1:0]   col;
  logic            dbl;
  always_comb begin
    dbl    = 1'b0;
    if (i < IW'(NH)) begin
      unique case (t)
        2'd0:    col = KW'(i);
        2'd1:    col = KW'(i) + KW'(NW);
        default: col = KW'(i) + KW'(NW + NH);
      endcase
    end else begin
      unique case (t)
        2'd0:    col = KW'(i);
        2'd1:    col = KW'(i) + KW'(NH);
        default: begin col = KW'(i) + KW'(NW); dbl = 1'b1; end
      endcase
    end
  end

  // range of m in column col
  function automatic logic [IW-1:0] mlo(input logic [KW-1:0] j);
    return (j > KW'(NW - 1)) ? IW'(j - KW'(NW - 1)) : '0;
  endfunction
  function automatic logic [IW-1:0] mhi(input logic [KW-1:0] j);
    return (j < KW'(NW - 1)) ? IW'(j) : IW'(NW - 1);
  endfunction

  // the multiplier: W x (W+1) bits
  logic [IW-1:0]  jb;
  logic [W:0]     bop;
  logic [2*W:0]   pp;
  logic [AW-1:0]  acc_nx;
  always_comb begin
    jb     = IW'(col - KW'(m));
    bop    = dbl ? {rb[jb*W +: W], 1'b0} : {1'b0, rb[jb*W +: W]};
    pp     = ra[m*W +: W] * bop;
    acc_nx = acc + AW'(pp);
  end

  // column of the next term, to start its m range
  logic [KW-1:0] col_next;
  logic          next_valid;
  always_comb begin
    if (i < IW'(NH)) col_next = (t == 2'd0) ? KW'(i) + KW'(NW) : KW'(i) + KW'(NW + NH);
    else             col_next = (t == 2'd0) ? KW'(i) + KW'(NH) : KW'(i) + KW'(NW);
    next_valid = (t != 2'd2) && (col_next <= KW'(2 * NW - 2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; red_start <= 1'b0; i <= '0; m <= '0; t <= '0; acc <= '0;
      ra <= '0; rb <= '0; racc <= '0; red_x <= '0;
    end else begin
      red_start <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; ra <= a; rb <= b; i <= '0; m <= '0; t <= '0; acc <= '0;
      end else if (busy) begin
        if (m != mhi(col)) begin
          acc <= acc_nx;
          m   <= m + 1'b1;
        end else if (next_valid) begin
          acc <= acc_nx;
          t   <= t + 1'b1;
          m   <= mlo(col_next);
        end else begin
          // digit i complete
          racc <= {acc_nx[W-1:0], racc[FW-1:W]};
          acc  <= acc_nx >> W;
          t    <= '0;
          m    <= '0;                      // column i+1 < NW starts at m = 0
          i    <= i + 1'b1;
          if (i == IW'(NW - 1)) begin
            busy      <= 1'b0;
            red_start <= 1'b1;
            red_x     <= {(FW)'(acc_nx >> W), acc_nx[W-1:0], racc[FW-1:W]};
          end
        end
      end
    end
  end

  fp_reduce_serial #(.W(W)) u_red (
    .clk, .rst_n, .start(red_start), .x(red_x), .done, .r(c)
  );
endmodule
