// Recursive Karatsuba multiplier (Design III multiplier tree).
//
// A W x W product is split at H = ceil(W/2):
//   a*b = ll + 2^H * (mm - ll - hh) + 2^(2H) * hh
// with ll = a_lo*b_lo, hh = a_hi*b_hi, mm = (a_lo+a_hi)*(b_lo+b_hi), each
// formed by a Karatsuba multiplier of one level less. At level 0 the
// product is one small multiplication, standing for one DSP block, with a
// register at its output; the recombination adders above are
// combinational. Four levels on 225-bit operands give 3^4 = 81 base
// multiplications of at most 16 x 16 bits, the 81 DSP blocks of the
// document's high-performance design. The split points and the position of
// the register are this design's choice.
//
// Interface: p = a*b, one cycle after a and b are applied; a new operand
// pair may be applied every cycle.
//
// Lint note: when Verilator lints this module on its own as the top, it does
// not elaborate the module's instances of itself and reports ll, hh and mm
// as undriven (and clk, asum, bsum as unused). Inside a parent, and in
// simulation, the whole tree is elaborated; the testbench checks every
// product at full throughput.
module kara_mul #(
  parameter int unsigned W      = 225,
  parameter int unsigned LEVELS = 4
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  if (LEVELS == 0) begin : g_base
    always_ff @(posedge clk) p <= (2*W)'(a) * (2*W)'(b);
  end else begin : g_split
    localparam int unsigned H = (W + 1) / 2;   // low part width
    localparam int unsigned U = W - H;         // high part width

    logic [H-1:0]     alo, blo;
    logic [U-1:0]     ahi, bhi;
    logic [H:0]       asum, bsum;
    logic [2*H-1:0]   ll;
    logic [2*U-1:0]   hh;
    logic [2*H+1:0]   mm;

    assign alo  = a[H-1:0];
    assign blo  = b[H-1:0];
    assign ahi  = a[W-1:H];
    assign bhi  = b[W-1:H];
    assign asum = (H+1)'(alo) + (H+1)'(ahi);
    assign bsum = (H+1)'(blo) + (H+1)'(bhi);

    kara_mul #(.W(H),   .LEVELS(LEVELS - 1)) u_ll (.clk, .a(alo),  .b(blo),  .p(ll));
    kara_mul #(.W(U),   .LEVELS(LEVELS - 1)) u_hh (.clk, .a(ahi),  .b(bhi),  .p(hh));
    kara_mul #(.W(H+1), .LEVELS(LEVELS - 1)) u_mm (.clk, .a(asum), .b(bsum), .p(mm));

    logic [2*W-1:0] mid;
    assign mid = (2*W)'(mm) - (2*W)'(ll) - (2*W)'(hh);
    assign p   = (2*W)'(ll) + (mid << H) + ((2*W)'(hh) << (2*H));
  end
endmodule
