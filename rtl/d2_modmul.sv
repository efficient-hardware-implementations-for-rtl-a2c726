// Design II modular multiplier: two-level Karatsuba on a 64x64 multiplier.
//
// Top level (golden-ratio Karatsuba, phi = 2^224, phi^2 = phi + 1 mod p):
//   A*B = (A0*B0 + A1*B1) + 2^224 * (A10*B10 - A0*B0)   (mod p)
// with A = A0 + 2^224*A1 and A10 = A0 + A1. Each of the three half-size
// products X*Y is formed with the refined Karatsuba identity, t = 2^112:
//   X*Y = (1 - t)*(x0*y0 - t*x1*y1) + t*(x0+x1)*(y0+y1)
// in three recombination steps s1, s2, s3, each one cycle, on the three
// sub-products from the 128x128 multiplier (4 cycles each). The three
// half-size results are kept in an internal register file, combined into a
// value below 2^896 and reduced by the digit-serial reducer on 112-bit
// chunks. Negative intermediates of the refined identity are held in
// two's complement; the final value of each product is non-negative.
//
// Interface: pulse start with a, b in [0, p); c = a*b mod p is valid when
// done pulses, 91 cycles after start whatever the data (about 54 for the
// nine sub-products, 9 for the recombination, 17 for the reduction).
// The identities and the multiplier rate follow the document; the schedule
// and the separate final reduction are this design's own.
module d2_modmul
  import c448_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  output logic          done,
  output logic [FW-1:0] c
);
  localparam int unsigned HF = 224;        // half field width
  localparam int unsigned TW = 112;        // t = 2^112
  localparam int unsigned RW = 464;        // recombination width (two's complement)

  typedef enum logic [2:0] {IDLE, MSTART, MWAIT, REC1, REC2, REC3, TOP, RED} state_e;
  state_e st;

  logic [HF:0]   xa [3];                   // A0, A1, A10
  logic [HF:0]   yb [3];
  logic [1:0]    t, s;                     // half-size product, sub-product index
  logic [255:0]  m [3];                    // m0, m1, m10
  logic [RW-1:0] acc;
  logic [RW-1:0] cint [3];                 // internal RAM: Cl, Ch, Cm

  // operands of the current sub-product
  logic [HF:0]   xx, yy;
  logic [127:0]  mx, my;
  always_comb begin
    xx = xa[t];
    yy = yb[t];
    unique case (s)
      2'd0:    begin mx = 128'(xx[TW-1:0]);  my = 128'(yy[TW-1:0]);  end
      2'd1:    begin mx = 128'(xx[HF:TW]);   my = 128'(yy[HF:TW]);   end
      default: begin mx = 128'(xx[TW-1:0]) + 128'(xx[HF:TW]);
                     my = 128'(yy[TW-1:0]) + 128'(yy[HF:TW]); end
    endcase
  end

  logic         m_start, m_done;
  logic [255:0] m_p;
  mul128_seq #(.HW(64)) u_mul (
    .clk, .rst_n, .start(m_start), .x(mx), .y(my), .done(m_done), .p(m_p)
  );

  logic [2*FW-1:0] top_sum;
  logic            red_start;
  always_comb begin
    top_sum = (2*FW)'(cint[0]) + (2*FW)'(cint[1])
            + (((2*FW)'(cint[2]) - (2*FW)'(cint[0])) << HF);
  end
  logic [2*FW-1:0] top_q;

  fp_reduce_serial #(.W(TW)) u_red (
    .clk, .rst_n, .start(red_start), .x(top_q), .done, .r(c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; t <= '0; s <= '0; m_start <= 1'b0; red_start <= 1'b0;
      acc <= '0; top_q <= '0;
      for (int q = 0; q < 3; q++) begin
        xa[q] <= '0; yb[q] <= '0; m[q] <= '0; cint[q] <= '0;
      end
    end else begin
      m_start   <= 1'b0;
      red_start <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          xa[0] <= {1'b0, a[HF-1:0]};  xa[1] <= {1'b0, a[FW-1:HF]};
          xa[2] <= (HF+1)'(a[HF-1:0]) + (HF+1)'(a[FW-1:HF]);
          yb[0] <= {1'b0, b[HF-1:0]};  yb[1] <= {1'b0, b[FW-1:HF]};
          yb[2] <= (HF+1)'(b[HF-1:0]) + (HF+1)'(b[FW-1:HF]);
          t <= '0; s <= '0; st <= MSTART;
        end
        MSTART: begin m_start <= 1'b1; st <= MWAIT; end
        MWAIT: if (m_done) begin
          m[s] <= m_p;
          if (s == 2'd2) begin s <= '0; st <= REC1; end
          else begin s <= s + 1'b1; st <= MSTART; end
        end
        // step 1: s1 = m0 - t*m1
        REC1: begin acc <= RW'(m[0]) - (RW'(m[1]) << TW); st <= REC2; end
        // step 2: s2 = (1 - t)*s1
        REC2: begin acc <= acc - (acc << TW); st <= REC3; end
        // step 3: s3 = s2 + t*m10
        REC3: begin
          cint[t] <= acc + (RW'(m[2]) << TW);
          if (t == 2'd2) st <= TOP;
          else begin t <= t + 1'b1; st <= MSTART; end
        end
        TOP: begin top_q <= top_sum; red_start <= 1'b1; st <= RED; end
        RED: if (done) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
