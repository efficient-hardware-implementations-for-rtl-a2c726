// 128 x 128-bit multiplier built from one 64 x 64-bit multiplier (Design II).
//
// The four 64-bit partial products x_i * y_j are formed on four consecutive
// cycles and added into a 256-bit accumulator at offset 64*(i+j). The 64x64
// multiplier stands for the array of 16 DSP blocks the document uses; its
// rate, one 64x64 product per cycle and a 128x128 product per 4 cycles,
// follows the document.
//
// Interface: pulse start with x, y; p = x*y is valid when done pulses,
// 4 cycles after start.
module mul128_seq #(
  parameter int unsigned HW = 64          // half width; full width 2*HW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [2*HW-1:0] x,
  input  logic [2*HW-1:0] y,
  output logic            done,
  output logic [4*HW-1:0] p
);
  logic [2*HW-1:0] rx, ry;
  logic [1:0]      step;
  logic            busy;
  logic [HW-1:0]   xd, yd;
  logic [2*HW-1:0] pp;
  logic [4*HW-1:0] pp_sh;

  always_comb begin
    xd    = step[1] ? rx[2*HW-1:HW] : rx[HW-1:0];
    yd    = step[0] ? ry[2*HW-1:HW] : ry[HW-1:0];
    pp    = xd * yd;                                   // 64 x 64 multiplier
    pp_sh = (4*HW)'(pp) << (HW * (32'(step[1]) + 32'(step[0])));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; step <= '0; rx <= '0; ry <= '0; p <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; rx <= x; ry <= y; step <= '0; p <= '0;
      end else if (busy) begin
        p    <= p + pp_sh;
        step <= step + 1'b1;
        if (step == 2'd3) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
