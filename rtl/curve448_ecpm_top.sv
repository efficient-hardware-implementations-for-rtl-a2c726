// Curve448 point multiplication at three performance levels.
//
// The three cores stand side by side, each with its own start, operands
// and result, sharing only clock and reset:
//   d1_*  Design I   (lightweight, 16-bit datapath)
//   d2_*  Design II  (area-time efficient, 112/128-bit datapath)
//   d3_*  Design III (high-performance, 448-bit datapath)
// Each computes x_out = u-coordinate of k*P from the u-coordinate of P,
// with optional projective randomisation by lambda. See ecpm_core.
module curve448_ecpm_top
  import c448_pkg::*;
#(
  parameter int unsigned KBITS = 448
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       start,     // bit d-1 starts Design d
  input  logic [KBITS-1:0] k   [3],
  input  logic [FW-1:0]    u   [3],
  input  logic [FW-1:0]    lambda [3],
  output logic [2:0]       busy,
  output logic [2:0]       done,
  output logic [FW-1:0]    x_out [3]
);
  for (genvar d = 0; d < 3; d++) begin : g_core
    ecpm_core #(.DESIGN(d + 1), .KBITS(KBITS)) u_core (
      .clk, .rst_n, .start(start[d]), .k(k[d]), .u(u[d]), .lambda(lambda[d]),
      .busy(busy[d]), .done(done[d]), .x_out(x_out[d])
    );
  end
endmodule
