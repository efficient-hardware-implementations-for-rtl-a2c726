// Dual-port operand RAM of a point-multiplication core.
//
// Holds the field elements of the ladder, each split into NW words of W
// bits (word 0 least significant), at address slot*NW + word. Port A reads
// and writes, port B only reads, so the controller can fetch one word of
// each operand per cycle and write results back through port A. Reads are
// synchronous: data appears one cycle after the address (block-RAM style).
// Write-first is not modelled: a read of the address written in the same
// cycle returns the old word.
module dp_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 448   // 16 slots x 28 words (Design I)
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [W-1:0]             a_wdata,
  output logic [W-1:0]             a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [W-1:0]             b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
