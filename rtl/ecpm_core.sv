// One Curve448 point-multiplication core (Design I, II or III).
//
// Connects the controller, the program ROM, the dual-port RAM and the
// field arithmetic unit of the chosen design:
//   DESIGN = 1  lightweight:      16-bit words (28 per element), digit-serial
//               adder, product scanning with interleaved reduction on one
//               16x17 multiplier
//   DESIGN = 2  area-time:        112-bit words (4 per element), chunk-serial
//               adder, two-level Karatsuba multiplier on a 64x64 multiplier
//   DESIGN = 3  high-performance: 448-bit words, single-cycle adder,
//               five-level Karatsuba multiplier with 81 base multipliers
// All three run the same program; they differ in word width and in the
// latency of the field operations.
//
// Interface: pulse start with scalar k, base-point u-coordinate u and the
// randomisation factor lambda (1 for none); x_out = u(k*P) when done
// pulses. busy is high while a point multiplication runs.
module ecpm_core
  import c448_pkg::*;
#(
  parameter int unsigned DESIGN = 1,
  parameter int unsigned KBITS  = 448,
  localparam int unsigned W     = (DESIGN == 1) ? 16 : (DESIGN == 2) ? 112 : FW,
  localparam int unsigned NW    = FW / W,
  localparam int unsigned DEPTH = NSLOTS * NW,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [KBITS-1:0] k,
  input  logic [FW-1:0]    u,
  input  logic [FW-1:0]    lambda,
  output logic             busy,
  output logic             done,
  output logic [FW-1:0]    x_out
);
  logic [4:0]    rom_addr;
  instr_t        rom_instr;
  logic          ram_we;
  logic [AW-1:0] ram_a_addr, ram_b_addr;
  logic [W-1:0]  ram_wdata, ram_a_rdata, ram_b_rdata;
  logic          fau_start, fau_done;
  fop_e          fau_op;
  logic [FW-1:0] fau_a, fau_b, fau_c;

  ecpm_ctrl #(.W(W), .KBITS(KBITS)) u_ctrl (
    .clk, .rst_n, .start, .k, .u, .lambda, .busy, .done, .x_out,
    .rom_addr, .rom_instr,
    .ram_we, .ram_a_addr, .ram_wdata, .ram_a_rdata, .ram_b_addr, .ram_b_rdata,
    .fau_start, .fau_op, .fau_a, .fau_b, .fau_done, .fau_c
  );

  c448_prog_rom u_rom (.addr(rom_addr), .instr(rom_instr));

  dp_ram #(.W(W), .DEPTH(DEPTH)) u_ram (
    .clk, .a_we(ram_we), .a_addr(ram_a_addr), .a_wdata(ram_wdata), .a_rdata(ram_a_rdata),
    .b_addr(ram_b_addr), .b_rdata(ram_b_rdata)
  );

  // field arithmetic unit: modular adder/subtractor and multiplier
  logic          add_start, mul_start, add_done, mul_done;
  logic [FW-1:0] add_c, mul_c;
  assign add_start = fau_start && (fau_op != OP_MUL);
  assign mul_start = fau_start && (fau_op == OP_MUL);
  assign fau_done  = add_done | mul_done;
  assign fau_c     = add_done ? add_c : mul_c;

  if (DESIGN == 1) begin : g_d1
    fp_addsub_serial #(.W(16)) u_add (
      .clk, .rst_n, .start(add_start), .op_sub(fau_op == OP_SUB), .a(fau_a), .b(fau_b),
      .done(add_done), .c(add_c));
    d1_modmul #(.W(16)) u_mul (
      .clk, .rst_n, .start(mul_start), .a(fau_a), .b(fau_b), .done(mul_done), .c(mul_c));
  end else if (DESIGN == 2) begin : g_d2
    fp_addsub_serial #(.W(112)) u_add (
      .clk, .rst_n, .start(add_start), .op_sub(fau_op == OP_SUB), .a(fau_a), .b(fau_b),
      .done(add_done), .c(add_c));
    d2_modmul u_mul (
      .clk, .rst_n, .start(mul_start), .a(fau_a), .b(fau_b), .done(mul_done), .c(mul_c));
  end else begin : g_d3
    d3_modadd u_add (
      .clk, .rst_n, .start(add_start), .op_sub(fau_op == OP_SUB), .a(fau_a), .b(fau_b),
      .done(add_done), .c(add_c));
    d3_modmul u_mul (
      .clk, .rst_n, .start(mul_start), .a(fau_a), .b(fau_b), .done(mul_done), .c(mul_c));
  end
endmodule
