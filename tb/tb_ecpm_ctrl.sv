// Testbench of the controller, with the real program ROM and RAM and a
// behavioural field unit (reference arithmetic, fixed 3-cycle latency).
// 112-bit words and a 12-bit scalar keep it short. Each run is compared
// with the reference ladder; the run time must be the same for every
// scalar (constant time), and both swapped and unswapped ladder steps and
// the inversion's multiply lines must occur.
module tb_ecpm_ctrl;
  import c448_pkg::*;
  import c448_ref_pkg::*;
  localparam int W = 112, NW = 4, KB = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_swap = 0, n_noswap = 0, n_mulz = 0;

  logic             start, busy, done;
  logic [KB-1:0]    k;
  logic [447:0]     u, lambda, x_out;
  logic [4:0]       rom_addr;
  instr_t           rom_instr;
  logic             ram_we;
  logic [5:0]       ram_a_addr, ram_b_addr;
  logic [W-1:0]     ram_wdata, ram_a_rdata, ram_b_rdata;
  logic             fau_start, fau_done;
  fop_e             fau_op;
  logic [447:0]     fau_a, fau_b, fau_c;

  ecpm_ctrl #(.W(W), .KBITS(KB)) dut (
    .clk, .rst_n, .start, .k, .u, .lambda, .busy, .done, .x_out,
    .rom_addr, .rom_instr, .ram_we, .ram_a_addr, .ram_wdata, .ram_a_rdata,
    .ram_b_addr, .ram_b_rdata, .fau_start, .fau_op, .fau_a, .fau_b, .fau_done, .fau_c);
  c448_prog_rom u_rom (.addr(rom_addr), .instr(rom_instr));
  dp_ram #(.W(W), .DEPTH(16 * NW)) u_ram (
    .clk, .a_we(ram_we), .a_addr(ram_a_addr), .a_wdata(ram_wdata), .a_rdata(ram_a_rdata),
    .b_addr(ram_b_addr), .b_rdata(ram_b_rdata));

  // behavioural field unit
  logic [2:0] fcnt;
  always @(posedge clk) begin
    fau_done <= 1'b0;
    if (fau_start) begin
      fcnt <= 3'd3;
      unique case (fau_op)
        OP_ADD:  fau_c <= fadd(fau_a, fau_b);
        OP_SUB:  fau_c <= fsub(fau_a, fau_b);
        default: fau_c <= fmul(fau_a, fau_b);
      endcase
    end else if (fcnt != 0) begin
      fcnt <= fcnt - 1'b1;
      if (fcnt == 3'd1) fau_done <= 1'b1;
    end
  end

  // mechanism counters
  always @(posedge clk) if (fau_start) begin
    if (rom_addr == 5'd1 && dut.swap)  n_swap++;
    if (rom_addr == 5'd1 && !dut.swap) n_noswap++;
    if (rom_addr == 5'd21)             n_mulz++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, cyc0;
    logic [447:0] exp;
    start = 0; k = '0; u = '0; lambda = '0; fcnt = '0; fau_done = 0; fau_c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      k = (t == 0) ? '0 : (t == 1) ? '1 : KB'($urandom);
      u = randfe();
      lambda = (t % 2 == 0) ? 448'd1 : randfe() | 448'd1;
      start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      exp = x448(448'(k), u, KB);
      checks += 2;
      if (x_out !== exp) begin failures++; $display("FAIL run %0d: got %h expected %h", t, x_out, exp); end
      if (t == 0) cyc0 = cyc;
      if (cyc != cyc0) begin failures++; $display("FAIL run time %0d vs %0d", cyc, cyc0); end
    end
    checks += 3;
    if (n_swap == 0)   begin failures++; $display("FAIL no swapped step"); end
    if (n_noswap == 0) begin failures++; $display("FAIL no unswapped step"); end
    if (n_mulz == 0)   begin failures++; $display("FAIL no inversion multiply"); end
    $display("steps swapped %0d, unswapped %0d, inversion multiplies %0d", n_swap, n_noswap, n_mulz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
