// Controller (FSM) of a Curve448 point-multiplication core.
//
// Computes the u-coordinate of Q = k*P with the Montgomery ladder:
//   1. LOAD   writes u, lambda and the constants 1, 0, a24 into the RAM,
//             one W-bit word per cycle.
//   2. line 0 of the program ROM randomises the start point,
//             (X3, Z3) = (lambda*u, lambda).
//   3. the 18-line ladder step runs once per scalar bit, most significant
//             bit first. Instead of swapping data the controller swaps the
//             RAM slots of the two ladder points (X2,Z2) <-> (X3,Z3) while
//             the bit is 1, so every step costs the same cycles and touches
//             the same number of words whatever the scalar.
//   4. Z2 is inverted as Z2^(p-2) by square-and-multiply over the fixed
//             public exponent, then x = X2 * Z2^-1.
//   5. OUT    reads x back from the RAM.
// Each program line is executed as: read both operands word by word through
// the two RAM ports (NW+1 cycles), run the field unit, write the result
// back through port A (NW cycles).
//
// Interface: pulse start with k, u and lambda (lambda = 1 disables the
// point randomisation; lambda must be non-zero). done pulses when x_out is
// valid; busy is high in between. The scalar is used as given (no clamping).
// Ladder formulas and a24 follow the document; the looping of ladder and
// inversion in the FSM, the slot swapping and the square-and-multiply
// inversion are this design's own.
module ecpm_ctrl
  import c448_pkg::*;
#(
  parameter int unsigned W     = 16,     // RAM word / datapath digit width
  parameter int unsigned KBITS = 448,    // scalar length
  localparam int unsigned NW   = FW / W,
  localparam int unsigned AW   = $clog2(NSLOTS * NW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [KBITS-1:0] k,
  input  logic [FW-1:0]    u,
  input  logic [FW-1:0]    lambda,
  output logic             busy,
  output logic             done,
  output logic [FW-1:0]    x_out,
  // program ROM
  output logic [4:0]       rom_addr,
  input  instr_t           rom_instr,
  // dual-port RAM
  output logic             ram_we,
  output logic [AW-1:0]    ram_a_addr,
  output logic [W-1:0]     ram_wdata,
  input  logic [W-1:0]     ram_a_rdata,
  output logic [AW-1:0]    ram_b_addr,
  input  logic [W-1:0]     ram_b_rdata,
  // field arithmetic unit
  output logic             fau_start,
  output fop_e             fau_op,
  output logic [FW-1:0]    fau_a,
  output logic [FW-1:0]    fau_b,
  input  logic             fau_done,
  input  logic [FW-1:0]    fau_c
);
  typedef enum logic [2:0] {IDLE, LOAD, RD, EX, EXW, WB, OUT} state_e;
  typedef enum logic [2:0] {PH_INIT, PH_LADDER, PH_INV, PH_EXP, PH_FIN} phase_e;

  localparam int unsigned CW = $clog2(NW + 1);

  state_e  st;
  phase_e  ph;
  logic [KBITS-1:0]          kq;
  logic [$clog2(KBITS)-1:0]  kbit;
  logic [$clog2(FW)-1:0]     ebit;
  logic [4:0]                pc;
  logic [CW-1:0]             cnt;
  logic [2:0]                ls;        // slot being loaded
  logic [FW-1:0]             opa, opb, res, uq, lq;

  assign rom_addr = pc;
  assign busy     = (st != IDLE);

  // logical -> physical slot: swap the two ladder points while the bit is 1
  logic swap;
  assign swap = (ph == PH_LADDER) && kq[kbit];
  function automatic logic [3:0] phys(input slot_e s, input logic sw);
    if (sw && (s == S_X2 || s == S_Z2)) return 4'(s) + 4'd2;
    if (sw && (s == S_X3 || s == S_Z3)) return 4'(s) - 4'd2;
    return 4'(s);
  endfunction

  // value written to slot ls during LOAD
  logic [FW-1:0] ldval;
  logic [3:0]    ldslot;
  always_comb begin
    unique case (ls)
      3'd0:    begin ldslot = S_X1;   ldval = uq;        end
      3'd1:    begin ldslot = S_X2;   ldval = FW'(1);    end
      3'd2:    begin ldslot = S_Z2;   ldval = '0;        end
      3'd3:    begin ldslot = S_X3;   ldval = '0;        end
      3'd4:    begin ldslot = S_Z3;   ldval = lq;        end
      3'd5:    begin ldslot = S_A24;  ldval = A24;       end
      default: begin ldslot = S_ZERO; ldval = '0;        end
    endcase
  end

  localparam int unsigned WDW = (NW > 1) ? $clog2(NW) : 1;
  logic [WDW-1:0] wd;
  assign wd = WDW'(cnt);

  // shift one RAM word in at the top of a field-element register
  function automatic logic [FW-1:0] shin(input logic [FW-1:0] old, input logic [W-1:0] word);
    return FW'({word, old} >> W);
  endfunction

  always_comb begin
    ram_we     = 1'b0;
    ram_a_addr = '0;
    ram_b_addr = '0;
    ram_wdata  = '0;
    unique case (st)
      LOAD: begin
        ram_we     = 1'b1;
        ram_a_addr = AW'(ldslot) * AW'(NW) + AW'(wd);
        ram_wdata  = ldval[wd*W +: W];
      end
      RD: begin
        ram_a_addr = AW'(phys(rom_instr.srca, swap)) * AW'(NW) + AW'(wd);
        ram_b_addr = AW'(phys(rom_instr.srcb, swap)) * AW'(NW) + AW'(wd);
      end
      WB: begin
        ram_we     = 1'b1;
        ram_a_addr = AW'(phys(rom_instr.dst, swap)) * AW'(NW) + AW'(wd);
        ram_wdata  = res[wd*W +: W];
      end
      OUT: ram_a_addr = AW'(S_T1) * AW'(NW) + AW'(wd);
      default: ;
    endcase
  end

  assign fau_op = rom_instr.op;
  assign fau_a  = opa;
  assign fau_b  = opb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; ph <= PH_INIT; done <= 1'b0; fau_start <= 1'b0;
      kq <= '0; kbit <= '0; ebit <= '0; pc <= '0; cnt <= '0; ls <= '0;
      opa <= '0; opb <= '0; res <= '0; uq <= '0; lq <= '0; x_out <= '0;
    end else begin
      done      <= 1'b0;
      fau_start <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          kq <= k; uq <= u; lq <= lambda;
          ls <= '0; cnt <= '0; st <= LOAD;
        end
        LOAD: begin
          if (cnt == CW'(NW - 1)) begin
            cnt <= '0;
            if (ls == 3'd6) begin
              ph <= PH_INIT; pc <= 5'(PC_INIT); st <= RD;
            end else ls <= ls + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        RD: begin
          // data of word cnt-1 arrives while word cnt is addressed
          if (cnt != 0) begin
            opa <= shin(opa, ram_a_rdata);
            opb <= shin(opb, ram_b_rdata);
          end
          if (cnt == CW'(NW)) begin
            cnt <= '0; fau_start <= 1'b1; st <= EX;
          end else cnt <= cnt + 1'b1;
        end
        EX:  st <= EXW;
        EXW: if (fau_done) begin res <= fau_c; st <= WB; end
        WB: begin
          if (cnt == CW'(NW - 1)) begin
            cnt <= '0;
            st  <= RD;
            // choose the next program line
            unique case (ph)
              PH_INIT: begin ph <= PH_LADDER; pc <= 5'(PC_STEP); kbit <= ($clog2(KBITS))'(KBITS - 1); end
              PH_LADDER:
                if (pc == 5'(PC_STEP + STEP_LEN - 1)) begin
                  if (kbit == 0) begin ph <= PH_INV; pc <= 5'(PC_INV); end
                  else begin kbit <= kbit - 1'b1; pc <= 5'(PC_STEP); end
                end else pc <= pc + 1'b1;
              PH_INV: begin ph <= PH_EXP; pc <= 5'(PC_SQR); ebit <= ($clog2(FW))'(FW - 2); end
              PH_EXP:
                if (pc == 5'(PC_SQR) && INV_EXP[ebit]) pc <= 5'(PC_MULZ);
                else if (ebit == 0) begin ph <= PH_FIN; pc <= 5'(PC_FINAL); end
                else begin ebit <= ebit - 1'b1; pc <= 5'(PC_SQR); end
              default: st <= OUT;          // PH_FIN done
            endcase
          end else cnt <= cnt + 1'b1;
        end
        OUT: begin
          if (cnt != 0) x_out <= shin(x_out, ram_a_rdata);
          if (cnt == CW'(NW)) begin
            cnt <= '0; st <= IDLE; done <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
