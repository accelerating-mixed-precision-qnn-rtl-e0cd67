// star_ctrl: control signals of the STAR-MAC unit.
//
// Turns the decoded operation into one control word per clock cycle. A small
// step counter runs while en_i is high; valid_o marks the last cycle of the
// operation, in which the result is on the unit's output, and the counter
// returns to 0 at the following clock edge so the next operation can start
// at once. en_i and op_i must stay stable until valid_o.
//
// Schedules (CC = clock cycle, L/H = low/high 16-bit half of a source reg):
//   mac{16,8,4}st : CC1 L*L, CC2 H*H, both accumulated into mr[51:0] with
//                   the full-width adder                         (2 cycles)
//   mac{16,8,4}sa : CC1 L*L into mr[51:0], CC2 H*H into mr[103:52], with the
//                   adder split into 1, 2 or 4 lanes              (2 cycles)
//   MUL           : AL*BL; AL*BH + (ar>>16); AH*BL + (ar>>16)     (3 cycles)
//   MULH[SU|U]    : AL*BL; AL*BH + (ar>>16); AH*BL + ar;
//                   AH*BH + (ar>>>16)                              (4 cycles)
//   macrst, retrieve                                               (1 cycle)
// The two-cycle sum-together/sum-apart schedules and the 3-cycle multiply
// are the published ones. The multiply schedule follows the original fast
// multiplier of the host core, adapted to a 16-bit multiplier with signed/
// unsigned operand control; that adaptation and the 4-cycle upper-word
// multiply are this design's reading. MAC operations use signed operands.
module star_ctrl
  import star_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       en_i,
  input  star_op_e   op_i,
  output star_ctrl_t ctrl_o,
  output logic       valid_o,
  output logic [1:0] step_o
);

  logic [1:0] step_q;
  logic       sa, sb;        // signedness of the upper halves for MULH*
  logic       is_mac;

  assign step_o = step_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      step_q <= 2'd0;
    end else if (en_i) begin
      step_q <= valid_o ? 2'd0 : step_q + 2'd1;
    end
  end

  assign sa = (op_i == OP_MULH) || (op_i == OP_MULHSU);
  assign sb = (op_i == OP_MULH);
  assign is_mac = (op_i inside {OP_MAC16ST, OP_MAC8ST, OP_MAC4ST,
                                OP_MAC16SA, OP_MAC8SA, OP_MAC4SA});

  always_comb begin
    // Idle defaults: nothing is written.
    ctrl_o = '{a_hi: 1'b0, b_hi: 1'b0, sign_a: 1'b0, sign_b: 1'b0,
               mmode: MM_16, acfg: AC_FULL, rb: RB_ZERO, ra: RA_ZERO,
               ra_sext: 1'b0, alu: AL_HOLD, mr: MR_HOLD, osel: OS_D};
    valid_o = 1'b0;

    if (en_i) begin
      if (is_mac) begin
        ctrl_o.a_hi   = step_q[0];
        ctrl_o.b_hi   = step_q[0];
        ctrl_o.sign_a = 1'b1;
        ctrl_o.sign_b = 1'b1;
        valid_o       = step_q[0];
        unique case (op_i)
          OP_MAC16ST: begin ctrl_o.mmode = MM_16;  ctrl_o.acfg = AC_FULL; ctrl_o.rb = RB_SEXT; end
          OP_MAC8ST:  begin ctrl_o.mmode = MM_ST8; ctrl_o.acfg = AC_FULL; ctrl_o.rb = RB_SEXT; end
          OP_MAC4ST:  begin ctrl_o.mmode = MM_ST4; ctrl_o.acfg = AC_FULL; ctrl_o.rb = RB_SEXT; end
          OP_MAC16SA: begin ctrl_o.mmode = MM_16;  ctrl_o.acfg = AC_SA16; ctrl_o.rb = RB_SEXT; end
          OP_MAC8SA:  begin ctrl_o.mmode = MM_SA8; ctrl_o.acfg = AC_SA8;  ctrl_o.rb = RB_SA8;  end
          default:    begin ctrl_o.mmode = MM_SA4; ctrl_o.acfg = AC_SA4;  ctrl_o.rb = RB_SA4;  end
        endcase
        if (ctrl_o.acfg == AC_FULL) begin
          ctrl_o.ra = RA_MR_LO;
          ctrl_o.mr = MR_LO;
        end else begin
          ctrl_o.ra = step_q[0] ? RA_MR_HI : RA_MR_LO;
          ctrl_o.mr = step_q[0] ? MR_HI    : MR_LO;
        end
      end else begin
        unique case (op_i)
          OP_MUL: begin
            unique case (step_q)
              2'd0: begin ctrl_o.ra = RA_ZERO; ctrl_o.alu = AL_D; end
              2'd1: begin ctrl_o.b_hi = 1'b1; ctrl_o.ra = RA_ARSH; ctrl_o.alu = AL_SHIFT; end
              default: begin
                ctrl_o.a_hi = 1'b1; ctrl_o.ra = RA_ARSH; ctrl_o.osel = OS_MUL;
                valid_o = 1'b1;
              end
            endcase
          end
          OP_MULH, OP_MULHSU, OP_MULHU: begin
            unique case (step_q)
              2'd0: begin ctrl_o.ra = RA_ZERO; ctrl_o.alu = AL_D; end
              2'd1: begin
                ctrl_o.b_hi = 1'b1; ctrl_o.sign_b = sb;
                ctrl_o.rb = sb ? RB_SEXT : RB_ZERO;
                ctrl_o.ra = RA_ARSH; ctrl_o.alu = AL_D;
              end
              2'd2: begin
                ctrl_o.a_hi = 1'b1; ctrl_o.sign_a = sa;
                ctrl_o.rb = sa ? RB_SEXT : RB_ZERO;
                ctrl_o.ra = RA_AR; ctrl_o.alu = AL_D;
              end
              default: begin
                ctrl_o.a_hi = 1'b1; ctrl_o.b_hi = 1'b1;
                ctrl_o.sign_a = sa; ctrl_o.sign_b = sb;
                ctrl_o.rb = (sa | sb) ? RB_SEXT : RB_ZERO;
                ctrl_o.ra = RA_ARSH; ctrl_o.ra_sext = 1'b1;
                ctrl_o.osel = OS_D;
                valid_o = 1'b1;
              end
            endcase
          end
          OP_MACRST: begin ctrl_o.mr = MR_CLEAR; valid_o = 1'b1; end
          OP_RETR:   begin ctrl_o.osel = OS_RET; valid_o = 1'b1; end
          default:   ;
        endcase
      end
    end
  end

endmodule
