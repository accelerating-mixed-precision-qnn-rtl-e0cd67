// tb_star_ctrl: self-checking testbench of the STAR-MAC control.
//
// Steps every operation through its schedule and checks the number of
// cycles to valid_o and the key control fields of each cycle: operand
// halves, multiplier mode, adder configuration, the MAC-REG half read and
// written, and the ALU-REG/output selections of the multiply schedules.
// Also checks that nothing is written while en_i is low.
module tb_star_ctrl;
  import star_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  star_op_e   op = OP_NONE;
  star_ctrl_t c;
  logic       valid;
  logic [1:0] step;
  int checks = 0, failures = 0;

  star_ctrl dut (.clk_i (clk), .rst_ni (rst_n), .en_i (en), .op_i (op), .ctrl_o (c), .valid_o (valid), .step_o (step));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Control fields expected in cycle cc of operation o (coded as a string).
  task automatic run(input star_op_e o, input int lat);
    int cc;
    @(negedge clk); en = 1'b1; op = o; cc = 0;
    forever begin
      #1;
      case (o)
        OP_MAC16ST, OP_MAC8ST, OP_MAC4ST: begin
          expect_true($sformatf("%s cc%0d halves", o.name(), cc), c.a_hi == (cc == 1) && c.b_hi == (cc == 1));
          expect_true($sformatf("%s cc%0d acc lo", o.name(), cc), c.ra == RA_MR_LO && c.mr == MR_LO && c.acfg == AC_FULL);
          expect_true($sformatf("%s mode", o.name()), c.mmode == ((o == OP_MAC16ST) ? MM_16 : (o == OP_MAC8ST) ? MM_ST8 : MM_ST4));
        end
        OP_MAC16SA, OP_MAC8SA, OP_MAC4SA: begin
          expect_true($sformatf("%s cc%0d half", o.name(), cc),
                      c.ra == ((cc == 1) ? RA_MR_HI : RA_MR_LO) && c.mr == ((cc == 1) ? MR_HI : MR_LO));
          expect_true($sformatf("%s cfg", o.name()),
                      c.acfg == ((o == OP_MAC16SA) ? AC_SA16 : (o == OP_MAC8SA) ? AC_SA8 : AC_SA4));
        end
        OP_MUL: begin
          expect_true($sformatf("MUL cc%0d", cc),
                      (cc == 0) ? (c.ra == RA_ZERO && c.alu == AL_D) :
                      (cc == 1) ? (c.b_hi && !c.a_hi && c.ra == RA_ARSH && c.alu == AL_SHIFT) :
                                  (c.a_hi && !c.b_hi && c.osel == OS_MUL));
        end
        OP_MULH: begin
          expect_true($sformatf("MULH cc%0d", cc),
                      (cc == 0) ? (c.ra == RA_ZERO && !c.sign_a && !c.sign_b) :
                      (cc == 1) ? (c.b_hi && c.sign_b && c.ra == RA_ARSH) :
                      (cc == 2) ? (c.a_hi && c.sign_a && c.ra == RA_AR) :
                                  (c.a_hi && c.b_hi && c.ra == RA_ARSH && c.ra_sext && c.osel == OS_D));
        end
        OP_MACRST: expect_true("macrst clears", c.mr == MR_CLEAR);
        OP_RETR:   expect_true("retrieve output", c.osel == OS_RET && c.mr == MR_HOLD);
        default: ;
      endcase
      cc++;
      if (valid || cc > 6) break;
      @(negedge clk);
    end
    expect_true($sformatf("%s latency %0d", o.name(), cc), cc == lat);
    @(posedge clk); #1 en = 1'b0; op = OP_NONE;
    #1;
    expect_true("idle writes nothing", c.mr == MR_HOLD && c.alu == AL_HOLD && !valid);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      run(OP_MAC16ST, 2); run(OP_MAC8ST, 2); run(OP_MAC4ST, 2);
      run(OP_MAC16SA, 2); run(OP_MAC8SA, 2); run(OP_MAC4SA, 2);
      run(OP_MUL, 3); run(OP_MULH, 4); run(OP_MULHSU, 4); run(OP_MULHU, 4);
      run(OP_MACRST, 1); run(OP_RETR, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
