// tb_star_decoder: self-checking testbench of the decoder extension.
//
// Builds instruction words field by field and checks the decoded operation,
// the retrieve format, and that other words (other opcodes, divides,
// reserved funct7 values) start nothing.
module tb_star_decoder;
  import star_pkg::*;

  logic [31:0] instr;
  star_op_e    op;
  ret_fmt_e    fmt;
  logic        is_star, is_div;
  int checks = 0, failures = 0;

  star_decoder dut (.instr_i (instr), .op_o (op), .ret_fmt_o (fmt), .star_o (is_star), .div_o (is_div));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rtype(input logic [6:0] f7, input logic [2:0] f3, input logic [6:0] opc);
    return {f7, 5'($urandom), 5'($urandom), f3, 5'($urandom), opc};
  endfunction

  task automatic expect_op(input logic [31:0] w, input star_op_e e, input logic div, input ret_fmt_e f);
    instr = w;
    #1;
    checks++;
    if (op !== e || is_div !== div || is_star !== (e != OP_NONE) || (e == OP_RETR && fmt !== f)) begin
      failures++;
      $display("FAIL %h: got %s div=%b fmt=%0d expected %s", w, op.name(), is_div, fmt, e.name());
    end
  endtask

  star_op_e custom [8] = '{OP_MAC16ST, OP_MAC8ST, OP_MAC4ST, OP_MACRST,
                           OP_MAC16SA, OP_MAC8SA, OP_MAC4SA, OP_RETR};
  star_op_e mul [4] = '{OP_MUL, OP_MULH, OP_MULHSU, OP_MULHU};

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int f3 = 0; f3 < 8; f3++) begin
        expect_op(rtype(7'd0, 3'(f3), 7'b0001011), custom[f3], 1'b0, RF_ST_LO);
        expect_op(rtype(7'b0000001, 3'(f3), 7'b0110011), (f3 < 4) ? mul[f3] : OP_NONE, f3 >= 4, RF_ST_LO);
        expect_op(rtype(7'd0, 3'(f3), 7'b0110011), OP_NONE, 1'b0, RF_ST_LO);      // base ALU ops
        expect_op(rtype(7'b0100000, 3'(f3), 7'b0001011), OP_NONE, 1'b0, RF_ST_LO); // reserved
      end
      for (int f = 0; f < 8; f++)
        expect_op(rtype(7'(f), 3'b111, 7'b0001011), (f <= 5) ? OP_RETR : OP_NONE, 1'b0, ret_fmt_e'(f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
