// tb_star_route_b: self-checking testbench of R-B.
//
// Checks that s[31:0] reaches adder input B unchanged and that each 5-bit
// group above it carries the extension bit of its lane for every select:
// zero, s[31] everywhere, the SA8 lane signs (s[15], s[31]) and the SA4
// lane signs (s[7], s[15], s[23], s[31]).
module tb_star_route_b;
  import star_pkg::*;

  logic [31:0] s;
  rb_sel_e     sel;
  logic [51:0] b, exp;
  logic [3:0]  e;
  int checks = 0, failures = 0;

  star_route_b dut (.s_i (s), .sel_i (sel), .b_o (b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rb_sel_e sels [4] = '{RB_ZERO, RB_SEXT, RB_SA8, RB_SA4};

  initial begin
    for (int t = 0; t < 2000; t++) begin
      sel = sels[t % 4];
      s = $urandom;
      #1;
      // Expected extension of the groups 51:47, 46:42, 41:37, 36:32.
      case (sel)
        RB_ZERO: e = 4'b0000;
        RB_SEXT: e = {4{s[31]}};
        RB_SA8:  e = {s[31], s[15], s[31], s[31]};
        default: e = {s[7], s[15], s[23], s[31]};
      endcase
      exp = {{5{e[3]}}, {5{e[2]}}, {5{e[1]}}, {5{e[0]}}, s};
      checks++;
      if (b !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s s=%h: got %h expected %h", sel.name(), s, b, exp);
      end
      // The SA lanes, read as numbers, equal the sign-extended products.
      if (sel == RB_SA4) begin
        checks++;
        if ($signed({b[51:47], b[7:0]}) !== 13'(signed'(s[7:0]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
