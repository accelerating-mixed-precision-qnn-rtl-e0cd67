// tb_star_route_a: self-checking testbench of R-A.
//
// Checks adder input A for each source: zero, both MAC-REG halves, ALU-REG
// sign-extended from ar[33], and ALU-REG shifted right by 16 with and
// without its upper bits and sign (arithmetic and logical shift).
module tb_star_route_a;
  import star_pkg::*;

  logic [33:0]  ar;
  logic [103:0] mr;
  ra_sel_e      sel;
  logic         ext;
  logic [51:0]  a, exp;
  int checks = 0, failures = 0;

  star_route_a dut (.ar_i (ar), .mr_i (mr), .sel_i (sel), .ext_i (ext), .a_o (a));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ra_sel_e sels [5] = '{RA_ZERO, RA_ARSH, RA_AR, RA_MR_LO, RA_MR_HI};

  initial begin
    for (int t = 0; t < 3000; t++) begin
      sel = sels[t % 5];
      ext = 1'($urandom);
      ar  = {2'($urandom), $urandom};
      mr  = {8'($urandom), $urandom, $urandom, $urandom};
      #1;
      case (sel)
        RA_ZERO:  exp = '0;
        RA_ARSH:  exp = ext ? 52'($signed(ar) >>> 16) : 52'(ar[31:16]);
        RA_AR:    exp = 52'($signed(ar));
        RA_MR_LO: exp = mr[51:0];
        default:  exp = mr[103:52];
      endcase
      checks++;
      if (a !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s ext=%b ar=%h: got %h expected %h", sel.name(), ext, ar, a, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
