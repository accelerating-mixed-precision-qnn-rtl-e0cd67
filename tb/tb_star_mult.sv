// tb_star_mult: self-checking testbench of the STAR multiplier.
//
// Drives random and extreme operands in all five configurations and compares
// s[31:0] with products computed directly from the sub-words: the full 16x16
// product for every signed/unsigned combination, the separate SA8/SA4 lane
// products truncated to their 16-bit/8-bit fields, and the sign-extended
// ST8/ST4 dot products.
module tb_star_mult;
  import star_pkg::*;
  import star_ref_pkg::*;

  logic [15:0] a, b;
  logic        sa, sb;
  mult_mode_e  mode;
  logic [31:0] s, exp;
  int checks = 0, failures = 0;

  star_mult dut (.a_i (a), .b_i (b), .sign_a_i (sa), .sign_b_i (sb), .mode_i (mode), .s_o (s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input logic [15:0] x, input logic [15:0] y,
                                        input logic gx, input logic gy, input mult_mode_e m);
    longint px, py;
    logic [31:0] r;
    case (m)
      MM_16: begin
        px = gx ? sw({16'd0, x}, 16, 0) : longint'(x);
        py = gy ? sw({16'd0, y}, 16, 0) : longint'(y);
        r = 32'(px * py);
      end
      MM_SA8: for (int k = 0; k < 2; k++) r[16*k +: 16] = 16'(sw({16'd0, x}, 8, k) * sw({16'd0, y}, 8, k));
      MM_SA4: for (int k = 0; k < 4; k++) r[8*k +: 8] = 8'(sw({16'd0, x}, 4, k) * sw({16'd0, y}, 4, k));
      MM_ST8: r = 32'(st_dot(x, y, 8));
      default: r = 32'(st_dot(x, y, 4));
    endcase
    return r;
  endfunction

  mult_mode_e modes [5] = '{MM_16, MM_SA8, MM_SA4, MM_ST8, MM_ST4};

  initial begin
    for (int t = 0; t < 5000; t++) begin
      mode = modes[t % 5];
      if (t < 40) begin
        a = (t % 2) ? 16'h8888 : 16'h8000; b = (t % 4 < 2) ? 16'h8888 : 16'h7FFF;
      end else begin
        a = 16'($urandom); b = 16'($urandom);
      end
      sa = (mode == MM_16) ? 1'($urandom) : 1'b1;
      sb = (mode == MM_16) ? 1'($urandom) : 1'b1;
      #1;
      exp = model(a, b, sa, sb, mode);
      checks++;
      if (s !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h sa=%b sb=%b: got %h expected %h",
                                    mode.name(), a, b, sa, sb, s, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
