// tb_star_route_out: self-checking testbench of R-O1/R-O2.
//
// Fills MAC-REG, ALU-REG and the adder output with random values and checks
// every output selection. The expected MAC-REG chunks are written out lane
// by lane from the register map of the MAC operations (e.g. SA8 lane 2 is
// {mr[98:94], mr[67:52]}), independently of how the block indexes them.
module tb_star_route_out;
  import star_pkg::*;
  import star_ref_pkg::*;

  logic [51:0]  d;
  logic [33:0]  ar;
  logic [103:0] mr;
  out_sel_e     sel;
  ret_fmt_e     fmt;
  logic [2:0]   idx;
  logic [31:0]  o, exp;
  int checks = 0, failures = 0;

  star_route_out dut (.d_i (d), .ar_i (ar), .mr_i (mr), .sel_i (sel), .fmt_i (fmt), .idx_i (idx), .o_o (o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] chunk(input ret_fmt_e f, input int k, input logic [103:0] m);
    case (f)
      RF_ST_LO:   return m[31:0];
      RF_ST_HI:   return sext(longint'(m[47:32]), 16);
      RF_SA16_LO: return (k % 2) ? m[83:52] : m[31:0];
      RF_SA16_HI: return (k % 2) ? sext(longint'(m[88:84]), 5) : sext(longint'(m[36:32]), 5);
      RF_SA8: case (k % 4)
        0: return sext(longint'({m[46:42], m[15:0]}), 21);
        1: return sext(longint'(m[36:16]), 21);
        2: return sext(longint'({m[98:94], m[67:52]}), 21);
        default: return sext(longint'(m[88:68]), 21);
      endcase
      default: case (k)
        0: return sext(longint'({m[51:47], m[7:0]}), 13);
        1: return sext(longint'({m[46:42], m[15:8]}), 13);
        2: return sext(longint'({m[41:37], m[23:16]}), 13);
        3: return sext(longint'(m[36:24]), 13);
        4: return sext(longint'({m[103:99], m[59:52]}), 13);
        5: return sext(longint'({m[98:94], m[67:60]}), 13);
        6: return sext(longint'({m[93:89], m[75:68]}), 13);
        default: return sext(longint'(m[88:76]), 13);
      endcase
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      sel = out_sel_e'(t % 4);
      fmt = ret_fmt_e'((t / 4) % 6);
      idx = 3'($urandom);
      if (fmt == RF_SA8) idx[2] = 1'b0;
      if (fmt inside {RF_SA16_LO, RF_SA16_HI}) idx[2:1] = 2'b00;
      d  = {20'($urandom), $urandom};
      ar = {2'($urandom), $urandom};
      mr = {8'($urandom), $urandom, $urandom, $urandom};
      #1;
      case (sel)
        OS_D:    exp = d[31:0];
        OS_MUL:  exp = {d[15:0], ar[15:0]};
        OS_AR:   exp = ar[31:0];
        default: exp = chunk(fmt, int'(idx), mr);
      endcase
      checks++;
      if (o !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s %s idx=%0d: got %h expected %h", sel.name(), fmt.name(), idx, o, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
