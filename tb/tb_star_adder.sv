// tb_star_adder: self-checking testbench of the 52-bit reconfigurable adder.
//
// For each carry configuration, adds random and carry-provoking operands and
// checks every lane against an independent lane-wise sum: one 52-bit sum,
// one 37-bit lane, two 21-bit lanes or four 13-bit lanes, each wrapping in
// its own width so that no carry crosses a lane boundary.
module tb_star_adder;
  import star_pkg::*;

  logic [51:0] a, b, d;
  add_cfg_e    cfg;
  int checks = 0, failures = 0;

  star_adder dut (.a_i (a), .b_i (b), .cfg_i (cfg), .d_o (d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Lane l of a value: the list of bit positions, LSB first.
  function automatic logic [51:0] lane_sum(input logic [51:0] x, input logic [51:0] y, input add_cfg_e c);
    logic [51:0] r;
    logic [20:0] s21;
    logic [12:0] s13;
    r = '0;
    case (c)
      AC_FULL: r = x + y;
      AC_SA16: begin r = '0; r[36:0] = x[36:0] + y[36:0]; end
      AC_SA8: begin
        s21 = {x[46:42], x[15:0]} + {y[46:42], y[15:0]};
        {r[46:42], r[15:0]} = s21;
        r[36:16] = x[36:16] + y[36:16];
      end
      default: begin
        s13 = {x[51:47], x[7:0]}   + {y[51:47], y[7:0]};   {r[51:47], r[7:0]}   = s13;
        s13 = {x[46:42], x[15:8]}  + {y[46:42], y[15:8]};  {r[46:42], r[15:8]}  = s13;
        s13 = {x[41:37], x[23:16]} + {y[41:37], y[23:16]}; {r[41:37], r[23:16]} = s13;
        r[36:24] = x[36:24] + y[36:24];
      end
    endcase
    return r;
  endfunction

  // Bits each configuration defines (SA16 leaves d[51:37] unused).
  function automatic logic [51:0] used(input add_cfg_e c);
    if (c == AC_SA8)  return {5'b0, 5'h1F, 5'b0, 37'h1F_FFFF_FFFF};
    if (c == AC_SA16) return {15'b0, 37'h1F_FFFF_FFFF};
    return '1;
  endfunction

  add_cfg_e cfgs [4] = '{AC_FULL, AC_SA16, AC_SA8, AC_SA4};

  initial begin
    for (int t = 0; t < 4000; t++) begin
      cfg = cfgs[t % 4];
      if (t < 400) begin
        a = '1; b = 52'(t / 4 + 1);        // every carry chain fully rippling
      end else begin
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
      end
      #1;
      checks++;
      if ((d & used(cfg)) !== (lane_sum(a, b, cfg) & used(cfg))) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h: got %h expected %h", cfg.name(), a, b, d, lane_sum(a, b, cfg));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
