// star_adder: 52-bit reconfigurable adder of the STAR-MAC unit.
//
// Built from four 8-bit sub-adders (bits d[7:0], d[15:8], d[23:16],
// d[31:24]) and four 5-bit sub-adders (d[36:32], d[41:37], d[46:42],
// d[51:47]) joined by a configurable carry chain:
//   AC_FULL : all sub-adders chained, one 52-bit adder (standard multiply and
//             sum-together accumulation, which needs 48 bits).
//   AC_SA16 : the four 8-bit and the d[36:32] sub-adders form one 37-bit adder.
//   AC_SA8  : two 21-bit adders, {d[46:42], d[15:0]} and d[36:16].
//   AC_SA4  : four 13-bit adders, each 8-bit sub-adder paired with a 5-bit
//             one: {d[51:47],d[7:0]}, {d[46:42],d[15:8]}, {d[41:37],d[23:16]},
//             d[36:24].
// Carries between 8-bit sub-adders pass through AND gates (cut in SA8 between
// bytes 1 and 2, cut everywhere in SA4); the carry into d[41:37], d[46:42]
// and d[51:47] comes through a 2-to-1 multiplexer from either the
// neighbouring 5-bit sub-adder or the carry out of byte 2, 1 or 0. The
// sub-adder sizes, lane groupings and the AND/multiplexer carry network are
// the published structure; the carry-in of the bottom sub-adder is 0.
// Purely combinational.
module star_adder
  import star_pkg::*;
(
  input  logic [51:0] a_i,
  input  logic [51:0] b_i,
  input  add_cfg_e    cfg_i,
  output logic [51:0] d_o
);

  // Sub-adder carry outs: byte k (k = 0..3) and 5-bit group g (g = 0..3,
  // g = 0 is d[36:32]).
  logic [3:0] co8, ci8;
  logic [3:0] co5, ci5;

  // Carry enables between bytes, and multiplexer selects for the 5-bit groups.
  logic en01, en12, en23;   // byte k -> byte k+1
  logic sel1, sel2, sel3;   // 1: take carry from a byte instead of the chain

  always_comb begin
    unique case (cfg_i)
      AC_FULL, AC_SA16: begin en01 = 1'b1; en12 = 1'b1; en23 = 1'b1;
                              sel1 = 1'b0; sel2 = 1'b0; sel3 = 1'b0; end
      AC_SA8:           begin en01 = 1'b1; en12 = 1'b0; en23 = 1'b1;
                              sel1 = 1'b0; sel2 = 1'b1; sel3 = 1'b0; end
      default:          begin en01 = 1'b0; en12 = 1'b0; en23 = 1'b0;
                              sel1 = 1'b1; sel2 = 1'b1; sel3 = 1'b1; end
    endcase
  end

  always_comb begin
    ci8[0] = 1'b0;
    ci8[1] = co8[0] & en01;
    ci8[2] = co8[1] & en12;
    ci8[3] = co8[2] & en23;
    ci5[0] = co8[3];
    ci5[1] = sel1 ? co8[2] : co5[0];
    ci5[2] = sel2 ? co8[1] : co5[1];
    ci5[3] = sel3 ? co8[0] : co5[2];
  end

  // Byte sub-adders.
  for (genvar k = 0; k < 4; k++) begin : g_byte
    logic [8:0] sum;
    assign sum      = {1'b0, a_i[8*k +: 8]} + {1'b0, b_i[8*k +: 8]} + 9'(ci8[k]);
    assign d_o[8*k +: 8] = sum[7:0];
    assign co8[k]   = sum[8];
  end

  // 5-bit sub-adders.
  for (genvar g = 0; g < 4; g++) begin : g_five
    logic [5:0] sum;
    assign sum      = {1'b0, a_i[32+5*g +: 5]} + {1'b0, b_i[32+5*g +: 5]} + 6'(ci5[g]);
    assign d_o[32+5*g +: 5] = sum[4:0];
    assign co5[g]   = sum[5];
  end

endmodule
