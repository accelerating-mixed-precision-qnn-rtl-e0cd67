// star_route_b: R-B, the path from the STAR multiplier to adder input B.
//
// s[31:0] drives the low 32 bits of adder input B unchanged. Each 5-bit
// group of the upper 20 bits is filled with one extension bit chosen by a
// multiplexer between '0', s[31] and the sign of the lane below it, so each
// adder lane receives its product sign-extended:
//   RB_ZERO : all groups 0             (unsigned standard-multiply product)
//   RB_SEXT : all groups s[31]         (one 32-bit product or ST result)
//   RB_SA8  : d[36:32] <- s[31], d[46:42] <- s[15]   (two 21-bit lanes)
//   RB_SA4  : d[36:32] <- s[31], d[41:37] <- s[23],
//             d[46:42] <- s[15], d[51:47] <- s[7]     (four 13-bit lanes)
// Groups unused by a lane configuration receive s[31]. The multiplexer
// inputs per group are the published ones; the select coding is this
// design's own. Purely combinational.
module star_route_b
  import star_pkg::*;
(
  input  logic [31:0] s_i,
  input  rb_sel_e     sel_i,
  output logic [51:0] b_o
);

  logic [3:0] ext;   // extension bit of group g (g = 0 is bits 36:32)

  always_comb begin
    unique case (sel_i)
      RB_ZERO: ext = 4'b0000;
      RB_SA8:  ext = {s_i[31], s_i[15], s_i[31], s_i[31]};
      RB_SA4:  ext = {s_i[7], s_i[15], s_i[23], s_i[31]};
      default: ext = {4{s_i[31]}};
    endcase
    b_o = {{5{ext[3]}}, {5{ext[2]}}, {5{ext[1]}}, {5{ext[0]}}, s_i};
  end

endmodule
