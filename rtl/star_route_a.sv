// star_route_a: R-A, the source of adder input A.
//
// Each sub-adder's A input comes from a multiplexer:
//   RA_MR_LO : mr[51:0]   (accumulate into the lower half of MAC-REG)
//   RA_MR_HI : mr[103:52] (accumulate into the upper half, second cycle of
//              a sum-apart operation)
//   RA_AR    : ALU-REG ar[33:0], sign-extended from ar[33]
//   RA_ARSH  : ALU-REG shifted right by 16: {ext, ar[32], ar[31:16]}, where
//              ar[33:32] and the extension are used when ext_i is set and
//              replaced by '0' otherwise (the 'ext' and 'cnct' blocks)
//   RA_ZERO  : zero (first cycle of a standard multiply)
// The byte-wide inputs (ar[23:16]/ar[7:0]/mr for byte 0, ar[31:24]/ar[15:8]/
// mr for byte 1, and the extended ALU-REG for bytes 2 and 3) follow the
// published routing. The published figure gives the 5-bit sub-adders only
// MAC-REG inputs; this design adds the ALU-REG sign and a zero so that the
// standard 32-bit multiply can use the full-width adder, and a zero input
// for the whole word. Purely combinational.
module star_route_a
  import star_pkg::*;
(
  input  logic [33:0]  ar_i,
  input  logic [103:0] mr_i,
  input  ra_sel_e      sel_i,
  input  logic         ext_i,
  output logic [51:0]  a_o
);

  logic x33, x32;
  assign x33 = ext_i & ar_i[33];
  assign x32 = ext_i & ar_i[32];

  always_comb begin
    unique case (sel_i)
      RA_MR_LO: a_o = mr_i[51:0];
      RA_MR_HI: a_o = mr_i[103:52];
      RA_AR:    a_o = {{18{ar_i[33]}}, ar_i};
      RA_ARSH:  a_o = {{35{x33}}, x32, ar_i[31:16]};
      default:  a_o = '0;
    endcase
  end

endmodule
