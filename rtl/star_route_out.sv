// star_route_out: R-O1 and R-O2, the output routing of the STAR-MAC unit.
//
// R-O1 forwards either ALU-REG or one chunk of MAC-REG, sign-extended to
// 32 bits; R-O2 is one level of multiplexers choosing between R-O1 and the
// adder output. The chunks a retrieve can select (fmt_i, idx_i) are:
//   RF_ST_LO   : mr[31:0]               sum-together accumulator, low word
//   RF_ST_HI   : sext(mr[47:32])        upper bits of the 48-bit mac16st sum
//   RF_SA16_LO : lane[31:0]             idx 0: mr[36:0], idx 1: mr[88:52]
//   RF_SA16_HI : sext(lane[36:32])
//   RF_SA8     : sext of 21-bit lane    idx 0..3: {mr[46:42],mr[15:0]},
//                mr[36:16], {mr[98:94],mr[67:52]}, mr[88:68]
//   RF_SA4     : sext of 13-bit lane    idx 0..7: {mr[51:47],mr[7:0]},
//                {mr[46:42],mr[15:8]}, {mr[41:37],mr[23:16]}, mr[36:24],
//                and the same four in mr[103:52]
// Lane indices follow the order of the sub-word products: lane k holds the
// products of the k-th sub-words of the two source registers. Output words:
//   OS_D   : o = d[31:0]
//   OS_MUL : o = {d[15:0], ar[15:0]}  (last cycle of MUL)
//   OS_AR  : o = ar[31:0]
//   OS_RET : o = the selected chunk
// The chunk set is the one the published byte multiplexers can form; how
// lanes are numbered and coded is this design's own choice.
// Purely combinational.
module star_route_out
  import star_pkg::*;
(
  input  logic [51:0]  d_i,
  input  logic [33:0]  ar_i,
  input  logic [103:0] mr_i,
  input  out_sel_e     sel_i,
  input  ret_fmt_e     fmt_i,
  input  logic [2:0]   idx_i,
  output logic [31:0]  o_o
);

  logic [31:0] ret;     // R-O1 MAC-REG chunk
  logic [51:0] half;    // MAC-REG half selected by the lane index
  logic [12:0] lane13;
  logic [20:0] lane21;

  always_comb begin
    unique case (fmt_i)
      RF_SA4:  half = idx_i[2] ? mr_i[103:52] : mr_i[51:0];
      RF_SA8:  half = idx_i[1] ? mr_i[103:52] : mr_i[51:0];
      default: half = idx_i[0] ? mr_i[103:52] : mr_i[51:0];
    endcase

    unique case (idx_i[1:0])
      2'd0:    lane13 = {half[51:47], half[7:0]};
      2'd1:    lane13 = {half[46:42], half[15:8]};
      2'd2:    lane13 = {half[41:37], half[23:16]};
      default: lane13 = {half[36:32], half[31:24]};
    endcase
    lane21 = idx_i[0] ? {half[36:32], half[31:16]} : {half[46:42], half[15:0]};

    unique case (fmt_i)
      RF_ST_LO:   ret = mr_i[31:0];
      RF_ST_HI:   ret = 32'(signed'(mr_i[47:32]));
      RF_SA16_LO: ret = half[31:0];
      RF_SA16_HI: ret = 32'(signed'(half[36:32]));
      RF_SA8:     ret = 32'(signed'(lane21));
      RF_SA4:     ret = 32'(signed'(lane13));
      default:    ret = mr_i[31:0];
    endcase

    unique case (sel_i)
      OS_D:    o_o = d_i[31:0];
      OS_MUL:  o_o = {d_i[15:0], ar_i[15:0]};
      OS_AR:   o_o = ar_i[31:0];
      default: o_o = ret;
    endcase
  end

endmodule
