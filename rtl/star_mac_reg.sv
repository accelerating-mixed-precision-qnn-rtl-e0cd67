// star_mac_reg: MAC-REG, the 104-bit accumulation register, with R-MAC.
//
// MAC-REG holds the running sums of the multiply-accumulate operations
// between instructions, so accumulation continues across non-consecutive
// instructions. It is split into 8-bit and 5-bit sub-registers that match
// the sub-adders: the lower half mr[51:0] and the upper half mr[103:52] have
// the same layout as the adder output d[51:0]. R-MAC gives every adder output
// segment a fanout of two, one to each half, and a 2-to-1 multiplexer in
// front of each sub-register chooses between keeping its value and loading d:
//   MR_HOLD  : keep
//   MR_LO    : mr[51:0]   <= d   (sum-together steps, first sum-apart step)
//   MR_HI    : mr[103:52] <= d   (second sum-apart step)
//   MR_CLEAR : mr <= 0           (the MAC reset operation)
// The synchronous clear and the asynchronous active-low reset are this
// design's own choices. One clock cycle per write; mr_o is the register.
module star_mac_reg
  import star_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  mr_sel_e      sel_i,
  input  logic [51:0]  d_i,
  output logic [103:0] mr_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mr_o <= '0;
    end else begin
      unique case (sel_i)
        MR_LO:    mr_o[51:0]   <= d_i;
        MR_HI:    mr_o[103:52] <= d_i;
        MR_CLEAR: mr_o         <= '0;
        default:  ;
      endcase
    end
  end

endmodule
