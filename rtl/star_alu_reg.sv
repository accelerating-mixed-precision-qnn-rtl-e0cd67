// star_alu_reg: ALU-REG, the 34-bit intermediate register, with R-ALU.
//
// ALU-REG holds the partial result between the cycles of a standard 32-bit
// multiply (and whatever the ALU stores in it for other multi-cycle
// instructions). It is split into sub-registers ar[7:0], ar[15:8],
// ar[23:16], ar[31:24] and ar[33:32], each fed by a 3-to-1 multiplexer:
//   AL_D     : ar <= d[33:0]
//   AL_SHIFT : ar[31:16] <= d[15:0], ar[33:32] <= d[17:16], ar[15:0] kept
//              (second cycle of MUL, which keeps the low half-word of the
//              product and the next partial sum)
//   AL_ALU   : ar <= alu_i (value from the ALU)
//   AL_HOLD  : keep
// The multiplexer inputs of each sub-register are the published ones; the
// select coding and the asynchronous active-low reset are this design's
// own. One clock cycle per write.
module star_alu_reg
  import star_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  alu_sel_e    sel_i,
  input  logic [51:0] d_i,
  input  logic [33:0] alu_i,
  output logic [33:0] ar_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ar_o <= '0;
    end else begin
      unique case (sel_i)
        AL_D:     ar_o <= d_i[33:0];
        AL_SHIFT: ar_o <= {d_i[17:16], d_i[15:0], ar_o[15:0]};
        AL_ALU:   ar_o <= alu_i;
        default:  ;
      endcase
    end
  end

endmodule
