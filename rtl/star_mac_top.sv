// star_mac_top: STAR-MAC execution slice of the STAR-based core.
//
// Joins the decoder extension and the STAR-MAC unit as the execute stage of
// the host core sees them: an instruction word with its two source register
// values comes in, and a result for the destination register comes out when
// the multi-cycle operation finishes. The rest of the core (fetch, register
// file, controller, CSRs, ALU, load/store unit) is the unmodified host core
// and is not part of this design; its ALU connection to ALU-REG is brought
// out as alu_we_i/alu_wdata_i.
//
// Timing: raise instr_valid_i with instr_i, rs1_i and rs2_i and hold them
// until rd_valid_o (the host core's decode stage holds an instruction while
// the multiplier is busy). rd_wdata_o is valid in the rd_valid_o cycle; a
// new instruction may be presented in the next cycle. Words that are not
// STAR-MAC or RV32M multiply instructions raise not_mine_o in the same cycle
// and start nothing.
module star_mac_top
  import star_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        instr_valid_i,
  input  logic [31:0] instr_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  input  logic        alu_we_i,
  input  logic [33:0] alu_wdata_i,
  output logic [31:0] rd_wdata_o,
  output logic        rd_valid_o,
  output logic        not_mine_o
);

  star_op_e op;
  ret_fmt_e fmt;
  logic     is_star, is_div;

  star_decoder u_dec (
    .instr_i, .op_o (op), .ret_fmt_o (fmt), .star_o (is_star), .div_o (is_div)
  );

  star_mac u_mac (
    .clk_i, .rst_ni,
    .en_i (instr_valid_i & is_star), .op_i (op), .ret_fmt_i (fmt),
    .a_i (rs1_i), .b_i (rs2_i),
    .alu_we_i, .alu_wdata_i,
    .result_o (rd_wdata_o), .valid_o (rd_valid_o)
  );

  assign not_mine_o = instr_valid_i & (~is_star | is_div);

endmodule
