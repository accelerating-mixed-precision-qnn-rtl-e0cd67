// star_decoder: instruction decoder extension for the STAR-MAC unit.
//
// Recognises the instructions the unit executes and turns them into an
// operation code for star_mac:
//   RV32M  (opcode 0110011, funct7 0000001): MUL, MULH, MULHSU, MULHU
//   custom-0 (opcode 0001011), R-type, funct7[6:3] = 0:
//     funct3 000 mac16st   001 mac8st   010 mac4st   011 macrst
//            100 mac16sa   101 mac8sa   110 mac4sa   111 retrieve
//   For retrieve, funct7[2:0] is the chunk format (ret_fmt_e) and the lane
//   index is taken from rs1[2:0]; the result goes to rd.
// Any other word gives OP_NONE with star_o low; an RV32M divide is left to
// the rest of the core (div_o). The instruction set (six MAC operations,
// a MAC-REG reset and a read-back) is the published one; the opcode and
// field encoding are this design's own, as no encoding is published.
// Purely combinational.
module star_decoder
  import star_pkg::*;
(
  input  logic [31:0] instr_i,
  output star_op_e    op_o,
  output ret_fmt_e    ret_fmt_o,
  output logic        star_o,    // instruction executes in the STAR-MAC unit
  output logic        div_o      // RV32M divide/remainder (not handled here)
);

  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_CUSTOM = 7'b0001011;

  logic [6:0] opcode, funct7;
  logic [2:0] funct3;

  assign opcode = instr_i[6:0];
  assign funct3 = instr_i[14:12];
  assign funct7 = instr_i[31:25];

  always_comb begin
    op_o      = OP_NONE;
    ret_fmt_o = RF_ST_LO;
    div_o     = 1'b0;
    if (opcode == OPC_OP && funct7 == 7'b0000001) begin
      unique case (funct3)
        3'b000:  op_o = OP_MUL;
        3'b001:  op_o = OP_MULH;
        3'b010:  op_o = OP_MULHSU;
        3'b011:  op_o = OP_MULHU;
        default: div_o = 1'b1;
      endcase
    end else if (opcode == OPC_CUSTOM && funct7[6:3] == 4'b0000) begin
      unique case (funct3)
        3'b000:  op_o = (funct7[2:0] == 3'b0) ? OP_MAC16ST : OP_NONE;
        3'b001:  op_o = (funct7[2:0] == 3'b0) ? OP_MAC8ST  : OP_NONE;
        3'b010:  op_o = (funct7[2:0] == 3'b0) ? OP_MAC4ST  : OP_NONE;
        3'b011:  op_o = (funct7[2:0] == 3'b0) ? OP_MACRST  : OP_NONE;
        3'b100:  op_o = (funct7[2:0] == 3'b0) ? OP_MAC16SA : OP_NONE;
        3'b101:  op_o = (funct7[2:0] == 3'b0) ? OP_MAC8SA  : OP_NONE;
        3'b110:  op_o = (funct7[2:0] == 3'b0) ? OP_MAC4SA  : OP_NONE;
        default: begin
          if (funct7[2:0] <= 3'd5) begin
            op_o      = OP_RETR;
            ret_fmt_o = ret_fmt_e'(funct7[2:0]);
          end
        end
      endcase
    end
  end

  assign star_o = (op_o != OP_NONE);

endmodule
