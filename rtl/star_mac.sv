// star_mac: the STAR-MAC unit.
//
// A precision-scalable multiply-accumulate unit that takes the place of the
// 3-cycle fast multiplier inside a small two-stage RISC-V core. Its 16-bit
// STAR multiplier works either as one 16x16 multiplier, as a SIMD unit that
// keeps 2 or 4 narrow products apart (sum-apart, SA), or as a dot-product
// unit that adds them together (sum-together, ST). A 52-bit adder split into
// 8-bit and 5-bit sub-adders adds the product to ALU-REG (standard multiply)
// or to one half of the 104-bit MAC-REG (MAC operations).
//
// Datapath, one pass per clock cycle:
//   operand muxes (A[31:16]/A[15:0], B[31:16]/B[15:0]) -> star_mult -> s
//   R-B (s, sign-extended per lane) and R-A (ALU-REG or MAC-REG) -> star_adder -> d
//   d -> R-MAC -> MAC-REG,  d -> R-ALU -> ALU-REG,  d/ALU-REG/MAC-REG -> R-O -> o
// star_ctrl sequences the cycles of each operation.
//
// Interface: hold en_i, op_i, ret_fmt_i, a_i and b_i stable from the first
// cycle of an operation until valid_o. result_o is valid in the cycle valid_o
// is high (combinational from the registers and the adder), and register
// updates of that cycle take effect at its closing clock edge. Latency:
// MAC operations 2 cycles, MUL 3, MULH/MULHSU/MULHU 4, macrst and retrieve 1.
// A retrieve returns the MAC-REG chunk selected by ret_fmt_i and the lane
// index a_i[2:0]. alu_we_i/alu_wdata_i load ALU-REG from the ALU when no
// multiply is using it. A MAC operation returns d[31:0] of its last cycle;
// software reads sums with retrieve. The operand source of the lane index
// and the value returned by MAC operations are this design's own choices.
module star_mac
  import star_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        en_i,
  input  star_op_e    op_i,
  input  ret_fmt_e    ret_fmt_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic        alu_we_i,
  input  logic [33:0] alu_wdata_i,
  output logic [31:0] result_o,
  output logic        valid_o
);

  star_ctrl_t   ctrl;
  logic [1:0]   step;
  logic [15:0]  op_a, op_b;
  logic [31:0]  s;
  logic [51:0]  add_a, add_b, d;
  logic [103:0] mr;
  logic [33:0]  ar;
  alu_sel_e     alu_sel;

  star_ctrl u_ctrl (
    .clk_i, .rst_ni, .en_i, .op_i,
    .ctrl_o (ctrl), .valid_o, .step_o (step)
  );

  // Operand multiplexers.
  assign op_a = ctrl.a_hi ? a_i[31:16] : a_i[15:0];
  assign op_b = ctrl.b_hi ? b_i[31:16] : b_i[15:0];

  star_mult u_mult (
    .a_i (op_a), .b_i (op_b), .sign_a_i (ctrl.sign_a), .sign_b_i (ctrl.sign_b),
    .mode_i (ctrl.mmode), .s_o (s)
  );

  star_route_b u_rb (.s_i (s), .sel_i (ctrl.rb), .b_o (add_b));

  star_route_a u_ra (
    .ar_i (ar), .mr_i (mr), .sel_i (ctrl.ra), .ext_i (ctrl.ra_sext), .a_o (add_a)
  );

  star_adder u_add (.a_i (add_a), .b_i (add_b), .cfg_i (ctrl.acfg), .d_o (d));

  star_mac_reg u_mr (.clk_i, .rst_ni, .sel_i (ctrl.mr), .d_i (d), .mr_o (mr));

  assign alu_sel = (ctrl.alu == AL_HOLD && alu_we_i) ? AL_ALU : ctrl.alu;

  star_alu_reg u_ar (
    .clk_i, .rst_ni, .sel_i (alu_sel), .d_i (d), .alu_i (alu_wdata_i), .ar_o (ar)
  );

  star_route_out u_ro (
    .d_i (d), .ar_i (ar), .mr_i (mr), .sel_i (ctrl.osel),
    .fmt_i (ret_fmt_i), .idx_i (a_i[2:0]), .o_o (result_o)
  );

  // The step counter never passes the last cycle of the longest operation.
  a_step_bound: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 en_i && step == 2'd3 |-> valid_o);

endmodule
