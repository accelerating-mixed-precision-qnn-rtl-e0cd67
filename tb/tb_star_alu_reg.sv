// tb_star_alu_reg: self-checking testbench of ALU-REG and R-ALU.
//
// Applies random hold / direct / shifted / ALU writes and compares the
// register with a model after every clock edge. The shifted write must put
// d[15:0] into ar[31:16] and d[17:16] into ar[33:32] and keep ar[15:0].
module tb_star_alu_reg;
  import star_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  alu_sel_e    sel = AL_HOLD;
  logic [51:0] d = '0;
  logic [33:0] alu = '0, ar, model;
  int checks = 0, failures = 0;

  star_alu_reg dut (.clk_i (clk), .rst_ni (rst_n), .sel_i (sel), .d_i (d), .alu_i (alu), .ar_o (ar));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      sel = alu_sel_e'($urandom % 4);
      d   = {20'($urandom), $urandom};
      alu = {2'($urandom), $urandom};
      @(posedge clk);
      case (sel)
        AL_D:     model = d[33:0];
        AL_SHIFT: model = {d[17:16], d[15:0], model[15:0]};
        AL_ALU:   model = alu;
        default:  ;
      endcase
      #1;
      checks++;
      if (ar !== model) begin
        failures++;
        if (failures < 10) $display("FAIL %s: got %h expected %h", sel.name(), ar, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
