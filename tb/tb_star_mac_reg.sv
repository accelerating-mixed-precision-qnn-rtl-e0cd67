// tb_star_mac_reg: self-checking testbench of MAC-REG and R-MAC.
//
// Applies random hold / lower-half / upper-half / clear writes and compares
// the register with a model after every clock edge, including reset.
module tb_star_mac_reg;
  import star_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  mr_sel_e      sel = MR_HOLD;
  logic [51:0]  d = '0;
  logic [103:0] mr, model;
  int checks = 0, failures = 0;

  star_mac_reg dut (.clk_i (clk), .rst_ni (rst_n), .sel_i (sel), .d_i (d), .mr_o (mr));

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
    checks++; if (mr !== '0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      sel = mr_sel_e'(($urandom % 8 == 0) ? 3 : $urandom % 3);
      d   = {20'($urandom), $urandom};
      @(posedge clk);
      case (sel)
        MR_LO:    model[51:0]   = d;
        MR_HI:    model[103:52] = d;
        MR_CLEAR: model         = '0;
        default:  ;
      endcase
      #1;
      checks++;
      if (mr !== model) begin
        failures++;
        if (failures < 10) $display("FAIL %s: got %h expected %h", sel.name(), mr, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
