// tb_star_mac: self-checking testbench of the STAR-MAC unit.
//
// Runs random RV32M multiplies and random sequences of every MAC operation,
// then reads every accumulator lane back with retrieve. Expected values come
// from star_ref_pkg (plain integer arithmetic on sub-words, lanes wrapped to
// their published widths: 48/52-bit ST sum, 37-bit SA16, 21-bit SA8, 13-bit
// SA4 lanes). The number of cycles of each operation is checked against the
// latencies: MAC 2, MUL 3, MULH* 4, macrst and retrieve 1. Also checks that
// ALU-REG can be loaded from the ALU without disturbing a later multiply.
module tb_star_mac;
  import star_pkg::*;
  import star_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0;
  star_op_e    op = OP_NONE;
  ret_fmt_e    fmt = RF_ST_LO;
  logic [31:0] a = '0, b = '0;
  logic        alu_we = 1'b0;
  logic [33:0] alu_wdata = '0;
  logic [31:0] result;
  logic        valid;

  int checks = 0, failures = 0;

  star_mac dut (
    .clk_i (clk), .rst_ni (rst_n), .en_i (en), .op_i (op), .ret_fmt_i (fmt),
    .a_i (a), .b_i (b), .alu_we_i (alu_we), .alu_wdata_i (alu_wdata),
    .result_o (result), .valid_o (valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Runs one operation; returns its result and checks its cycle count.
  task automatic run(input star_op_e o, input ret_fmt_e f, input logic [31:0] x,
                     input logic [31:0] y, input int lat, output logic [31:0] r);
    int cyc;
    @(negedge clk);
    en = 1'b1; op = o; fmt = f; a = x; b = y;
    cyc = 0;
    forever begin
      cyc++;
      #1;
      if (valid) break;
      if (cyc > 8) break;
      @(negedge clk);
    end
    r = result;
    @(posedge clk);
    #1 en = 1'b0; op = OP_NONE;
    checks++;
    if (cyc != lat) begin
      failures++;
      $display("FAIL latency of %s: %0d cycles, expected %0d", o.name(), cyc, lat);
    end
  endtask

  // Reference accumulators.
  longint st_acc;
  longint sa16 [2];
  longint sa8  [4];
  longint sa4  [8];

  task automatic clear_ref();
    st_acc = 0;
    foreach (sa16[i]) sa16[i] = 0;
    foreach (sa8[i])  sa8[i]  = 0;
    foreach (sa4[i])  sa4[i]  = 0;
  endtask

  logic [31:0] r, x, y;
  star_op_e mops [6] = '{OP_MAC16ST, OP_MAC8ST, OP_MAC4ST, OP_MAC16SA, OP_MAC8SA, OP_MAC4SA};
  star_op_e mulops [4] = '{OP_MUL, OP_MULH, OP_MULHSU, OP_MULHU};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Directed corner cases of the standard multiplies, then random ones.
    for (int t = 0; t < 400; t++) begin
      int k = t % 4;
      case (t / 4)
        0: begin x = 32'h8000_0000; y = 32'h8000_0000; end
        1: begin x = 32'hFFFF_FFFF; y = 32'hFFFF_FFFF; end
        2: begin x = 32'h7FFF_FFFF; y = 32'h8000_0000; end
        3: begin x = 32'h0000_FFFF; y = 32'hFFFF_0000; end
        4: begin x = 32'hFFFF_8000; y = 32'h0000_7FFF; end
        default: begin x = $urandom; y = $urandom; end
      endcase
      run(mulops[k], RF_ST_LO, x, y, (k == 0) ? 3 : 4, r);
      check($sformatf("%s %h*%h", mulops[k].name(), x, y), r, rv_mul(k, x, y));
    end

    // ALU-REG load from the ALU, then a multiply that must ignore it.
    @(negedge clk); alu_we = 1'b1; alu_wdata = 34'h3_DEAD_BEEF;
    @(negedge clk); alu_we = 1'b0;
    run(OP_MULH, RF_ST_LO, 32'h1234_5678, 32'h9ABC_DEF0, 4, r);
    check("MULH after ALU load", r, rv_mul(1, 32'h1234_5678, 32'h9ABC_DEF0));

    // MAC sequences: every operation, several random lengths, extremes.
    for (int rep = 0; rep < 24; rep++) begin
      int m = rep % 6;
      int n = (rep < 6) ? 31 : 1 + ($urandom % 20);
      run(OP_MACRST, RF_ST_LO, '0, '0, 1, r);
      clear_ref();
      for (int i = 0; i < n; i++) begin
        if (rep < 6) begin
          // Most negative operands: the largest products of each lane.
          x = (m == 0 || m == 3) ? 32'h8000_8000 : (m == 1 || m == 4) ? 32'h8080_8080 : 32'h8888_8888;
          y = x;
        end else begin
          x = $urandom; y = $urandom;
        end
        run(mops[m], RF_ST_LO, x, y, 2, r);
        case (m)
          0: st_acc += sw(x, 16, 0) * sw(y, 16, 0) + sw(x, 16, 1) * sw(y, 16, 1);
          1: st_acc += st_dot(x[15:0], y[15:0], 8) + st_dot(x[31:16], y[31:16], 8);
          2: st_acc += st_dot(x[15:0], y[15:0], 4) + st_dot(x[31:16], y[31:16], 4);
          3: for (int k = 0; k < 2; k++) sa16[k] += sw(x, 16, k) * sw(y, 16, k);
          4: for (int k = 0; k < 4; k++) sa8[k]  += sw(x, 8, k)  * sw(y, 8, k);
          default: for (int k = 0; k < 8; k++) sa4[k] += sw(x, 4, k) * sw(y, 4, k);
        endcase
      end
      case (m)
        0, 1, 2: begin
          run(OP_RETR, RF_ST_LO, 32'd0, '0, 1, r);
          check($sformatf("%s lo n=%0d", mops[m].name(), n), r, st_acc[31:0]);
          run(OP_RETR, RF_ST_HI, 32'd0, '0, 1, r);
          check($sformatf("%s hi n=%0d", mops[m].name(), n), r, sext(st_acc >>> 32, 16));
        end
        3: for (int k = 0; k < 2; k++) begin
          run(OP_RETR, RF_SA16_LO, 32'(k), '0, 1, r);
          check($sformatf("mac16sa lane%0d lo", k), r, sa16[k][31:0]);
          run(OP_RETR, RF_SA16_HI, 32'(k), '0, 1, r);
          check($sformatf("mac16sa lane%0d hi", k), r, sext(sa16[k] >>> 32, 5));
        end
        4: for (int k = 0; k < 4; k++) begin
          run(OP_RETR, RF_SA8, 32'(k), '0, 1, r);
          check($sformatf("mac8sa lane%0d", k), r, sext(sa8[k], 21));
        end
        default: for (int k = 0; k < 8; k++) begin
          run(OP_RETR, RF_SA4, 32'(k), '0, 1, r);
          check($sformatf("mac4sa lane%0d", k), r, sext(sa4[k], 13));
        end
      endcase
    end

    // Accumulation survives an unrelated multiply in between.
    run(OP_MACRST, RF_ST_LO, '0, '0, 1, r);
    run(OP_MAC8ST, RF_ST_LO, 32'h0102_0304, 32'h0506_0708, 2, r);
    run(OP_MUL, RF_ST_LO, 32'd7, 32'd9, 3, r);
    check("MUL between MACs", r, 32'd63);
    run(OP_MAC8ST, RF_ST_LO, 32'h0102_0304, 32'h0506_0708, 2, r);
    run(OP_RETR, RF_ST_LO, '0, '0, 1, r);
    check("mac8st across MUL", r, 32'(2 * (3*8 + 4*7 + 1*6 + 2*5)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
