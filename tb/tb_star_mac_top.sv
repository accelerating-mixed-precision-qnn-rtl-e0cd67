// tb_star_mac_top: end-to-end testbench of the STAR-MAC execution slice.
//
// Feeds instruction words, as the host core's decode stage would, and runs
// the inner loops of quantized neural-network kernels with them:
//   * a fully-connected / pointwise-convolution layer (output-stationary,
//     sum-together MAC over the input channels, then one retrieve per output),
//     at 16-, 8- and 4-bit precision;
//   * a 3x3 depthwise convolution (sum-apart MAC: 2, 4 or 8 channels in
//     parallel, then one retrieve per channel), at 16-, 8- and 4-bit;
//   * RV32M multiplies with random and extreme operands;
//   * an ALU write into ALU-REG, and words the unit must ignore.
// Expected outputs are plain integer dot products and convolutions computed
// in the testbench. Every instruction's latency is checked (MAC 2, MUL 3,
// MULH* 4, macrst/retrieve 1 cycles), and each mechanism is counted: every
// MAC operation, every retrieve format, macrst, each multiply type, an
// ST-to-SA mode switch, the ALU-REG load and the ignored words; a mechanism
// that never happened counts as a failure.
module tb_star_mac_top;
  import star_pkg::*;
  import star_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ivalid = 1'b0;
  logic [31:0] instr = '0, rs1 = '0, rs2 = '0;
  logic        alu_we = 1'b0;
  logic [33:0] alu_wdata = '0;
  logic [31:0] rd;
  logic        rd_valid, not_mine;

  int checks = 0, failures = 0;
  int cnt [string];

  star_mac_top dut (
    .clk_i (clk), .rst_ni (rst_n), .instr_valid_i (ivalid), .instr_i (instr),
    .rs1_i (rs1), .rs2_i (rs2), .alu_we_i (alu_we), .alu_wdata_i (alu_wdata),
    .rd_wdata_o (rd), .rd_valid_o (rd_valid), .not_mine_o (not_mine)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Instruction words (custom-0 R-type for the MAC operations).
  function automatic logic [31:0] star_instr(input logic [2:0] f3, input logic [2:0] fmt);
    return {4'b0000, fmt, 5'd2, 5'd1, f3, 5'd3, 7'b0001011};
  endfunction
  function automatic logic [31:0] mul_instr(input logic [2:0] f3);
    return {7'b0000001, 5'd2, 5'd1, f3, 5'd3, 7'b0110011};
  endfunction

  // Issues one instruction and waits for its result.
  task automatic issue(input string name, input logic [31:0] w, input logic [31:0] a,
                       input logic [31:0] b, input int lat, output logic [31:0] r);
    int cyc;
    @(negedge clk);
    ivalid = 1'b1; instr = w; rs1 = a; rs2 = b;
    cyc = 0;
    forever begin
      cyc++;
      #1;
      if (rd_valid || cyc > 8) break;
      @(negedge clk);
    end
    r = rd;
    @(posedge clk);
    #1 ivalid = 1'b0;
    checks++;
    if (cyc != lat) begin
      failures++;
      $display("FAIL latency of %s: %0d cycles, expected %0d", name, cyc, lat);
    end
    if (cnt.exists(name)) cnt[name]++; else cnt[name] = 1;
  endtask

  // Packs n values of w bits into a word, element 0 in the low bits.
  function automatic logic [31:0] pack(input int v [8], input int w);
    logic [31:0] r = '0;
    for (int k = 0; k < 32 / w; k++) r[w*k +: 16] |= 16'(v[k]) & 16'((1 << w) - 1);
    return r;
  endfunction

  function automatic int rnd(input int w);
    return int'($urandom % (1 << w)) - (1 << (w - 1));
  endfunction

  logic [31:0] r;
  string last_mode = "";

  // Fully connected layer: out[o] = sum_i W[o][i] * X[i].
  task automatic fc_layer(input int w, input int cin, input int cout);
    int np = 32 / w;
    int x [256];
    int wt [256];
    int va [8], vb [8];
    longint acc;
    string opn = (w == 16) ? "mac16st" : (w == 8) ? "mac8st" : "mac4st";
    logic [2:0] f3 = (w == 16) ? 3'b000 : (w == 8) ? 3'b001 : 3'b010;
    if (last_mode == "sa") cnt["st_after_sa"] = 1;
    last_mode = "st";
    for (int i = 0; i < cin; i++) x[i] = rnd(w);
    for (int o = 0; o < cout; o++) begin
      for (int i = 0; i < cin; i++) wt[i] = rnd(w);
      issue("macrst", star_instr(3'b011, 3'd0), '0, '0, 1, r);
      acc = 0;
      for (int i = 0; i < cin; i += np) begin
        // Sum-together pairs sub-word k of one half with sub-word n-1-k of
        // the other operand's half, so the weights are packed reversed
        // within each 16-bit half.
        for (int k = 0; k < np; k++) begin
          int h = k / (np / 2), j = k % (np / 2);
          va[k] = x[i + k];
          vb[h * (np / 2) + (np / 2 - 1 - j)] = wt[i + k];
          acc += longint'(x[i + k]) * longint'(wt[i + k]);
        end
        issue(opn, star_instr(f3, 3'd0), pack(va, w), pack(vb, w), 2, r);
      end
      issue("ret_st_lo", star_instr(3'b111, 3'(RF_ST_LO)), '0, '0, 1, r);
      check($sformatf("fc%0d out%0d lo", w, o), r, acc[31:0]);
      issue("ret_st_hi", star_instr(3'b111, 3'(RF_ST_HI)), '0, '0, 1, r);
      check($sformatf("fc%0d out%0d hi", w, o), r, sext(acc >>> 32, 16));
    end
  endtask

  // 3x3 depthwise convolution, valid padding, np channels per instruction.
  task automatic dw_layer(input int w, input int ch, input int hw);
    int np = 32 / w;
    int img [8][8][16];
    int ker [3][3][16];
    int va [8], vb [8];
    longint acc [8];
    string opn = (w == 16) ? "mac16sa" : (w == 8) ? "mac8sa" : "mac4sa";
    logic [2:0] f3 = (w == 16) ? 3'b100 : (w == 8) ? 3'b101 : 3'b110;
    ret_fmt_e fmt = (w == 16) ? RF_SA16_LO : (w == 8) ? RF_SA8 : RF_SA4;
    if (last_mode == "st") cnt["sa_after_st"] = 1;
    last_mode = "sa";
    foreach (img[y, x, c]) img[y][x][c] = rnd(w);
    foreach (ker[y, x, c]) ker[y][x][c] = rnd(w);
    for (int oy = 0; oy < hw - 2; oy++)
      for (int ox = 0; ox < hw - 2; ox++)
        for (int cg = 0; cg < ch; cg += np) begin
          issue("macrst", star_instr(3'b011, 3'd0), '0, '0, 1, r);
          foreach (acc[k]) acc[k] = 0;
          for (int fy = 0; fy < 3; fy++)
            for (int fx = 0; fx < 3; fx++) begin
              for (int k = 0; k < np; k++) begin
                va[k] = img[oy + fy][ox + fx][cg + k];
                vb[k] = ker[fy][fx][cg + k];
                acc[k] += longint'(va[k]) * longint'(vb[k]);
              end
              issue(opn, star_instr(f3, 3'd0), pack(va, w), pack(vb, w), 2, r);
            end
          for (int k = 0; k < np; k++) begin
            issue((w == 16) ? "ret_sa16_lo" : (w == 8) ? "ret_sa8" : "ret_sa4",
                  star_instr(3'b111, 3'(fmt)), 32'(k), '0, 1, r);
            check($sformatf("dw%0d (%0d,%0d) ch%0d", w, oy, ox, cg + k), r,
                  (w == 16) ? acc[k][31:0] : sext(acc[k], (w == 8) ? 21 : 13));
            if (w == 16) begin
              issue("ret_sa16_hi", star_instr(3'b111, 3'(RF_SA16_HI)), 32'(k), '0, 1, r);
              check($sformatf("dw16 ch%0d hi", cg + k), r, sext(acc[k] >>> 32, 5));
            end
          end
        end
  endtask

  string mech [$] = '{"mac16st", "mac8st", "mac4st", "mac16sa", "mac8sa", "mac4sa",
                      "macrst", "ret_st_lo", "ret_st_hi", "ret_sa16_lo", "ret_sa16_hi",
                      "ret_sa8", "ret_sa4", "mul", "mulh", "mulhsu", "mulhu",
                      "sa_after_st", "st_after_sa", "alu_load", "ignored"};

  initial begin
    logic [31:0] x, y;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    fc_layer(16, 16, 4);
    dw_layer(16, 4, 4);
    fc_layer(8, 64, 4);
    dw_layer(8, 8, 5);
    fc_layer(4, 128, 4);
    dw_layer(4, 16, 5);

    // Standard multiplies.
    for (int t = 0; t < 200; t++) begin
      x = (t < 8) ? 32'h8000_0000 : $urandom;
      y = (t < 4) ? 32'hFFFF_FFFF : $urandom;
      issue("mul",    mul_instr(3'b000), x, y, 3, r); check("mul", r, rv_mul(0, x, y));
      issue("mulh",   mul_instr(3'b001), x, y, 4, r); check("mulh", r, rv_mul(1, x, y));
      issue("mulhsu", mul_instr(3'b010), x, y, 4, r); check("mulhsu", r, rv_mul(2, x, y));
      issue("mulhu",  mul_instr(3'b011), x, y, 4, r); check("mulhu", r, rv_mul(3, x, y));
    end

    // ALU writes ALU-REG; the next multiply must not see the old content.
    @(negedge clk); alu_we = 1'b1; alu_wdata = 34'h2_5555_AAAA; cnt["alu_load"] = 1;
    @(negedge clk); alu_we = 1'b0;
    issue("mulh", mul_instr(3'b001), 32'hCAFE_F00D, 32'h8765_4321, 4, r);
    check("mulh after alu load", r, rv_mul(1, 32'hCAFE_F00D, 32'h8765_4321));

    // Words that are not for the unit: a divide and an add.
    for (int t = 0; t < 2; t++) begin
      @(negedge clk);
      ivalid = 1'b1;
      instr = (t == 0) ? mul_instr(3'b100) : {7'd0, 5'd2, 5'd1, 3'b000, 5'd3, 7'b0110011};
      #1;
      checks++;
      if (!not_mine) begin failures++; $display("FAIL word %h not flagged", instr); end
      repeat (4) begin
        checks++;
        if (rd_valid) begin failures++; $display("FAIL word %h produced a result", instr); end
        @(negedge clk); #1;
      end
      ivalid = 1'b0;
      cnt["ignored"] = cnt.exists("ignored") ? cnt["ignored"] + 1 : 1;
    end

    foreach (mech[i]) begin
      int n;
      n = cnt.exists(mech[i]) ? cnt[mech[i]] : 0;
      $display("mechanism %-12s happened %0d times", mech[i], n);
      checks++;
      if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", mech[i]); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
