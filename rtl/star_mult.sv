// star_mult: STAR sum-together / sum-apart reconfigurable 16-bit multiplier.
//
// Multiplies two 16-bit operands in one of five configurations and returns
// s[31:0] combinationally:
//   MM_16  : s = a * b                                   (SA16 = ST16)
//   MM_SA8 : s[31:16] = a[15:8]*b[15:8], s[15:0] = a[7:0]*b[7:0]
//   MM_SA4 : s[8k+7:8k] = a[4k+3:4k] * b[4k+3:4k], k = 0..3
//   MM_ST8 : s = a[7:0]*b[15:8] + a[15:8]*b[7:0]          (17-bit dot product)
//   MM_ST4 : s = sum_k a[4k+3:4k]*b[15-4k:12-4k]          (10-bit dot product)
// The partial-product matrix is cut into a 4x4 grid of 4-bit x 4-bit tiles.
// Each mode switches a set of tiles on: the whole grid (16-bit), the
// diagonal blocks (sum apart) or the anti-diagonal blocks (sum together),
// so one array serves all modes, as in the working principle of the STAR
// multiplier. Each tile is a signed 5x5 product whose operand digits are
// sign-extended only when the digit is the top digit of a signed
// sub-operand; sign_a / sign_b select signed or unsigned operands (the
// standard multiply needs unsigned halves; the MAC operations are signed).
//
// Sum-apart lanes are truncated to their own field, so a negative lane does
// not borrow from its neighbour. Sum-together results are returned
// right-aligned and sign-extended to 32 bits, so that they accumulate at the
// least significant end of MAC-REG. In the natural partial-product weights
// these dot products sit at s[24:8] (ST8) and s[21:12] (ST4); the alignment
// shift is wiring inside the multiplier. The tile-level structure is this
// design's own choice: the published description gives the modes and
// bit fields, not the gate-level array.
// Purely combinational.
module star_mult
  import star_pkg::*;
(
  input  logic [15:0] a_i,
  input  logic [15:0] b_i,
  input  logic        sign_a_i,
  input  logic        sign_b_i,
  input  mult_mode_e  mode_i,
  output logic [31:0] s_o
);

  // Tile products P[i][j] = digit a_i * digit b_j (10-bit signed).
  logic signed [9:0] tile [4][4];
  logic [3:0] dsa, dsb;   // per-digit signed flags

  always_comb begin
    unique case (mode_i)
      MM_16:          begin dsa = {sign_a_i, 3'b000}; dsb = {sign_b_i, 3'b000}; end
      MM_SA8, MM_ST8: begin dsa = {sign_a_i, 1'b0, sign_a_i, 1'b0};
                            dsb = {sign_b_i, 1'b0, sign_b_i, 1'b0}; end
      default:        begin dsa = {4{sign_a_i}}; dsb = {4{sign_b_i}}; end
    endcase
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        tile[i][j] = $signed({dsa[i] & a_i[4*i+3], a_i[4*i +: 4]}) *
                     $signed({dsb[j] & b_i[4*j+3], b_i[4*j +: 4]});
      end
    end
  end

  // Mode-dependent reduction of the active tiles.
  logic signed [39:0] acc_full, acc_lo8, acc_hi8, acc_st8, acc_st4;

  always_comb begin
    acc_full = '0;
    acc_lo8  = '0;
    acc_hi8  = '0;
    acc_st8  = '0;
    acc_st4  = '0;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        acc_full += 40'(tile[i][j]) <<< (4 * (i + j));
        if (i < 2 && j < 2)   acc_lo8 += 40'(tile[i][j]) <<< (4 * (i + j));
        if (i >= 2 && j >= 2) acc_hi8 += 40'(tile[i][j]) <<< (4 * (i + j - 4));
        if ((i < 2) != (j < 2)) acc_st8 += 40'(tile[i][j]) <<< (4 * (i + j - 2));
        if (i + j == 3)       acc_st4 += 40'(tile[i][j]);
      end
    end
  end

  always_comb begin
    unique case (mode_i)
      MM_16:   s_o = acc_full[31:0];
      MM_SA8:  s_o = {acc_hi8[15:0], acc_lo8[15:0]};
      MM_SA4:  s_o = {tile[3][3][7:0], tile[2][2][7:0], tile[1][1][7:0], tile[0][0][7:0]};
      MM_ST8:  s_o = 32'(signed'(acc_st8[16:0]));
      MM_ST4:  s_o = 32'(signed'(acc_st4[9:0]));
      default: s_o = '0;
    endcase
  end

endmodule
