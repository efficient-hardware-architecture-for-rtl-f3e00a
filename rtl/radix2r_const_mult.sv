// radix2r_const_mult: multiplierless multiplication by a constant.
//
// Computes p = round(x * CONST / 2^FRAC) with shifts and adders only. The
// constant is split into R-bit segments and each segment is recoded into a
// signed radix-2^R digit d_j in [-2^(R-1), 2^(R-1)), so that
// CONST = sum_j d_j * 2^(R*j). Each digit product d_j * x is formed from the
// binary bits of |d_j| as a sum of shifted copies of x, added or subtracted
// by the sign of d_j; all partial products are then summed. The digit
// recoding is done while the design is elaborated. In the rotator this
// multiplies the result by the inverse CORDIC gain. The recoding into
// equal-length signed segments follows the radix-2^r idea; R = 4 and the
// plain bit-wise digit products (no shared odd multiples) are this design's
// choices. Combinational.
module radix2r_const_mult #(
  parameter int W     = 22,      // operand and result width
  parameter int CONST = 39797,   // positive constant, FRAC fraction bits
  parameter int FRAC  = 16,
  parameter int R     = 4        // segment (digit) length in bits
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] p
);

  // digits needed to cover a constant below 2^31, plus one for the final carry
  localparam int ND = (31 + R - 1) / R + 1;
  localparam int AccW = W + R * ND + 1;

  // signed digits, 8 bits each, least significant first
  function automatic logic [ND*8-1:0] recode();
    logic [ND*8-1:0] dig;
    int c, d;
    dig = '0;
    c = CONST;
    for (int j = 0; j < ND; j++) begin
      d = c & ((1 << R) - 1);
      if (d >= (1 << (R - 1))) d = d - (1 << R);
      dig[j*8 +: 8] = 8'(d);
      c = (c - d) >>> R;
    end
    return dig;
  endfunction

  localparam logic [ND*8-1:0] DIGITS = recode();

  logic signed [AccW-1:0] xe, acc;
  logic signed [7:0]      d;
  logic        [7:0]      mag;

  always_comb begin
    xe  = AccW'(x);
    acc = '0;
    for (int j = 0; j < ND; j++) begin
      d   = DIGITS[j*8 +: 8];
      mag = (d < 0) ? 8'(-d) : 8'(d);
      for (int b = 0; b < R; b++) begin
        if (mag[b]) begin
          if (d < 0) acc = acc - (xe <<< (R * j + b));
          else       acc = acc + (xe <<< (R * j + b));
        end
      end
    end
    // round to nearest and drop the fraction bits
    acc = acc + (AccW'(1) <<< (FRAC - 1));
    p   = W'(acc >>> FRAC);
  end

endmodule
