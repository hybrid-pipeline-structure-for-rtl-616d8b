// solar_alu -- arithmetic function unit of one SOLAR processing node.
//
// Purely combinational: y = f(a, b) on 8-bit unsigned words, f chosen by func.
//   FN_IDENT    y = a
//   FN_HALF     y = a / 2
//   FN_ADD      y = a/2 + b/2 (each operand halved first, so the sum cannot
//               overflow; 47 and 57 give 23 + 28 = 51, the architecture's
//               "modified add")
//   FN_SUB      y = a/2 - b/2, limited at 0 (built by analogy with the
//               modified add; the limit at 0 is this design's choice)
//   FN_LOG      y ~= 32*log2(a), y(0) = 0 (Mitchell's approximation: the
//               leading-one position gives the integer part, the bits below
//               it give a linear fraction, truncated; error below 4 LSB)
//   FN_EXP      y ~= 2^(a/32), the inverse of FN_LOG (3 integer bits of a
//               select a shift, 5 fraction bits a linear mantissa)
//   FN_SIGMOID  y ~= 256/(1+exp(-(a-128)/16)), limited to 255 (input centred
//               on 128, piecewise-linear PLAN approximation with slopes 1/4,
//               1/8, 1/32)
// Only the function list and the modified add are fixed by the architecture;
// the fixed-point scalings of log, exp and sigmoid are this design's choice.
// The node registers y one node cycle after its operands are complete.
module solar_alu
  import solar_pkg::*;
(
  input  func_e func,
  input  data_t a,
  input  data_t b,
  output data_t y
);

  // ---- logarithm -----------------------------------------------------
  logic [2:0]  lg_e;
  logic [4:0]  lg_f;
  always_comb begin
    lg_e = '0;
    for (int i = 0; i < DW; i++)
      if (a[i]) lg_e = 3'(i);
    // a * 32 / 2^e lies in 32..63; keeping 5 bits drops the leading one
    lg_f = 5'({a, 5'b0} >> lg_e);
  end

  // ---- exponent ------------------------------------------------------
  logic [12:0] ex_full;
  always_comb ex_full = {7'd0, 1'b1, a[4:0]} << a[7:5];   // (32+f) * 2^e

  // ---- sigmoid -------------------------------------------------------
  logic [7:0] sg_d;   // |a - 128|, 16 LSB per unit of the argument
  logic [8:0] sg_p;   // sigmoid of +|x|, 256 = 1.0
  logic [8:0] sg_y;
  always_comb begin
    sg_d = a[7] ? {1'b0, a[6:0]} : 8'(8'd128 - a);
    if (sg_d < 8'd16)      sg_p = 9'd128 + 9'({sg_d[5:0], 2'b0});
    else if (sg_d < 8'd38) sg_p = 9'd160 + {sg_d, 1'b0};
    else if (sg_d < 8'd80) sg_p = 9'd216 + 9'(sg_d[7:1]);
    else                   sg_p = 9'd256;
    sg_y = a[7] ? sg_p : 9'(9'd256 - sg_p);
  end

  logic [DW-1:0] ha, hb;
  assign ha = a >> 1;
  assign hb = b >> 1;

  always_comb begin
    unique case (func)
      FN_IDENT:   y = a;
      FN_HALF:    y = ha;
      FN_ADD:     y = ha + hb;
      FN_SUB:     y = (ha > hb) ? data_t'(ha - hb) : '0;
      FN_LOG:     y = (a == '0) ? '0 : {lg_e, lg_f};
      FN_EXP:     y = data_t'(ex_full >> 5);
      FN_SIGMOID: y = sg_y[8] ? 8'hFF : sg_y[7:0];
      default:    y = a;
    endcase
  end

endmodule
