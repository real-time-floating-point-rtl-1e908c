// fp_arith: the "FP Add, Mul & Div" stage in front of the polynomial
// evaluator. It turns the position of the sample being filtered into the
// argument of the filter polynomial:
//   x = (k * scale + l * lscale + offset) / divisor
// where k is the frequency bin within the line and l the line number in the
// sub-block, both integers, and scale, lscale, offset and divisor are host
// registers. The design names this unit and its operators (addition,
// multiplication, division, type conversion); the formula is this
// implementation's choice of the simplest mapping that uses them.
//
// Timing: five pipeline stages (convert, multiply, add, add, divide), one
// sample per cycle, out_valid follows in_valid by FPA_LAT cycles.
module fp_arith
  import sar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fp32_t       scale,
  input  fp32_t       lscale,
  input  fp32_t       offset,
  input  fp32_t       divisor,
  input  logic        in_valid,
  input  logic [31:0] k,
  input  logic [31:0] l,
  output logic        out_valid,
  output fp32_t       x
);
  logic  [FPA_LAT-1:0] v;
  fp32_t kf, lf, km, lm, s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v  <= '0;
      kf <= FP_ZERO; lf <= FP_ZERO;
      km <= FP_ZERO; lm <= FP_ZERO;
      s1 <= FP_ZERO; s2 <= FP_ZERO;
      x  <= FP_ZERO;
    end else begin
      v  <= {v[FPA_LAT-2:0], in_valid};
      kf <= i2f(k);
      lf <= i2f(l);
      km <= fmul(kf, scale);
      lm <= fmul(lf, lscale);
      s1 <= fadd(km, lm);
      s2 <= fadd(s1, offset);
      x  <= fdiv(s2, divisor);
    end
  end
  assign out_valid = v[FPA_LAT-1];
endmodule
