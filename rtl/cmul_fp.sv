// cmul_fp: the complex multiplier after the FFT. Every spectrum sample is
// multiplied by the one filter coefficient generated for it,
//   y = a * b = (ar*br - ai*bi) + j(ar*bi + ai*br),
// in single precision. A side-band word (the sample's line and bin) travels
// with the product so the result can be written to its cache address.
// Function from the design; the two-stage split (four products, then sum
// and difference) is this implementation's choice.
//
// Timing: two pipeline stages, one product per cycle, no back-pressure.
module cmul_fp
  import sar_pkg::*;
#(
  parameter int SW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx_t         a,
  input  cplx_t         b,
  input  logic [SW-1:0] in_side,
  output logic          out_valid,
  output cplx_t         y,
  output logic [SW-1:0] out_side
);
  fp32_t rr, ii, ri, ir;
  logic  v1;
  logic [SW-1:0] side1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0; ii <= '0; ri <= '0; ir <= '0; v1 <= 1'b0; side1 <= '0;
      y <= '0; out_valid <= 1'b0; out_side <= '0;
    end else begin
      rr <= fmul(a[63:32], b[63:32]);
      ii <= fmul(a[31:0],  b[31:0]);
      ri <= fmul(a[63:32], b[31:0]);
      ir <= fmul(a[31:0],  b[63:32]);
      v1 <= in_valid;
      side1 <= in_side;
      y  <= {fsub(rr, ii), fadd(ri, ir)};
      out_valid <= v1;
      out_side  <= side1;
    end
  end
endmodule
