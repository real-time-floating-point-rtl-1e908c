// phase_f2i: the "F2I & Mod 32" stage between the filter phase and the
// CORDIC. A filter phase arrives as a float; it is multiplied by
// phase_scale, which maps one turn to 2^32 (2^32/(2*pi) when the phase is in
// radians), converted to an integer with rounding and kept modulo 2^32, so
// any number of whole turns drops out without a range check. The top 16
// bits are the CORDIC phase word (one turn = 65536).
// The unit's name and its 16-bit output follow the design; the phase scale
// register and the rounding mode are this implementation's choices.
//
// Timing: two stages (multiply, convert), one sample per cycle.
module phase_f2i
  import sar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fp32_t       phase_scale,
  input  logic        in_valid,
  input  fp32_t       phase,
  output logic        out_valid,
  output logic [15:0] phase_word
);
  fp32_t       p;
  logic [31:0] w;
  logic [1:0]  v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= FP_ZERO; w <= '0; v <= '0;
    end else begin
      v <= {v[0], in_valid};
      p <= fmul(phase, phase_scale);
      w <= f2i_mod32(p);
    end
  end
  assign out_valid  = v[1];
  assign phase_word = w[31:16];
endmodule
