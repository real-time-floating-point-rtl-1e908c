// poly_eval: streaming evaluation of a degree-6 polynomial in single precision
// by Horner's rule,
//   f(x) = ((((((a6 x + a5) x + a4) x + a3) x + a2) x + a1) x + a0 .
// One shared evaluator serves every polynomial of the filter generator;
// lower-degree polynomials set their unused high coefficients to zero.
//
// Structure: six Horner steps, each a multiply stage followed by an add
// stage (12 pipeline registers), then a delay line that pads the total
// latency to LATENCY cycles. The degree (6), the Horner form and the
// 26-cycle latency with one input accepted per cycle follow the design
// description; the split into stages is this implementation's choice.
//
// Interface: in_valid/x enter every cycle; out_valid/y appear exactly
// LATENCY cycles later. coef[i] is a_i and must stay constant while samples
// are in flight. There is no back-pressure.
module poly_eval
  import sar_pkg::*;
#(
  parameter int DEGREE  = 6,
  parameter int LATENCY = POLY_LAT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  fp32_t [DEGREE:0]   coef,
  input  logic               in_valid,
  input  fp32_t              x,
  output logic               out_valid,
  output fp32_t              y
);
  localparam int STAGES = 2 * DEGREE;
  localparam int PAD    = LATENCY - STAGES;

  // Stage 2i holds acc*x, stage 2i+1 holds acc*x + a_(DEGREE-1-i).
  fp32_t acc [STAGES+1];
  fp32_t xs  [STAGES+1];
  logic  vs  [STAGES+1];

  always_comb begin
    acc[0] = coef[DEGREE];
    xs[0]  = x;
    vs[0]  = in_valid;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[s+1]  <= 1'b0;
        acc[s+1] <= FP_ZERO;
        xs[s+1]  <= FP_ZERO;
      end else begin
        vs[s+1] <= vs[s];
        xs[s+1] <= xs[s];
        if (s % 2 == 0) acc[s+1] <= fmul(acc[s], xs[s]);
        else            acc[s+1] <= fadd(acc[s], coef[DEGREE-1-s/2]);
      end
    end
  end

  if (PAD > 0) begin : g_pad
    fp32_t dly_y [PAD];
    logic  dly_v [PAD];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < PAD; i++) begin
          dly_y[i] <= FP_ZERO;
          dly_v[i] <= 1'b0;
        end
      end else begin
        dly_y[0] <= acc[STAGES];
        dly_v[0] <= vs[STAGES];
        for (int i = 1; i < PAD; i++) begin
          dly_y[i] <= dly_y[i-1];
          dly_v[i] <= dly_v[i-1];
        end
      end
    end
    assign y         = dly_y[PAD-1];
    assign out_valid = dly_v[PAD-1];
  end else begin : g_nopad
    assign y         = acc[STAGES];
    assign out_valid = vs[STAGES];
  end

  initial assert (LATENCY >= STAGES) else $error("poly_eval: LATENCY below %0d", STAGES);
endmodule
