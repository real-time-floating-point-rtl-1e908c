// cordic_f2f: "CORDIC & F2F". Turns a 16-bit phase word (one turn = 65536)
// into the unit phasor exp(j*2*pi*phase/65536) in single precision, the
// form in which a phase-only matched filter multiplies the spectrum.
//
// How it works: the phase is widened to a 32-bit turn fraction; phases
// beyond a quarter turn are folded by half a turn with the start vector
// negated. ITER rotation-mode micro-rotations on 20-bit fixed point
// (16 fraction bits), started from the CORDIC gain 1/K, drive the residual
// angle to zero. The fixed-point cosine and sine are then converted to float
// ("F2F", fixed to float). The arctangent table holds round(atan(2^-i) /
// (2*pi) * 2^32).
// The design names the unit and its 16-bit input; word lengths, iteration
// count and folding are this implementation's choices. Accuracy is about
// 2e-4 in each component.
//
// Timing: fully pipelined, one phase per cycle, latency ITER+2 cycles.
module cordic_f2f
  import sar_pkg::*;
#(
  parameter int ITER = CORDIC_IT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] phase_word,
  output logic        out_valid,
  output cplx_t       phasor
);
  localparam int W = 20;
  localparam logic signed [W-1:0] KINIT = 20'sd39797;   // 0.607253 * 2^16
  localparam logic [31:0] ATAN [18] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215 };

  logic signed [W-1:0]  xs [ITER+1];
  logic signed [W-1:0]  ys [ITER+1];
  logic signed [31:0]   zs [ITER+1];
  logic                 vs [ITER+1];

  // Stage 0: fold into [-90, +90] degrees.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      logic signed [31:0] z;
      z = {phase_word, 16'd0};
      vs[0] <= in_valid;
      ys[0] <= '0;
      if (z >= 32'sh4000_0000 || z < -32'sh4000_0000) begin
        xs[0] <= -KINIT;
        zs[0] <= z ^ 32'sh8000_0000;
      end else begin
        xs[0] <= KINIT;
        zs[0] <= z;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_it
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (!zs[i][31]) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - $signed(ATAN[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + $signed(ATAN[i]);
        end
      end
    end
  end

  // F2F: fixed point (16 fraction bits) to float.
  localparam fp32_t TWO_M16 = 32'h3780_0000;   // 2^-16
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phasor <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= vs[ITER];
      phasor    <= {fmul(i2f(32'(xs[ITER])), TWO_M16), fmul(i2f(32'(ys[ITER])), TWO_M16)};
    end
  end

  initial assert (ITER <= 18) else $error("cordic_f2f: ITER above table size");
endmodule
