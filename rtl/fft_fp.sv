// fft_fp: single-precision complex FFT / IFFT of one line, 2^log2n points
// (up to 2^MAX_LOG2), selected at run time so the same unit serves range
// lines (32768 points) and azimuth lines (8192 points).
//
// How it works: an in-place radix-2 decimation-in-time transform on one
// line memory. Samples are written in bit-reversed order as they arrive
// (LOAD); then log2n stages of N/2 butterflies run, one butterfly per cycle,
// each reading two entries, multiplying the lower one by the twiddle factor
// and writing sum and difference back (COMPUTE); finally the spectrum is
// streamed out in natural order (UNLOAD). Twiddles exp(-j*2*pi*m/2^MAX_LOG2)
// are held in a ROM of 2^(MAX_LOG2-1) entries computed at elaboration;
// stage s uses every 2^(MAX_LOG2-1-s)-th entry. The inverse transform uses
// the conjugate twiddles. Neither direction is scaled, so FFT followed by
// IFFT returns N times the input.
// The design uses a vendor floating-point FFT core here and gives only its
// function and sizes; this architecture is this implementation's own.
//
// Interface: in_ready is high in LOAD; N samples are accepted with
// in_valid. COMPUTE then takes exactly log2n*N/2 cycles. In UNLOAD
// out_valid is high for N consecutive cycles with out_idx = bin number,
// after which the unit returns to LOAD. log2n and inverse must be stable
// from the first input sample to the last output sample.
module fft_fp
  import sar_pkg::*;
#(
  parameter int MAX_LOG2 = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  log2n,
  input  logic        inverse,
  output logic        in_ready,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t       out_data,
  output logic [31:0] out_idx
);
  localparam int MAX_N = 1 << MAX_LOG2;
  localparam int AW    = MAX_LOG2;

  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_UNLOAD} state_e;
  state_e state;

  cplx_t mem [MAX_N];
  cplx_t tw  [MAX_N/2];

  initial begin
    for (int m = 0; m < MAX_N / 2; m++) begin
      real a;
      a = 2.0 * 3.14159265358979323846 * real'(m) / real'(MAX_N);
      tw[m] = {real2f($cos(a)), real2f(-$sin(a))};
    end
  end

  logic [AW:0]   cnt;      // sample counter in LOAD / UNLOAD, butterfly in COMPUTE
  logic [4:0]    stage;
  logic [AW:0]   npts;
  assign npts = (AW+1)'(1) << log2n;

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] i, input logic [4:0] n);
    logic [AW-1:0] r;
    for (int b = 0; b < AW; b++) r[b] = i[AW-1-b];
    return r >> (5'(AW) - n);
  endfunction

  // Butterfly addressing.
  logic [AW-1:0] j, pos, i0, i1, twi;
  cplx_t w, a0, a1, t;
  always_comb begin
    j   = cnt[AW-1:0];
    pos = j & ((AW'(1) << stage) - AW'(1));
    i0  = ((j >> stage) << (stage + 5'd1)) | pos;
    i1  = i0 | (AW'(1) << stage);
    twi = pos << (5'(AW - 1) - stage);
    w   = tw[twi[AW-2:0]];
    if (inverse) w[31:0] = fneg(w[31:0]);
    a0  = mem[i0];
    a1  = mem[i1];
    t   = cmul(a1, w);
  end

  assign in_ready = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid)
      mem[bitrev(cnt[AW-1:0], log2n)] <= in_data;
    else if (state == S_COMPUTE) begin
      mem[i0] <= cadd(a0, t);
      mem[i1] <= csub(a0, t);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      stage     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == npts - 1) begin
            cnt   <= '0;
            stage <= '0;
            state <= S_COMPUTE;
          end else cnt <= cnt + 1;
        end
        S_COMPUTE: begin
          if (cnt == (npts >> 1) - 1) begin
            cnt <= '0;
            if (stage == log2n - 1) state <= S_UNLOAD;
            else stage <= stage + 1;
          end else cnt <= cnt + 1;
        end
        S_UNLOAD: begin
          out_valid <= 1'b1;
          out_data  <= mem[cnt[AW-1:0]];
          out_idx   <= 32'(cnt);
          if (cnt == npts - 1) begin
            cnt   <= '0;
            state <= S_LOAD;
          end else cnt <= cnt + 1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  initial assert (MAX_LOG2 >= 2 && MAX_LOG2 <= 24) else $error("fft_fp: MAX_LOG2 out of range");
endmodule
