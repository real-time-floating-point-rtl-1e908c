// iq_correction: "Correction, 0-Padding, Complex Add & Mul". Raw radar
// echoes arrive as 8-bit/8-bit complex integers. Each sample is converted to
// single precision, corrected with a complex offset (the receiver's DC bias,
// removed by adding dc = -bias) and a complex gain, y = (x + dc) * g, and
// the line is then padded with zeros up to the FFT length 2^log2n.
//
// Raw sample format: I in bits [7:0], Q in bits [15:8], two's complement.
// The block's three functions and its 16-bit input follow the design; the
// bit order, the correction formula and the handshake are this
// implementation's choices.
//
// Interface: for every line, raw_len samples are taken with in_valid /
// in_ready, then 2^log2n - raw_len zeros are produced while in_ready is low;
// exactly 2^log2n outputs leave per line. A line begins with its first raw
// sample, so raw_len must be at least 1. Three pipeline stages (convert,
// add, multiply); no back-pressure on the output.
module iq_correction
  import sar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  log2n,
  input  logic [31:0] raw_len,
  input  fp32_t       dc_re,
  input  fp32_t       dc_im,
  input  fp32_t       g_re,
  input  fp32_t       g_im,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] in_data,
  output logic        out_valid,
  output cplx_t       out_data
);
  logic [31:0] cnt;
  logic        pad, active;
  logic [31:0] npts;
  assign npts     = 32'd1 << log2n;
  assign pad      = active && cnt >= raw_len;
  assign in_ready = !pad;

  logic  fire;
  assign fire = pad || in_valid;

  // A line starts with its first raw sample and ends after npts outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; active <= 1'b0;
    end else if (fire) begin
      if (cnt == npts - 1) begin
        cnt <= '0; active <= 1'b0;
      end else begin
        cnt <= cnt + 1; active <= 1'b1;
      end
    end
  end

  logic [2:0] v;
  logic [2:0] z;   // padding sample flags
  cplx_t s1, s2, s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0; z <= '0; s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      v  <= {v[1:0], fire};
      z  <= {z[1:0], pad};
      s1 <= {i2f(32'(signed'(in_data[7:0]))), i2f(32'(signed'(in_data[15:8])))};
      s2 <= cadd(s1, {dc_re, dc_im});
      s3 <= z[1] ? '0 : cmul(s2, {g_re, g_im});
    end
  end
  assign out_valid = v[2];
  assign out_data  = s3;
endmodule
