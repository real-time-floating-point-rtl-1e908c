// filter_gen: matched filter coefficient generator of one datapath. For every
// FFT output sample, identified by its frequency bin k and its line l within
// the sub-block, it delivers the complex coefficient that sample is
// multiplied with, exactly FILT_LAT cycles after the request, so the
// datapath only has to delay its FFT output by the same amount.
//
// Sources, chosen by coef_sel (the MUX in front of the complex multiplier):
//   COEF_PHASE   exp(j*phi): x from fp_arith, phi = poly(x) (or x itself
//                when phase_direct is set, the DE-MUX after the polynomial
//                evaluator), then phase_f2i and cordic_f2f
//   COEF_WINDOW  window LUT at bin k
//   COEF_CHIRP   chirp LUT at bin k
//   COEF_UNITY   1 + 0j
// The polynomial chain, the two LUTs and the selection follow the design's
// datapath figure; the unity source and the exact formula of the argument x
// are this implementation's choices. Coefficients are computed while the FFT
// runs, so they cost no extra cycles.
//
// Interface: req_valid/k/l one request per cycle; coef_valid/coef exactly
// FILT_LAT cycles later. LUT write ports pass through to the two tables.
// Configuration inputs must be stable while requests are in flight.
module filter_gen
  import sar_pkg::*;
#(
  parameter int LUT_DEPTH = 32768,
  parameter int AW        = $clog2(LUT_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sar_cfg_t      cfg,
  input  logic          chirp_wr_en,
  input  logic          win_wr_en,
  input  logic [AW-1:0] lut_wr_addr,
  input  cplx_t         lut_wr_data,
  input  logic          req_valid,
  input  logic [31:0]   k,
  input  logic [31:0]   l,
  output logic          coef_valid,
  output cplx_t         coef
);
  // Input register.
  logic        v0;
  logic [31:0] k0, l0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; k0 <= '0; l0 <= '0;
    end else begin
      v0 <= req_valid; k0 <= k; l0 <= l;
    end
  end

  // Phase chain.
  logic  xa_valid, py_valid, ph_valid, co_valid;
  fp32_t xa, py, xa_dly;
  logic [15:0] pw;
  cplx_t phasor;

  fp_arith u_fpa (
    .clk, .rst_n, .scale(cfg.scale), .lscale(cfg.lscale), .offset(cfg.offset),
    .divisor(cfg.divisor), .in_valid(v0), .k(k0), .l(l0),
    .out_valid(xa_valid), .x(xa));

  poly_eval u_poly (
    .clk, .rst_n, .coef(cfg.poly), .in_valid(xa_valid), .x(xa),
    .out_valid(py_valid), .y(py));

  delay_line #(.W(32), .N(POLY_LAT)) u_xdly (.clk, .rst_n, .d(xa), .q(xa_dly));

  phase_f2i u_f2i (
    .clk, .rst_n, .phase_scale(cfg.phase_scale), .in_valid(py_valid),
    .phase(cfg.phase_direct ? xa_dly : py), .out_valid(ph_valid), .phase_word(pw));

  cordic_f2f u_cordic (
    .clk, .rst_n, .in_valid(ph_valid), .phase_word(pw),
    .out_valid(co_valid), .phasor(phasor));

  // LUT path: read one cycle after the input register, then delayed.
  cplx_t chirp_q, win_q, lut_sel, lut_dly;
  coef_lut #(.DEPTH(LUT_DEPTH)) u_chirp (
    .clk, .wr_en(chirp_wr_en), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .rd_addr(k0[AW-1:0]), .rd_data(chirp_q));
  coef_lut #(.DEPTH(LUT_DEPTH)) u_win (
    .clk, .wr_en(win_wr_en), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .rd_addr(k0[AW-1:0]), .rd_data(win_q));
  assign lut_sel = (cfg.coef_sel == COEF_CHIRP) ? chirp_q : win_q;
  delay_line #(.W(64), .N(FILT_LAT - 2)) u_ldly (.clk, .rst_n, .d(lut_sel), .q(lut_dly));

  // Output MUX.
  always_comb begin
    coef_valid = co_valid;
    unique case (cfg.coef_sel)
      COEF_PHASE:  coef = phasor;
      COEF_WINDOW,
      COEF_CHIRP:  coef = lut_dly;
      default:     coef = {FP_ONE, FP_ZERO};
    endcase
  end
endmodule
