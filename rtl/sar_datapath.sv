// sar_datapath: one of the parallel floating-point datapath instances of
// the focusing kernel. It caches one sub-block of lines (4 range lines or 16
// azimuth lines), streams each line through the FFT or IFFT, multiplies
// every spectrum sample by the filter coefficient generated for it, caches
// the filtered lines and hands them back towards HBM, cropped to out_len
// samples per line.
//
// Chain (following the design's datapath figure):
//   uram_cache_in -> dwc_in (256b to 16b raw / 64b float)
//     -> DE-MUX: raw data through iq_correction (conversion, complex offset
//        and gain, zero padding), float data bypasses it
//     -> fft_fp (forward or inverse)
//     -> cmul_fp with the coefficient from filter_gen
//     -> uram_cache_out -> dwc_out (512b to 256b)
// filter_gen is fed with (bin, line) as the FFT output appears, and the FFT
// output is delayed by FILT_LAT cycles, so the coefficient computation runs
// in parallel with the data and costs no extra cycles.
//
// Control: the kernel controller loads the input cache through ld_* (one
// 256-bit word per ld_valid, always accepted, word order as described in
// uram_cache_in), pulses proc_start, waits for proc_done (a level, cleared
// by the next start), then pulses st_start and drains st_* (valid/ready)
// until st_done. Lines are processed one after the other: feed N samples,
// transform, stream N filtered samples into the output cache.
// The sub-block sizes and the chain follow the design; the sequencing, the
// handshakes and line-at-a-time processing are this implementation's
// choices.
module sar_datapath
  import sar_pkg::*;
#(
  parameter int MAX_LOG2    = 15,
  parameter int LINES_RG    = 4,
  parameter int LINES_AZ    = 16,
  parameter int LANES       = 8,
  parameter int CACHE_DEPTH = 32768,
  parameter int OUT_DEPTH   = 16384,
  parameter int LUT_DEPTH   = 32768,
  parameter int LAW         = $clog2(LUT_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  sar_cfg_t       cfg,
  // LUT fill
  input  logic           chirp_wr_en,
  input  logic           win_wr_en,
  input  logic [LAW-1:0] lut_wr_addr,
  input  cplx_t          lut_wr_data,
  // input cache load
  input  logic           ld_clear,
  input  logic           ld_valid,
  input  logic [255:0]   ld_data,
  output logic [31:0]    ld_count,
  // processing
  input  logic           proc_start,
  output logic           proc_done,
  // store
  input  logic           st_start,
  output logic           st_valid,
  input  logic           st_ready,
  output logic [255:0]   st_data,
  output logic           st_done
);
  logic [31:0] npts, n_lines, wpl, out_wpl;
  assign npts    = 32'd1 << cfg.log2n;
  assign n_lines = cfg.az_mode ? 32'(LINES_AZ) : 32'(LINES_RG);
  assign wpl     = cfg.az_mode ? (npts >> 2) : cfg.line_words;
  assign out_wpl = cfg.out_len >> 3;

  // ------------------------------------------------------------ input side
  logic         rd_en;
  logic [31:0]  rd_line, rd_word;
  logic [255:0] rd_data;

  uram_cache_in #(.DEPTH(CACHE_DEPTH), .LANES(LANES), .GROUPS(LINES_AZ / 4)) u_cin (
    .clk, .rst_n, .az_mode(cfg.az_mode), .log2n(cfg.log2n), .line_words(cfg.line_words),
    .wr_clear(ld_clear), .wr_valid(ld_valid), .wr_data(ld_data), .wr_count(ld_count),
    .rd_en, .rd_line, .rd_word, .rd_data);

  // Processing sequencer.
  typedef enum logic [1:0] {P_IDLE, P_FEED, P_WAIT} pstate_e;
  pstate_e pst;
  logic [31:0] line, fw, wr_cnt;
  logic        rd_pend, fb_valid, fb_take;
  logic [255:0] fb;

  assign rd_en   = (pst == P_FEED) && (fw < wpl) && !rd_pend && !fb_valid;
  assign rd_line = line;
  assign rd_word = fw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend <= 1'b0; fb_valid <= 1'b0; fb <= '0;
    end else begin
      rd_pend <= rd_en;
      if (rd_pend) begin
        fb       <= rd_data;
        fb_valid <= 1'b1;
      end else if (fb_take) fb_valid <= 1'b0;
    end
  end

  // DWC and DE-MUX.
  logic        dw_valid, dw_ready;
  logic [63:0] dw_data;
  logic        iq_in_ready, iq_valid;
  cplx_t       iq_data;
  logic        fft_in_ready, fft_in_valid;
  cplx_t       fft_in_data;
  logic        fb_take_rdy;

  dwc_in u_dwc_in (
    .clk, .rst_n, .raw(cfg.raw_in), .in_valid(fb_valid), .in_ready(fb_take_rdy),
    .in_data(fb), .out_valid(dw_valid), .out_ready(dw_ready), .out_data(dw_data));
  assign fb_take = fb_valid && fb_take_rdy;

  iq_correction u_iq (
    .clk, .rst_n, .log2n(cfg.log2n), .raw_len(cfg.raw_len),
    .dc_re(cfg.dc_re), .dc_im(cfg.dc_im), .g_re(cfg.g_re), .g_im(cfg.g_im),
    .in_valid(dw_valid && cfg.raw_in), .in_ready(iq_in_ready), .in_data(dw_data[15:0]),
    .out_valid(iq_valid), .out_data(iq_data));

  assign dw_ready     = cfg.raw_in ? iq_in_ready : fft_in_ready;
  assign fft_in_valid = cfg.raw_in ? iq_valid : (dw_valid && pst != P_IDLE);
  assign fft_in_data  = cfg.raw_in ? iq_data : dw_data;

  // --------------------------------------------------------------- FFT
  logic        fft_out_valid;
  cplx_t       fft_out_data;
  logic [31:0] fft_out_idx;

  fft_fp #(.MAX_LOG2(MAX_LOG2)) u_fft (
    .clk, .rst_n, .log2n(cfg.log2n), .inverse(cfg.inverse),
    .in_ready(fft_in_ready), .in_valid(fft_in_valid), .in_data(fft_in_data),
    .out_valid(fft_out_valid), .out_data(fft_out_data), .out_idx(fft_out_idx));

  // ------------------------------------------- filter and multiplication
  logic  coef_valid;
  cplx_t coef;
  filter_gen #(.LUT_DEPTH(LUT_DEPTH)) u_filt (
    .clk, .rst_n, .cfg, .chirp_wr_en, .win_wr_en, .lut_wr_addr, .lut_wr_data,
    .req_valid(fft_out_valid), .k(fft_out_idx), .l(line),
    .coef_valid, .coef);

  localparam int SW = 1 + 64 + 32;
  logic [SW-1:0] dly_q;
  delay_line #(.W(SW), .N(FILT_LAT)) u_dly (
    .clk, .rst_n, .d({fft_out_valid, fft_out_data, fft_out_idx}), .q(dly_q));

  logic        m_valid;
  cplx_t       m_data;
  logic [31:0] m_idx;
  cmul_fp #(.SW(32)) u_cmul (
    .clk, .rst_n, .in_valid(dly_q[SW-1]), .a(dly_q[95:32]), .b(coef),
    .in_side(dly_q[31:0]), .out_valid(m_valid), .y(m_data), .out_side(m_idx));

  // --------------------------------------------------------- output side
  logic         ord_en;
  logic [31:0]  ord_line, ord_word;
  logic [511:0] ord_data;

  uram_cache_out #(.DEPTH(OUT_DEPTH)) u_cout (
    .clk, .log2n(cfg.log2n), .wr_valid(m_valid), .wr_line(line), .wr_idx(m_idx),
    .wr_data(m_data), .rd_en(ord_en), .rd_line(ord_line), .rd_word(ord_word),
    .rd_data(ord_data));

  // Processing sequencer state.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst <= P_IDLE; line <= '0; fw <= '0; wr_cnt <= '0; proc_done <= 1'b0;
    end else begin
      if (rd_en) fw <= fw + 1;
      if (m_valid) wr_cnt <= wr_cnt + 1;
      unique case (pst)
        P_IDLE: if (proc_start) begin
          pst <= P_FEED; line <= '0; fw <= '0; wr_cnt <= '0; proc_done <= 1'b0;
        end
        P_FEED: if (fw == wpl && !rd_pend && !fb_valid) pst <= P_WAIT;
        P_WAIT: if (wr_cnt == npts) begin
          wr_cnt <= '0;
          fw     <= '0;
          if (line == n_lines - 1) begin
            pst <= P_IDLE; proc_done <= 1'b1;
          end else begin
            line <= line + 1; pst <= P_FEED;
          end
        end
        default: pst <= P_IDLE;
      endcase
    end
  end

  // Store sequencer: read out_wpl 512-bit words per line, all lines.
  logic         s_act, s_pend, s_fbv, s_take, s_rdy;
  logic [511:0] s_fb;
  logic [31:0]  s_line, s_word, s_sent, s_total;
  assign s_total  = n_lines * out_wpl * 2;
  assign ord_en   = s_act && (s_line < n_lines) && !s_pend && !s_fbv;
  assign ord_line = s_line;
  assign ord_word = s_word;
  assign s_take   = s_fbv && s_rdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_act <= 1'b0; s_pend <= 1'b0; s_fbv <= 1'b0; s_fb <= '0;
      s_line <= '0; s_word <= '0; s_sent <= '0; st_done <= 1'b0;
    end else begin
      st_done <= 1'b0;
      s_pend  <= ord_en;
      if (s_pend) begin
        s_fb <= ord_data; s_fbv <= 1'b1;
      end else if (s_take) s_fbv <= 1'b0;
      if (ord_en) begin
        if (s_word == out_wpl - 1) begin
          s_word <= '0; s_line <= s_line + 1;
        end else s_word <= s_word + 1;
      end
      if (st_valid && st_ready) s_sent <= s_sent + 1;
      if (st_start) begin
        s_act <= 1'b1; s_line <= '0; s_word <= '0; s_sent <= '0;
      end else if (s_act && s_sent == s_total) begin
        s_act <= 1'b0; st_done <= 1'b1;
      end
    end
  end

  dwc_out u_dwc_out (
    .clk, .rst_n, .in_valid(s_fbv), .in_ready(s_rdy), .in_data(s_fb),
    .out_valid(st_valid), .out_ready(st_ready), .out_data(st_data));

  // A sub-block must fit the caches: 16 azimuth lines may be at most a
  // quarter as long as the 4 range lines.
  assert property (@(posedge clk) disable iff (!rst_n)
      proc_start |-> (n_lines << cfg.log2n) <= 32'(4 * CACHE_DEPTH))
    else $error("sar_datapath: sub-block larger than the cache");

  // The FFT must be ready whenever data is fed into it.
  assert property (@(posedge clk) disable iff (!rst_n) fft_in_valid |-> fft_in_ready)
    else $error("sar_datapath: sample offered while the FFT is busy");
endmodule
