// sar_regs: host-written register file of the focusing kernel. The host
// computes all geometry-dependent parameters (polynomial coefficients of the
// matched filters, correction values, buffer addresses) and writes them here
// over PCIe before starting the kernel; the registers drive the controller
// and all datapaths through one configuration structure.
//
// Map (32-bit words): 0 CTRL (bit 0 start, self-clearing), 1 MODE (bit 0
// azimuth, 1 raw input, 2 inverse, 4:3 coefficient source, 5 polynomial
// bypass, 6 output transpose, 7 load chirp LUT, 8 load window LUT), 2 LOG2N,
// 3 N_SUB, 4 SRC_BASE, 5 DST_BASE, 6 CHIRP_BASE, 7 WIN_BASE, 8 LINE_WORDS,
// 9 ROW_WORDS, 10 RAW_LEN, 11 OUT_LEN, 12..18 polynomial a0..a6,
// 19 SCALE, 20 LSCALE, 21 OFFSET, 22 DIVISOR, 23 PHASE_SCALE, 24 DC_RE,
// 25 DC_IM, 26 G_RE, 27 G_IM. Reads return the stored word; CTRL reads back
// bit 0 = busy. That the host fills registers is the design's; the map is
// this implementation's.
//
// Timing: writes take effect on the next clock edge; start is a one-cycle
// pulse; reads are combinational.
module sar_regs
  import sar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [4:0]  raddr,
  output logic [31:0] rdata,
  input  logic        busy,
  output logic        start,
  output sar_cfg_t    cfg
);
  logic [31:0] r [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) r[i] <= '0;
      start <= 1'b0;
    end else begin
      start <= we && waddr == 5'd0 && wdata[0];
      if (we && waddr != 5'd0) r[waddr] <= wdata;
    end
  end

  assign rdata = (raddr == 5'd0) ? {31'd0, busy} : r[raddr];

  always_comb begin
    cfg              = '0;
    cfg.az_mode      = r[1][0];
    cfg.raw_in       = r[1][1];
    cfg.inverse      = r[1][2];
    cfg.coef_sel     = coef_sel_e'(r[1][4:3]);
    cfg.phase_direct = r[1][5];
    cfg.out_ct       = r[1][6];
    cfg.load_chirp   = r[1][7];
    cfg.load_win     = r[1][8];
    cfg.log2n        = r[2][4:0];
    cfg.n_sub        = r[3][15:0];
    cfg.src_base     = r[4];
    cfg.dst_base     = r[5];
    cfg.chirp_base   = r[6];
    cfg.win_base     = r[7];
    cfg.line_words   = r[8];
    cfg.row_words    = r[9];
    cfg.raw_len      = r[10];
    cfg.out_len      = r[11];
    for (int i = 0; i < 7; i++) cfg.poly[i] = r[12+i];
    cfg.scale        = r[19];
    cfg.lscale       = r[20];
    cfg.offset       = r[21];
    cfg.divisor      = r[22];
    cfg.phase_scale  = r[23];
    cfg.dc_re        = r[24];
    cfg.dc_im        = r[25];
    cfg.g_re         = r[26];
    cfg.g_im         = r[27];
  end
endmodule
