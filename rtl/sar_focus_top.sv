// sar_focus_top: single-precision SAR focusing kernel (monochromatic
// omega-K algorithm) for an FPGA with HBM. The host prepares everything that
// depends on the acquisition geometry (filter polynomials, the chirp
// replica spectrum, addresses) and starts the kernel through the register
// port; the kernel then runs the range and azimuth FFT / filter / IFFT steps
// on sub-blocks it caches from HBM, NUM_DP datapaths in parallel, one HBM
// lane (pseudo channel) per datapath.
//
// Contents: sar_regs (host registers), sar_fsm (controller), partial_ct on
// the read side (transposes in azimuth mode) and on the write side
// (transposes when out_ct is set), and NUM_DP sar_datapath instances.
// One start runs one processing step over n_sub sub-blocks: for the full
// algorithm the host starts the kernel once per step (range FFT with chirp
// filter, azimuth FFT with 2-D filter, range IFFT with range-Doppler
// filter, azimuth IFFT with pattern correction) with the registers set for
// that step.
//
// Ports: the HBM controller is outside: per lane a read request channel
// (valid/ready, 256-bit word address), a read data channel (valid/ready, in
// request order) and a write channel (valid/ready with address and data).
// The register port is a simple synchronous write with combinational read.
// Eight datapaths, the 32k/8k line lengths and the 4 range / 16 azimuth
// lines per datapath are the design's main configuration.
module sar_focus_top
  import sar_pkg::*;
#(
  parameter int NUM_DP   = 8,
  parameter int MAX_LOG2 = 15,
  parameter int LINES_RG = 4,
  parameter int LINES_AZ = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host registers
  input  logic                     reg_we,
  input  logic [4:0]               reg_waddr,
  input  logic [31:0]              reg_wdata,
  input  logic [4:0]               reg_raddr,
  output logic [31:0]              reg_rdata,
  output logic                     busy,
  output logic                     done,
  // HBM read
  output logic [NUM_DP-1:0]        rd_req_valid,
  input  logic [NUM_DP-1:0]        rd_req_ready,
  output logic [NUM_DP-1:0][31:0]  rd_addr,
  input  logic [NUM_DP-1:0]        rd_data_valid,
  output logic [NUM_DP-1:0]        rd_data_ready,
  input  logic [NUM_DP-1:0][255:0] rd_data,
  // HBM write
  output logic [NUM_DP-1:0]        wr_valid,
  input  logic [NUM_DP-1:0]        wr_ready,
  output logic [NUM_DP-1:0][31:0]  wr_addr,
  output logic [NUM_DP-1:0][255:0] wr_data
);
  localparam int MAX_N       = 1 << MAX_LOG2;
  localparam int CACHE_DEPTH = (LINES_RG * MAX_N > LINES_AZ * (MAX_N / 4) ?
                                LINES_RG * MAX_N : LINES_AZ * (MAX_N / 4)) / 4;
  localparam int OUT_DEPTH   = CACHE_DEPTH / 2;
  localparam int LAW         = MAX_LOG2;

  sar_cfg_t cfg;
  logic     start;

  sar_regs u_regs (
    .clk, .rst_n, .we(reg_we), .waddr(reg_waddr), .wdata(reg_wdata),
    .raddr(reg_raddr), .rdata(reg_rdata), .busy, .start, .cfg);

  logic                     lut_fill, lut_in_ready, chirp_wr_en, win_wr_en;
  logic [LAW-1:0]           lut_wr_addr;
  cplx_t                    lut_wr_data;
  logic                     ld_clear, proc_start, st_start;
  logic [NUM_DP-1:0][31:0]  dp_ld_count;
  logic [NUM_DP-1:0]        dp_proc_done, dp_st_done;

  sar_fsm #(.LANES(NUM_DP), .LINES_RG(LINES_RG), .LINES_AZ(LINES_AZ), .LUT_DEPTH(MAX_N)) u_fsm (
    .clk, .rst_n, .cfg, .start, .busy, .done,
    .rd_req_valid, .rd_req_ready, .rd_addr,
    .lut_fill, .lut_in_valid(rd_data_valid[0]), .lut_in_ready, .lut_in_data(rd_data[0]),
    .chirp_wr_en, .win_wr_en, .lut_wr_addr, .lut_wr_data,
    .ld_clear, .dp_ld_count, .proc_start, .dp_proc_done, .st_start,
    .wr_fire(wr_valid & wr_ready), .wr_addr);

  // Read side partial corner turn.
  logic [NUM_DP-1:0]        cti_ready, cti_out_valid;
  logic [NUM_DP-1:0][255:0] cti_out_data;
  partial_ct #(.LANES(NUM_DP), .W(256)) u_ct_in (
    .clk, .rst_n, .transpose(cfg.az_mode),
    .in_valid(lut_fill ? '0 : rd_data_valid), .in_ready(cti_ready), .in_data(rd_data),
    .out_valid(cti_out_valid), .out_ready('1), .out_data(cti_out_data));
  always_comb begin
    rd_data_ready = lut_fill ? '0 : cti_ready;
    if (lut_fill) rd_data_ready[0] = lut_in_ready;
  end

  // Datapaths.
  logic [NUM_DP-1:0]        st_valid, st_ready;
  logic [NUM_DP-1:0][255:0] st_data;
  for (genvar d = 0; d < NUM_DP; d++) begin : g_dp
    sar_datapath #(
      .MAX_LOG2(MAX_LOG2), .LINES_RG(LINES_RG), .LINES_AZ(LINES_AZ), .LANES(NUM_DP),
      .CACHE_DEPTH(CACHE_DEPTH), .OUT_DEPTH(OUT_DEPTH), .LUT_DEPTH(MAX_N)
    ) u_dp (
      .clk, .rst_n, .cfg, .chirp_wr_en, .win_wr_en, .lut_wr_addr, .lut_wr_data,
      .ld_clear, .ld_valid(cti_out_valid[d]), .ld_data(cti_out_data[d]), .ld_count(dp_ld_count[d]),
      .proc_start, .proc_done(dp_proc_done[d]),
      .st_start, .st_valid(st_valid[d]), .st_ready(st_ready[d]), .st_data(st_data[d]),
      .st_done(dp_st_done[d]));
  end

  // Write side partial corner turn. In transpose mode all lanes move
  // together, so the datapath streams are released only when all are valid.
  logic [NUM_DP-1:0] cto_in_valid, cto_in_ready;
  assign cto_in_valid = cfg.out_ct ? {NUM_DP{&st_valid}} : st_valid;
  assign st_ready     = cto_in_ready & cto_in_valid;
  partial_ct #(.LANES(NUM_DP), .W(256)) u_ct_out (
    .clk, .rst_n, .transpose(cfg.out_ct),
    .in_valid(cto_in_valid), .in_ready(cto_in_ready), .in_data(st_data),
    .out_valid(wr_valid), .out_ready(wr_ready),
    .out_data(wr_data));
endmodule
