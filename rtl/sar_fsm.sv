// sar_fsm: the kernel controller. Once the host has written the registers
// and pulsed start, it takes over the data flow:
//   1. CHIRP / WIN: if enabled, read the chirp replica (complex reciprocal
//      of its spectrum, prepared by the host) and the window table from HBM
//      lane 0 and write them into the LUTs of every datapath;
//   2. for each sub-block: LOAD the input caches of all datapaths from HBM,
//      PROC (all datapaths transform and filter their lines in parallel),
//      STORE the results back to HBM;
//   3. DONE.
// Read addresses: in range mode each lane reads the LINES_RG consecutive
// lines of its own pseudo channel, line_words words each. In azimuth mode
// lane p reads, for each of its rows m (global row m*LANES + p), the
// LINES_AZ/4 words of every datapath's columns, datapath index fastest,
// so that the partial corner turn delivers to every datapath its own
// columns from all rows. Writes go to consecutive addresses of each lane
// from dst_base + sub-block * words_per_sub_block.
// The sequence (chirp fill, caching sub-blocks repeatedly from HBM,
// processing, write back) follows the design; the address patterns and
// handshakes are this implementation's choices.
//
// Interface: per-lane read request valid/ready with address (every lane of
// one address index is issued before the next index); LUT fill data from
// lane 0 through lut_in_* (valid/ready); per-datapath load count, done
// flags and start pulses; per-lane write-accept pulses for the address
// counters. busy is high from start to done; done is a one-cycle pulse.
module sar_fsm
  import sar_pkg::*;
#(
  parameter int LANES     = 8,
  parameter int LINES_RG  = 4,
  parameter int LINES_AZ  = 16,
  parameter int LUT_DEPTH = 32768,
  parameter int LAW       = $clog2(LUT_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  sar_cfg_t                cfg,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // HBM read requests
  output logic [LANES-1:0]        rd_req_valid,
  input  logic [LANES-1:0]        rd_req_ready,
  output logic [LANES-1:0][31:0]  rd_addr,
  // LUT fill from lane 0
  output logic                    lut_fill,
  input  logic                    lut_in_valid,
  output logic                    lut_in_ready,
  input  logic [255:0]            lut_in_data,
  output logic                    chirp_wr_en,
  output logic                    win_wr_en,
  output logic [LAW-1:0]          lut_wr_addr,
  output cplx_t                   lut_wr_data,
  // datapath control
  output logic                    ld_clear,
  input  logic [LANES-1:0][31:0]  dp_ld_count,
  output logic                    proc_start,
  input  logic [LANES-1:0]        dp_proc_done,
  output logic                    st_start,
  // HBM writes
  input  logic [LANES-1:0]        wr_fire,
  output logic [LANES-1:0][31:0]  wr_addr
);
  typedef enum logic [2:0] {S_IDLE, S_CHIRP, S_WIN, S_LOAD, S_PROC, S_STORE} state_e;
  state_e st;

  localparam int G  = LINES_AZ / 4;
  localparam int LB = $clog2(LANES);
  localparam int GB = $clog2(G);

  logic [31:0] npts, n_lines, ld_total, lut_total, req_total, wps, sub;
  assign npts      = 32'd1 << cfg.log2n;
  assign n_lines   = cfg.az_mode ? 32'(LINES_AZ) : 32'(LINES_RG);
  assign ld_total  = cfg.az_mode ? npts * 32'(G) : 32'(LINES_RG) * cfg.line_words;
  assign lut_total = npts >> 2;
  assign req_total = (st == S_LOAD) ? ld_total : lut_total;
  assign wps       = n_lines * (cfg.out_len >> 2);

  // ---------------------------------------------------- read requests
  logic [31:0]      ri;
  logic             req_act;
  logic [LANES-1:0] lane_mask, issued, fire;
  assign req_act   = (st == S_CHIRP || st == S_WIN || st == S_LOAD) && ri < req_total;
  assign lane_mask = (st == S_LOAD) ? '1 : LANES'(1);
  assign rd_req_valid = req_act ? (lane_mask & ~issued) : '0;
  assign fire      = rd_req_valid & rd_req_ready;

  logic [31:0] az_addr;
  always_comb begin
    logic [31:0] j, g, m;
    j = ri & 32'(LANES - 1);
    g = (ri >> LB) & 32'(G - 1);
    m = ri >> (LB + GB);
    az_addr = cfg.src_base + m * cfg.row_words + sub * 32'(LANES * G) + j * 32'(G) + g;
    for (int p = 0; p < LANES; p++) begin
      unique case (st)
        S_CHIRP: rd_addr[p] = cfg.chirp_base + ri;
        S_WIN:   rd_addr[p] = cfg.win_base + ri;
        default: rd_addr[p] = cfg.az_mode ? az_addr
                            : cfg.src_base + sub * ld_total + ri;
      endcase
    end
  end

  // ------------------------------------------------------ LUT loader
  logic        lw_valid;
  logic [63:0] lw_data;
  logic [31:0] lut_cnt;
  dwc_in u_unpack (
    .clk, .rst_n, .raw(1'b0), .in_valid(lut_in_valid && lut_fill), .in_ready(lut_in_ready),
    .in_data(lut_in_data), .out_valid(lw_valid), .out_ready(1'b1), .out_data(lw_data));
  assign lut_fill    = (st == S_CHIRP || st == S_WIN);
  assign chirp_wr_en = lw_valid && st == S_CHIRP;
  assign win_wr_en   = lw_valid && st == S_WIN;
  assign lut_wr_addr = LAW'(lut_cnt);
  assign lut_wr_data = lw_data;

  // ------------------------------------------------------- write side
  logic [LANES-1:0][31:0] wcnt;
  logic all_loaded, all_proc, all_written;
  always_comb begin
    all_loaded  = 1'b1;
    all_proc    = 1'b1;
    all_written = 1'b1;
    for (int p = 0; p < LANES; p++) begin
      if (dp_ld_count[p] != ld_total) all_loaded = 1'b0;
      if (!dp_proc_done[p]) all_proc = 1'b0;
      if (wcnt[p] != wps) all_written = 1'b0;
      wr_addr[p] = cfg.dst_base + sub * wps + wcnt[p];
    end
  end

  logic proc_wait;   // one cycle after proc_start, done flags are stale
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ri <= '0; issued <= '0; lut_cnt <= '0; sub <= '0; wcnt <= '0;
      done <= 1'b0; ld_clear <= 1'b0; proc_start <= 1'b0; st_start <= 1'b0; proc_wait <= 1'b0;
    end else begin
      done       <= 1'b0;
      ld_clear   <= 1'b0;
      proc_start <= 1'b0;
      st_start   <= 1'b0;
      proc_wait  <= proc_start;
      // request issue bookkeeping
      if (req_act) begin
        if (((issued | fire) & lane_mask) == lane_mask) begin
          issued <= '0;
          ri     <= ri + 1;
        end else issued <= issued | fire;
      end
      if (lw_valid) lut_cnt <= lut_cnt + 1;
      for (int p = 0; p < LANES; p++) if (wr_fire[p]) wcnt[p] <= wcnt[p] + 1;

      unique case (st)
        S_IDLE: if (start) begin
          sub <= '0; ri <= '0; issued <= '0; lut_cnt <= '0;
          if (cfg.load_chirp) st <= S_CHIRP;
          else if (cfg.load_win) st <= S_WIN;
          else begin st <= S_LOAD; ld_clear <= 1'b1; end
        end
        S_CHIRP: if (lut_cnt == npts) begin
          ri <= '0; lut_cnt <= '0;
          if (cfg.load_win) st <= S_WIN;
          else begin st <= S_LOAD; ld_clear <= 1'b1; end
        end
        S_WIN: if (lut_cnt == npts) begin
          ri <= '0; lut_cnt <= '0; st <= S_LOAD; ld_clear <= 1'b1;
        end
        S_LOAD: if (!ld_clear && ri == req_total && all_loaded) begin
          st <= S_PROC; proc_start <= 1'b1;
        end
        S_PROC: if (!proc_start && !proc_wait && all_proc) begin
          st <= S_STORE; st_start <= 1'b1; wcnt <= '0;
        end
        S_STORE: if (!st_start && all_written) begin
          if (sub == 32'(cfg.n_sub) - 1) begin
            st <= S_IDLE; done <= 1'b1;
          end else begin
            sub <= sub + 1; ri <= '0; st <= S_LOAD; ld_clear <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
  assign busy = st != S_IDLE;
endmodule
