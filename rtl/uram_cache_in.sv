// uram_cache_in: the on-chip cache at the head of a datapath. It holds one
// sub-block (4 range lines of 32k samples or 16 azimuth lines of 8k samples,
// 64-bit complex floats, or raw 16-bit data) and performs the corner turn
// for azimuth processing: words arrive from HBM row by row and are read back
// column by column.
//
// How it works: four 64-bit banks of DEPTH entries. In range mode word n is
// stored straight at address n of all four banks and line l, word w is read
// from address l*line_words + w. In azimuth mode the incoming word n carries
// samples of columns 4g..4g+3 of row r (n = (m*GROUPS + g)*LANES + p,
// r = m*LANES + p: the order produced by the partial corner turn over LANES
// lanes, GROUPS words per row and datapath); sample j goes to bank
// (j + r) mod 4 at address c*2^(log2n-2) + r/4 with c = 4g + j. This diagonal
// skew lets a whole row (4 columns) be written and four consecutive rows of
// one column be read back in a single cycle without bank conflicts.
// Cache capacity and its corner-turn role follow the design; the banking
// and skew are this implementation's choices.
//
// Interface: wr_clear restarts the write counter; one 256-bit word per
// wr_valid cycle. A read (rd_en, rd_line, rd_word) returns 256 bits
// (four samples, first in the low bits) on the next cycle.
module uram_cache_in
  import sar_pkg::*;
#(
  parameter int DEPTH  = 32768,
  parameter int LANES  = 8,
  parameter int GROUPS = 4,
  parameter int AW     = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         az_mode,
  input  logic [4:0]   log2n,
  input  logic [31:0]  line_words,
  input  logic         wr_clear,
  input  logic         wr_valid,
  input  logic [255:0] wr_data,
  output logic [31:0]  wr_count,
  input  logic         rd_en,
  input  logic [31:0]  rd_line,
  input  logic [31:0]  rd_word,
  output logic [255:0] rd_data
);

  logic [31:0] n, r, g;
  logic [1:0]  jb [4];
  logic [AW-1:0] waddr [4];
  logic [63:0]   wdat  [4];
  assign n = wr_count;
  localparam int LB = $clog2(LANES);
  localparam int GB = $clog2(GROUPS);
  assign r = ((n >> (LB + GB)) << LB) | (n & 32'(LANES - 1));
  assign g = (n >> LB) & 32'(GROUPS - 1);

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      if (az_mode) begin
        jb[b]    = 2'(b) - r[1:0];
        waddr[b] = AW'((((g << 2) + 32'(jb[b])) << (log2n - 5'd2)) + (r >> 2));
        wdat[b]  = wr_data[64*jb[b] +: 64];
      end else begin
        jb[b]    = 2'(b);
        waddr[b] = AW'(n);
        wdat[b]  = wr_data[64*b +: 64];
      end
    end
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_count <= '0;
    else if (wr_clear) wr_count <= '0;
    else if (wr_valid) wr_count <= wr_count + 1;
  end

  // Read: one address for all banks, then undo the skew.
  logic [AW-1:0] raddr;
  logic [63:0]   rq [4];
  logic [1:0]    rot;
  assign raddr = az_mode ? AW'((rd_line << (log2n - 5'd2)) + rd_word)
                         : AW'(rd_line * line_words + rd_word);
  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [63:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_valid) mem[waddr[b]] <= wdat[b];
      if (rd_en) rq[b] <= mem[raddr];
    end
  end
  always_ff @(posedge clk)
    if (rd_en) rot <= az_mode ? rd_line[1:0] : 2'd0;
  always_comb
    for (int t = 0; t < 4; t++) rd_data[64*t +: 64] = rq[2'(t) + rot];
endmodule
