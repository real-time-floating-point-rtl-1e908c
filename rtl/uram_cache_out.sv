// uram_cache_out: the on-chip cache at the tail of a datapath. Filtered
// samples are written one 64-bit complex float per cycle at (line, bin);
// lines are read back eight samples (512 bits) per cycle for the data width
// converter towards HBM. Eight banks, bank = bin mod 8, address
// line*2^(log2n-3) + bin/8. The 64b-in / 512b-out widths follow the design;
// the banking is this implementation's choice.
//
// Timing: synchronous write; read data one cycle after rd_en.
module uram_cache_out
  import sar_pkg::*;
#(
  parameter int DEPTH = 16384,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic [4:0]   log2n,
  input  logic         wr_valid,
  input  logic [31:0]  wr_line,
  input  logic [31:0]  wr_idx,
  input  cplx_t        wr_data,
  input  logic         rd_en,
  input  logic [31:0]  rd_line,
  input  logic [31:0]  rd_word,
  output logic [511:0] rd_data
);
  logic [AW-1:0] waddr, raddr;
  assign waddr = AW'((wr_line << (log2n - 5'd3)) + (wr_idx >> 3));
  assign raddr = AW'((rd_line << (log2n - 5'd3)) + rd_word);
  for (genvar b = 0; b < 8; b++) begin : g_bank
    cplx_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_valid && wr_idx[2:0] == 3'(b)) mem[waddr] <= wr_data;
      if (rd_en) rd_data[64*b +: 64] <= mem[raddr];
    end
  end
endmodule
