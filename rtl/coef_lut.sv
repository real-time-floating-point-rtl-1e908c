// coef_lut: block-RAM table of complex single-precision filter values. Two
// instances sit in each datapath: the chirp LUT, holding the complex
// reciprocal of the transmitted chirp's spectrum that the host prepares, and
// the window LUT. The controller fills a table from HBM before processing;
// during processing the table is read at the frequency bin of the sample
// being filtered.
// That the tables exist, are 64 bits wide and are filled by the controller
// follows the design; the depth (one entry per bin of the longest FFT) and
// the single write / single read port are this implementation's choices.
//
// Timing: synchronous write; synchronous read, data one cycle after
// rd_addr.
module coef_lut
  import sar_pkg::*;
#(
  parameter int DEPTH = 32768,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  cplx_t         wr_data,
  input  logic [AW-1:0] rd_addr,
  output cplx_t         rd_data
);
  cplx_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
