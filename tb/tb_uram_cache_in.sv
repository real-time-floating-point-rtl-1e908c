// tb_uram_cache_in: range mode writes 4 lines straight and reads them back;
// azimuth mode writes a 32-row by 16-column block in the corner-turn word
// order and reads each column back, checking every sample against the
// transpose of what was written (log2n = 5, i.e. 32 rows).
module tb_uram_cache_in;
  import sar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic az_mode = 0, wr_clear = 0, wr_valid = 0, rd_en = 0;
  logic [4:0] log2n = 5;
  logic [31:0] line_words = 8, wr_count, rd_line = 0, rd_word = 0;
  logic [255:0] wr_data = 0, rd_data;
  logic [63:0] img [32][16];
  logic [255:0] words [32];
  int checks = 0, failures = 0;
  uram_cache_in #(.DEPTH(256), .LANES(8), .GROUPS(4)) dut (.*);
  task automatic rd(int l, int w, logic [255:0] e);
    @(negedge clk) begin rd_en = 1; rd_line = l; rd_word = w; end
    @(negedge clk) rd_en = 0;
    checks++;
    if (rd_data != e) begin failures++; $display("line %0d word %0d", l, w); end
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // range mode
    @(negedge clk) wr_clear = 1; @(negedge clk) wr_clear = 0;
    for (int n = 0; n < 32; n++) begin
      for (int i = 0; i < 8; i++) words[n][32*i +: 32] = $urandom;
      @(negedge clk) begin wr_valid = 1; wr_data = words[n]; end
    end
    @(negedge clk) wr_valid = 0;
    checks++; if (wr_count != 32) failures++;
    for (int l = 0; l < 4; l++) for (int w = 0; w < 8; w++) rd(l, w, words[l*8+w]);
    // azimuth mode
    az_mode = 1;
    for (int r = 0; r < 32; r++) for (int c = 0; c < 16; c++) img[r][c] = {$urandom, $urandom};
    @(negedge clk) wr_clear = 1; @(negedge clk) wr_clear = 0;
    for (int m = 0; m < 4; m++) for (int g = 0; g < 4; g++) for (int p = 0; p < 8; p++) begin
      logic [255:0] d;
      for (int j = 0; j < 4; j++) d[64*j +: 64] = img[8*m+p][4*g+j];
      @(negedge clk) begin wr_valid = 1; wr_data = d; end
    end
    @(negedge clk) wr_valid = 0;
    for (int c = 0; c < 16; c++) for (int R = 0; R < 8; R++)
      rd(c, R, {img[4*R+3][c], img[4*R+2][c], img[4*R+1][c], img[4*R][c]});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
