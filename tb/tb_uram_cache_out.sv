// tb_uram_cache_out: writes 4 lines of 32 samples in a scrambled order and
// reads every 8-sample word back.
module tb_uram_cache_out;
  import sar_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] log2n = 5;
  logic wr_valid = 0, rd_en = 0;
  logic [31:0] wr_line = 0, wr_idx = 0, rd_line = 0, rd_word = 0;
  cplx_t wr_data = 0;
  logic [511:0] rd_data;
  cplx_t m [4][32];
  int checks = 0, failures = 0;
  uram_cache_out #(.DEPTH(64)) dut (.*);
  initial begin
    for (int i = 0; i < 128; i++) begin
      int l, k;
      l = (i * 37 % 128) / 32; k = (i * 37 % 128) % 32;
      m[l][k] = {$urandom, $urandom};
      @(negedge clk) begin wr_valid = 1; wr_line = l; wr_idx = k; wr_data = m[l][k]; end
    end
    @(negedge clk) wr_valid = 0;
    for (int l = 0; l < 4; l++) for (int w = 0; w < 4; w++) begin
      logic [511:0] e;
      for (int b = 0; b < 8; b++) e[64*b +: 64] = m[l][8*w+b];
      @(negedge clk) begin rd_en = 1; rd_line = l; rd_word = w; end
      @(negedge clk) rd_en = 0;
      checks++;
      if (rd_data != e) begin failures++; $display("line %0d word %0d", l, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
