// tb_coef_lut: writes random entries into a small table, then reads them
// back in random order and checks the one-cycle read latency.
module tb_coef_lut;
  import sar_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  cplx_t wr_data = 0, rd_data;
  cplx_t model [256];
  int checks = 0, failures = 0;
  coef_lut #(.DEPTH(256)) dut (.*);
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(i); wr_data = {$urandom, $urandom}; model[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk) rd_addr = 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin failures++; $display("addr %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
