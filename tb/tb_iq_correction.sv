// tb_iq_correction: three lines of 16 points with 11 raw samples each,
// random input gaps; the 16 outputs per line must be (x + dc) * g computed
// in double precision for the first 11 and exact zeros for the padding.
module tb_iq_correction;
  import sar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] log2n = 4;
  logic [31:0] raw_len = 11;
  fp32_t dc_re, dc_im, g_re, g_im;
  logic in_valid = 0, in_ready, out_valid;
  logic [15:0] in_data = 0;
  cplx_t out_data;
  int checks = 0, failures = 0, nout = 0;
  real er [$], ei [$];
  iq_correction dut (.*);
  initial begin
    dc_re = real2f(-1.5); dc_im = real2f(0.5); g_re = real2f(1.25); g_im = real2f(-0.1);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int ln = 0; ln < 3; ln++) begin
      for (int i = 0; i < 11; i++) begin
        int ii, qq;
        @(negedge clk);
        while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = 16'($urandom);
        ii = int'(signed'(in_data[7:0])); qq = int'(signed'(in_data[15:8]));
        er.push_back((ii - 1.5) * 1.25 - (qq + 0.5) * (-0.1));
        ei.push_back((ii - 1.5) * (-0.1) + (qq + 0.5) * 1.25);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk) in_valid = 0;
      for (int i = 0; i < 5; i++) begin er.push_back(0.0); ei.push_back(0.0); end
      repeat (8) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++; if (nout != 48) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    real r, i;
    nout++;
    checks++;
    if (er.size() == 0) failures++;
    else begin
      r = er.pop_front(); i = ei.pop_front();
      if (f2real(out_data[63:32]) - r > 1e-4 || f2real(out_data[63:32]) - r < -1e-4 ||
          f2real(out_data[31:0]) - i > 1e-4 || f2real(out_data[31:0]) - i < -1e-4) begin
        failures++; $display("got %f %f exp %f %f", f2real(out_data[63:32]), f2real(out_data[31:0]), r, i);
      end
    end
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
