// tb_dwc_out: random 512-bit words with random stalls on both sides; the
// output must be the two 256-bit halves of each word, low half first.
module tb_dwc_out;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [511:0] in_data = 0;
  logic [255:0] out_data;
  logic [255:0] exp_q [$];
  int checks = 0, failures = 0;
  dwc_out dut (.*);
  always @(negedge clk) out_ready = $urandom % 4 != 0;
  always @(posedge clk) if (out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_data != exp_q.pop_front()) failures++;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int w = 0; w < 60; w++) begin
      logic [511:0] d;
      for (int i = 0; i < 16; i++) d[32*i +: 32] = $urandom;
      @(negedge clk);
      while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = d;
      exp_q.push_back(d[255:0]); exp_q.push_back(d[511:256]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    while (exp_q.size() != 0) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
