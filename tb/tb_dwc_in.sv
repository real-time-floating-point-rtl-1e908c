// tb_dwc_in: random words with random input and output stalls in both modes;
// the output stream must be the words' 16-bit or 64-bit parts in order.
module tb_dwc_in;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic raw = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [255:0] in_data = 0;
  logic [63:0] out_data;
  logic [63:0] exp_q [$];
  int checks = 0, failures = 0;
  dwc_in dut (.*);
  task automatic run(bit r, int nw);
    raw = r;
    for (int w = 0; w < nw; w++) begin
      logic [255:0] d;
      for (int i = 0; i < 8; i++) d[32*i +: 32] = $urandom;
      @(negedge clk);
      while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = d;
      if (r) for (int i = 0; i < 16; i++) exp_q.push_back({48'd0, d[16*i +: 16]});
      else   for (int i = 0; i < 4; i++)  exp_q.push_back(d[64*i +: 64]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    while (exp_q.size() != 0) @(posedge clk);
  endtask
  always @(negedge clk) out_ready = $urandom % 4 != 0;
  always @(posedge clk) if (out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_data != exp_q.pop_front()) failures++;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(0, 40); run(1, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
