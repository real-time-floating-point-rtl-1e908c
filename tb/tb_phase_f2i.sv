// tb_phase_f2i: random phases in radians over many turns, positive and
// negative; the 16-bit phase word must equal round(phase/(2pi)*2^32) mod 2^32
// taken to its top 16 bits, within one count.
module tb_phase_f2i;
  import sar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fp32_t phase_scale, phase = 0;
  logic in_valid = 0, out_valid;
  logic [15:0] phase_word;
  int checks = 0, failures = 0;
  real pq [$];
  phase_f2i dut (.*);
  initial begin
    phase_scale = real2f(4294967296.0 / (2.0 * 3.14159265358979));
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = 1;
      phase = real2f((real'($urandom % 200001) - 100000.0) / 1000.0);
      pq.push_back(f2real(phase));
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++; if (pq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    real turns, fr; int e; int d;
    checks++;
    turns = pq.pop_front() / (2.0 * 3.14159265358979);
    fr = turns - $floor(turns);
    e = int'($floor(fr * 65536.0)) % 65536;
    d = (int'(phase_word) - e + 65536) % 65536;
    if (d > 1 && d < 65535) begin failures++; $display("got %0d exp %0d", phase_word, e); end
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
