// tb_cordic_f2f: all four quadrants and random phase words; real and
// imaginary parts must match cos and sin within 5e-4, and the result must
// arrive ITER+2 cycles after its phase.
module tb_cordic_f2f;
  import sar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [15:0] phase_word = 0;
  cplx_t phasor;
  int checks = 0, failures = 0, cyc = 0;
  int pq [$], tq [$];
  always @(posedge clk) cyc <= cyc + 1;
  cordic_f2f dut (.*);
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = $urandom % 5 != 0;
      phase_word = (n < 16) ? 16'(n * 4096) : 16'($urandom);
      if (in_valid) begin pq.push_back(phase_word); tq.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++; if (pq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    real a, c, s, dc, ds;
    checks += 3;
    a = real'(pq.pop_front()) / 65536.0 * 2.0 * 3.14159265358979;
    c = f2real(phasor[63:32]); s = f2real(phasor[31:0]);
    dc = c - $cos(a); ds = s - $sin(a);
    if (dc > 5e-4 || dc < -5e-4) begin failures++; $display("cos %f exp %f", c, $cos(a)); end
    if (ds > 5e-4 || ds < -5e-4) begin failures++; $display("sin %f exp %f", s, $sin(a)); end
    if (cyc - tq.pop_front() != CORDIC_IT + 2) begin failures++; $display("latency"); end
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
