// tb_fp_arith: random (k, l) pairs every cycle; each result is compared with
// the formula evaluated in double precision (relative tolerance 1e-6) and
// must appear exactly five cycles after its input.
module tb_fp_arith;
  import sar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fp32_t scale, lscale, offset, divisor, x;
  logic in_valid = 0, out_valid;
  logic [31:0] k = 0, l = 0;
  int checks = 0, failures = 0, cyc = 0;
  real eq [$]; int tq [$];
  real rs = 0.37, rl = -2.5, ro = 11.0, rd = 3.0;
  always @(posedge clk) cyc <= cyc + 1;
  fp_arith dut (.*);
  initial begin
    scale = real2f(rs); lscale = real2f(rl); offset = real2f(ro); divisor = real2f(rd);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = $urandom % 3 != 0;
      k = $urandom % 40000; l = $urandom % 16;
      if (in_valid) begin
        eq.push_back((real'(k) * f2real(scale) + real'(l) * f2real(lscale) + f2real(offset)) / f2real(divisor));
        tq.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (eq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    real e, g, d;
    checks += 2;
    if (eq.size() == 0) failures += 2;
    else begin
      e = eq.pop_front(); g = f2real(x); d = g - e; if (d < 0) d = -d;
      if (d > 1e-6 * ((e < 0 ? -e : e) + 1.0)) begin failures++; $display("got %f exp %f", g, e); end
      if (cyc - tq.pop_front() != FPA_LAT) begin failures++; $display("latency"); end
    end
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
