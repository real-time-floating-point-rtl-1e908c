// tb_cmul_fp: random complex pairs every cycle; products must match double
// precision within 1e-5 relative, the side-band must follow its product and
// the latency must be two cycles.
module tb_cmul_fp;
  import sar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  cplx_t a = 0, b = 0, y;
  logic [31:0] in_side = 0, out_side;
  int checks = 0, failures = 0, cyc = 0;
  real rq [$], iq [$]; int sq [$], tq [$];
  always @(posedge clk) cyc <= cyc + 1;
  cmul_fp dut (.*);
  function automatic real rnd(); return real'(int'($urandom % 20001) - 10000) / 1000.0; endfunction
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      real ar, ai, br, bi;
      @(negedge clk);
      in_valid = $urandom % 4 != 0;
      ar = rnd(); ai = rnd(); br = rnd(); bi = rnd();
      a = {real2f(ar), real2f(ai)}; b = {real2f(br), real2f(bi)}; in_side = $urandom;
      ar = f2real(a[63:32]); ai = f2real(a[31:0]); br = f2real(b[63:32]); bi = f2real(b[31:0]);
      if (in_valid) begin
        rq.push_back(ar * br - ai * bi); iq.push_back(ar * bi + ai * br);
        sq.push_back(in_side); tq.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++; if (rq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    real r, i, tol;
    checks += 3;
    r = rq.pop_front(); i = iq.pop_front();
    tol = 1e-5 * ((r < 0 ? -r : r) + (i < 0 ? -i : i) + 1.0);
    if (f2real(y[63:32]) - r > tol || f2real(y[63:32]) - r < -tol ||
        f2real(y[31:0]) - i > tol || f2real(y[31:0]) - i < -tol) begin
      failures++; $display("got %f %f exp %f %f", f2real(y[63:32]), f2real(y[31:0]), r, i);
    end
    if (out_side != 32'(sq.pop_front())) failures++;
    if (cyc - tq.pop_front() != 2) failures++;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
