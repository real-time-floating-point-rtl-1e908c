// tb_fft_fp: transforms random lines of 16, 64 and 256 points forward and
// inverse on a unit built for at most 256 points, compares every bin with
// a direct DFT in double precision (error below 1e-4 of the line's peak),
// and checks that the butterfly phase takes exactly log2n*N/2 cycles.
module tb_fft_fp;
  import sar_pkg::*;
  localparam int ML = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] log2n = 4;
  logic inverse = 0, in_ready, in_valid = 0, out_valid;
  cplx_t in_data = 0, out_data;
  logic [31:0] out_idx;
  int checks = 0, failures = 0;
  real xr [256], xi [256];
  fft_fp #(.MAX_LOG2(ML)) dut (.*);

  task automatic run(int ln, bit inv);
    int n = 1 << ln;
    int t0, t1, got;
    real peak;
    log2n = 5'(ln); inverse = inv;
    for (int i = 0; i < n; i++) begin
      xr[i] = real'(int'($urandom % 2001) - 1000) / 100.0;
      xi[i] = real'(int'($urandom % 2001) - 1000) / 100.0;
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = {real2f(xr[i]), real2f(xi[i])};
    end
    @(negedge clk) in_valid = 0;
    t0 = $time;
    while (!out_valid) begin @(posedge clk); #1; end
    t1 = $time;
    // t0 is half a cycle after the last input edge; the first output is
    // seen one cycle after the last butterfly
    checks++;
    if ((t1 - t0) / 10 != ln * n / 2) begin
      failures++; $display("compute cycles %0d expected %0d", (t1 - t0) / 10, ln * n / 2);
    end
    peak = 0;
    for (int i = 0; i < n; i++) peak += (xr[i] < 0 ? -xr[i] : xr[i]) + (xi[i] < 0 ? -xi[i] : xi[i]);
    got = 0;
    while (out_valid) begin
      real sr, si, a, dr, di;
      int kk;
      kk = int'(out_idx);
      sr = 0; si = 0;
      for (int i = 0; i < n; i++) begin
        a = (inv ? 2.0 : -2.0) * 3.14159265358979 * real'(kk * i % n) / real'(n);
        sr += xr[i] * $cos(a) - xi[i] * $sin(a);
        si += xr[i] * $sin(a) + xi[i] * $cos(a);
      end
      dr = f2real(out_data[63:32]) - sr; di = f2real(out_data[31:0]) - si;
      checks++;
      if (kk != got || dr > 1e-4 * peak || dr < -1e-4 * peak || di > 1e-4 * peak || di < -1e-4 * peak) begin
        failures++; $display("n %0d bin %0d got %f %f exp %f %f", n, kk,
          f2real(out_data[63:32]), f2real(out_data[31:0]), sr, si);
      end
      got++;
      @(posedge clk); #1;
    end
    checks++;
    if (got != n) begin failures++; $display("got %0d outputs", got); end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(4, 0); run(6, 0); run(6, 1); run(8, 0); run(8, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
