// tb_poly_eval: drives random arguments into poly_eval every cycle and
// compares each result, 26 cycles later, with a double-precision Horner
// evaluation (relative tolerance 1e-5). Also checks the exact latency.
module tb_poly_eval;
  import sar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fp32_t [6:0] coef;
  real   ca [7];
  logic  in_valid = 0, out_valid;
  fp32_t x = 0, y;
  int checks = 0, failures = 0;
  real xq [$];
  int  tq [$];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  poly_eval dut (.clk, .rst_n, .coef, .in_valid, .x, .out_valid, .y);

  initial begin
    ca = '{0.5, -1.25, 0.75, 0.1, -0.03, 0.002, 0.0007};
    for (int i = 0; i < 7; i++) coef[i] = real2f(ca[i]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      real xr;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      xr = (real'($urandom % 20001) - 10000.0) / 2500.0;
      x = real2f(xr);
      if (in_valid) begin xq.push_back(f2real(x)); tq.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (xq.size() != 0) begin failures++; $display("missing %0d outputs", xq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real xr, ref_y, got, err;
    int t;
    checks += 2;
    if (xq.size() == 0) begin failures += 2; $display("unexpected output"); end
    else begin
      xr = xq.pop_front(); t = tq.pop_front();
      ref_y = ca[6];
      for (int i = 5; i >= 0; i--) ref_y = ref_y * xr + ca[i];
      got = f2real(y);
      err = got - ref_y; if (err < 0) err = -err;
      if (err > 1e-5 * ((ref_y < 0 ? -ref_y : ref_y) + 1.0)) begin
        failures++; $display("x=%f got %f exp %f", xr, got, ref_y);
      end
      if (cyc - t != 26) begin failures++; $display("latency %0d", cyc - t); end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
