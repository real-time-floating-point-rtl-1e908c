// tb_filter_gen: fills both LUTs with random values and requests
// coefficients for random (k, l) under each of the four sources and with the
// polynomial bypassed. LUT coefficients must match exactly; phase
// coefficients must match exp(j*poly(x)) computed in double precision within
// 1e-3; every coefficient must arrive FILT_LAT cycles after its request.
module tb_filter_gen;
  import sar_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sar_cfg_t cfg;
  logic chirp_wr_en = 0, win_wr_en = 0, req_valid = 0, coef_valid;
  logic [5:0] lut_wr_addr = 0;
  cplx_t lut_wr_data = 0, coef;
  logic [31:0] k = 0, l = 0;
  cplx_t chirp_m [D], win_m [D];
  int checks = 0, failures = 0, cyc = 0;
  int kq [$], lq [$], tq [$];
  real pc [7];
  always @(posedge clk) cyc <= cyc + 1;
  filter_gen #(.LUT_DEPTH(D)) dut (.*);

  function automatic real polyr(real x);
    real y = pc[6];
    for (int i = 5; i >= 0; i--) y = y * x + pc[i];
    return y;
  endfunction

  task automatic run_requests(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      req_valid = $urandom % 4 != 0;
      k = $urandom % D; l = $urandom % 16;
      if (req_valid) begin kq.push_back(k); lq.push_back(l); tq.push_back(cyc); end
    end
    @(negedge clk) req_valid = 0;
    repeat (FILT_LAT + 5) @(posedge clk);
    checks++; if (kq.size() != 0) begin failures++; $display("missing outputs"); end
  endtask

  initial begin
    cfg = '0;
    pc = '{0.3, 0.8, -0.05, 0.01, 0.0, 0.0, 0.0};
    for (int i = 0; i < 7; i++) cfg.poly[i] = real2f(pc[i]);
    cfg.scale = real2f(0.1); cfg.lscale = real2f(0.5); cfg.offset = real2f(-1.0);
    cfg.divisor = real2f(2.0);
    cfg.phase_scale = real2f(4294967296.0 / (2.0 * 3.14159265358979));
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      chirp_wr_en = 1; win_wr_en = 0; lut_wr_addr = 6'(i);
      lut_wr_data = {real2f(real'($urandom % 1000) / 100.0), real2f(-real'(i))};
      chirp_m[i] = lut_wr_data;
      @(negedge clk);
      chirp_wr_en = 0; win_wr_en = 1;
      lut_wr_data = {real2f(real'(i)), real2f(0.5)};
      win_m[i] = lut_wr_data;
    end
    @(negedge clk) win_wr_en = 0;
    for (int s = 0; s < 5; s++) begin
      cfg.coef_sel = (s == 4) ? COEF_PHASE : coef_sel_e'(s);
      cfg.phase_direct = (s == 4);
      run_requests(100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && coef_valid) begin
    int kk, ll;
    real x, ph, dr, di;
    cplx_t e;
    checks += 2;
    if (kq.size() == 0) begin failures += 2; $display("unexpected output"); end
    else begin
      kk = kq.pop_front(); ll = lq.pop_front();
      if (cyc - tq.pop_front() != FILT_LAT) begin failures++; $display("latency"); end
      case (cfg.coef_sel)
        COEF_WINDOW, COEF_CHIRP, COEF_UNITY: begin
          e = (cfg.coef_sel == COEF_WINDOW) ? win_m[kk] :
              (cfg.coef_sel == COEF_CHIRP) ? chirp_m[kk] : {FP_ONE, FP_ZERO};
          if (coef !== e) begin failures++; $display("sel %0d k %0d mismatch", cfg.coef_sel, kk); end
        end
        default: begin
          x = (real'(kk) * 0.1 + real'(ll) * 0.5 - 1.0) / 2.0;
          ph = cfg.phase_direct ? x : polyr(x);
          dr = f2real(coef[63:32]) - $cos(ph); di = f2real(coef[31:0]) - $sin(ph);
          if (dr > 1e-3 || dr < -1e-3 || di > 1e-3 || di < -1e-3) begin
            failures++; $display("phase k %0d l %0d got %f %f exp %f %f", kk, ll,
              f2real(coef[63:32]), f2real(coef[31:0]), $cos(ph), $sin(ph));
          end
        end
      endcase
    end
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
