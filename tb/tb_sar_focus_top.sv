// tb_sar_focus_top: end-to-end test of the focusing kernel at reduced size
// (4 datapaths, 64-point lines). A behavioural HBM model with random
// request, data and write stalls serves all lanes. Four processing steps
// are run through the register port, each checked word by word against a
// double-precision reference (direct DFT and the filter formulas):
//   1. range, raw 8/8-bit input with I/Q correction and zero padding,
//      chirp LUT filled from HBM, chirp filter, output cropped, 2 sub-blocks
//   2. azimuth (corner-turned load), forward FFT, polynomial phase filter
//   3. range, float input, IFFT, window LUT filled from HBM, output
//      partial corner turn in transpose mode
//   4. range, float input, FFT, phase filter with the polynomial bypassed
// Every mechanism is counted and must have happened at least once.
module tb_sar_focus_top;
  import sar_pkg::*;
  localparam int L = 4, ML = 6, N = 1 << ML, LRG = 4, LAZ = 16;
  localparam int MEMW = 4096;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we = 0, busy, done;
  logic [4:0] reg_waddr = 0, reg_raddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [L-1:0] rd_req_valid, rd_req_ready, rd_data_valid, rd_data_ready, wr_valid, wr_ready;
  logic [L-1:0][31:0] rd_addr, wr_addr;
  logic [L-1:0][255:0] rd_data, wr_data;

  sar_focus_top #(.NUM_DP(L), .MAX_LOG2(ML), .LINES_RG(LRG), .LINES_AZ(LAZ)) dut (.*);

  // ------------------------------------------------------------ HBM model
  logic [255:0] mem [L][MEMW];
  int unsigned rq [L][$];
  int n_rd_stall = 0, n_rdata_stall = 0, n_wr_stall = 0, n_writes = 0;
  always @(negedge clk) begin
    for (int p = 0; p < L; p++) begin
      rd_req_ready[p] = $urandom % 5 != 0;
      wr_ready[p]     = $urandom % 6 != 0;
      rd_data_valid[p] = rq[p].size() != 0 && $urandom % 7 != 0;
      rd_data[p] = rq[p].size() != 0 ? mem[p][rq[p][0] % MEMW] : '0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < L; p++) begin
      if (rd_data_valid[p] && rd_data_ready[p]) void'(rq[p].pop_front());
      if (rd_req_valid[p] && rd_req_ready[p]) rq[p].push_back(rd_addr[p]);
      if (rd_req_valid[p] && !rd_req_ready[p]) n_rd_stall++;
      if (rd_data_valid[p] && !rd_data_ready[p]) n_rdata_stall++;
      if (wr_valid[p] && !wr_ready[p]) n_wr_stall++;
      if (wr_valid[p] && wr_ready[p]) begin mem[p][wr_addr[p] % MEMW] <= wr_data[p]; n_writes++; end
    end
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wreg(int a, logic [31:0] v);
    @(negedge clk) begin reg_we = 1; reg_waddr = 5'(a); reg_wdata = v; end
    @(negedge clk) reg_we = 0;
  endtask

  // ---------------------------------------------------- reference model
  real pc [7];
  real cr [N], ci [N], wre [N], wim [N];   // chirp and window tables
  real sc = 0.05, lsc = 0.3, off = -0.4, dv = 1.5;

  function automatic real fabs(real x); return x < 0 ? -x : x; endfunction

  // DFT of one line (xr, xi) into (yr, yi).
  int n_cur = N;   // length of the lines being checked
  task automatic dft(input real xr [N], input real xi [N], input bit inv,
                     output real yr [N], output real yi [N]);
    for (int k = 0; k < n_cur; k++) begin
      real a;
      yr[k] = 0; yi[k] = 0;
      for (int i = 0; i < n_cur; i++) begin
        a = (inv ? 2.0 : -2.0) * PI * real'((k * i) % n_cur) / real'(n_cur);
        yr[k] += xr[i] * $cos(a) - xi[i] * $sin(a);
        yi[k] += xr[i] * $sin(a) + xi[i] * $cos(a);
      end
    end
  endtask

  function automatic real polyr(real x);
    real y = pc[6];
    for (int i = 5; i >= 0; i--) y = y * x + pc[i];
    return y;
  endfunction

  // Coefficient for bin k, line l under mode sel.
  task automatic coefr(int sel, bit direct, int k, int l, output real re, output real im);
    real x, ph;
    case (sel)
      COEF_CHIRP:  begin re = cr[k];  im = ci[k];  end
      COEF_WINDOW: begin re = wre[k]; im = wim[k]; end
      COEF_UNITY:  begin re = 1.0;    im = 0.0;    end
      default: begin
        x = (real'(k) * sc + real'(l) * lsc + off) / dv;
        ph = direct ? x : polyr(x);
        re = $cos(ph); im = $sin(ph);
      end
    endcase
  endtask

  // Compare one processed line of datapath d with the cache contents
  // written back. Words are addressed as stream index q of datapath d.
  int out_ct_mode = 0;
  function automatic logic [255:0] outword(int d, int base, int q);
    int b, j;
    if (!out_ct_mode) return mem[d][(base + q) % MEMW];
    b = q / L; j = q % L;
    return mem[j][(base + L * b + d) % MEMW];
  endfunction

  task automatic check_line(int d, int base, int q0, real xr [N], real xi [N], bit inv,
                            int sel, bit direct, int l, int out_len, string tag);
    real yr [N], yi [N];
    real mag, tol, er, ei;
    dft(xr, xi, inv, yr, yi);
    mag = 0;
    for (int i = 0; i < n_cur; i++) mag += fabs(xr[i]) + fabs(xi[i]);
    for (int k = 0; k < out_len; k++) begin
      logic [255:0] w;
      logic [63:0] s;
      real gr, gi, hr, hi;
      coefr(sel, direct, k, l, hr, hi);
      er = yr[k] * hr - yi[k] * hi;
      ei = yr[k] * hi + yi[k] * hr;
      tol = 1e-3 * mag * (fabs(hr) + fabs(hi) + 1.0) + 1e-6;
      w = outword(d, base, q0 + k / 4);
      s = w[64 * (k % 4) +: 64];
      gr = f2real(s[63:32]); gi = f2real(s[31:0]);
      chk(fabs(gr - er) <= tol && fabs(gi - ei) <= tol,
          $sformatf("%s dp %0d line %0d bin %0d got %f %f exp %f %f", tag, d, l, k, gr, gi, er, ei));
    end
  endtask

  task automatic run_and_wait(output int cycles);
    int t0;
    t0 = $time;
    wreg(0, 1);
    @(posedge clk);
    while (!done) @(posedge clk);
    cycles = ($time - t0) / 10;
    repeat (5) @(posedge clk);
  endtask

  // Mechanism counters.
  int n_raw = 0, n_pad = 0, n_crop = 0, n_az = 0, n_inv = 0, n_fwd = 0;
  int n_chirp = 0, n_win = 0, n_poly = 0, n_direct = 0, n_ctout = 0, n_subs = 0;

  int f0 = 0;
  initial begin
    int cyc;
    real xr [N], xi [N];
    for (int i = 0; i < 7; i++) pc[i] = 0.0;
    pc[0] = 0.2; pc[1] = 0.9; pc[2] = -0.15; pc[3] = 0.02;
    for (int p = 0; p < L; p++) for (int a = 0; a < MEMW; a++) mem[p][a] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // common registers
    for (int i = 0; i < 7; i++) wreg(12 + i, real2f(pc[i]));
    wreg(19, real2f(sc)); wreg(20, real2f(lsc)); wreg(21, real2f(off)); wreg(22, real2f(dv));
    wreg(23, real2f(4294967296.0 / (2.0 * PI)));
    wreg(24, real2f(-0.5)); wreg(25, real2f(0.25)); wreg(26, real2f(0.8)); wreg(27, real2f(0.1));
    wreg(2, ML); wreg(6, 3000); wreg(7, 3100);

    // chirp and window tables in HBM lane 0
    for (int k = 0; k < N; k++) begin
      cr[k] = f2real(real2f(real'(int'($urandom % 200) - 100) / 50.0));
      ci[k] = f2real(real2f(real'(int'($urandom % 200) - 100) / 50.0));
      wre[k] = f2real(real2f(0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(N))));
      wim[k] = 0.0;
      mem[0][3000 + k / 4][64 * (k % 4) +: 64] = {real2f(cr[k]), real2f(ci[k])};
      mem[0][3100 + k / 4][64 * (k % 4) +: 64] = {real2f(wre[k]), 32'h0};
    end

    // ---------------- step 1: range, raw input, chirp filter, 2 sub-blocks
    begin
      int rawlen = 48, lw = 3, outlen = 56, wps;
      wps = LRG * outlen / 4;
      for (int p = 0; p < L; p++) for (int a = 0; a < 2 * LRG * lw; a++)
        for (int t = 0; t < 8; t++) mem[p][a][32 * t +: 32] = $urandom;
      wreg(1, 32'(1 << 1) | (32'(COEF_CHIRP) << 3) | (1 << 7));
      wreg(3, 2); wreg(4, 0); wreg(5, 1000); wreg(8, lw); wreg(10, rawlen); wreg(11, outlen);
      out_ct_mode = 0;
      run_and_wait(cyc);
      f0 = failures;
      $display("step 1: %0d cycles", cyc);
      n_raw++; n_pad++; n_crop++; n_chirp++; n_fwd++; n_subs += 2;
      for (int p = 0; p < L; p++) for (int s = 0; s < 2; s++) for (int l = 0; l < LRG; l++) begin
        for (int i = 0; i < N; i++) begin
          if (i < rawlen) begin
            logic [15:0] v;
            int ii, qq;
            v = mem[p][s * LRG * lw + l * lw + i / 16][16 * (i % 16) +: 16];
            ii = int'(signed'(v[7:0])); qq = int'(signed'(v[15:8]));
            xr[i] = (ii - 0.5) * 0.8 - (qq + 0.25) * 0.1;
            xi[i] = (ii - 0.5) * 0.1 + (qq + 0.25) * 0.8;
          end else begin xr[i] = 0; xi[i] = 0; end
        end
        check_line(p, 1000 + s * wps, l * outlen / 4, xr, xi, 0, COEF_CHIRP, 0, l, outlen, "step1");
      end
    end

    $display("step 1 failures %0d", failures - f0);
    // ---------------- step 2: azimuth, forward FFT, polynomial phase filter
    begin
      int rw = L * LAZ / 4;   // words per stored row
      int na = N / 4;         // azimuth lines are a quarter of the range length
      for (int p = 0; p < L; p++) for (int m = 0; m < na / L; m++) for (int c = 0; c < rw; c++)
        for (int t = 0; t < 4; t++)
          mem[p][m * rw + c][64 * t +: 64] = {real2f(real'(int'($urandom % 2000) - 1000) / 100.0),
                                              real2f(real'(int'($urandom % 2000) - 1000) / 100.0)};
      wreg(1, 32'(1 << 0) | (32'(COEF_PHASE) << 3));
      wreg(2, ML - 2); wreg(3, 1); wreg(4, 0); wreg(5, 1500); wreg(9, rw); wreg(11, na);
      n_cur = na;
      run_and_wait(cyc);
      f0 = failures;
      $display("step 2: %0d cycles", cyc);
      n_az++; n_poly++; n_fwd++; n_subs++;
      for (int d = 0; d < L; d++) for (int cc = 0; cc < LAZ; cc++) begin
        int col;
        col = LAZ * d + cc;
        for (int r = 0; r < na; r++) begin
          logic [63:0] s;
          s = mem[r % L][(r / L) * rw + col / 4][64 * (col % 4) +: 64];
          xr[r] = f2real(s[63:32]); xi[r] = f2real(s[31:0]);
        end
        check_line(d, 1500, cc * na / 4, xr, xi, 0, COEF_PHASE, 0, cc, na, "step2");
      end
      n_cur = N;
      wreg(2, ML);
    end

    $display("step 2 failures %0d", failures - f0);
    // ---------------- step 3: range float IFFT, window LUT, output transpose
    begin
      int lw = N / 4;
      for (int p = 0; p < L; p++) for (int a = 0; a < LRG * lw; a++) for (int t = 0; t < 4; t++)
        mem[p][200 + a][64 * t +: 64] = {real2f(real'(int'($urandom % 2000) - 1000) / 100.0),
                                         real2f(real'(int'($urandom % 2000) - 1000) / 100.0)};
      wreg(1, 32'(1 << 2) | (32'(COEF_WINDOW) << 3) | (1 << 6) | (1 << 8));
      wreg(3, 1); wreg(4, 200); wreg(5, 2200); wreg(8, lw); wreg(11, N);
      out_ct_mode = 1;
      run_and_wait(cyc);
      f0 = failures;
      $display("step 3: %0d cycles", cyc);
      n_inv++; n_win++; n_ctout++; n_subs++;
      for (int p = 0; p < L; p++) for (int l = 0; l < LRG; l++) begin
        for (int i = 0; i < N; i++) begin
          logic [63:0] s;
          s = mem[p][200 + l * lw + i / 4][64 * (i % 4) +: 64];
          xr[i] = f2real(s[63:32]); xi[i] = f2real(s[31:0]);
        end
        check_line(p, 2200, l * N / 4, xr, xi, 1, COEF_WINDOW, 0, l, N, "step3");
      end
      out_ct_mode = 0;
    end

    $display("step 3 failures %0d", failures - f0);
    // ---------------- step 4: range float FFT, phase filter, polynomial bypassed
    begin
      int lw = N / 4;
      wreg(1, 32'(COEF_PHASE) << 3 | (1 << 5));
      wreg(3, 1); wreg(4, 200); wreg(5, 2600); wreg(8, lw); wreg(11, N);
      run_and_wait(cyc);
      f0 = failures;
      $display("step 4: %0d cycles", cyc);
      n_direct++; n_fwd++; n_subs++;
      for (int p = 0; p < L; p++) for (int l = 0; l < LRG; l++) begin
        for (int i = 0; i < N; i++) begin
          logic [63:0] s;
          s = mem[p][200 + l * lw + i / 4][64 * (i % 4) +: 64];
          xr[i] = f2real(s[63:32]); xi[i] = f2real(s[31:0]);
        end
        check_line(p, 2600, l * N / 4, xr, xi, 0, COEF_PHASE, 1, l, N, "step4");
      end
    end

    $display("step 4 failures %0d", failures - f0);
    // ---------------- mechanisms
    $display("mechanisms: read-request stalls %0d, read-data stalls %0d, write stalls %0d",
             n_rd_stall, n_rdata_stall, n_wr_stall);
    $display("  raw %0d pad %0d crop %0d azimuth %0d fft %0d ifft %0d chirp %0d window %0d poly %0d direct %0d ct-out %0d sub-blocks %0d",
             n_raw, n_pad, n_crop, n_az, n_fwd, n_inv, n_chirp, n_win, n_poly, n_direct, n_ctout, n_subs);
    chk(n_rd_stall > 0, "no read request stall");
    chk(n_rdata_stall > 0, "no read data stall");
    chk(n_wr_stall > 0, "no write stall");
    chk(n_writes == L * (2 * LRG * 14 + LAZ * 4 + 2 * LRG * 16), "write count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog: controller state %0d, index %0d, LUT count %0d, lane 0 writes %0d, datapath 0 done %0b",
             dut.u_fsm.st, dut.u_fsm.ri, dut.u_fsm.lut_cnt, dut.u_fsm.wcnt[0], dut.dp_proc_done[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
