// tb_sar_focus_full: the focusing kernel at its full size (8 datapaths,
// 32768-point range lines, 4 lines per datapath), default parameters.
// One range sub-block of 8 x 4 lines is processed with a forward FFT and
// unity filter. Every line holds a single complex tone at its own bin, so
// the expected spectrum is known exactly: N at the tone bin and zero
// elsewhere. Every output sample of every line is checked, as is the
// number of cycles the run takes against the sequential FFT schedule.
module tb_sar_focus_full;
  import sar_pkg::*;
  localparam int L = 8, ML = 15, N = 1 << ML, LRG = 4;
  localparam int MEMW = 65536, DST = 32768;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we = 0, busy, done;
  logic [4:0] reg_waddr = 0, reg_raddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [L-1:0] rd_req_valid, rd_req_ready, rd_data_valid, rd_data_ready, wr_valid, wr_ready;
  logic [L-1:0][31:0] rd_addr, wr_addr;
  logic [L-1:0][255:0] rd_data, wr_data;

  sar_focus_top dut (.*);

  // HBM model: one 256-bit word per lane and cycle, no stalls.
  logic [255:0] mem [L][MEMW];
  int unsigned rq [L][$];
  always @(negedge clk) begin
    for (int p = 0; p < L; p++) begin
      rd_req_ready[p]  = 1'b1;
      wr_ready[p]      = 1'b1;
      rd_data_valid[p] = rq[p].size() != 0;
      rd_data[p]       = rq[p].size() != 0 ? mem[p][rq[p][0] % MEMW] : '0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < L; p++) begin
      if (rd_data_valid[p] && rd_data_ready[p]) void'(rq[p].pop_front());
      if (rd_req_valid[p] && rd_req_ready[p]) rq[p].push_back(rd_addr[p]);
      if (wr_valid[p] && wr_ready[p]) mem[p][wr_addr[p] % MEMW] <= wr_data[p];
    end
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wreg(int a, logic [31:0] v);
    @(posedge clk); reg_we <= 1; reg_waddr <= 5'(a); reg_wdata <= v;
    @(posedge clk); reg_we <= 0;
  endtask

  function automatic int tone(int p, int l);
    return (1000 * p + 3071 * l + 5) % N;
  endfunction

  initial begin
    int t0, cyc, worst_bin;
    real worst_off, err_peak;
    for (int p = 0; p < L; p++) for (int a = 0; a < MEMW; a++) mem[p][a] = '0;
    for (int p = 0; p < L; p++) for (int l = 0; l < LRG; l++) begin
      int b;
      b = tone(p, l);
      for (int i = 0; i < N; i++) begin
        real a;
        a = 2.0 * PI * real'((b * i) % N) / real'(N);
        mem[p][l * (N / 4) + i / 4][64 * (i % 4) +: 64] = {real2f($cos(a)), real2f($sin(a))};
      end
    end
    repeat (3) @(posedge clk); rst_n = 1;
    wreg(1, 32'(COEF_UNITY) << 3);
    wreg(2, ML); wreg(3, 1); wreg(4, 0); wreg(5, DST); wreg(8, N / 4); wreg(11, N);
    t0 = $time;
    wreg(0, 1);
    @(posedge clk);
    while (!done) @(posedge clk);
    cyc = ($time - t0) / 10;
    repeat (5) @(posedge clk);
    $display("sub-block of %0d x %0d lines of %0d points: %0d cycles", L, LRG, N, cyc);
    // Per line: feed N, log2(N)*N/2 butterflies, unload N, plus the filter
    // latency; then load and store of the sub-block around it.
    chk(cyc >= LRG * (ML * N / 2 + 2 * N) && cyc <= LRG * (ML * N / 2 + 2 * N + 400) + 3 * LRG * N,
        $sformatf("cycle count %0d", cyc));
    worst_off = 0; err_peak = 0; worst_bin = 0;
    for (int p = 0; p < L; p++) for (int l = 0; l < LRG; l++) begin
      int b, bad;
      b = tone(p, l); bad = 0;
      for (int k = 0; k < N; k++) begin
        logic [63:0] s;
        real re, im, m;
        s = mem[p][(DST + l * (N / 4) + k / 4) % MEMW][64 * (k % 4) +: 64];
        re = f2real(s[63:32]); im = f2real(s[31:0]);
        if (k == b) begin
          m = (re - N) * (re - N) + im * im;
          if (m > err_peak) err_peak = m;
          chk(m < (N * 1e-4) * (N * 1e-4), $sformatf("lane %0d line %0d peak %f %f", p, l, re, im));
        end else begin
          m = re * re + im * im;
          if (m > worst_off) begin worst_off = m; worst_bin = k; end
          if (m > 0.25) bad++;
        end
      end
      chk(bad == 0, $sformatf("lane %0d line %0d: %0d bins away from the tone are not zero", p, l, bad));
    end
    $display("largest peak error %f, largest off-tone magnitude %f (bin %0d)",
             $sqrt(err_peak), $sqrt(worst_off), worst_bin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
