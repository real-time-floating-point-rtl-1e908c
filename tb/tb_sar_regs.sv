// tb_sar_regs: writes random values to every register, reads them back,
// checks each field of the configuration structure and the start pulse.
module tb_sar_regs;
  import sar_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, busy = 0, start;
  logic [4:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  sar_cfg_t cfg;
  logic [31:0] m [32];
  int checks = 0, failures = 0, starts = 0;
  sar_regs dut (.*);
  always @(posedge clk) if (rst_n && start) starts++;
  task automatic chk(bit c, string what);
    checks++; if (!c) begin failures++; $display("fail %s", what); end
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 1; i < 32; i++) begin
      @(negedge clk) begin we = 1; waddr = 5'(i); wdata = $urandom; m[i] = wdata; end
    end
    @(negedge clk) we = 0;
    for (int i = 1; i < 32; i++) begin raddr = 5'(i); #1 chk(rdata == m[i], "readback"); end
    chk(cfg.az_mode == m[1][0] && cfg.raw_in == m[1][1] && cfg.inverse == m[1][2], "mode bits");
    chk(cfg.coef_sel == m[1][4:3] && cfg.phase_direct == m[1][5] && cfg.out_ct == m[1][6], "mode bits 2");
    chk(cfg.load_chirp == m[1][7] && cfg.load_win == m[1][8], "load bits");
    chk(cfg.log2n == m[2][4:0] && cfg.n_sub == m[3][15:0], "sizes");
    chk(cfg.src_base == m[4] && cfg.dst_base == m[5] && cfg.chirp_base == m[6] && cfg.win_base == m[7], "bases");
    chk(cfg.line_words == m[8] && cfg.row_words == m[9] && cfg.raw_len == m[10] && cfg.out_len == m[11], "lengths");
    for (int i = 0; i < 7; i++) chk(cfg.poly[i] == m[12+i], "poly");
    chk(cfg.scale == m[19] && cfg.lscale == m[20] && cfg.offset == m[21] && cfg.divisor == m[22], "arith");
    chk(cfg.phase_scale == m[23] && cfg.dc_re == m[24] && cfg.dc_im == m[25], "phase/dc");
    chk(cfg.g_re == m[26] && cfg.g_im == m[27], "gain");
    raddr = 0; busy = 1; #1 chk(rdata == 1, "busy");
    @(negedge clk) begin we = 1; waddr = 0; wdata = 1; end
    @(negedge clk) we = 0;
    repeat (3) @(posedge clk);
    chk(starts == 1, "one start pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
