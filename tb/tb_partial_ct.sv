// tb_partial_ct: four lanes. Pass mode: each lane's stream must come out
// unchanged on the same lane under random stalls. Transpose mode: three
// 4x4 blocks with random output stalls; output lane j must carry, at block
// position i, the word j of input lane i.
module tb_partial_ct;
  localparam int L = 4, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic transpose = 0;
  logic [L-1:0] in_valid = 0, in_ready, out_valid, out_ready = '1;
  logic [L-1:0][W-1:0] in_data = 0, out_data;
  logic [W-1:0] exp_q [L][$];
  int checks = 0, failures = 0;
  partial_ct #(.LANES(L), .W(W)) dut (.*);
  always @(negedge clk) out_ready = ($urandom % 4 != 0) ? '1 : '0;
  always @(posedge clk) for (int j = 0; j < L; j++) if (out_valid[j] && out_ready[j]) begin
    checks++;
    if (exp_q[j].size() == 0 || out_data[j] != exp_q[j].pop_front()) begin
      failures++; $display("lane %0d mismatch", j);
    end
  end
  initial begin
    logic [W-1:0] blk [L][L];
    repeat (3) @(posedge clk); rst_n = 1;
    // pass mode, all lanes valid together
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      in_valid = '1;
      for (int i = 0; i < L; i++) begin in_data[i] = $urandom; exp_q[i].push_back(in_data[i]); end
      @(posedge clk); while (!(&in_ready)) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    transpose = 1;
    for (int b = 0; b < 3; b++) begin
      for (int i = 0; i < L; i++) for (int j = 0; j < L; j++) begin
        blk[i][j] = $urandom; exp_q[j].push_back(blk[i][j]);
      end
      for (int j = 0; j < L; j++) begin
        @(negedge clk);
        in_valid = '1;
        for (int i = 0; i < L; i++) in_data[i] = blk[i][j];
        @(posedge clk); while (!(&in_ready)) @(posedge clk);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    for (int j = 0; j < L; j++) begin checks++; if (exp_q[j].size() != 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
