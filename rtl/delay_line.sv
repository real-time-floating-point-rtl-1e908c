// delay_line: fixed shift-register delay of a W-bit bus by N clock cycles
// (N >= 1), reset to zero. Used to keep data, side information and filter
// coefficients in step across pipelines of known latency.
module delay_line #(
  parameter int W = 1,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] sr [N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) sr[i] <= '0;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
  end
  assign q = sr[N-1];
endmodule
