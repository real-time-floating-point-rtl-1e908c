// dwc_out: data width converter between the output cache (512-bit words,
// eight complex samples) and the HBM write port (256-bit words). Each
// input word leaves as two output words, low half first. The widths follow
// the design; the order is this implementation's choice.
//
// Interface: valid/ready on both sides; one output word per cycle on a
// continuous stream.
module dwc_out (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [511:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [255:0] out_data
);
  logic [511:0] word;
  logic         half, full, give, take;
  assign out_valid = full;
  assign give      = full && out_ready;
  assign in_ready  = !full || (give && half);
  assign take      = in_valid && in_ready;
  assign out_data  = half ? word[511:256] : word[255:0];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0; half <= 1'b0; full <= 1'b0;
    end else begin
      if (give) half <= ~half;
      if (take) begin
        word <= in_data; full <= 1'b1; half <= 1'b0;
      end else if (give && half) full <= 1'b0;
    end
  end
endmodule
