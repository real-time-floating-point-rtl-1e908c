// dwc_in: data width converter between the input cache and the datapath.
// A 256-bit cache word is split into sixteen 16-bit raw samples (raw mode,
// for 8/8-bit complex integer radar data) or four 64-bit complex floats,
// least significant part first. The 256b to 16b/64b widths follow the design;
// the ordering within a word is this implementation's choice.
//
// Interface: valid/ready on both sides. A word is taken when the output
// part counter is idle or on its last part, so a continuous input stream
// yields one output part per cycle. out_data carries a raw sample in its
// low 16 bits (upper bits zero).
module dwc_in (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         raw,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [255:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [63:0]  out_data
);
  logic [255:0] word;
  logic [3:0]   part;
  logic         full;
  logic [3:0]   last;
  logic         take, give;

  assign last      = raw ? 4'd15 : 4'd3;
  assign out_valid = full;
  assign give      = full && out_ready;
  assign in_ready  = !full || (give && part == last);
  assign take      = in_valid && in_ready;
  assign out_data  = raw ? {48'd0, word[16*part +: 16]} : word[64*part[1:0] +: 64];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0; part <= '0; full <= 1'b0;
    end else begin
      if (give) part <= (part == last) ? '0 : part + 4'd1;
      if (take) begin
        word <= in_data;
        full <= 1'b1;
        part <= '0;
      end else if (give && part == last) full <= 1'b0;
    end
  end
endmodule
