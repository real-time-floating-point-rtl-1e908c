// partial_ct: partial corner turn between the HBM lanes and the datapaths.
// There is one lane per datapath and per HBM pseudo channel in use. In pass
// mode every lane's word stream goes straight through. In transpose mode
// the unit gathers a LANES x LANES block of words (LANES consecutive words
// from every lane) and emits it transposed: word j of input lane i leaves as
// word i of output lane j. With rows of the SAR data spread over the pseudo
// channels (row r in channel r mod 8), this hands every datapath the words
// of its own columns from all rows, as azimuth processing needs; on the way
// out it returns data to the interleaved layout.
// The design names the unit on both sides of the datapaths; the block
// transpose is this implementation's reading of what it has to do.
//
// How it works: a collect buffer and an emit buffer (ping-pong). The collect
// buffer takes one word per lane in cycles where every lane is valid; when
// full it is copied, transposed, into the emit buffer as soon as that is
// empty or sending its last word. The emit buffer offers one word per lane;
// each lane takes it when its own out_ready is high (a word is never sent
// twice), and the next position is offered once all lanes have taken theirs.
//
// Interface: per-lane valid/ready. In transpose mode the input lanes move in
// lock-step. Latency LANES+1 cycles; throughput LANES words per LANES+1
// cycles. Switch modes only while idle.
module partial_ct #(
  parameter int LANES = 8,
  parameter int W     = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      transpose,
  input  logic [LANES-1:0]          in_valid,
  output logic [LANES-1:0]          in_ready,
  input  logic [LANES-1:0][W-1:0]   in_data,
  output logic [LANES-1:0]          out_valid,
  input  logic [LANES-1:0]          out_ready,
  output logic [LANES-1:0][W-1:0]   out_data
);
  localparam int CW = $clog2(LANES + 1);

  logic [W-1:0] abuf [LANES][LANES];   // [lane][position]
  logic [W-1:0] bbuf [LANES][LANES];
  logic [CW-1:0] acnt, bcnt;
  logic afull, bfull, accept, emit, blast, swap;
  logic [LANES-1:0] sent, take;   // lanes whose current word is already taken

  // A lane may take its word on any cycle; the block position advances
  // once every lane has taken the word of the current position.
  assign take   = out_valid & out_ready;
  assign afull  = acnt == CW'(LANES);
  assign emit   = bfull && transpose && (&(sent | take));
  assign blast  = emit && bcnt == CW'(LANES - 1);
  assign swap   = afull && (!bfull || blast);
  assign accept = !afull && (&in_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acnt <= '0; bcnt <= '0; bfull <= 1'b0; sent <= '0;
    end else if (transpose) begin
      sent <= emit ? '0 : (sent | take);
      if (accept) begin
        for (int i = 0; i < LANES; i++) abuf[i][acnt] <= in_data[i];
        acnt <= acnt + 1'b1;
      end
      if (emit) bcnt <= bcnt + 1'b1;
      if (swap) begin
        for (int i = 0; i < LANES; i++)
          for (int j = 0; j < LANES; j++) bbuf[j][i] <= abuf[i][j];
        acnt  <= '0;
        bcnt  <= '0;
        bfull <= 1'b1;
      end else if (blast) bfull <= 1'b0;
    end
  end

  always_comb begin
    if (transpose) begin
      in_ready  = {LANES{accept}};
      out_valid = {LANES{bfull}} & ~sent;
      for (int j = 0; j < LANES; j++) out_data[j] = bbuf[j][bcnt[CW-1:0] % CW'(LANES)];
    end else begin
      in_ready  = out_ready;
      out_valid = in_valid;
      out_data  = in_data;
    end
  end
endmodule
