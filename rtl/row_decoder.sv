// row_decoder: one row stage of the scalable pipelined buffer.
//
// Receives RBA, RA and ME from the primary decoder or the row decoder above.
// When ME is high and RBA is zero it raises the row branch trigger (RBT) and
// sends it, with the word lines pre-decoded from RA, to the first memory bank
// of its row. Downward it passes RBA-1, RA and ME to the next row decoder.
// One register stage. RA has RAW bits but a bank has WORDS word lines; an
// RA value of WORDS or more selects no word line.
module row_decoder #(
  parameter int unsigned CB    = 2,
  parameter int unsigned RAW   = 7,
  parameter int unsigned WORDS = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             me_i,
  input  logic [CB-1:0]    rba_i,
  input  logic [RAW-1:0]   ra_i,
  // vertical: to the next row decoder
  output logic             me_o,
  output logic [CB-1:0]    rba_o,
  output logic [RAW-1:0]   ra_o,
  // horizontal: to memory bank (this row, 0)
  output logic             rbt_o,
  output logic [WORDS-1:0] wl_o
);
  logic rbt_n;
  logic [WORDS-1:0] wl_n;
  assign rbt_n = me_i && (rba_i == '0);

  always_comb begin
    wl_n = '0;
    for (int unsigned i = 0; i < WORDS; i++)
      wl_n[i] = (ra_i == RAW'(i));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      me_o  <= 1'b0;
      rbt_o <= 1'b0;
    end else begin
      me_o  <= me_i;
      rbt_o <= rbt_n;
    end
  end

  always_ff @(posedge clk) begin
    if (me_i) begin
      rba_o <= rba_i - 1'b1;
      ra_o  <= ra_i;
    end
    if (rbt_n) wl_o <= wl_n;
  end
endmodule
