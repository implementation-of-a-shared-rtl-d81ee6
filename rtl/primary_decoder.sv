// primary_decoder: first stage of the scalable pipelined buffer.
//
// Takes one buffer request per clock and turns its bank-select bits into the
// pipeline control data of the MxM bank array:
//   x = ADDR[AF_W +: CB] (bank row), y = ADDR[AF_W+CB +: CB] (bank column),
//   Temp = x - y; no borrow: RBA = Temp, CBA = 0, PD = x;
//                 borrow:    RBA = 0,    CBA = y - x, PD = y.
// RA, the word address inside a bank, is the remaining cell address bits
// above the bank select followed by the address fraction.
// CBA, PD and the request fields go to the first column decoder, RBA, RA and
// ME to the first row decoder. The document builds every stage from a
// negative-level input latch and a positive-level output latch; here each
// stage is one rising-edge register, so this block has one cycle of latency.
// Payload registers load only when ME is high (the clock gating of the
// document becomes a load enable); ME, MD, PA and R/W load every cycle.
module primary_decoder #(
  parameter int unsigned M     = 4,   // bank array is M x M
  parameter int unsigned AW    = 11,  // buffer address width
  parameter int unsigned AFW   = 3,   // address fraction width
  parameter int unsigned DW    = 65,  // buffer word width
  parameter int unsigned PAW   = 2,   // port address width
  localparam int unsigned CB   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned RAW  = AW - 2*CB
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           me_i,
  input  logic           md_i,
  input  logic           rw_i,     // 1 = write, 0 = read
  input  logic [PAW-1:0] pa_i,
  input  logic [AW-1:0]  addr_i,
  input  logic [DW-1:0]  data_i,
  // to column decoder 0
  output logic           me_o,
  output logic           md_o,
  output logic           rw_o,
  output logic [PAW-1:0] pa_o,
  output logic [DW-1:0]  data_o,
  output logic [CB-1:0]  cba_o,
  output logic [CB-1:0]  pd_o,
  // to row decoder 0
  output logic [CB-1:0]  rba_o,
  output logic [RAW-1:0] ra_o
);
  logic [CB-1:0] x, y;
  logic [CB:0]   temp;          // one extra bit holds the borrow
  logic          borrow;
  logic [CB-1:0] cba_n, rba_n, pd_n;
  logic [RAW-1:0] ra_n;

  always_comb begin
    x      = addr_i[AFW +: CB];
    y      = addr_i[AFW+CB +: CB];
    temp   = {1'b0, x} - {1'b0, y};
    borrow = temp[CB];
    if (!borrow) begin
      rba_n = temp[CB-1:0];
      cba_n = '0;
      pd_n  = x;
    end else begin
      rba_n = '0;
      cba_n = -temp[CB-1:0];    // two's complement gives |Temp|
      pd_n  = y;
    end
    ra_n = {addr_i[AW-1 : AFW+2*CB], addr_i[AFW-1:0]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      me_o <= 1'b0;
      md_o <= 1'b1;
      rw_o <= 1'b0;
      pa_o <= '0;
    end else begin
      me_o <= me_i;
      md_o <= md_i;
      rw_o <= rw_i;
      pa_o <= pa_i;
    end
  end

  always_ff @(posedge clk) begin
    if (me_i) begin
      data_o <= data_i;
      cba_o  <= cba_n;
      pd_o   <= pd_n;
      rba_o  <= rba_n;
      ra_o   <= ra_n;
    end
  end
endmodule
