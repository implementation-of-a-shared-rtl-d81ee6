// column_decoder: one column stage of the scalable pipelined buffer.
//
// Receives the request from the primary decoder or the previous column
// decoder. When ME is high and CBA is zero it raises the column branch
// trigger (CBT) and hands PD, R/W and the cell data down to the first
// memory bank of its column. To the next column decoder it passes CBA-1 and
// PD-1 together with the data, PA, MD, R/W and ME, so the column whose CBA
// reaches zero is the one the request enters the array by. PA (port address)
// rides along so the address controller learns which output queue a read
// belongs to. One register stage, one cycle of latency in both directions.
// As in the document's gated clocking, payload registers load only when
// their trigger (ME to the right, CBT downward) is high.
module column_decoder #(
  parameter int unsigned CB  = 2,   // log2 of the array size M
  parameter int unsigned DW  = 65,
  parameter int unsigned PAW = 2
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           me_i,
  input  logic           md_i,
  input  logic           rw_i,
  input  logic [PAW-1:0] pa_i,
  input  logic [CB-1:0]  cba_i,
  input  logic [CB-1:0]  pd_i,
  input  logic [DW-1:0]  data_i,
  // horizontal: to the next column decoder
  output logic           me_o,
  output logic           md_o,
  output logic           rw_o,
  output logic [PAW-1:0] pa_o,
  output logic [CB-1:0]  cba_o,
  output logic [CB-1:0]  pd_o,
  output logic [DW-1:0]  data_o,
  // vertical: to memory bank (0, this column)
  output logic           cbt_o,
  output logic [CB-1:0]  vpd_o,
  output logic           vrw_o,
  output logic [DW-1:0]  vdata_o
);
  logic cbt_n;
  assign cbt_n = me_i && (cba_i == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      me_o  <= 1'b0;
      md_o  <= 1'b1;
      rw_o  <= 1'b0;
      pa_o  <= '0;
      cbt_o <= 1'b0;
    end else begin
      me_o  <= me_i;
      md_o  <= md_i;
      rw_o  <= rw_i;
      pa_o  <= pa_i;
      cbt_o <= cbt_n;
    end
  end

  always_ff @(posedge clk) begin
    if (me_i) begin
      cba_o  <= cba_i - 1'b1;
      pd_o   <= pd_i - 1'b1;
      data_o <= data_i;
    end
    if (cbt_n) begin
      vpd_o   <= pd_i;
      vrw_o   <= rw_i;
      vdata_o <= data_i;
    end
  end
endmodule
