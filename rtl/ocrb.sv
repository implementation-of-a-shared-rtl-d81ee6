// ocrb: output cell rotation buffer.
//
// Turns the 64-bit words read from the shared buffer back into N byte-wide
// output port streams. Two pages of N x 64 bytes swap roles every cell time.
// It follows the returned MD (mode) signal: when MD falls, the read half of
// a cell time begins and the next N*8 words are port 0 word 0 .. port N-1
// word 7. Each is stored in the loading page; if ME was low for it (the
// port's queue was empty) an idle word is stored instead, so the port sends
// an idle cell (cell indication bit 0 = 0). When MD rises again the pages
// swap and OCS (output cell start) pulses; from that cycle the full page is
// sent out one byte per port per clock, byte 0 first, for 64 clocks.
// Outputs are registered: ocs_o is high in the cycle byte 0 is on dout_o.
// Hence OCS follows ICS by the buffer's latency plus the fixed pipeline of
// the rotation buffers and the address controller.
module ocrb
  import atm_pkg::*;
#(
  parameter int unsigned N  = 4,
  localparam int unsigned PAW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned BW  = $clog2(CELL_BYTES)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [WORD_BITS-1:0] ocd_i,
  input  logic                 me_i,
  input  logic                 md_i,
  output logic                 ocs_o,
  output logic [N-1:0][7:0]    dout_o
);
  logic [7:0]    page [2][N][CELL_BYTES];
  logic          md_q;
  logic          fall, rise;
  logic [BW-1:0] wcnt_q, widx;     // word counter of the read half
  logic [BW-1:0] ocnt_q, oidx;     // byte counter of the departing cells
  logic          lp_q, lp;         // page being loaded
  logic          filling_q;
  logic [1:0]    full_q;

  assign fall = md_q && !md_i;
  assign rise = !md_q && md_i;
  assign widx = fall ? '0 : wcnt_q + 1'b1;
  assign oidx = rise ? '0 : ocnt_q + 1'b1;
  assign lp   = rise ? !lp_q : lp_q;

  logic wr_en;
  assign wr_en = !md_i && (widx < BW'(N*WORDS_PER_CELL));

  always_ff @(posedge clk) begin
    if (rst) begin
      md_q      <= 1'b1;
      wcnt_q    <= '1;
      ocnt_q    <= '0;
      lp_q      <= 1'b0;
      filling_q <= 1'b0;
      full_q    <= '0;
    end else begin
      md_q   <= md_i;
      wcnt_q <= (!md_i && widx != '1) ? widx : wcnt_q;
      ocnt_q <= oidx;
      lp_q   <= lp;
      if (fall) filling_q <= 1'b1;
      if (rise) begin
        full_q[lp_q] <= filling_q;
        full_q[lp]   <= 1'b0;
        filling_q    <= 1'b0;
      end
    end
  end

  // load side: idle cell insertion when ME is low
  logic [WORD_BITS-1:0] wdata;
  assign wdata = me_i ? ocd_i : IDLE_WORD;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int unsigned b = 0; b < 8; b++)
        page[lp][widx[3 +: PAW]][{widx[2:0], 3'(b)}] <= wdata[8*b +: 8];
    end
  end

  // departure side; at the swap the page just loaded is full if its
  // read half was seen from the start
  logic rfull;
  assign rfull = rise ? filling_q : full_q[!lp];

  always_ff @(posedge clk) begin
    if (rst) begin
      ocs_o  <= 1'b0;
      dout_o <= '0;
    end else begin
      ocs_o <= rise;
      for (int unsigned p = 0; p < N; p++)
        dout_o[p] <= rfull ? page[!lp][p][oidx] : 8'h00;
    end
  end
endmodule
