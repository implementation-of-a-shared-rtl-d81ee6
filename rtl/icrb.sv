// icrb: input cell rotation buffer.
//
// Turns N byte-wide port streams into 64-bit cell words for the address
// controller. Two pages of N x 64 bytes swap roles every cell time:
// while one page collects the current cells (one byte per port per clock),
// the other hands the previous cells out as eight 64-bit words per port,
// port 0 first, in the first N*8 cycles of the cell time (32 for N = 4).
// ics_i is high in the cycle byte 0 of the new cells is on the ports; it
// resets the 6-bit byte counter and swaps the pages. Byte b of a cell goes to
// bits [8*(b%8) +: 8] of word b/8. icd_o/ics_o are registered: ics_o is high
// in the cycle word 0 of port 0 is on icd_o. A page that never held complete
// cells (after reset) reads as idle words.
// Interface: plain byte ports; no flow control (cells arrive every 64 clocks).
module icrb
  import atm_pkg::*;
#(
  parameter int unsigned N  = 4,
  localparam int unsigned PAW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned BW  = $clog2(CELL_BYTES)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ics_i,
  input  logic [N-1:0][7:0]    din_i,
  output logic                 ics_o,
  output logic [WORD_BITS-1:0] icd_o
);
  logic [7:0]    page [2][N][CELL_BYTES];
  logic [BW-1:0] cnt_q, idx;
  logic          lp_q, lp;          // page being loaded
  logic          started_q;
  logic [1:0]    full_q;

  assign idx = ics_i ? '0 : cnt_q + 1'b1;
  assign lp  = ics_i ? !lp_q : lp_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q     <= '1;
      lp_q      <= 1'b0;
      started_q <= 1'b0;
      full_q    <= '0;
    end else begin
      cnt_q <= idx;
      lp_q  <= lp;
      if (ics_i) begin
        started_q     <= 1'b1;
        full_q[lp_q]  <= started_q;   // page just finished
        full_q[lp]    <= 1'b0;        // page about to be overwritten
      end
    end
  end

  // load side
  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < N; p++)
      page[lp][p][idx] <= din_i[p];
  end

  // delivery side: word idx[2:0] of port idx[PAW+2:3] while idx < N*8
  logic [PAW-1:0] rport;
  logic [2:0]     rword;
  logic [WORD_BITS-1:0] rdata;
  logic           rfull;
  assign rport = idx[3 +: PAW];
  // at ICS the page just finished is full if an ICS came before it
  assign rfull = ics_i ? started_q : full_q[!lp];
  assign rword = idx[2:0];

  always_comb begin
    for (int unsigned b = 0; b < 8; b++)
      rdata[8*b +: 8] = page[!lp][rport][{rword, 3'(b)}];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ics_o <= 1'b0;
      icd_o <= IDLE_WORD;
    end else begin
      ics_o <= (idx == '0);
      icd_o <= (idx < BW'(N*WORDS_PER_CELL) && rfull) ? rdata : IDLE_WORD;
    end
  end
endmodule
