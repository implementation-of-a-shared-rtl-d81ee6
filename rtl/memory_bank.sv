// memory_bank: one SRAM bank of the scalable pipelined buffer (WORDS x DW).
//
// A bank sits at (row i, column j) of the M x M array and has three
// registered data paths, one clock per hop:
//   vertical   (from the bank or column decoder above): CBT, PD, R/W, data;
//   horizontal (from the bank or row decoder to the left): RBT, word lines;
//   diagonal   (from the bank above-left): both triggers, PD, R/W, word
//              lines, data.
// A request enters the array down the column chosen by CBA and along the row
// chosen by RBA. The bank where CBT and RBT meet turns it onto the diagonal
// (towards row+1, column+1); every hop, vertical or diagonal, decrements PD.
// A bank that holds both triggers and sees PD == 0 is the addressed bank: it
// writes the data into the selected word, or reads the word and sends it on
// down the diagonal in place of the data. Because PD is CB bits wide and
// wraps, it cannot reach zero again before the request leaves the array.
// Vertical data stop at the meeting bank and horizontal data too, so only one
// diagonal is busy per request. Memory reads are synchronous.
// The document gates the clock of the vertical and horizontal latches with
// CBT and RBT; here those registers have load enables instead. The diagonal
// channel and the meeting rule are this design's reading of the three-way
// systolic flow; the document does not detail them.
module memory_bank #(
  parameter int unsigned CB    = 2,
  parameter int unsigned DW    = 65,
  parameter int unsigned WORDS = 64
) (
  input  logic             clk,
  input  logic             rst,
  // vertical in
  input  logic             v_cbt_i,
  input  logic [CB-1:0]    v_pd_i,
  input  logic             v_rw_i,
  input  logic [DW-1:0]    v_data_i,
  // horizontal in
  input  logic             h_rbt_i,
  input  logic [WORDS-1:0] h_wl_i,
  // diagonal in
  input  logic             d_trg_i,
  input  logic [CB-1:0]    d_pd_i,
  input  logic             d_rw_i,
  input  logic [WORDS-1:0] d_wl_i,
  input  logic [DW-1:0]    d_data_i,
  // vertical out
  output logic             v_cbt_o,
  output logic [CB-1:0]    v_pd_o,
  output logic             v_rw_o,
  output logic [DW-1:0]    v_data_o,
  // horizontal out
  output logic             h_rbt_o,
  output logic [WORDS-1:0] h_wl_o,
  // diagonal out
  output logic             d_trg_o,
  output logic [CB-1:0]    d_pd_o,
  output logic             d_rw_o,
  output logic [WORDS-1:0] d_wl_o,
  output logic [DW-1:0]    d_data_o
);
  localparam int unsigned IW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [DW-1:0] mem [WORDS];

  logic             meet, trg;
  logic [CB-1:0]    a_pd;
  logic             a_rw;
  logic [WORDS-1:0] a_wl;
  logic [DW-1:0]    a_data;
  logic             access, wl_any;
  logic [IW-1:0]    widx;

  assign meet = v_cbt_i && h_rbt_i;
  assign trg  = meet || d_trg_i;

  always_comb begin
    if (meet) begin
      a_pd   = v_pd_i;
      a_rw   = v_rw_i;
      a_wl   = h_wl_i;
      a_data = v_data_i;
    end else begin
      a_pd   = d_pd_i;
      a_rw   = d_rw_i;
      a_wl   = d_wl_i;
      a_data = d_data_i;
    end
    // word lines are one-hot; turn them into an array index
    widx   = '0;
    wl_any = 1'b0;
    for (int unsigned w = 0; w < WORDS; w++) begin
      if (a_wl[w]) widx = widx | IW'(w);
      wl_any = wl_any | a_wl[w];
    end
    access = trg && (a_pd == '0) && wl_any;
  end

  // trigger bits
  always_ff @(posedge clk) begin
    if (rst) begin
      v_cbt_o <= 1'b0;
      h_rbt_o <= 1'b0;
      d_trg_o <= 1'b0;
    end else begin
      v_cbt_o <= v_cbt_i && !h_rbt_i;
      h_rbt_o <= h_rbt_i && !v_cbt_i;
      d_trg_o <= trg;
    end
  end

  // payload registers, loaded only when their trigger is active
  always_ff @(posedge clk) begin
    if (v_cbt_i && !h_rbt_i) begin
      v_pd_o   <= v_pd_i - 1'b1;
      v_rw_o   <= v_rw_i;
      v_data_o <= v_data_i;
    end
    if (h_rbt_i && !v_cbt_i)
      h_wl_o <= h_wl_i;
    if (trg) begin
      d_pd_o <= a_pd - 1'b1;
      d_rw_o <= a_rw;
      d_wl_o <= a_wl;
      if (access && !a_rw) d_data_o <= mem[widx];
      else                 d_data_o <= a_data;
    end
  end

  // memory cell array
  always_ff @(posedge clk) begin
    if (access && a_rw) mem[widx] <= a_data;
  end
endmodule
