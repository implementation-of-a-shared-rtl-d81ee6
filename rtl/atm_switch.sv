// atm_switch: N x N shared-buffer ATM switch with a scalable pipelined buffer.
//
// Data path, one cell time = 64 clocks (one 64-byte cell per port):
//   ports --> icrb --> addr_ctrl --> pipelined_buffer --> addr_ctrl --> ocrb --> ports
// The input rotation buffer gathers one cell per port and hands the cells
// to the address controller as 64-bit words in the first half of the next
// cell time; the controller writes them into the shared buffer at the tails
// of their output queues. In the second half it reads the head cell of each
// output queue; the words come back M+3 clocks later and the output
// rotation buffer sends them out one byte per clock in the following cell
// time, with idle cells for ports whose queue was empty.
// ics_i marks byte 0 of the incoming cells; ocs_o marks byte 0 of the
// outgoing cells. pal_i picks which 2-bit field of the routing tag holds the
// output port (for building multistage networks from these elements).
// drop_o pulses when a cell is refused because its queue has reached MAXQ
// (sharing with maximum queue length) or the buffer is full.
// Prototype sizes: 4 x 4 ports, 4 x 4 banks of 64 words x 65 bits = 128
// cells, MAXQ = floor(128 / sqrt(4)) = 64.
module atm_switch
  import atm_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned M     = 4,
  parameter int unsigned MAXQ  = 64,
  localparam int unsigned PAW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NCELL = M * M * BANK_WORDS / WORDS_PER_CELL,
  localparam int unsigned QW   = $clog2(MAXQ + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ics_i,
  input  logic [N-1:0][7:0] din_i,
  input  logic [PAL_W-1:0]  pal_i,
  output logic              ocs_o,
  output logic [N-1:0][7:0] dout_o,
  output logic              drop_o,
  output logic [QW-1:0]     qlen_o [N]
);
  logic                  ics_w;
  logic [WORD_BITS-1:0]  icd;
  logic                  q_me, q_md, q_rw;
  logic [PAW-1:0]        q_pa;
  logic [BUF_ADDR_W-1:0] q_addr;
  logic [BUF_DATA_W-1:0] q_data;
  logic                  r_me, r_md, r_rw;
  logic [PAW-1:0]        r_pa;
  logic [BUF_DATA_W-1:0] r_data;
  logic [WORD_BITS-1:0]  ocd;
  logic                  o_me, o_md;

  icrb #(.N(N)) u_icrb (
    .clk, .rst, .ics_i, .din_i, .ics_o(ics_w), .icd_o(icd)
  );

  addr_ctrl #(.N(N), .CAW(CELL_ADDR_W), .NCELL(NCELL), .MAXQ(MAXQ)) u_ac (
    .clk, .rst,
    .ics_i(ics_w), .icd_i(icd), .pal_i,
    .b_me_o(q_me), .b_md_o(q_md), .b_rw_o(q_rw), .b_pa_o(q_pa),
    .b_addr_o(q_addr), .b_data_o(q_data),
    .b_me_i(r_me), .b_md_i(r_md), .b_rw_i(r_rw), .b_pa_i(r_pa),
    .b_data_i(r_data),
    .ocd_o(ocd), .o_me_o(o_me), .o_md_o(o_md),
    .drop_o, .qlen_o
  );

  pipelined_buffer #(.M(M), .AW(BUF_ADDR_W), .AFW(AF_W), .DW(BUF_DATA_W),
                     .PAW(PAW), .WORDS(BANK_WORDS)) u_buf (
    .clk, .rst,
    .me_i(q_me), .md_i(q_md), .rw_i(q_rw), .pa_i(q_pa),
    .addr_i(q_addr), .data_i(q_data),
    .me_o(r_me), .md_o(r_md), .rw_o(r_rw), .pa_o(r_pa), .data_o(r_data)
  );

  ocrb #(.N(N)) u_ocrb (
    .clk, .rst, .ocd_i(ocd), .me_i(o_me), .md_i(o_md),
    .ocs_o, .dout_o
  );
endmodule
