// addr_ctrl: address controller of the shared-buffer switch.
//
// Keeps one logical output queue per output port as a linked list inside the
// shared buffer. WAR[p] (tail) always points at a free cell already reserved
// for the next cell to port p; RAR[p] (head) points at the next cell to send.
// Every stored cell carries, in the extra buffer bit of its eight words, the
// address of the cell behind it (MSB first, one bit per word).
//
// A 6-bit master counter (MC) splits the 64-cycle cell time: MC[5] = 0 is
// the write half (MD high), MC[5] = 1 the read half (MD low); MC[4:3] picks
// the port and MC[2:0] is the address fraction AF (word in cell).
//  Write slot of input port p: word 0 of the cell arrives from the input
//   rotation buffer; bit 0 marks a real cell, the 2-bit field at
//   bit ROUTE_LSB + 2*PAL is its destination d. If the queue of d is shorter
//   than MAXQ (SMXQ sharing) and a free address exists, the cell is written
//   to the buffer at {WAR[d], AF} for AF = 0..7 with the popped free address
//   sent serially in bit 64; WAR[d] shifts that address in bit by bit.
//   Otherwise the cell is dropped (drop_o pulses) and ME stays low.
//  Read slot of output port p: if its queue is not empty the eight words at
//   {RAR[p], AF} are read and RAR[p] is returned to the free pool at once.
//   When the words come back from the buffer (M+3 cycles later), bit 64 is
//   shifted into the RAR named by the returned PA, so after eight words RAR
//   holds the next cell address. The 64 data bits go to the output rotation
//   buffer together with ME and MD.
// Interface timing: icd_i is registered (ICDR) with ics_i, which must be high
// in the cycle word 0 of input port 0 is on icd_i. Buffer request outputs are
// registered, so a request leaves two cycles after its word arrived.
// The queue length counters and the drop pulse are this design's own way of
// realising SMXQ; the document gives the rule, not the circuit.
module addr_ctrl
  import atm_pkg::*;
#(
  parameter int unsigned N     = 4,     // switch ports
  parameter int unsigned CAW   = 8,     // cell address width
  parameter int unsigned NCELL = 128,   // cells in the shared buffer
  parameter int unsigned MAXQ  = 64,    // SMXQ limit per output queue
  localparam int unsigned PAW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AFW  = AF_W,
  localparam int unsigned MCW  = 1 + PAW + AFW,
  localparam int unsigned AW   = CAW + AFW,
  localparam int unsigned DW   = WORD_BITS + 1,
  localparam int unsigned QW   = $clog2(MAXQ + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  // from the input cell rotation buffer
  input  logic                 ics_i,
  input  logic [WORD_BITS-1:0] icd_i,
  input  logic [PAL_W-1:0]     pal_i,
  // to the pipelined buffer
  output logic                 b_me_o,
  output logic                 b_md_o,
  output logic                 b_rw_o,    // 1 = write
  output logic [PAW-1:0]       b_pa_o,
  output logic [AW-1:0]        b_addr_o,
  output logic [DW-1:0]        b_data_o,
  // from the pipelined buffer
  input  logic                 b_me_i,
  input  logic                 b_md_i,
  input  logic                 b_rw_i,
  input  logic [PAW-1:0]       b_pa_i,
  input  logic [DW-1:0]        b_data_i,
  // to the output cell rotation buffer
  output logic [WORD_BITS-1:0] ocd_o,
  output logic                 o_me_o,
  output logic                 o_md_o,
  // status
  output logic                 drop_o,
  output logic [QW-1:0]        qlen_o [N]
);
  // input registers (ICDR) and master counter
  logic [WORD_BITS-1:0] icdr;
  logic                 ics_r;
  logic [MCW-1:0]       mc_q, mc;

  always_ff @(posedge clk) begin
    if (rst) begin
      icdr  <= '0;
      ics_r <= 1'b0;
    end else begin
      icdr  <= icd_i;
      ics_r <= ics_i;
    end
  end

  assign mc = ics_r ? '0 : mc_q + 1'b1;
  always_ff @(posedge clk) begin
    if (rst) mc_q <= '1;
    else     mc_q <= mc;
  end

  logic           wr_half;
  logic [PAW-1:0] slot_port;
  logic [AFW-1:0] af;
  logic           slot_start;
  assign wr_half    = !mc[MCW-1];
  assign slot_port  = mc[AFW +: PAW];
  assign af         = mc[AFW-1:0];
  assign slot_start = (af == '0);

  // queue registers
  logic [CAW-1:0] war [N];
  logic [CAW-1:0] rar [N];
  logic [QW-1:0]  qlen[N];
  assign qlen_o = qlen;

  // idle address queue
  logic           iq_pop, iq_push, iq_empty;
  logic [CAW-1:0] iq_head;
  logic [$clog2(NCELL+1)-1:0] iq_count;

  idle_addr_queue #(.NCELL(NCELL), .AW(CAW), .NRES(N)) u_iaq (
    .clk, .rst,
    .pop_i(iq_pop), .push_i(iq_push), .push_addr_i(rar[slot_port]),
    .head_o(iq_head), .empty_o(iq_empty), .count_o(iq_count)
  );

  // slot decisions (made at AF == 0, held in CAR/IAR/DPR for the slot)
  logic           cell_act;
  logic [PAW-1:0] dest;
  logic           accept, rd_ok;
  logic [CAW-1:0] car_q, iar_q;
  logic [PAW-1:0] dpr_q;
  logic           en_q;
  logic [CAW-1:0] car, iar;
  logic [PAW-1:0] dpr;
  logic           en;

  assign cell_act = icdr[0];
  assign dest     = icdr[ROUTE_LSB + PAW*pal_i +: PAW];
  assign accept   = cell_act && (qlen[dest] < QW'(MAXQ)) && !iq_empty;
  assign rd_ok    = (qlen[slot_port] != '0);

  always_comb begin
    car = car_q; iar = iar_q; dpr = dpr_q; en = en_q;
    if (slot_start) begin
      if (wr_half) begin
        car = war[dest];
        iar = iq_head;
        dpr = dest;
        en  = accept;
      end else begin
        car = rar[slot_port];
        iar = '0;
        dpr = slot_port;
        en  = rd_ok;
      end
    end
  end

  assign iq_pop  = slot_start &&  wr_half && accept;
  assign iq_push = slot_start && !wr_half && rd_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      car_q <= '0; iar_q <= '0; dpr_q <= '0; en_q <= 1'b0;
    end else begin
      car_q <= car; iar_q <= iar; dpr_q <= dpr; en_q <= en;
    end
  end

  // buffer request (output latches)
  always_ff @(posedge clk) begin
    if (rst) begin
      b_me_o <= 1'b0;
      b_md_o <= 1'b1;
      b_rw_o <= 1'b0;
      b_pa_o <= '0;
      drop_o <= 1'b0;
    end else begin
      b_me_o <= en;
      b_md_o <= wr_half;
      b_rw_o <= wr_half;
      b_pa_o <= dpr;
      drop_o <= slot_start && wr_half && cell_act && !accept;
    end
    b_addr_o <= {car, af};
    b_data_o <= wr_half ? {iar[CAW-1-int'(af)], icdr} : '0;
  end

  // WAR / RAR / queue lengths
  logic ret_rd;
  assign ret_rd = b_me_i && !b_rw_i && !b_md_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned p = 0; p < N; p++) begin
        war[p]  <= CAW'(p);
        rar[p]  <= CAW'(p);
        qlen[p] <= '0;
      end
    end else begin
      // serial load of the new tail into the used WAR, one bit per word
      if (wr_half && en)
        war[dpr] <= {war[dpr][CAW-2:0], iar[CAW-1-int'(af)]};
      // serial load of the next head address from the returned bit 64
      if (ret_rd)
        rar[b_pa_i] <= {rar[b_pa_i][CAW-2:0], b_data_i[DW-1]};
      if (iq_pop)  qlen[dest]      <= qlen[dest] + 1'b1;
      if (iq_push) qlen[slot_port] <= qlen[slot_port] - 1'b1;
    end
  end

  // to the output cell rotation buffer (OCDR, ER, MR)
  always_ff @(posedge clk) begin
    if (rst) begin
      o_me_o <= 1'b0;
      o_md_o <= 1'b1;
    end else begin
      o_me_o <= b_me_i && !b_rw_i;
      o_md_o <= b_md_i;
    end
    ocd_o <= b_data_i[WORD_BITS-1:0];
  end

  // the serial next-address transfer needs one word per address bit
  initial assert (CAW == WORDS_PER_CELL)
    else $error("addr_ctrl: CAW must equal the words per cell");
endmodule
