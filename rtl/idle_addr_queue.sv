// idle_addr_queue: pool of free cell addresses of the shared buffer.
//
// A circular FIFO of NCELL entries of AW bits (128 x 8 = 1 kbit in the
// prototype) with a head register (IAQHR) and a tail register (IAQTR).
// pop takes the address at the head and advances IAQHR; push stores a freed
// address at the tail and advances IAQTR. head_o shows the address a pop
// would take (combinational read, the document notes that a slow memory
// would do because one address is handled per 8-cycle cell slot).
// After reset the queue holds addresses NRES .. NCELL-1: addresses 0 ..
// NRES-1 are the pre-allocated tails of the NRES output queues, which the
// address controller loads into its WAR and RAR registers. That start state
// is this design's choice; the document does not describe initialisation.
// Pop on an empty queue and push on a full one are ignored.
module idle_addr_queue #(
  parameter int unsigned NCELL = 128,
  parameter int unsigned AW    = 8,
  parameter int unsigned NRES  = 4,
  localparam int unsigned PW   = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned CW   = $clog2(NCELL + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pop_i,
  input  logic          push_i,
  input  logic [AW-1:0] push_addr_i,
  output logic [AW-1:0] head_o,
  output logic          empty_o,
  output logic [CW-1:0] count_o
);
  logic [AW-1:0] pool [NCELL];
  logic [PW-1:0] iaqhr, iaqtr;
  logic          do_pop, do_push;

  assign empty_o = (count_o == '0);
  assign head_o  = pool[iaqhr];
  assign do_pop  = pop_i && !empty_o;
  assign do_push = push_i && (count_o != CW'(NCELL));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NCELL; i++)
        pool[i] <= AW'(i + NRES);
      iaqhr   <= '0;
      iaqtr   <= PW'(NCELL - NRES);
      count_o <= CW'(NCELL - NRES);
    end else begin
      if (do_push) begin
        pool[iaqtr] <= push_addr_i;
        iaqtr       <= iaqtr + 1'b1;
      end
      if (do_pop) iaqhr <= iaqhr + 1'b1;
      count_o <= count_o + CW'(do_push) - CW'(do_pop);
    end
  end
endmodule
