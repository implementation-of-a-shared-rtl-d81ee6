// output_buffer: last pipeline stage of the scalable pipelined buffer.
//
// One sits below every bank of the bottom row and right of every bank of the
// right column. It latches what leaves the array on the diagonal and, if
// that was a read, drives it onto the shared output data bus for one cycle.
// Its output is zero when it is not active, so the bus is the OR of all
// output buffers (the document's bus is driven by whichever buffer is
// active; at most one is active in a cycle). One cycle of latency.
module output_buffer #(
  parameter int unsigned DW = 65
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          trg_i,   // CBT and RBT of the diagonal request
  input  logic          rw_i,    // 1 = write, 0 = read
  input  logic [DW-1:0] data_i,
  output logic          act_o,   // this buffer drives the bus this cycle
  output logic [DW-1:0] bus_o
);
  logic [DW-1:0] data_q;

  always_ff @(posedge clk) begin
    if (rst) act_o <= 1'b0;
    else     act_o <= trg_i && !rw_i;
    if (trg_i && !rw_i) data_q <= data_i;
  end

  assign bus_o = act_o ? data_q : '0;
endmodule
