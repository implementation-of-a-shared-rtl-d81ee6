// buf_model: behavioural stand-in for the shared buffer in the address
// controller test. A plain memory of 2**AW words with a fixed read latency
// of LAT clocks; ME, MD, R/W and PA are delayed by the same amount. Read data
// are zero unless the request was a read.
module buf_model #(
  parameter int unsigned AW  = 11,
  parameter int unsigned DW  = 65,
  parameter int unsigned LAT = 7
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          me_i, md_i, rw_i,
  input  logic [1:0]    pa_i,
  input  logic [AW-1:0] addr_i,
  input  logic [DW-1:0] data_i,
  output logic          me_o, md_o, rw_o,
  output logic [1:0]    pa_o,
  output logic [DW-1:0] data_o
);
  logic [DW-1:0] mem [2**AW];
  logic [DW+4:0] pipe [LAT];

  always @(posedge clk) begin
    logic [DW-1:0] rd;
    rd = '0;
    if (me_i && rw_i) mem[addr_i] <= data_i;
    if (me_i && !rw_i) rd = mem[addr_i];
    if (rst) begin
      for (int i = 0; i < LAT; i++) pipe[i] <= {1'b0, 1'b1, {DW+3{1'b0}}};
    end else begin
      pipe[0] <= {me_i, md_i, rw_i, pa_i, rd};
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign {me_o, md_o, rw_o, pa_o, data_o} = pipe[LAT-1];
endmodule
