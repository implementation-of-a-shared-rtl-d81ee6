// tb_output_buffer: the buffer must drive the bus for exactly one cycle after
// a read arrives with its triggers, and drive zero otherwise.
module tb_output_buffer;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        trg, rw, act;
  logic [64:0] data, bus;
  int checks = 0, failures = 0;

  output_buffer dut (.clk, .rst, .trg_i(trg), .rw_i(rw), .data_i(data),
    .act_o(act), .bus_o(bus));

  initial begin
    logic e_act;
    logic [64:0] e_bus;
    trg = 0; rw = 0; data = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      trg = 1'($urandom); rw = 1'($urandom); data = {1'($urandom), $urandom, $urandom};
      e_act = trg && !rw;
      e_bus = e_act ? data : '0;
      @(posedge clk); #1;
      checks++;
      if (act != e_act || bus != e_bus) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: act=%b bus=%h want %b %h", i, act, bus, e_act, e_bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
