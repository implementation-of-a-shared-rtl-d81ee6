// tb_pipelined_buffer: self-checking test of the scalable pipelined buffer.
//
// Runs pbuf_checker on the 4 x 4 prototype array (latency 7) and on an
// 8 x 8 array (latency 11) to exercise the scalability of the decoders.
// A separate check follows the timing example cycle by cycle: the read of
// address 3 issued at t0 must deliver its data exactly at t7.
module tb_pipelined_buffer;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int c4, f4, c8, f8;
  logic d4, d8;
  int checks, failures;

  pbuf_checker #(.M(4)) u4 (.clk, .rst, .checks(c4), .failures(f4), .done(d4));
  pbuf_checker #(.M(8)) u8 (.clk, .rst, .checks(c8), .failures(f8), .done(d8));

  // cycle-exact look at the timing example on the 4 x 4 array: count the
  // clock edges from the edge that samples the read of address 3 (or 8)
  // to the edge that samples its data on the output bus
  int cyc, t_rd3, t_rd8, seen0, seen1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && u4.dut.me_i && !u4.dut.rw_i && t_rd3 < 0 && u4.dut.addr_i == 3) t_rd3 = cyc;
    if (!rst && u4.dut.me_i && !u4.dut.rw_i && t_rd8 < 0 && u4.dut.addr_i == 8) t_rd8 = cyc;
    if (!rst && u4.dut.me_o && !u4.dut.rw_o) begin
      if (u4.dut.data_o == 65'd0 && seen0 < 0) seen0 = cyc - t_rd3;
      if (u4.dut.data_o == 65'd1 && seen1 < 0) seen1 = cyc - t_rd8;
    end
  end

  initial begin
    cyc = 0; t_rd3 = -1; t_rd8 = -1; seen0 = -1; seen1 = -1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (d4 && d8);
    checks   = c4 + c8 + 2;
    failures = f4 + f8;
    if (seen0 != 7) begin failures++; $display("read of address 3 came %0d cycles after its request, want 7", seen0); end
    if (seen1 != 7) begin failures++; $display("read of address 8 came %0d cycles after its request, want 7", seen1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8, f4 + f8 + 1);
    $finish;
  end
endmodule
