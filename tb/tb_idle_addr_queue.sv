// tb_idle_addr_queue: random push/pop against a reference queue.
// After reset the pool must hand out 4, 5, ..., 127 in order; freed
// addresses come back in the order they were pushed.
module tb_idle_addr_queue;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic       pop, push, empty;
  logic [7:0] paddr, head;
  logic [7:0] cnt;
  int checks = 0, failures = 0, nempty = 0;
  logic [7:0] q[$];

  idle_addr_queue dut (.clk, .rst, .pop_i(pop), .push_i(push), .push_addr_i(paddr),
    .head_o(head), .empty_o(empty), .count_o(cnt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    pop = 0; push = 0; paddr = 0;
    for (int i = 4; i < 128; i++) q.push_back(8'(i));
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(cnt == 8'(q.size()), "count");
      check(empty == (q.size() == 0), "empty");
      if (q.size() != 0) check(head == q[0], "head");
      if (q.size() == 0) nempty++;
      // bias towards draining in the first half, refilling in the second
      pop  = 1'($urandom_range(0, 9) < ((i % 1000) < 500 ? 7 : 3));
      push = 1'($urandom_range(0, 9) < ((i % 1000) < 500 ? 3 : 7)) && q.size() < 128;
      paddr = 8'($urandom);
      @(posedge clk);
      if (pop && q.size() != 0) void'(q.pop_front());
      if (push) q.push_back(paddr);
    end
    check(nempty > 0, "queue ran empty at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
