// tb_primary_decoder: exhaustive check of the primary decoding rule.
//
// For every 11-bit address the expected CBA, RBA and PD are worked out from
// the bank the address names (row x = ADDR[4:3], column y = ADDR[6:5]):
// the request must enter the array in column max(0, y-x) of row max(0, x-y)
// and PD must be the number of hops left to the addressed bank, max(x, y).
// Also checks that RA and the request fields are registered unchanged and
// that payload registers hold while ME is low.
module tb_primary_decoder;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        me, md, rw;
  logic [1:0]  pa;
  logic [10:0] addr;
  logic [64:0] data;
  logic        me_o, md_o, rw_o;
  logic [1:0]  pa_o, cba_o, pd_o, rba_o;
  logic [64:0] data_o;
  logic [6:0]  ra_o;
  int checks = 0, failures = 0;

  primary_decoder dut (.clk, .rst, .me_i(me), .md_i(md), .rw_i(rw), .pa_i(pa),
    .addr_i(addr), .data_i(data), .me_o, .md_o, .rw_o, .pa_o, .data_o,
    .cba_o, .pd_o, .rba_o, .ra_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s addr=%h", what, addr); end
  endtask

  initial begin
    int x, y;
    me = 0; md = 0; rw = 0; pa = 0; addr = 0; data = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      me = 1; addr = 11'(a); md = 1'($urandom); rw = 1'($urandom); pa = 2'($urandom);
      data = {1'($urandom), $urandom, $urandom};
      @(posedge clk); #1;
      x = (a >> 3) & 3; y = (a >> 5) & 3;
      check(rba_o == 2'((x >= y) ? x - y : 0), "RBA");
      check(cba_o == 2'((x >= y) ? 0 : y - x), "CBA");
      check(pd_o  == 2'((x >= y) ? x : y), "PD");
      check(ra_o  == {addr[10:7], addr[2:0]}, "RA");
      check(me_o && md_o == md && rw_o == rw && pa_o == pa && data_o == data, "fields");
    end
    // payload hold with ME low
    @(negedge clk);
    me = 0; addr = ~addr; data = ~data;
    @(posedge clk); #1;
    check(!me_o && data_o == ~data && ra_o == {~addr[10:7], ~addr[2:0]}, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
