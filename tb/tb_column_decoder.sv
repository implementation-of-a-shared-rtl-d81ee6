// tb_column_decoder: random check of one column decoder stage.
// CBT must rise exactly when ME is high and CBA is zero; CBA and PD go
// right decremented, PD/R-W/data go down unchanged; one cycle of latency.
module tb_column_decoder;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        me, md, rw;
  logic [1:0]  pa, cba, pd;
  logic [64:0] data;
  logic        me_o, md_o, rw_o, cbt_o, vrw_o;
  logic [1:0]  pa_o, cba_o, pd_o, vpd_o;
  logic [64:0] data_o, vdata_o;
  int checks = 0, failures = 0, ncbt = 0;

  column_decoder dut (.clk, .rst, .me_i(me), .md_i(md), .rw_i(rw), .pa_i(pa),
    .cba_i(cba), .pd_i(pd), .data_i(data), .me_o, .md_o, .rw_o, .pa_o,
    .cba_o, .pd_o, .data_o, .cbt_o, .vpd_o, .vrw_o, .vdata_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic        e_cbt;
    logic [1:0]  e_cba, e_pd, e_vpd;
    logic [64:0] e_data, e_vdata;
    logic        e_vrw;
    me = 0; md = 0; rw = 0; pa = 0; cba = 0; pd = 0; data = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      me = 1'($urandom_range(0, 3) != 0); md = 1'($urandom); rw = 1'($urandom);
      pa = 2'($urandom); cba = 2'($urandom); pd = 2'($urandom);
      data = {1'($urandom), $urandom, $urandom};
      e_cbt = me && cba == 0;
      if (me) begin e_cba = cba - 2'd1; e_pd = pd - 2'd1; e_data = data; end
      if (e_cbt) begin e_vpd = pd; e_vrw = rw; e_vdata = data; end
      @(posedge clk); #1;
      check(me_o == me && md_o == md && rw_o == rw && pa_o == pa, "sideband");
      check(cbt_o == e_cbt, "CBT");
      if (i > 20) begin
        check(cba_o == e_cba && pd_o == e_pd && data_o == e_data, "right payload");
        check(vpd_o == e_vpd && vrw_o == e_vrw && vdata_o == e_vdata, "down payload");
      end
      if (e_cbt) ncbt++;
    end
    check(ncbt > 100, "CBT seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
