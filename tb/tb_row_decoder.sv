// tb_row_decoder: random check of one row decoder stage.
// RBT must rise exactly when ME is high and RBA is zero, carrying a one-hot
// word line vector for RA (none for RA >= 64); RBA goes down decremented.
module tb_row_decoder;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        me;
  logic [1:0]  rba;
  logic [6:0]  ra;
  logic        me_o, rbt_o;
  logic [1:0]  rba_o;
  logic [6:0]  ra_o;
  logic [63:0] wl_o;
  int checks = 0, failures = 0, nrbt = 0;

  row_decoder dut (.clk, .rst, .me_i(me), .rba_i(rba), .ra_i(ra),
    .me_o, .rba_o, .ra_o, .rbt_o, .wl_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s ra=%0d", what, ra); end
  endtask

  initial begin
    logic [63:0] e_wl;
    logic [1:0]  e_rba;
    logic [6:0]  e_ra;
    me = 0; rba = 0; ra = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      me = 1'($urandom_range(0, 3) != 0); rba = 2'($urandom); ra = 7'($urandom);
      if (me) begin e_rba = rba - 2'd1; e_ra = ra; end
      if (me && rba == 0) e_wl = (ra < 64) ? (64'd1 << ra) : 64'd0;
      @(posedge clk); #1;
      check(me_o == me, "ME");
      check(rbt_o == (me && rba == 0), "RBT");
      if (i > 20) begin
        check(rba_o == e_rba && ra_o == e_ra, "down payload");
        check(wl_o == e_wl, "word lines");
      end
      if (me && rba == 0) nrbt++;
    end
    check(nrbt > 100, "RBT seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
