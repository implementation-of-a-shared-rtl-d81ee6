// tb_icrb: input rotation buffer check.
// Random cells arrive on four byte ports, one cell time (64 clocks) each,
// with ICS on byte 0. In the first 32 clocks of the next cell time the
// buffer must deliver those cells as 64-bit words, port 0 word 0 first,
// with ics_o marking word 0; the rest of the time it delivers idle words.
module tb_icrb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic            ics, ics_o;
  logic [3:0][7:0] din;
  logic [63:0]     icd;
  int checks = 0, failures = 0;
  logic [7:0] cells [2][4][64];   // by frame parity

  icrb dut (.clk, .rst, .ics_i(ics), .din_i(din), .ics_o, .icd_o(icd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [63:0] e;
    ics = 0; din = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int f = 0; f < 12; f++) begin
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        ics = (k == 0);
        for (int p = 0; p < 4; p++) begin
          din[p] = 8'($urandom);
          cells[f % 2][p][k] = din[p];
        end
        @(posedge clk); #1;
        e = '0;
        if (f > 0 && k < 32)
          for (int b = 0; b < 8; b++) e[8*b +: 8] = cells[(f - 1) % 2][k / 8][8 * (k % 8) + b];
        check(ics_o == (k == 0), "ics_o");
        check(icd == e, $sformatf("word f=%0d k=%0d got %h want %h", f, k, icd, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
