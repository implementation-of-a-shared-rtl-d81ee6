// tb_ocrb: output rotation buffer check.
// Feeds cell times of 32 write-mode clocks (MD high) and 32 read-mode clocks
// (MD low) carrying port 0..3 x word 0..7, ME random per port. When MD rises
// OCS must pulse together with byte 0, and the next 64 clocks must carry the
// words read (ME high) or an idle cell of zero bytes (ME low) on each port.
module tb_ocrb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic            me, md, ocs;
  logic [63:0]     ocd;
  logic [3:0][7:0] dout;
  int checks = 0, failures = 0, nidle = 0;
  logic [7:0] cells [2][4][64];
  logic       pme [4];

  ocrb dut (.clk, .rst, .ocd_i(ocd), .me_i(me), .md_i(md), .ocs_o(ocs), .dout_o(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    me = 0; md = 1; ocd = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    for (int f = 0; f < 12; f++) begin
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        if (k < 32) begin
          // write half: nothing for the OCRB, random junk on the data lines
          md = 1; me = 1'($urandom); ocd = {$urandom, $urandom};
        end else begin
          int p, w;
          p = (k - 32) / 8; w = (k - 32) % 8;
          if (w == 0) pme[p] = 1'($urandom_range(0, 3) != 0);
          md = 0; me = pme[p]; ocd = {$urandom, $urandom};
          for (int b = 0; b < 8; b++)
            cells[f % 2][p][8 * w + b] = me ? ocd[8*b +: 8] : 8'h00;
          if (w == 0 && !me) nidle++;
        end
        @(posedge clk); #1;
        // cells of cell time f-1 depart during the write half of f and
        // the read half of f; OCS with the first byte at k == 0
        check(ocs == (k == 0 && f > 0), "OCS");
        if (f > 1 || (f == 1 && k >= 0)) begin
          for (int p = 0; p < 4; p++)
            check(dout[p] == cells[(f - 1) % 2][p][k],
                  $sformatf("port %0d byte %0d of cell time %0d: got %h", p, k, f - 1, dout[p]));
        end
      end
    end
    check(nidle > 0, "idle cells inserted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
