// tb_atm_switch: end-to-end test of the 4 x 4 switch at its default sizes.
//
// Tagged 64-byte cells enter the four byte ports, one cell time (64 clocks)
// each, with ICS on byte 0; byte 0 bit 0 marks a real cell and the 2-bit
// field selected by PAL in bytes 1..2 names its output port. A reference
// model with one FIFO per output port, the SMXQ limit (64) and 124 free
// cells predicts which cells are accepted and in which cell time each
// leaves on which port; ports with nothing to send must carry idle cells
// (all zero bytes). Every output byte is compared.
// Traffic phases: uniform random, everything to one port (queue limit),
// everything to two ports (buffer full), then silence until the queues
// drain. Also checked: OCS follows every ICS by a fixed M+3+5 = 12 clocks
// (buffer latency plus five pipeline registers of the rotation buffers and
// the address controller), and each named mechanism happens at least once:
// write/read mode switch, write directly followed by read in the buffer,
// SMXQ drop, buffer-full drop, idle cell insertion.
module tb_atm_switch;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  localparam int MAXQ = 64;
  localparam int FREE = 124;
  localparam int OCS_DELAY = 4 + 3 + 5;

  logic            ics, ocs, drop;
  logic [3:0][7:0] din, dout;
  logic [2:0]      pal;
  logic [6:0]      qlen [4];

  atm_switch dut (.clk, .rst, .ics_i(ics), .din_i(din), .pal_i(pal),
    .ocs_o(ocs), .dout_o(dout), .drop_o(drop), .qlen_o(qlen));

  typedef logic [63:0][7:0] cell_t;
  typedef cell_t frame_t [4];

  int checks = 0, failures = 0;
  int n_acc = 0, n_out = 0, n_drop_q = 0, n_drop_full = 0, n_idle = 0;
  int n_mode = 0, n_wr2rd = 0, dut_drops = 0, n_ocs = 0;
  cell_t  mq [4][$];
  cell_t  outq [$];      // 4 entries per output cell time, port order
  logic   outv [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int total_queued();
    int t = 0;
    for (int p = 0; p < 4; p++) t += mq[p].size();
    return t;
  endfunction

  // mechanism counters, observed at the buffer's request port
  logic md_q = 1'b1, wr_q = 1'b0;
  always @(posedge clk) if (!rst) begin
    if (md_q && !dut.u_buf.md_i) n_mode++;
    if (wr_q && dut.u_buf.me_i && !dut.u_buf.rw_i) n_wr2rd++;
    md_q <= dut.u_buf.md_i;
    wr_q <= dut.u_buf.me_i && dut.u_buf.rw_i;
    if (drop) dut_drops++;
  end

  // OCS must follow ICS by OCS_DELAY clocks
  int cyc = 0, last_ics = -1000;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && ics) last_ics = cyc;
    if (!rst && ocs && last_ics >= 0 && cyc - last_ics < 64) begin
      n_ocs++;
      check(cyc - last_ics == OCS_DELAY, $sformatf("OCS %0d clocks after ICS", cyc - last_ics));
    end
  end

  // output comparator: one cell time per OCS
  cell_t ecell [4];
  logic  evalid [4];
  int    ob = 99;
  always @(negedge clk) begin
    if (!rst) begin
      if (ocs) begin
        ob = 0;
        for (int p = 0; p < 4; p++) begin
          if (outq.size() != 0) begin ecell[p] = outq.pop_front(); evalid[p] = outv.pop_front(); end
          else begin ecell[p] = '0; evalid[p] = 1'b0; end
          if (evalid[p]) n_out++;
        end
      end
      if (ob < 64) begin
        for (int p = 0; p < 4; p++)
          check(dout[p] == (evalid[p] ? ecell[p][ob] : 8'h00),
                $sformatf("port %0d byte %0d: %h want %h", p, ob, dout[p],
                          evalid[p] ? ecell[p][ob] : 8'h00));
        ob++;
      end
    end
  end

  initial begin
    frame_t prev;
    logic   pvalid [4];
    int     pdest [4];
    frame_t cur;
    logic   cvalid [4];
    int     cdest [4];
    int     id;
    id = 1; ics = 0; din = '0; pal = 3'($urandom);
    for (int p = 0; p < 4; p++) begin pvalid[p] = 0; pdest[p] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (7) @(posedge clk);
    for (int f = 0; f < 170 || total_queued() != 0 || pvalid[0] || pvalid[1] ||
                    pvalid[2] || pvalid[3]; f++) begin
      // cells offered in this cell time
      for (int p = 0; p < 4; p++) begin
        if (f < 40)       begin cvalid[p] = 1'($urandom_range(0, 9) < 8); cdest[p] = $urandom_range(0, 3); end
        else if (f < 70)  begin cvalid[p] = 1'b1; cdest[p] = 1; end
        else if (f < 150) begin cvalid[p] = 1'b1; cdest[p] = 2 + p % 2; end
        else              begin cvalid[p] = 1'b0; cdest[p] = 0; end
        for (int b = 0; b < 64; b++) cur[p][b] = 8'($urandom);
        cur[p][0][0] = cvalid[p];
        cur[p][1 + pal / 4][2 * (pal % 4) +: 2] = 2'(cdest[p]);
        cur[p][8 +: 4] = 32'(id++);
      end
      // the cells offered last cell time are stored during this one
      for (int p = 0; p < 4; p++) if (pvalid[p]) begin
        if (mq[pdest[p]].size() >= MAXQ) n_drop_q++;
        else if (total_queued() >= FREE) n_drop_full++;
        else begin mq[pdest[p]].push_back(prev[p]); n_acc++; end
      end
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        ics = (k == 0);
        for (int p = 0; p < 4; p++) din[p] = cur[p][k];
        if (k == 32) begin
          for (int p = 0; p < 4; p++) begin
            if (mq[p].size() != 0) begin outq.push_back(mq[p].pop_front()); outv.push_back(1'b1); end
            else begin outq.push_back('0); outv.push_back(1'b0); n_idle++; end
          end
        end
        if (k == 63) begin
          check(dut_drops == n_drop_q + n_drop_full,
                $sformatf("drops %0d want %0d", dut_drops, n_drop_q + n_drop_full));
          for (int p = 0; p < 4; p++)
            check(qlen[p] == 7'(mq[p].size()), $sformatf("queue %0d length", p));
        end
      end
      prev = cur; pvalid = cvalid; pdest = cdest;
    end
    repeat (200) @(negedge clk);
    check(outq.size() == 0, "every expected cell left the switch");
    check(n_out == n_acc, $sformatf("cells out %0d, accepted %0d", n_out, n_acc));
    check(n_mode > 0,      "write/read mode switch");
    check(n_wr2rd > 0,     "read right after write, no dead cycle");
    check(n_drop_q > 0,    "SMXQ queue limit reached");
    check(n_drop_full > 0, "shared buffer full");
    check(n_idle > 0,      "idle cell insertion");
    check(n_ocs > 100,     "OCS seen");
    $display("cells accepted %0d, delivered %0d, SMXQ drops %0d, buffer-full drops %0d, idle cells %0d, mode switches %0d, write->read %0d",
             n_acc, n_out, n_drop_q, n_drop_full, n_idle, n_mode, n_wr2rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
