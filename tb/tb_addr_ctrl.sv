// tb_addr_ctrl: address controller against a reference queue model.
//
// The controller talks to a behavioural buffer (plain memory, 7-cycle
// latency). Each cell time the test offers up to four tagged cells in the
// write half and a reference model (one FIFO per output port, SMXQ limit
// MAXQ = 64, 124 free cells) predicts which are accepted, which are dropped
// and which cell each output port reads in the read half. The words coming
// back to the output side must be those cells, in queue order, with ME low
// for ports whose queue was empty. Traffic phases: uniform random, all cells
// to one port (queue limit reached), cells to two ports (buffer runs out of
// free cells), then no input until the queues drain.
module tb_addr_ctrl;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  localparam int MAXQ = 64;
  localparam int FREE = 124;

  logic        ics;
  logic [63:0] icd;
  logic [2:0]  pal;
  logic        q_me, q_md, q_rw, r_me, r_md, r_rw, o_me, o_md, drop;
  logic [1:0]  q_pa, r_pa;
  logic [10:0] q_addr;
  logic [64:0] q_data, r_data;
  logic [63:0] ocd;
  logic [6:0]  qlen [4];

  addr_ctrl dut (.clk, .rst, .ics_i(ics), .icd_i(icd), .pal_i(pal),
    .b_me_o(q_me), .b_md_o(q_md), .b_rw_o(q_rw), .b_pa_o(q_pa), .b_addr_o(q_addr),
    .b_data_o(q_data), .b_me_i(r_me), .b_md_i(r_md), .b_rw_i(r_rw), .b_pa_i(r_pa),
    .b_data_i(r_data), .ocd_o(ocd), .o_me_o(o_me), .o_md_o(o_md), .drop_o(drop),
    .qlen_o(qlen));

  buf_model #(.AW(11), .DW(65), .LAT(7)) u_buf (.clk, .rst,
    .me_i(q_me), .md_i(q_md), .rw_i(q_rw), .pa_i(q_pa), .addr_i(q_addr), .data_i(q_data),
    .me_o(r_me), .md_o(r_md), .rw_o(r_rw), .pa_o(r_pa), .data_o(r_data));

  typedef logic [7:0][63:0] cellw_t;
  typedef struct { logic me; logic [63:0] w; } expw_t;

  int checks = 0, failures = 0;
  int n_acc = 0, n_drop_q = 0, n_drop_full = 0, n_idle = 0, n_out = 0, dut_drops = 0;
  int cellid = 0;
  cellw_t mq [4][$];
  expw_t  expq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (!rst && drop) dut_drops++;

  // output side comparator
  logic omd_q = 1'b1;
  int   widx = 99;
  always @(negedge clk) begin
    if (!rst) begin
      if (omd_q && !o_md) widx = 0;
      if (!o_md && widx < 32) begin
        if (expq.size() == 0) check(!o_me, "ME low before any expected cell");
        else begin
          expw_t e;
          e = expq.pop_front();
          check(o_me == e.me && (!e.me || ocd == e.w),
                $sformatf("output word %0d: me=%b %h want me=%b %h", widx, o_me, ocd, e.me, e.w));
          if (e.me) n_out++;
        end
        widx++;
      end
      omd_q = o_md;
    end
  end

  function automatic int total_queued();
    int t = 0;
    for (int p = 0; p < 4; p++) t += mq[p].size();
    return t;
  endfunction

  initial begin
    cellw_t cells [4];
    logic   valid [4];
    ics = 0; icd = '0; pal = 3'($urandom);
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);
    for (int f = 0; f < 160 || total_queued() != 0; f++) begin
      // build the four offered cells
      for (int p = 0; p < 4; p++) begin
        int d;
        if (f < 40)       begin valid[p] = 1'($urandom_range(0, 9) < 8); d = $urandom_range(0, 3); end
        else if (f < 70)  begin valid[p] = 1'b1; d = 2; end
        else if (f < 150) begin valid[p] = 1'b1; d = p % 2; end
        else              begin valid[p] = 1'b0; d = 0; end
        for (int w = 0; w < 8; w++) cells[p][w] = {$urandom, $urandom};
        cells[p][0][0] = valid[p];
        cells[p][0][8 + 2*pal +: 2] = 2'(d);
        cells[p][0][63:32] = cellid++;
        // reference admission: SMXQ limit, then free cells
        if (valid[p]) begin
          if (mq[d].size() >= MAXQ) n_drop_q++;
          else if (total_queued() >= FREE) n_drop_full++;
          else begin mq[d].push_back(cells[p]); n_acc++; end
        end
      end
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        ics = (k == 0);
        icd = (k < 32) ? cells[k / 8][k % 8] : 64'(0);
        if (k == 32) begin
          for (int p = 0; p < 4; p++) begin
            if (mq[p].size() != 0) begin
              cellw_t c;
              c = mq[p].pop_front();
              for (int w = 0; w < 8; w++) expq.push_back('{me: 1'b1, w: c[w]});
            end else begin
              for (int w = 0; w < 8; w++) expq.push_back('{me: 1'b0, w: '0});
              n_idle++;
            end
          end
        end
        if (k == 63) begin
          check(dut_drops == n_drop_q + n_drop_full,
                $sformatf("drops %0d want %0d", dut_drops, n_drop_q + n_drop_full));
          for (int p = 0; p < 4; p++)
            check(qlen[p] == 7'(mq[p].size()), $sformatf("queue %0d length", p));
        end
      end
    end
    repeat (100) @(negedge clk);
    check(expq.size() == 0, "all expected words seen");
    check(n_drop_q > 0,    "queue limit (SMXQ) reached");
    check(n_drop_full > 0, "buffer ran out of free cells");
    check(n_idle > 0,      "idle cells");
    $display("accepted %0d, out %0d, dropped by SMXQ %0d, dropped buffer full %0d, idle slots %0d",
             n_acc, n_out, n_drop_q, n_drop_full, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
