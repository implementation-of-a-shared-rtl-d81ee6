// switch_traffic: drives one atm_switch with a statistical traffic source
// and checks every output byte against a reference queue model.
//
// BURSTY = 0: uniform random (Bernoulli) arrivals: in every cell time each
//   input port receives a cell with probability LOAD/1000, destination
//   uniform over the four outputs.
// BURSTY = 1: two-state (active/idle) Markov source per input: while active
//   a cell arrives every cell time, all cells of a burst go to one uniformly
//   chosen output; the mean burst length is BURST and the idle periods are
//   sized so that the offered load is LOAD/1000.
// The model applies the switch's admission rule (at most 64 cells per output
// queue, 124 free cells) and reports the cell loss ratio it observed.
module switch_traffic #(
  parameter int BURSTY = 0,
  parameter int LOAD   = 900,    // offered load in 1/1000
  parameter int BURST  = 8,      // mean burst length in cells
  parameter int NCELLT = 2000    // cell times simulated
) (
  output int   checks,
  output int   failures,
  output int   offered,
  output int   lost,
  output logic done
);
  localparam int MAXQ = 64;
  localparam int FREE = 124;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic            ics, ocs, drop;
  logic [3:0][7:0] din, dout;
  logic [2:0]      pal;
  logic [6:0]      qlen [4];

  atm_switch dut (.clk, .rst, .ics_i(ics), .din_i(din), .pal_i(pal),
    .ocs_o(ocs), .dout_o(dout), .drop_o(drop), .qlen_o(qlen));

  typedef logic [63:0][7:0] cell_t;
  typedef cell_t frame_t [4];

  cell_t mq [4][$];
  cell_t outq [$];
  logic  outv [$];
  int    dut_drops = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int total_queued();
    int t = 0;
    for (int p = 0; p < 4; p++) t += mq[p].size();
    return t;
  endfunction

  always @(posedge clk) if (!rst && drop) dut_drops++;

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
        end
      end
      if (ob < 64) begin
        for (int p = 0; p < 4; p++)
          check(dout[p] == (evalid[p] ? ecell[p][ob] : 8'h00), $sformatf("port %0d byte %0d", p, ob));
        ob++;
      end
    end
  end

  initial begin
    frame_t prev, cur;
    logic   pvalid [4], cvalid [4];
    int     pdest [4], cdest [4];
    logic   active [4];
    int     bdest [4];
    int     id;
    int     p_end, p_start;   // transition probabilities in 1/1000000
    checks = 0; failures = 0; offered = 0; lost = 0; done = 1'b0;
    id = 1; ics = 0; din = '0; pal = 3'($urandom);
    // active -> idle 1/L, idle -> active load / (L (1 - load))
    p_end   = 1000000 / BURST;
    p_start = (LOAD >= 1000) ? 1000000
                             : int'(longint'(1000000) * LOAD / (longint'(BURST) * (1000 - longint'(LOAD))));
    for (int p = 0; p < 4; p++) begin pvalid[p] = 0; pdest[p] = 0; active[p] = 0; bdest[p] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (7) @(posedge clk);
    for (int f = 0; f < NCELLT || total_queued() != 0 || pvalid[0] || pvalid[1] ||
                    pvalid[2] || pvalid[3]; f++) begin
      for (int p = 0; p < 4; p++) begin
        if (f >= NCELLT) begin
          cvalid[p] = 1'b0; cdest[p] = 0;
        end else if (BURSTY == 0) begin
          cvalid[p] = ($urandom_range(0, 999) < LOAD);
          cdest[p]  = $urandom_range(0, 3);
        end else begin
          if (active[p]) begin
            if ($urandom_range(0, 999999) < p_end) active[p] = 1'b0;
          end else if ($urandom_range(0, 999999) < p_start) begin
            active[p] = 1'b1;
            bdest[p]  = $urandom_range(0, 3);
          end
          cvalid[p] = active[p];
          cdest[p]  = bdest[p];
        end
        for (int b = 0; b < 64; b++) cur[p][b] = 8'($urandom);
        cur[p][0][0] = cvalid[p];
        cur[p][1 + pal / 4][2 * (pal % 4) +: 2] = 2'(cdest[p]);
        cur[p][8 +: 4] = 32'(id++);
        if (cvalid[p]) offered++;
      end
      for (int p = 0; p < 4; p++) if (pvalid[p]) begin
        if (mq[pdest[p]].size() >= MAXQ || total_queued() >= FREE) lost++;
        else mq[pdest[p]].push_back(prev[p]);
      end
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        ics = (k == 0);
        for (int p = 0; p < 4; p++) din[p] = cur[p][k];
        if (k == 32)
          for (int p = 0; p < 4; p++) begin
            if (mq[p].size() != 0) begin outq.push_back(mq[p].pop_front()); outv.push_back(1'b1); end
            else begin outq.push_back('0); outv.push_back(1'b0); end
          end
        if (k == 63) check(dut_drops == lost, "drop count");
      end
      prev = cur; pvalid = cvalid; pdest = cdest;
    end
    repeat (200) @(negedge clk);
    check(outq.size() == 0, "every expected cell left the switch");
    done = 1'b1;
  end
endmodule
