// pbuf_checker: drives one pipelined_buffer instance and checks it.
//
// Phase 1 reproduces the buffer timing example for a 4 x 4 array: write
// data 0 to address 3 and data 1 to address 8, read both back in the next
// two cycles; the words must appear M+3 cycles after their read requests.
// Phase 2 writes every word once; phase 3 issues NRAND random requests (reads
// and writes mixed back to back, some cycles idle). A reference memory,
// updated in request order, predicts every output; the expected outputs are
// kept in a ring indexed by cycle so the M+3 latency is checked exactly,
// together with ME, MD, R/W and PA travelling alongside.
module pbuf_checker #(
  parameter int unsigned M     = 4,
  parameter int unsigned NRAND = 3000
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned CB    = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned WORDS = 64;
  localparam int unsigned AW    = 2*CB + $clog2(WORDS);  // RA is exactly 6 bits
  localparam int unsigned DW    = 65;
  localparam int unsigned LAT   = M + 3;
  localparam int unsigned NW    = 1 << AW;

  logic          me, md, rw;
  logic [1:0]    pa;
  logic [AW-1:0] addr;
  logic [DW-1:0] data;
  logic          me_o, md_o, rw_o;
  logic [1:0]    pa_o;
  logic [DW-1:0] data_o;

  pipelined_buffer #(.M(M), .AW(AW), .AFW(3), .DW(DW), .PAW(2), .WORDS(WORDS)) dut (
    .clk, .rst, .me_i(me), .md_i(md), .rw_i(rw), .pa_i(pa), .addr_i(addr),
    .data_i(data), .me_o, .md_o, .rw_o, .pa_o, .data_o
  );

  typedef struct packed {
    logic          vld;
    logic          me, md, rw;
    logic [1:0]    pa;
    logic [DW-1:0] data;
  } exp_t;

  logic [DW-1:0] ref_mem [NW];
  exp_t          ring [64];
  int            cyc;

  task automatic issue(input logic e, input logic w, input logic [AW-1:0] a,
                       input logic [DW-1:0] d, input logic m, input logic [1:0] p);
    exp_t x;
    me = e; rw = w; addr = a; data = d; md = m; pa = p;
    x.vld = 1'b1; x.me = e; x.md = m; x.rw = w; x.pa = p;
    x.data = (e && !w) ? ref_mem[a] : '0;
    if (e && w) ref_mem[a] = d;
    ring[(cyc + LAT) % 64] = x;
    @(posedge clk);
  endtask

  // compare the outputs with the ring every cycle
  always @(negedge clk) begin
    if (!rst) begin
      exp_t x;
      x = ring[cyc % 64];
      if (x.vld) begin
        checks++;
        if (me_o !== x.me || md_o !== x.md || rw_o !== x.rw || pa_o !== x.pa ||
            (x.me && !x.rw && data_o !== x.data) || (!(x.me && !x.rw) && data_o !== '0)) begin
          failures++;
          if (failures < 10)
            $display("M=%0d cycle %0d: got me=%b md=%b rw=%b pa=%0d data=%h, want me=%b md=%b rw=%b pa=%0d data=%h",
                     M, cyc, me_o, md_o, rw_o, pa_o, data_o, x.me, x.md, x.rw, x.pa, x.data);
        end
        ring[cyc % 64].vld = 1'b0;
      end
    end
  end

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  initial begin
    checks = 0; failures = 0; done = 1'b0; cyc = 0;
    me = 0; md = 1; rw = 0; pa = 0; addr = '0; data = '0;
    for (int i = 0; i < 64; i++) ring[i] = '0;
    for (int i = 0; i < NW; i++) ref_mem[i] = '0;
    @(negedge rst);
    @(posedge clk);
    // phase 1: the timing example (addresses 3 and 8)
    issue(1, 1, AW'(3), DW'(0), 1, 0);
    issue(1, 1, AW'(8), DW'(1), 1, 1);
    issue(1, 0, AW'(3), '0, 0, 2);
    issue(1, 0, AW'(8), '0, 0, 3);
    for (int i = 0; i < LAT + 2; i++) issue(0, 0, '0, '0, 0, 0);
    // phase 2: fill every word
    for (int i = 0; i < NW; i++)
      issue(1, 1, AW'(i), DW'({$urandom, $urandom, $urandom}), 1, 2'(i));
    // phase 3: random mix
    for (int i = 0; i < NRAND; i++)
      issue($urandom_range(0, 7) != 0, 1'($urandom_range(0, 1)), AW'($urandom),
            DW'({$urandom, $urandom, $urandom}), 1'($urandom_range(0, 1)), 2'($urandom));
    for (int i = 0; i < LAT + 2; i++) issue(0, 0, '0, '0, 0, 0);
    done = 1'b1;
  end
endmodule
