// tb_memory_bank: random check of one memory bank against a reference.
//
// Each cycle one of: nothing, vertical pass (CBT only), horizontal pass (RBT
// only), a request that meets here (CBT and RBT), or a request arriving on
// the diagonal. A request with PD == 0 is the bank's own and reads or writes
// its word; any other is passed on with PD - 1. All 64 words are first
// written through meeting requests, then traffic is random.
module tb_memory_bank;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        v_cbt, v_rw, h_rbt, d_trg, d_rw;
  logic [1:0]  v_pd, d_pd;
  logic [64:0] v_data, d_data;
  logic [63:0] h_wl, d_wl;
  logic        v_cbt_o, v_rw_o, h_rbt_o, d_trg_o, d_rw_o;
  logic [1:0]  v_pd_o, d_pd_o;
  logic [64:0] v_data_o, d_data_o;
  logic [63:0] h_wl_o, d_wl_o;
  int checks = 0, failures = 0, nrd = 0, nwr = 0;
  logic [64:0] ref_mem [64];

  memory_bank dut (.clk, .rst,
    .v_cbt_i(v_cbt), .v_pd_i(v_pd), .v_rw_i(v_rw), .v_data_i(v_data),
    .h_rbt_i(h_rbt), .h_wl_i(h_wl),
    .d_trg_i(d_trg), .d_pd_i(d_pd), .d_rw_i(d_rw), .d_wl_i(d_wl), .d_data_i(d_data),
    .v_cbt_o, .v_pd_o, .v_rw_o, .v_data_o, .h_rbt_o, .h_wl_o,
    .d_trg_o, .d_pd_o, .d_rw_o, .d_wl_o, .d_data_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // kind: 0 none, 1 vertical, 2 horizontal, 3 meet, 4 diagonal
  task automatic step(input int kind, input logic rw, input logic [1:0] pd,
                      input int w, input logic [64:0] d);
    logic [64:0] e_d;
    logic [1:0]  e_pd;
    @(negedge clk);
    v_cbt = (kind == 1 || kind == 3); h_rbt = (kind == 2 || kind == 3); d_trg = (kind == 4);
    v_pd = pd; v_rw = rw; v_data = d; h_wl = 64'd1 << w;
    d_pd = pd; d_rw = rw; d_wl = 64'd1 << w; d_data = d;
    e_pd = pd - 2'd1;
    e_d  = d;
    if ((kind == 3 || kind == 4) && pd == 0) begin
      if (rw) begin ref_mem[w] = d; nwr++; end
      else begin e_d = ref_mem[w]; nrd++; end
    end
    @(posedge clk); #1;
    check(v_cbt_o == (kind == 1) && h_rbt_o == (kind == 2) && d_trg_o == (kind >= 3), "triggers");
    if (kind == 1) check(v_pd_o == e_pd && v_rw_o == rw && v_data_o == d, "vertical pass");
    if (kind == 2) check(h_wl_o == 64'd1 << w, "horizontal pass");
    if (kind >= 3) check(d_pd_o == e_pd && d_rw_o == rw && d_wl_o == 64'd1 << w && d_data_o == e_d,
                         "diagonal out");
  endtask

  initial begin
    v_cbt = 0; h_rbt = 0; d_trg = 0; v_pd = 0; d_pd = 0; v_rw = 0; d_rw = 0;
    v_data = 0; d_data = 0; h_wl = 0; d_wl = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int w = 0; w < 64; w++) step(3, 1, 0, w, {1'($urandom), $urandom, $urandom});
    for (int i = 0; i < 4000; i++)
      step($urandom_range(0, 4), 1'($urandom), 2'($urandom_range(0, 3) == 0 ? 0 : $urandom),
           $urandom_range(0, 63), {1'($urandom), $urandom, $urandom});
    step(0, 0, 0, 0, '0);
    check(nrd > 100 && nwr > 100, "reads and writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
