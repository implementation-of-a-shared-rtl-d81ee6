// tb_traffic: the cell-loss experiments on the 4 x 4, 128-cell switch,
// shortened to 20000 cell times each (a loss ratio near 1e-9 needs
// far longer runs than a simulation of the RTL can afford).
// Three switches run side by side: uniform random traffic at load 0.9 and
// 1.0, and bursty traffic (mean burst 8 cells) at load 0.95. Every output
// byte is checked against the reference model; the observed loss ratios
// are printed.
module tb_traffic;
  int c[3], f[3], o[3], l[3];
  logic d[3];

  switch_traffic #(.BURSTY(0), .LOAD(900),  .NCELLT(20000)) u_r90 (.checks(c[0]), .failures(f[0]), .offered(o[0]), .lost(l[0]), .done(d[0]));
  switch_traffic #(.BURSTY(0), .LOAD(1000), .NCELLT(20000)) u_r100(.checks(c[1]), .failures(f[1]), .offered(o[1]), .lost(l[1]), .done(d[1]));
  switch_traffic #(.BURSTY(1), .LOAD(950), .BURST(8), .NCELLT(20000)) u_b95 (.checks(c[2]), .failures(f[2]), .offered(o[2]), .lost(l[2]), .done(d[2]));

  initial begin
    int checks, failures;
    wait (d[0] && d[1] && d[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("random 0.90: offered %0d lost %0d", o[0], l[0]);
    $display("random 1.00: offered %0d lost %0d", o[1], l[1]);
    $display("bursty 0.95, L=8: offered %0d lost %0d", o[2], l[2]);
    // the bursty source must actually overload some queue at times
    checks++;
    if (l[2] == 0) begin failures++; $display("bursty run lost no cell"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64 * 10 * 22000 + 100000);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
