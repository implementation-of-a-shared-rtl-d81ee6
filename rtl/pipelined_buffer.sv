// pipelined_buffer: the scalable pipelined shared buffer memory.
//
// An M x M array of memory banks (WORDS words of DW bits each) fed by a
// primary decoder, a chain of M column decoders along the top and a chain of
// M row decoders down the left side, with output buffers along the bottom
// row and the right column. One request (read or write of one DW-bit word)
// can enter every clock; there are no dead cycles between reads and writes.
//
// Address: ADDR = {cell address, AF}. Above the AFW fraction bits come CB
// bits x (bank row) and CB bits y (bank column), then the word-in-bank bits;
// RA = {ADDR[AW-1 : AFW+2CB], ADDR[AFW-1:0]} is the word address inside the
// bank. The primary decoder makes CBA, RBA and PD so that every request makes
// exactly M hops inside the array (column decoders plus banks) and leaves it
// on the diagonal through bank row M-1 or column M-1:
//   latency = 1 (primary) + 1 (first column decoder) + M + 1 (output buffer)
//           = M + 3 cycles, 7 for the 4 x 4 prototype.
// Read data appear on data_o M+3 cycles after the request; ME, MD, R/W and PA
// of the request come out on the same cycle, carried along the column
// decoder chain and two more register stages. data_o is zero unless
// me_o && !rw_o.
module pipelined_buffer #(
  parameter int unsigned M     = 4,    // array is M x M banks
  parameter int unsigned AW    = 11,   // buffer address width
  parameter int unsigned AFW   = 3,
  parameter int unsigned DW    = 65,
  parameter int unsigned PAW   = 2,
  parameter int unsigned WORDS = 64,   // word lines per bank
  localparam int unsigned CB   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned RAW  = AW - 2*CB
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           me_i,
  input  logic           md_i,
  input  logic           rw_i,     // 1 = write, 0 = read
  input  logic [PAW-1:0] pa_i,
  input  logic [AW-1:0]  addr_i,
  input  logic [DW-1:0]  data_i,
  output logic           me_o,
  output logic           md_o,
  output logic           rw_o,
  output logic [PAW-1:0] pa_o,
  output logic [DW-1:0]  data_o
);
  // column decoder chain: index c is the input of column decoder c,
  // index M the output of the last one
  logic           c_me  [M+1];
  logic           c_md  [M+1];
  logic           c_rw  [M+1];
  logic [PAW-1:0] c_pa  [M+1];
  logic [CB-1:0]  c_cba [M+1];
  logic [CB-1:0]  c_pd  [M+1];
  logic [DW-1:0]  c_data[M+1];
  // row decoder chain
  logic           r_me  [M+1];
  logic [CB-1:0]  r_rba [M+1];
  logic [RAW-1:0] r_ra  [M+1];

  // vertical inputs of bank (i,j); row M collects the bottom outputs
  logic             v_cbt [M+1][M];
  logic [CB-1:0]    v_pd  [M+1][M];
  logic             v_rw  [M+1][M];
  logic [DW-1:0]    v_data[M+1][M];
  // horizontal inputs of bank (i,j); column M collects the right outputs
  logic             h_rbt [M][M+1];
  logic [WORDS-1:0] h_wl  [M][M+1];
  // diagonal outputs of bank (i,j)
  logic             d_trg [M][M];
  logic [CB-1:0]    d_pd  [M][M];
  logic             d_rw  [M][M];
  logic [WORDS-1:0] d_wl  [M][M];
  logic [DW-1:0]    d_data[M][M];

  // output buffers: 0..M-1 below the columns, M..2M-2 right of rows 0..M-2
  logic [DW-1:0]  ob_bus[2*M-1];
  logic [2*M-2:0] ob_act;

  primary_decoder #(.M(M), .AW(AW), .AFW(AFW), .DW(DW), .PAW(PAW)) u_pdec (
    .clk, .rst,
    .me_i, .md_i, .rw_i, .pa_i, .addr_i, .data_i,
    .me_o(c_me[0]), .md_o(c_md[0]), .rw_o(c_rw[0]), .pa_o(c_pa[0]),
    .data_o(c_data[0]), .cba_o(c_cba[0]), .pd_o(c_pd[0]),
    .rba_o(r_rba[0]), .ra_o(r_ra[0])
  );
  assign r_me[0] = c_me[0];

  for (genvar c = 0; c < M; c++) begin : g_col
    column_decoder #(.CB(CB), .DW(DW), .PAW(PAW)) u_cdec (
      .clk, .rst,
      .me_i(c_me[c]), .md_i(c_md[c]), .rw_i(c_rw[c]), .pa_i(c_pa[c]),
      .cba_i(c_cba[c]), .pd_i(c_pd[c]), .data_i(c_data[c]),
      .me_o(c_me[c+1]), .md_o(c_md[c+1]), .rw_o(c_rw[c+1]), .pa_o(c_pa[c+1]),
      .cba_o(c_cba[c+1]), .pd_o(c_pd[c+1]), .data_o(c_data[c+1]),
      .cbt_o(v_cbt[0][c]), .vpd_o(v_pd[0][c]), .vrw_o(v_rw[0][c]),
      .vdata_o(v_data[0][c])
    );
  end

  for (genvar r = 0; r < M; r++) begin : g_row
    row_decoder #(.CB(CB), .RAW(RAW), .WORDS(WORDS)) u_rdec (
      .clk, .rst,
      .me_i(r_me[r]), .rba_i(r_rba[r]), .ra_i(r_ra[r]),
      .me_o(r_me[r+1]), .rba_o(r_rba[r+1]), .ra_o(r_ra[r+1]),
      .rbt_o(h_rbt[r][0]), .wl_o(h_wl[r][0])
    );
  end

  for (genvar i = 0; i < M; i++) begin : g_bi
    for (genvar j = 0; j < M; j++) begin : g_bj
      logic             di_trg;
      logic [CB-1:0]    di_pd;
      logic             di_rw;
      logic [WORDS-1:0] di_wl;
      logic [DW-1:0]    di_data;
      if (i == 0 || j == 0) begin : g_edge
        assign di_trg  = 1'b0;
        assign di_pd   = '0;
        assign di_rw   = 1'b0;
        assign di_wl   = '0;
        assign di_data = '0;
      end else begin : g_inner
        assign di_trg  = d_trg [i-1][j-1];
        assign di_pd   = d_pd  [i-1][j-1];
        assign di_rw   = d_rw  [i-1][j-1];
        assign di_wl   = d_wl  [i-1][j-1];
        assign di_data = d_data[i-1][j-1];
      end
      memory_bank #(.CB(CB), .DW(DW), .WORDS(WORDS)) u_bank (
        .clk, .rst,
        .v_cbt_i(v_cbt[i][j]), .v_pd_i(v_pd[i][j]), .v_rw_i(v_rw[i][j]),
        .v_data_i(v_data[i][j]),
        .h_rbt_i(h_rbt[i][j]), .h_wl_i(h_wl[i][j]),
        .d_trg_i(di_trg), .d_pd_i(di_pd), .d_rw_i(di_rw), .d_wl_i(di_wl),
        .d_data_i(di_data),
        .v_cbt_o(v_cbt[i+1][j]), .v_pd_o(v_pd[i+1][j]), .v_rw_o(v_rw[i+1][j]),
        .v_data_o(v_data[i+1][j]),
        .h_rbt_o(h_rbt[i][j+1]), .h_wl_o(h_wl[i][j+1]),
        .d_trg_o(d_trg[i][j]), .d_pd_o(d_pd[i][j]), .d_rw_o(d_rw[i][j]),
        .d_wl_o(d_wl[i][j]), .d_data_o(d_data[i][j])
      );
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_obc
    output_buffer #(.DW(DW)) u_ob (
      .clk, .rst,
      .trg_i(d_trg[M-1][j]), .rw_i(d_rw[M-1][j]), .data_i(d_data[M-1][j]),
      .act_o(ob_act[j]), .bus_o(ob_bus[j])
    );
  end
  for (genvar i = 0; i < M-1; i++) begin : g_obr
    output_buffer #(.DW(DW)) u_ob (
      .clk, .rst,
      .trg_i(d_trg[i][M-1]), .rw_i(d_rw[i][M-1]), .data_i(d_data[i][M-1]),
      .act_o(ob_act[M+i]), .bus_o(ob_bus[M+i])
    );
  end

  always_comb begin
    data_o = '0;
    for (int unsigned b = 0; b < 2*M-1; b++) data_o = data_o | ob_bus[b];
  end

  // ME, MD, R/W and PA: two more stages after the last column decoder line
  // them up with the output buffers (M+3 in total)
  logic           s_me, s_md, s_rw;
  logic [PAW-1:0] s_pa;
  always_ff @(posedge clk) begin
    if (rst) begin
      s_me <= 1'b0; s_md <= 1'b1; s_rw <= 1'b0; s_pa <= '0;
      me_o <= 1'b0; md_o <= 1'b1; rw_o <= 1'b0; pa_o <= '0;
    end else begin
      s_me <= c_me[M]; s_md <= c_md[M]; s_rw <= c_rw[M]; s_pa <= c_pa[M];
      me_o <= s_me;    md_o <= s_md;    rw_o <= s_rw;    pa_o <= s_pa;
    end
  end

  // at most one output buffer drives the data bus in any cycle
  always @(posedge clk) if (!rst)
    assert ($countones(ob_act) <= 1)
      else $error("pipelined_buffer: more than one output buffer active");
endmodule
