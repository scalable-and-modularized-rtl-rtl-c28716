// tb_conv_unit: runs three convolution layers through the CONV engine and the
// shared multiplier array and compares every output pixel with the reference
// convolution. The feature and weight buffers are modelled here as arrays with
// one clock of read latency. Layers cover zero padding, stride 2, a 1x1 kernel,
// more input maps than lanes (several input-map groups per pixel) and map
// counts that are not multiples of LANES. The run time from start to done is
// checked against groups(Nof) * Xout * Yout * groups(Nif) * K * K + 4 cycles.
// A second engine with adder-tree fan-in SMALL_NIF (NM / SMALL_NIF trees, output
// written in NM / SMALL_NIF / LANES chunks per pixel) runs layers marked
// conv_small, including 1x1 layers whose window is exactly one chunk per tap.
module tb_conv_unit;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, mul_valid, prod_valid;
  logic start_m, busy_m, done_m, mvalid_m, start_s, busy_s, done_s, mvalid_s;
  fb_rd_t rd_m, rd_s;
  fb_wr_t wr_m, wr_s;
  logic [WB_AW-1:0] waddr_m, waddr_s;
  wgt_t [NM-1:0] mwgt_m, mwgt_s;
  feat_t [NM-1:0] mfeat_m, mfeat_s;
  layer_cfg_t cfg;
  fb_rd_t fb_rd;
  fb_wr_t fb_wr;
  feat_t [LANES-1:0] fb_rdata;
  logic [WB_AW-1:0] wb_raddr;
  wgt_t [NM-1:0] wb_rdata, mul_wgt;
  feat_t [NM-1:0] mul_feat;
  prod_t [NM-1:0] prod;
  int checks = 0, failures = 0;

  conv_unit dut (.clk, .rst_n, .start(start_m), .cfg, .busy(busy_m), .done(done_m),
                 .fb_rd(rd_m), .fb_rdata, .wb_raddr(waddr_m), .wb_rdata,
                 .mul_valid(mvalid_m), .mul_feat(mfeat_m), .mul_wgt(mwgt_m),
                 .prod_valid, .prod, .fb_wr(wr_m));
  conv_unit #(.NIF(SMALL_NIF)) dut_s (
                 .clk, .rst_n, .start(start_s), .cfg, .busy(busy_s), .done(done_s),
                 .fb_rd(rd_s), .fb_rdata, .wb_raddr(waddr_s), .wb_rdata,
                 .mul_valid(mvalid_s), .mul_feat(mfeat_s), .mul_wgt(mwgt_s),
                 .prod_valid, .prod, .fb_wr(wr_s));

  assign start_m = start && !cfg.conv_small;
  assign start_s = start &&  cfg.conv_small;
  assign busy    = cfg.conv_small ? busy_s : busy_m;
  assign done    = cfg.conv_small ? done_s : done_m;
  assign fb_rd   = cfg.conv_small ? rd_s : rd_m;
  assign fb_wr   = cfg.conv_small ? wr_s : wr_m;
  assign wb_raddr  = cfg.conv_small ? waddr_s : waddr_m;
  assign mul_valid = cfg.conv_small ? mvalid_s : mvalid_m;
  assign mul_feat  = cfg.conv_small ? mfeat_s : mfeat_m;
  assign mul_wgt   = cfg.conv_small ? mwgt_s : mwgt_m;
  mult_array u_mult (.clk, .rst_n, .in_valid(mul_valid), .feat(mul_feat), .wgt(mul_wgt),
                     .out_valid(prod_valid), .prod);

  // buffer models
  int fin_mem [LANES][FB_DEPTH];
  int fout_mem [LANES][FB_DEPTH];
  int wmem [WB_DEPTH][NM];
  always_ff @(posedge clk) begin
    for (int b = 0; b < int'(LANES); b++) begin
      if (fb_rd.en[b]) fb_rdata[b] <= feat_t'(fin_mem[b][fb_rd.addr]);
      if (fb_wr.en[b]) fout_mem[b][fb_wr.addr] <= int'($signed(fb_wr.data[b]));
    end
    for (int l = 0; l < int'(NM); l++) wb_rdata[l] <= wgt_t'(wmem[wb_raddr][l]);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(input layer_cfg_t c, input bit narrow = 0);
    int fin[], w[], fout[];
    int xy = int'(c.xin) * int'(c.yin), xyo = int'(c.xout) * int'(c.yout);
    int cyc = 0, expc, f, g;
    c.conv_small = narrow;
    f = conv_nif(c);
    g = conv_nout(c);
    fin = new[int'(c.nif) * xy];
    w = new[int'(c.nof) * int'(c.nif) * int'(c.k) * int'(c.k)];
    foreach (fin[i]) fin[i] = $urandom_range(0, 200) - 60;
    foreach (w[i]) w[i] = $urandom_range(0, 60) - 30;
    for (int m = 0; m < int'(c.nif); m++)
      for (int p = 0; p < xy; p++) fin_mem[fb_bank(m)][fb_addr(m, p, xy)] = fin[m * xy + p];
    for (int a = 0; a < wwords(c); a++)
      for (int l = 0; l < int'(NM); l++) wmem[a][l] = conv_wword(c, w, a, l);
    for (int b = 0; b < int'(LANES); b++)
      for (int a = 0; a < int'(FB_DEPTH); a++) fout_mem[b][a] = -9999;
    conv_ref(c, fin, w, fout);
    @(negedge clk);
    cfg = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    expc = ((int'(c.nof) + g - 1) / g) * xyo * ((int'(c.nif) + f - 1) / f) * int'(c.k) * int'(c.k)
           + 3 + g / int'(LANES);
    checks++;
    if (cyc + 1 != expc) begin
      failures++;
      $display("cycle count %0d expected %0d", cyc + 1, expc);
    end
    @(negedge clk);
    for (int o = 0; o < int'(c.nof); o++)
      for (int p = 0; p < xyo; p++) begin
        checks++;
        if (fout_mem[fb_bank(o)][fb_addr(o, p, xyo)] != fout[o * xyo + p]) begin
          failures++;
          if (failures < 10) $display("map %0d pix %0d: got %0d expected %0d", o, p,
                                      fout_mem[fb_bank(o)][fb_addr(o, p, xyo)], fout[o * xyo + p]);
        end
      end
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    //            kind    k  s  p  xin yin xo yo nif nof sh relu avg
    run_layer(mk(L_CONV, 3, 1, 1, 6,  6,  6, 6, 11, 10, 6, 1,   0));
    run_layer(mk(L_CONV, 3, 2, 0, 7,  7,  3, 3, 3,  5,  4, 0,   0));
    run_layer(mk(L_CONV, 1, 1, 0, 4,  4,  4, 4, 16, 8,  2, 1,   0));
    run_layer(mk(L_CONV, 5, 1, 2, 5,  5,  5, 5, 4,  9,  0, 0,   0));
    // narrow engine
    run_layer(mk(L_CONV, 3, 1, 1, 6,  6,  6, 6, 3,  20, 5, 1,   0), 1);
    run_layer(mk(L_CONV, 5, 2, 1, 9,  9,  4, 4, 7,  16, 6, 0,   0), 1);
    run_layer(mk(L_CONV, 1, 1, 0, 5,  5,  5, 5, 6,  33, 3, 1,   0), 1);
    run_layer(mk(L_CONV, 3, 1, 0, 4,  4,  2, 2, 2,  5,  2, 0,   0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
