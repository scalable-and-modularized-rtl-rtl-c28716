// tb_norm_unit: fills the LRN scale table with (k + alpha/n * s)^(-beta)
// (AlexNet constants k=2, alpha=1e-4, beta=0.75, n=5, in the feature scale used
// here) and runs two normalisation layers through the NORM engine, comparing
// every output with the reference LRN and checking the run time of
// Nif * X * Y * n + 2 cycles.
module tb_norm_unit;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, lut_we;
  logic [LUT_AW-1:0] lut_addr;
  logic [SCALE_W-1:0] lut_data;
  layer_cfg_t cfg;
  fb_rd_t fb_rd;
  fb_wr_t fb_wr;
  feat_t [LANES-1:0] fb_rdata;
  int checks = 0, failures = 0;
  int lut[];

  norm_unit dut (.clk, .rst_n, .start, .cfg, .busy, .done, .lut_we, .lut_addr, .lut_data,
                 .fb_rd, .fb_rdata, .fb_wr);

  int fin_mem [LANES][FB_DEPTH];
  int fout_mem [LANES][FB_DEPTH];
  always_ff @(posedge clk)
    for (int b = 0; b < int'(LANES); b++) begin
      if (fb_rd.en[b]) fb_rdata[b] <= feat_t'(fin_mem[b][fb_rd.addr]);
      if (fb_wr.en[b]) fout_mem[b][fb_wr.addr] <= int'($signed(fb_wr.data[b]));
    end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(input layer_cfg_t c);
    int fin[], fout[];
    int xy = int'(c.xin) * int'(c.yin);
    int cyc = 0, expc;
    fin = new[int'(c.nif) * xy];
    foreach (fin[i]) fin[i] = $urandom_range(0, 1023) - 512;
    for (int m = 0; m < int'(c.nif); m++)
      for (int p = 0; p < xy; p++) fin_mem[fb_bank(m)][fb_addr(m, p, xy)] = fin[m * xy + p];
    for (int b = 0; b < int'(LANES); b++)
      for (int a = 0; a < int'(FB_DEPTH); a++) fout_mem[b][a] = -9999;
    norm_ref(c, fin, lut, fout);
    @(negedge clk);
    cfg = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    expc = int'(c.nif) * xy * int'(c.k) + 2;
    checks++;
    if (cyc + 1 != expc) begin failures++; $display("cycles %0d expected %0d", cyc + 1, expc); end
    @(negedge clk);
    for (int m = 0; m < int'(c.nif); m++)
      for (int p = 0; p < xy; p++) begin
        checks++;
        if (fout_mem[fb_bank(m)][fb_addr(m, p, xy)] != fout[m * xy + p]) begin
          failures++;
          if (failures < 10) $display("map %0d pix %0d: got %0d expected %0d", m, p,
                                      fout_mem[fb_bank(m)][fb_addr(m, p, xy)], fout[m * xy + p]);
        end
      end
  endtask

  initial begin
    start = 0; cfg = '0; lut_we = 0; lut_addr = '0; lut_data = '0;
    lut = new[LUT_N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // entry i covers a sum of squares near i << 12; features are Q5.4 style,
    // so a sum s of squared raw values is s / 256 in real units
    for (int i = 0; i < int'(LUT_N); i++) begin
      real s, f;
      s = real'(i << 12) / 256.0;
      f = (2.0 + 1.0e-1 / 5.0 * s) ** (-0.75);
      lut[i] = int'(f * 32768.0);
      if (lut[i] > 65535) lut[i] = 65535;
      @(negedge clk);
      lut_we = 1; lut_addr = LUT_AW'(i); lut_data = SCALE_W'(lut[i]);
    end
    @(negedge clk);
    lut_we = 0;
    //            kind    k  s  p  xin yin xo yo nif nof sh  relu avg
    run_layer(mk(L_NORM, 5, 1, 0, 4,  3,  4, 3, 13, 13, 12, 0,   0));
    run_layer(mk(L_NORM, 3, 1, 0, 2,  2,  2, 2, 4,  4,  10, 0,   0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
