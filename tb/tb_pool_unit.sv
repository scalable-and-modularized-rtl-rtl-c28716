// tb_pool_unit: runs max and average pooling layers (AlexNet-style 3x3 stride 2,
// 2x2 stride 2, and a padded window) through the POOL engine with an array
// model of the feature buffers, compares all outputs with the reference
// pooling, and checks the run time groups(N) * Xout * Yout * K * K + 2 cycles.
module tb_pool_unit;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  layer_cfg_t cfg;
  fb_rd_t fb_rd;
  fb_wr_t fb_wr;
  feat_t [LANES-1:0] fb_rdata;
  int checks = 0, failures = 0;

  pool_unit dut (.clk, .rst_n, .start, .cfg, .busy, .done, .fb_rd, .fb_rdata, .fb_wr);

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
    int xy = int'(c.xin) * int'(c.yin), xyo = int'(c.xout) * int'(c.yout);
    int cyc = 0, expc;
    fin = new[int'(c.nif) * xy];
    foreach (fin[i]) fin[i] = $urandom_range(0, 1023) - 512;
    for (int m = 0; m < int'(c.nif); m++)
      for (int p = 0; p < xy; p++) fin_mem[fb_bank(m)][fb_addr(m, p, xy)] = fin[m * xy + p];
    for (int b = 0; b < int'(LANES); b++)
      for (int a = 0; a < int'(FB_DEPTH); a++) fout_mem[b][a] = -9999;
    pool_ref(c, fin, fout);
    @(negedge clk);
    cfg = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    expc = groups(int'(c.nif)) * xyo * int'(c.k) * int'(c.k) + 2;
    checks++;
    if (cyc + 1 != expc) begin failures++; $display("cycles %0d expected %0d", cyc + 1, expc); end
    @(negedge clk);
    for (int m = 0; m < int'(c.nif); m++)
      for (int p = 0; p < xyo; p++) begin
        checks++;
        if (fout_mem[fb_bank(m)][fb_addr(m, p, xyo)] != fout[m * xyo + p]) begin
          failures++;
          if (failures < 10) $display("map %0d pix %0d: got %0d expected %0d", m, p,
                                      fout_mem[fb_bank(m)][fb_addr(m, p, xyo)], fout[m * xyo + p]);
        end
      end
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    //            kind    k  s  p  xin yin xo yo nif nof sh relu avg
    run_layer(mk(L_POOL, 3, 2, 0, 13, 13, 6, 6, 10, 10, 0, 0,   0));
    run_layer(mk(L_POOL, 2, 2, 0, 6,  6,  3, 3, 8,  8,  0, 0,   1));
    run_layer(mk(L_POOL, 3, 2, 1, 6,  6,  3, 3, 3,  3,  0, 0,   0));
    run_layer(mk(L_POOL, 3, 1, 0, 5,  5,  3, 3, 9,  9,  0, 0,   1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
