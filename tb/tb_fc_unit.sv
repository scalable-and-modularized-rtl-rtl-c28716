// tb_fc_unit: runs fully-connected layers through the FC engine and the shared
// multipliers. Weights are offered as a show-ahead stream whose words appear
// only on some cycles (a transfer slower than the engine), so the engine must
// stall; every output neuron is compared with the reference matrix-vector
// product, and the run time must equal weight words + stall cycles + 4.
// Layers: 3 maps of 2x2 -> 10 outputs (flatten from a pooled layer), 20 -> 9
// with ReLU, and 16 -> 4 with the stream always ready (no stalls).
module tb_fc_unit;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, stall, w_valid, w_pop, mul_valid, prod_valid;
  layer_cfg_t cfg;
  fb_rd_t fb_rd;
  fb_wr_t fb_wr;
  feat_t [LANES-1:0] fb_rdata;
  wgt_t [NM-1:0] w_data, mul_wgt;
  feat_t [NM-1:0] mul_feat;
  prod_t [NM-1:0] prod;
  int checks = 0, failures = 0;

  fc_unit dut (.clk, .rst_n, .start, .cfg, .busy, .done, .stall, .fb_rd, .fb_rdata,
               .w_valid, .w_data, .w_pop, .mul_valid, .mul_feat, .mul_wgt,
               .prod_valid, .prod, .fb_wr);
  mult_array u_mult (.clk, .rst_n, .in_valid(mul_valid), .feat(mul_feat), .wgt(mul_wgt),
                     .out_valid(prod_valid), .prod);

  int fin_mem [LANES][FB_DEPTH];
  int fout_mem [LANES][FB_DEPTH];
  int wq [$][NM];
  int rate = 1;        // a word is shown on 1 of `rate` cycles
  bit show;

  always_ff @(posedge clk)
    for (int b = 0; b < int'(LANES); b++) begin
      if (fb_rd.en[b]) fb_rdata[b] <= feat_t'(fin_mem[b][fb_rd.addr]);
      if (fb_wr.en[b]) fout_mem[b][fb_wr.addr] <= int'($signed(fb_wr.data[b]));
    end

  always_ff @(posedge clk) begin
    if (w_pop) void'(wq.pop_front());
    show <= ($urandom_range(rate - 1) == 0);
  end

  always_comb begin
    w_valid = show && wq.size() > 0;
    w_data  = '0;
    if (wq.size() > 0)
      for (int l = 0; l < int'(NM); l++) w_data[l] = wgt_t'(wq[0][l]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(input layer_cfg_t c, input int r);
    int fin[], w[], fout[];
    int xy = int'(c.xin) * int'(c.yin), nin = int'(c.nif) * xy;
    int cyc = 0, stalls = 0;
    fin = new[nin];
    w = new[int'(c.nof) * nin];
    foreach (fin[i]) fin[i] = $urandom_range(0, 300) - 100;
    foreach (w[i]) w[i] = $urandom_range(0, 255) - 128;
    for (int m = 0; m < int'(c.nif); m++)
      for (int p = 0; p < xy; p++) fin_mem[fb_bank(m)][fb_addr(m, p, xy)] = fin[m * xy + p];
    for (int b = 0; b < int'(LANES); b++)
      for (int a = 0; a < int'(FB_DEPTH); a++) fout_mem[b][a] = -9999;
    for (int n = 0; n < wwords(c); n++) begin
      int word [NM];
      for (int l = 0; l < int'(NM); l++) word[l] = fc_wword(c, w, n, l);
      wq.push_back(word);
    end
    fc_ref(c, fin, w, fout);
    rate = r;
    @(negedge clk);
    cfg = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (stall) stalls++;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc + 1 != wwords(c) + stalls + 4) begin
      failures++;
      $display("cycles %0d, expected %0d words + %0d stalls + 4", cyc + 1, wwords(c), stalls);
    end
    checks++;
    if ((r > 1) != (stalls > 0)) begin failures++; $display("stall count %0d at rate %0d", stalls, r); end
    checks++;
    if (wq.size() != 0) failures++;
    @(negedge clk);
    for (int o = 0; o < int'(c.nof); o++) begin
      checks++;
      if (fout_mem[fb_bank(o)][fb_addr(o, 0, 1)] != fout[o]) begin
        failures++;
        if (failures < 10) $display("neuron %0d: got %0d expected %0d", o,
                                    fout_mem[fb_bank(o)][fb_addr(o, 0, 1)], fout[o]);
      end
    end
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    //            kind  k  s  p  xin yin xo yo nif nof sh relu avg
    run_layer(mk(L_FC, 1, 1, 0, 2,  2,  1, 1, 3,  10, 6, 0,   0), 3);
    run_layer(mk(L_FC, 1, 1, 0, 1,  1,  1, 1, 20, 9,  5, 1,   0), 2);
    run_layer(mk(L_FC, 1, 1, 0, 1,  1,  1, 1, 16, 4,  7, 0,   0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
