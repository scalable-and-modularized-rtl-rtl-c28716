// tb_cnn_top: end-to-end run of a small AlexNet/NIN-shaped network on the whole
// accelerator at its default parameters:
//   conv 3x3/2 pad 1 (3 -> 10 maps, 9x9 -> 5x5, ReLU, on the narrow CONV
//   engine) > LRN (n = 5) >
//   max pool 3x3/1 (5x5 -> 3x3) > conv 1x1 (10 -> 12 maps, ReLU) >
//   average pool 2x2/1 (3x3 -> 2x2) > fc 48 -> 20 (ReLU) > fc 20 -> 10.
// The host loads the layer table, the LRN table and the image, starts the run
// and feeds the weight stream (all CONV and FC words in layer order) with a
// word offered only on some cycles, so both the CONV weight preload and the FC
// weight starvation stall happen. The output is read back through the host port
// and compared with the reference models chained layer by layer.
// Mechanisms counted (each must occur): CONV weight preload words, FC stall
// cycles, ping-pong swaps, padded taps, extra input-map groups, max and
// average pooling outputs, LRN outputs, ReLU clamps, outputs at saturation and
// cycles on each of the two CONV engines.
module tb_cnn_top;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, lut_we, start, busy, done, out_sel, fc_stall, host_en, host_sel;
  logic w_valid, w_ready;
  logic [$clog2(MAX_LAYERS)-1:0] cfg_addr;
  layer_cfg_t cfg_data;
  logic [LUT_AW-1:0] lut_addr;
  logic [SCALE_W-1:0] lut_data;
  logic [31:0] cycles;
  fb_rd_t host_rd;
  fb_wr_t host_wr;
  feat_t [LANES-1:0] host_rdata;
  wgt_t [NM-1:0] w_data;

  cnn_top dut (.*);

  int checks = 0, failures = 0;
  localparam int NL = 7;
  layer_cfg_t net [NL];
  int lut[];
  int wq [$][NM];
  bit show;
  int n_narrow = 0, n_wide = 0;
  int n_preload = 0, n_stall = 0, n_pad = 0, n_groups = 0, n_max = 0, n_avg = 0,
      n_norm = 0, n_relu = 0, n_sat = 0, n_swap = 0;
  int conv_words = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // weight stream: a word is offered on about half of the cycles
  always_ff @(posedge clk) begin
    if (w_valid && w_ready) void'(wq.pop_front());
    show <= $urandom_range(1);
  end
  always_comb begin
    w_valid = show && wq.size() > 0;
    w_data = '0;
    if (wq.size() > 0)
      for (int l = 0; l < int'(NM); l++) w_data[l] = wgt_t'(wq[0][l]);
  end

  always @(posedge clk) if (rst_n) begin
    if (fc_stall) n_stall++;
    if (w_valid && w_ready && dut.u_ctrl.wbuf_accept) n_preload++;
    if (dut.u_ctrl.st == dut.u_ctrl.S_NEXT) n_swap++;
    if (dut.convs_busy) n_narrow++;
    if (dut.convm_busy) n_wide++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("%s wrong", what); end
  endtask

  // count padded taps and extra input groups of a conv layer (reference side)
  function automatic void count_conv(input layer_cfg_t c);
    for (int y = 0; y < int'(c.yout); y++)
      for (int x = 0; x < int'(c.xout); x++)
        for (int ky = 0; ky < int'(c.k); ky++)
          for (int kx = 0; kx < int'(c.k); kx++) begin
            int iy = y * int'(c.stride) + ky - int'(c.pad);
            int ix = x * int'(c.stride) + kx - int'(c.pad);
            if (iy < 0 || ix < 0 || iy >= int'(c.yin) || ix >= int'(c.xin)) n_pad++;
          end
    n_groups += groups(int'(c.nif)) - 1;
  endfunction

  // ReLU clamps: outputs of a ReLU layer whose pre-activation was negative
  function automatic int relu_clamps(input layer_cfg_t c, ref int fin[], ref int w[]);
    layer_cfg_t c2 = c;
    int a[], b[], n = 0;
    c2.relu = 0;
    if (c.kind == L_CONV) begin conv_ref(c2, fin, w, a); conv_ref(c, fin, w, b); end
    else begin fc_ref(c2, fin, w, a); fc_ref(c, fin, w, b); end
    foreach (a[i]) if (a[i] < 0 && b[i] == 0) n++;
    return n;
  endfunction

  initial begin
    int feat[], nxt[];
    int w [NL][];
    int xy;
    int res_bank, res_addr;
    int expect_min = 0;
    cfg_we = 0; lut_we = 0; start = 0; host_en = 0; host_sel = 0;
    cfg_addr = '0; cfg_data = '0; lut_addr = '0; lut_data = '0; host_rd = '0; host_wr = '0;

    //             kind    k  s  p  xin yin xo yo nif nof sh relu avg
    net[0] = mk(L_CONV, 3, 2, 1, 9,  9,  5, 5, 3,  10, 5, 1,   0);
    net[0].conv_small = 1'b1;
    net[1] = mk(L_NORM, 5, 1, 0, 5,  5,  5, 5, 10, 10, 11, 0,  0);
    net[2] = mk(L_POOL, 3, 1, 0, 5,  5,  3, 3, 10, 10, 0, 0,   0);
    net[3] = mk(L_CONV, 1, 1, 0, 3,  3,  3, 3, 10, 12, 5, 1,   0);
    net[4] = mk(L_POOL, 2, 1, 0, 3,  3,  2, 2, 12, 12, 0, 0,   1);
    net[5] = mk(L_FC,   1, 1, 0, 2,  2,  1, 1, 12, 20, 7, 1,   0);
    net[6] = mk(L_FC,   1, 1, 0, 1,  1,  1, 1, 20, 10, 6, 0,   0);

    // LRN table: (2 + 1e-4/5 * s)^-0.75 with 4 fractional feature bits
    lut = new[LUT_N];
    for (int i = 0; i < int'(LUT_N); i++) begin
      automatic real s = real'(i << 11) / 256.0;
      lut[i] = int'(((2.0 + 1.0e-1 / 5.0 * s) ** (-0.75)) * 32768.0);
    end

    // image and weights
    feat = new[int'(net[0].nif) * 81];
    foreach (feat[i]) feat[i] = $urandom_range(0, 511);
    for (int l = 0; l < NL; l++) begin
      if (net[l].kind == L_CONV) w[l] = new[int'(net[l].nof) * int'(net[l].nif) * int'(net[l].k) * int'(net[l].k)];
      else if (net[l].kind == L_FC) w[l] = new[int'(net[l].nof) * int'(net[l].nif) * int'(net[l].xin) * int'(net[l].yin)];
      else w[l] = new[1];
      foreach (w[l][i]) w[l][i] = $urandom_range(0, 255) - 128;
      for (int n = 0; n < wwords(net[l]); n++) begin
        int word [NM];
        for (int k = 0; k < int'(NM); k++)
          word[k] = (net[l].kind == L_CONV) ? conv_wword(net[l], w[l], n, k) : fc_wword(net[l], w[l], n, k);
        wq.push_back(word);
        if (net[l].kind == L_CONV) conv_words++;
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // layer table, END marker, LRN table
    for (int l = 0; l <= NL; l++) begin
      cfg_we = 1; cfg_addr = 5'(l);
      cfg_data = (l < NL) ? net[l] : '0;
      if (l == NL) cfg_data.kind = L_END;
      @(negedge clk);
    end
    cfg_we = 0;
    for (int i = 0; i < int'(LUT_N); i++) begin
      lut_we = 1; lut_addr = LUT_AW'(i); lut_data = SCALE_W'(lut[i]);
      @(negedge clk);
    end
    lut_we = 0;
    // image into buffer A
    host_en = 1; host_sel = 0;
    for (int m = 0; m < int'(net[0].nif); m++)
      for (int p = 0; p < 81; p++) begin
        host_wr = '0;
        host_wr.en[fb_bank(m)] = 1'b1;
        host_wr.addr = FB_AW'(fb_addr(m, p, 81));
        host_wr.data[fb_bank(m)] = FEAT_W'(feat[m * 81 + p]);
        @(negedge clk);
      end
    host_wr = '0;
    host_en = 0;

    // reference chain and mechanism counts
    for (int l = 0; l < NL; l++) begin
      automatic layer_cfg_t c = net[l];
      xy = int'(c.xout) * int'(c.yout);
      case (c.kind)
        L_CONV: begin
          count_conv(c);
          n_relu += relu_clamps(c, feat, w[l]);
          conv_ref(c, feat, w[l], nxt);
          expect_min += wwords(c) / int'(c.k) / int'(c.k) / groups(int'(c.nif)) * xy
                        * groups(int'(c.nif)) * int'(c.k) * int'(c.k);
        end
        L_NORM: begin norm_ref(c, feat, lut, nxt); n_norm += nxt.size(); end
        L_POOL: begin pool_ref(c, feat, nxt); if (c.pool_avg) n_avg += nxt.size(); else n_max += nxt.size(); end
        default: begin n_relu += relu_clamps(c, feat, w[l]); fc_ref(c, feat, w[l], nxt); end
      endcase
      foreach (nxt[i]) if (nxt[i] == 511 || nxt[i] == -512) n_sat++;
      feat = nxt;
    end

    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    chk(cycles >= 32'(expect_min + conv_words), "run time");
    chk(wq.size() == 0, "all weight words consumed");
    $display("run: %0d cycles", cycles);

    // read the result (10 neurons as 1x1 maps) from the output buffer
    host_en = 1; host_sel = out_sel;
    for (int o = 0; o < int'(net[NL-1].nof); o++) begin
      res_bank = fb_bank(o);
      res_addr = fb_addr(o, 0, 1);
      host_rd = '0;
      host_rd.en[res_bank] = 1'b1;
      host_rd.addr = FB_AW'(res_addr);
      @(negedge clk);
      chk(int'(host_rdata[res_bank]) == feat[o], $sformatf("output %0d (got %0d expected %0d)",
                                                          o, host_rdata[res_bank], feat[o]));
    end
    host_rd = '0;

    $display("mechanisms: preload=%0d fc_stall=%0d swaps=%0d pad=%0d groups=%0d max=%0d avg=%0d norm=%0d relu=%0d sat=%0d",
             n_preload, n_stall, n_swap, n_pad, n_groups, n_max, n_avg, n_norm, n_relu, n_sat);
    chk(n_preload == conv_words, "preload words");
    chk(n_stall > 0, "fc stall");
    chk(n_swap == NL, "ping-pong swaps");
    chk(out_sel == 1'(NL % 2), "out_sel");
    chk(n_pad > 0, "padding");
    chk(n_groups > 0, "input groups");
    chk(n_max > 0, "max pool");
    chk(n_avg > 0, "avg pool");
    chk(n_norm > 0, "lrn");
    chk(n_relu > 0, "relu");
    chk(n_sat > 0, "saturation");
    $display("conv engine cycles: narrow=%0d wide=%0d", n_narrow, n_wide);
    chk(n_narrow > 0, "narrow conv engine");
    chk(n_wide > 0, "wide conv engine");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
