// tb_workloads: runs the layer sequences of AlexNet and NIN end to end on the
// accelerator at its default parameters, with channel counts and input sizes
// reduced so that every layer fits the default buffers and the run simulates
// in seconds. The input is 3 x 63 x 63 (each map must fit one 4096-word bank).
// The first layer keeps its real shape (11x11 kernel, stride 4, 3 -> 96 maps)
// and runs on the narrow CONV engine (fan-in SMALL_NIF);
// later layers keep their kernel, stride, padding and order (pool5 and pool3
// use 2x2 windows because the maps are only 2x2 there):
//   AlexNet: conv1 > norm1 > pool1 > conv2 (5x5 pad 2) > norm2 > pool2 >
//            conv3 > conv4 > conv5 (3x3 pad 1) > pool5 > fc6 > fc7 > fc8
//   NIN:     conv1 > cccp1 > cccp2 > pool1 > conv2 > cccp3 > cccp4 > pool2 >
//            conv3 > cccp5 > cccp6 > pool3 > conv4 > cccp7 > cccp8 > pool4 (avg)
// AlexNet's grouped layers are run as dense convolutions. For each layer the
// shift is picked here so that few outputs saturate. Outputs are compared with
// the chained reference models; run times are reported.
module tb_workloads;
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
  int lut[];
  int img_q[];
  int wq [$][NM];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) if (w_valid && w_ready) void'(wq.pop_front());
  always_comb begin
    w_valid = wq.size() > 0;
    w_data = '0;
    if (wq.size() > 0)
      for (int l = 0; l < int'(NM); l++) w_data[l] = wgt_t'(wq[0][l]);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("%s wrong", what); end
  endtask

  function automatic void layer_ref(input layer_cfg_t c, ref int fin[], ref int w[], ref int fout[]);
    case (c.kind)
      L_CONV: conv_ref(c, fin, w, fout);
      L_NORM: norm_ref(c, fin, lut, fout);
      L_POOL: pool_ref(c, fin, fout);
      default: fc_ref(c, fin, w, fout);
    endcase
  endfunction

  task automatic run_net(input string name, input layer_cfg_t net [$]);
    int feat[], nxt[];
    int w [$][];
    int xy0 = int'(net[0].xin) * int'(net[0].yin);
    int last_n;

    feat = img_q;
    // weights, shift selection and reference chain
    for (int l = 0; l < net.size(); l++) begin
      int wl[];
      if (net[l].kind == L_CONV) wl = new[int'(net[l].nof) * int'(net[l].nif) * int'(net[l].k) * int'(net[l].k)];
      else if (net[l].kind == L_FC) wl = new[int'(net[l].nof) * int'(net[l].nif) * int'(net[l].xin) * int'(net[l].yin)];
      else wl = new[1];
      foreach (wl[i]) wl[i] = $urandom_range(0, 64) - 32;
      w.push_back(wl);
      if (net[l].kind == L_CONV || net[l].kind == L_FC) begin
        for (int s = 0; s < 31; s++) begin
          int nsat = 0;
          net[l].shift = 5'(s);
          layer_ref(net[l], feat, wl, nxt);
          foreach (nxt[i]) if (nxt[i] == 511 || nxt[i] == -512) nsat++;
          if (nsat * 50 <= nxt.size()) break;
        end
      end else layer_ref(net[l], feat, wl, nxt);
      begin
        int nz = 0;
        foreach (nxt[i]) if (nxt[i] != 0) nz++;
        $display("%s layer %0d: %0d of %0d outputs non-zero, shift %0d", name, l, nz, nxt.size(), net[l].shift);
      end
      feat = nxt;
      for (int n = 0; n < wwords(net[l]); n++) begin
        int word [NM];
        for (int k = 0; k < int'(NM); k++)
          word[k] = (net[l].kind == L_CONV) ? conv_wword(net[l], w[l], n, k) : fc_wword(net[l], w[l], n, k);
        wq.push_back(word);
      end
    end

    // program the table and load the image
    @(negedge clk);
    for (int l = 0; l <= net.size(); l++) begin
      cfg_we = 1; cfg_addr = 5'(l);
      cfg_data = (l < net.size()) ? net[l] : '0;
      if (l == net.size()) cfg_data.kind = L_END;
      @(negedge clk);
    end
    cfg_we = 0;
    begin
      host_en = 1; host_sel = 0;
      for (int m = 0; m < int'(net[0].nif); m++)
        for (int p = 0; p < xy0; p++) begin
          host_wr = '0;
          host_wr.en[fb_bank(m)] = 1'b1;
          host_wr.addr = FB_AW'(fb_addr(m, p, xy0));
          host_wr.data[fb_bank(m)] = FEAT_W'(img_q[m * xy0 + p]);
          @(negedge clk);
        end
      host_wr = '0;
      host_en = 0;
    end
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    $display("%s: %0d layers, %0d cycles", name, net.size(), cycles);
    chk(wq.size() == 0, "weights consumed");
    // read back the final layer
    last_n = feat.size();
    host_en = 1; host_sel = out_sel;
    begin
      layer_cfg_t c = net[net.size() - 1];
      int xyo = (c.kind == L_FC) ? 1 : int'(c.xout) * int'(c.yout);
      int nm = last_n / xyo;
      int nz = 0;
      for (int m = 0; m < nm; m++)
        for (int p = 0; p < xyo; p++) begin
          host_rd = '0;
          host_rd.en[fb_bank(m)] = 1'b1;
          host_rd.addr = FB_AW'(fb_addr(m, p, xyo));
          @(negedge clk);
          if (feat[m * xyo + p] != 0) nz++;
          chk(int'(host_rdata[fb_bank(m)]) == feat[m * xyo + p],
              $sformatf("%s output %0d/%0d (got %0d expected %0d)", name, m, p,
                        host_rdata[fb_bank(m)], feat[m * xyo + p]));
        end
      chk(nz > 0, "non-zero outputs");
    end
    host_rd = '0;
    host_en = 0;
  endtask

  initial begin
    layer_cfg_t alex [$], nin [$];
    cfg_we = 0; lut_we = 0; start = 0; host_en = 0; host_sel = 0;
    cfg_addr = '0; cfg_data = '0; lut_addr = '0; lut_data = '0; host_rd = '0; host_wr = '0;
    lut = new[LUT_N];
    for (int i = 0; i < int'(LUT_N); i++) begin
      automatic real s = real'(i << 14) / 256.0;
      lut[i] = int'(((2.0 + 1.0e-1 / 5.0 * s) ** (-0.75)) * 32768.0);
    end
    //               kind    k   s  p  xin yin xo  yo  nif nof sh relu avg
    alex.push_back(mk(L_CONV, 11, 4, 0, 63, 63, 14, 14, 3,  96, 0, 1, 0));
    alex[0].conv_small = 1'b1;
    alex.push_back(mk(L_NORM, 5,  1, 0, 14, 14, 14, 14, 96, 96, 14, 0, 0));
    alex.push_back(mk(L_POOL, 3,  2, 0, 14, 14, 6,  6,  96, 96, 0, 0, 0));
    alex.push_back(mk(L_CONV, 5,  1, 2, 6,  6,  6,  6,  96, 64, 0, 1, 0));
    alex.push_back(mk(L_NORM, 5,  1, 0, 6,  6,  6,  6,  64, 64, 14, 0, 0));
    alex.push_back(mk(L_POOL, 3,  2, 0, 6,  6,  2,  2,  64, 64, 0, 0, 0));
    alex.push_back(mk(L_CONV, 3,  1, 1, 2,  2,  2,  2,  64, 96, 0, 1, 0));
    alex.push_back(mk(L_CONV, 3,  1, 1, 2,  2,  2,  2,  96, 96, 0, 1, 0));
    alex.push_back(mk(L_CONV, 3,  1, 1, 2,  2,  2,  2,  96, 64, 0, 1, 0));
    alex.push_back(mk(L_POOL, 2,  2, 0, 2,  2,  1,  1,  64, 64, 0, 0, 0));
    alex.push_back(mk(L_FC,   1,  1, 0, 1,  1,  1,  1,  64, 256, 0, 1, 0));
    alex.push_back(mk(L_FC,   1,  1, 0, 1,  1,  1,  1,  256, 256, 0, 1, 0));
    alex.push_back(mk(L_FC,   1,  1, 0, 1,  1,  1,  1,  256, 100, 0, 0, 0));

    nin.push_back(mk(L_CONV, 11, 4, 0, 63, 63, 14, 14, 3,  96, 0, 1, 0));
    nin[0].conv_small = 1'b1;
    nin.push_back(mk(L_CONV, 1,  1, 0, 14, 14, 14, 14, 96, 96, 0, 1, 0));
    nin.push_back(mk(L_CONV, 1,  1, 0, 14, 14, 14, 14, 96, 96, 0, 1, 0));
    nin.push_back(mk(L_POOL, 3,  2, 0, 14, 14, 6,  6,  96, 96, 0, 0, 0));
    nin.push_back(mk(L_CONV, 5,  1, 2, 6,  6,  6,  6,  96, 64, 0, 1, 0));
    nin.push_back(mk(L_CONV, 1,  1, 0, 6,  6,  6,  6,  64, 64, 0, 1, 0));
    nin.push_back(mk(L_CONV, 1,  1, 0, 6,  6,  6,  6,  64, 64, 0, 1, 0));
    nin.push_back(mk(L_POOL, 3,  2, 0, 6,  6,  2,  2,  64, 64, 0, 0, 0));
    nin.push_back(mk(L_CONV, 3,  1, 1, 2,  2,  2,  2,  64, 96, 0, 1, 0));
    nin.push_back(mk(L_CONV, 1,  1, 0, 2,  2,  2,  2,  96, 96, 0, 1, 0));
    nin.push_back(mk(L_CONV, 1,  1, 0, 2,  2,  2,  2,  96, 96, 0, 1, 0));
    nin.push_back(mk(L_POOL, 2,  2, 0, 2,  2,  1,  1,  96, 96, 0, 0, 0));
    nin.push_back(mk(L_CONV, 3,  1, 1, 1,  1,  1,  1,  96, 128, 0, 1, 0));
    nin.push_back(mk(L_CONV, 1,  1, 0, 1,  1,  1,  1,  128, 128, 0, 1, 0));
    nin.push_back(mk(L_CONV, 1,  1, 0, 1,  1,  1,  1,  128, 100, 0, 1, 0));
    nin.push_back(mk(L_POOL, 1,  1, 0, 1,  1,  1,  1,  100, 100, 0, 0, 1));

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < int'(LUT_N); i++) begin
      lut_we = 1; lut_addr = LUT_AW'(i); lut_data = SCALE_W'(lut[i]);
      @(negedge clk);
    end
    lut_we = 0;
    img_q = new[3 * 63 * 63];
    foreach (img_q[i]) img_q[i] = $urandom_range(0, 255);
    run_net("AlexNet-shaped", alex);
    foreach (img_q[i]) img_q[i] = $urandom_range(0, 255);
    run_net("NIN-shaped", nin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
