// tb_feature_router: drives random requests from all engines and the host and
// checks, for every layer kind, input-buffer select and host mode, that exactly
// the right request reaches each buffer, that the right read data comes back,
// and that the multipliers get the CONV or the FC operands.
module tb_feature_router;
  import cnn_pkg::*;

  layer_kind_e kind;
  logic in_sel, host_en, host_sel;
  fb_rd_t conv_rd, pool_rd, norm_rd, fc_rd, host_rd, a_rd, b_rd;
  fb_wr_t conv_wr, pool_wr, norm_wr, fc_wr, host_wr, a_wr, b_wr;
  feat_t [LANES-1:0] eng_rdata, host_rdata, a_rdata, b_rdata;
  logic conv_mvalid, fc_mvalid, m_valid;
  feat_t [NM-1:0] conv_mfeat, fc_mfeat, m_feat;
  wgt_t [NM-1:0] conv_mwgt, fc_mwgt, m_wgt;
  int checks = 0, failures = 0;

  feature_router dut (.*);

  function automatic fb_rd_t rnd_rd();
    fb_rd_t r;
    r.en = LANES'($urandom) | 1'b1;
    r.addr = FB_AW'($urandom);
    return r;
  endfunction
  function automatic fb_wr_t rnd_wr();
    fb_wr_t w;
    w.en = LANES'($urandom) | 1'b1;
    w.addr = FB_AW'($urandom);
    for (int b = 0; b < int'(LANES); b++) w.data[b] = FEAT_W'($urandom);
    return w;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("%s wrong", what); end
  endtask

  initial begin
    automatic layer_kind_e kinds [4] = '{L_CONV, L_POOL, L_NORM, L_FC};
    for (int t = 0; t < 400; t++) begin
      fb_rd_t er; fb_wr_t ew;
      kind = kinds[t % 4];
      in_sel = t[2]; host_en = (t % 7 == 0); host_sel = t[3];
      conv_rd = rnd_rd(); pool_rd = rnd_rd(); norm_rd = rnd_rd(); fc_rd = rnd_rd(); host_rd = rnd_rd();
      conv_wr = rnd_wr(); pool_wr = rnd_wr(); norm_wr = rnd_wr(); fc_wr = rnd_wr(); host_wr = rnd_wr();
      for (int b = 0; b < int'(LANES); b++) begin a_rdata[b] = FEAT_W'($urandom); b_rdata[b] = FEAT_W'($urandom); end
      conv_mvalid = $urandom; fc_mvalid = $urandom;
      for (int i = 0; i < int'(NM); i++) begin
        conv_mfeat[i] = FEAT_W'($urandom); fc_mfeat[i] = FEAT_W'($urandom);
        conv_mwgt[i] = WGT_W'($urandom);   fc_mwgt[i] = WGT_W'($urandom);
      end
      #1;
      case (kind)
        L_CONV: begin er = conv_rd; ew = conv_wr; end
        L_POOL: begin er = pool_rd; ew = pool_wr; end
        L_NORM: begin er = norm_rd; ew = norm_wr; end
        default: begin er = fc_rd; ew = fc_wr; end
      endcase
      if (host_en) begin
        chk(host_sel ? (b_rd == host_rd && a_rd.en == 0) : (a_rd == host_rd && b_rd.en == 0), "host rd");
        chk(host_sel ? (b_wr == host_wr && a_wr.en == 0) : (a_wr == host_wr && b_wr.en == 0), "host wr");
      end else begin
        chk(in_sel ? (b_rd == er && a_rd.en == 0) : (a_rd == er && b_rd.en == 0), "engine rd");
        chk(in_sel ? (a_wr == ew && b_wr.en == 0) : (b_wr == ew && a_wr.en == 0), "engine wr");
      end
      chk(eng_rdata == (in_sel ? b_rdata : a_rdata), "engine rdata");
      chk(host_rdata == (host_sel ? b_rdata : a_rdata), "host rdata");
      if (kind == L_FC) chk(m_valid == fc_mvalid && m_feat == fc_mfeat && m_wgt == fc_mwgt, "fc operands");
      else              chk(m_valid == conv_mvalid && m_feat == conv_mfeat && m_wgt == conv_mwgt, "conv operands");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
