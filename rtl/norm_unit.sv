// norm_unit: the NORM engine. Local response normalisation across maps:
//   b[c](x,y) = a[c](x,y) * (k + alpha/n * sum_j a[j](x,y)^2) ^ (-beta),
// with j over the n maps centred on c that exist.
//
// The non-linear factor is not computed in hardware: it comes from a LUT_N-entry
// table of unsigned Q1.15 scales that the host fills before the layer through
// the lut_* port (entry i holds the factor for a sum of squares of about
// i << shift). The engine is serial: for each map c and pixel it reads the n
// neighbouring features one per cycle (bank j % LANES, word (j / LANES) * X * Y +
// pixel), accumulates their squares, keeps the centre value, and at the last tap
// writes sat((a[c] * scale[min(sum >> shift, LUT_N-1)]) >>> 15) to the same
// place in the output buffer. Counter order: c > pixel > tap.
// Timing: issue at 0, data at 1, write at 2; n cycles per output feature, so a
// layer takes Nif * X * Y * n cycles plus 2. `done` pulses with the last write.
// The layer's function (LRN, non-linear) is from the source design; the serial
// schedule and the table-based scale are this design's choices.
module norm_unit
  import cnn_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  layer_cfg_t          cfg,
  output logic                busy,
  output logic                done,
  // scale table write port
  input  logic                lut_we,
  input  logic [LUT_AW-1:0]   lut_addr,
  input  logic [SCALE_W-1:0]  lut_data,
  output fb_rd_t              fb_rd,
  input  feat_t [LANES-1:0]   fb_rdata,
  output fb_wr_t              fb_wr
);

  logic [SCALE_W-1:0] lut [LUT_N];

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= lut_data;
  end

  layer_cfg_t        c;
  logic              run;
  logic [MAPS_W-1:0] ch;
  logic [MEM_W-1:0]  pix, npix;
  logic [3:0]        tap;

  assign npix = MEM_W'(c.xin) * MEM_W'(c.yin);

  wire tap_end = (tap == c.k - 4'd1);
  wire pix_end = (pix == npix - 1'b1);
  wire ch_end  = (ch == c.nif - 1'b1);

  logic signed [MAPS_W+1:0] j;
  logic                     j_ok;
  logic [31:0]              fa, oa;
  logic [BANK_W-1:0]        jbank, cbank;

  always_comb begin
    j     = $signed({2'b0, ch}) - $signed({10'd0, (c.k - 4'd1) >> 1}) + $signed({10'd0, tap});
    j_ok  = (j >= 0) && (j < $signed({2'b0, c.nif}));
    jbank = BANK_W'(j[MAPS_W-1:0] % LANES);
    cbank = BANK_W'(ch % LANES);
    fa    = 32'(j[MAPS_W-1:0] / LANES) * 32'(npix) + 32'(pix);
    oa    = 32'(ch / LANES) * 32'(npix) + 32'(pix);
  end

  always_comb begin
    fb_rd.en   = '0;
    fb_rd.en[jbank] = run && j_ok;
    fb_rd.addr = FB_AW'(fa);
  end

  logic              s1_valid, s1_first, s1_last, s1_ok, s1_centre;
  logic [BANK_W-1:0] s1_bank, s1_cbank;
  logic [FB_AW-1:0]  s1_oaddr;
  logic              run_done, done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; c <= '0; ch <= '0; pix <= '0; tap <= '0;
      s1_valid <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_ok <= 1'b0;
      s1_centre <= 1'b0; s1_bank <= '0; s1_cbank <= '0; s1_oaddr <= '0;
      run_done <= 1'b0; done_q <= 1'b0;
    end else begin
      run_done  <= 1'b0;
      done_q    <= run_done;
      s1_valid  <= run;
      s1_first  <= (tap == '0);
      s1_last   <= tap_end;
      s1_ok     <= j_ok;
      s1_centre <= (tap == (c.k - 4'd1) >> 1);
      s1_bank   <= jbank;
      s1_cbank  <= cbank;
      s1_oaddr  <= FB_AW'(oa);
      if (start && !busy) begin
        run <= 1'b1;
        c   <= cfg;
        ch  <= '0; pix <= '0; tap <= '0;
      end else if (run) begin
        tap <= tap + 4'd1;
        if (tap_end) begin
          tap <= '0;
          pix <= pix + 1'b1;
          if (pix_end) begin
            pix <= '0;
            ch  <= ch + 1'b1;
            if (ch_end) begin
              run      <= 1'b0;
              run_done <= 1'b1;
            end
          end
        end
      end
    end
  end

  // stage 1: square-accumulate, scale at the last tap
  acc_t  sq_q, sq_n, idx_w;
  feat_t ctr_q, ctr_n, v;
  logic [LUT_AW-1:0] idx;
  acc_t  prod;

  always_comb begin
    v     = s1_ok ? fb_rdata[s1_bank] : '0;
    sq_n  = (s1_first ? acc_t'(0) : sq_q) + acc_t'(v) * acc_t'(v);
    ctr_n = s1_centre ? v : ctr_q;
    idx_w = sq_n >>> c.shift;
    idx   = (idx_w > acc_t'(LUT_N - 1)) ? LUT_AW'(LUT_N - 1) : LUT_AW'(idx_w);
    prod  = (acc_t'(ctr_n) * acc_t'({1'b0, lut[idx]})) >>> 15;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_q <= '0; ctr_q <= '0; fb_wr <= '0;
    end else begin
      fb_wr.en <= '0;
      if (s1_valid) begin
        sq_q  <= sq_n;
        ctr_q <= ctr_n;
        if (s1_last) begin
          fb_wr.en[s1_cbank]   <= 1'b1;
          fb_wr.addr           <= s1_oaddr;
          fb_wr.data[s1_cbank] <= sat_feat(prod);
        end
      end
    end
  end

  assign busy = run || s1_valid || run_done || done_q;
  assign done = done_q;

endmodule
