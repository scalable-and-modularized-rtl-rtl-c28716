// pool_unit: the POOL engine. Max or average pooling over a K x K window with a
// stride, on LANES feature maps at a time.
//
// Counter order, outermost first: og (group of LANES maps) > oy > ox > ky > kx.
// Each cycle one window tap of LANES maps is read from the input buffer (one
// bank per map); the taps are folded into a per-lane running maximum or sum. At
// the last tap the result is written to the same banks of the output buffer:
// the maximum, or the sum times avg_recip (= round(65536 / K^2)) shifted right by
// 16. Taps that fall outside the input map (padding) are skipped for max and count
// as zero for average. Pooling keeps the number of maps.
// Timing: issue at cycle 0, data at 1, write at 2; one tap per cycle, so a layer
// takes ceil(Nif/LANES) * Xout * Yout * K * K cycles plus 2. `done` pulses with
// the last write. Max and average pooling follow the source design; the
// reciprocal multiply for the average is this design's choice.
module pool_unit
  import cnn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  output logic              busy,
  output logic              done,
  output fb_rd_t            fb_rd,
  input  feat_t [LANES-1:0] fb_rdata,
  output fb_wr_t            fb_wr
);

  layer_cfg_t        c;
  logic              run;
  logic [MAPS_W-1:0] og, ngo;
  logic [DIM_W-1:0]  oy, ox;
  logic [3:0]        ky, kx;

  assign ngo = MAPS_W'((c.nif + MAPS_W'(LANES - 1)) / MAPS_W'(LANES));

  wire kx_end = (kx == c.k - 4'd1);
  wire ky_end = (ky == c.k - 4'd1);
  wire ox_end = (ox == c.xout - 1'b1);
  wire oy_end = (oy == c.yout - 1'b1);
  wire og_end = (og == ngo - 1'b1);

  logic signed [DIM_W+4:0] iy, ix;
  logic                    in_bounds;
  logic [31:0]             fa, oa;
  logic [LANES-1:0]        lane_ok;

  always_comb begin
    iy = $signed({5'd0, oy}) * $signed({10'd0, c.stride}) + $signed({9'd0, ky}) - $signed({11'd0, c.pad});
    ix = $signed({5'd0, ox}) * $signed({10'd0, c.stride}) + $signed({9'd0, kx}) - $signed({11'd0, c.pad});
    in_bounds = (iy >= 0) && (ix >= 0) &&
                (iy < $signed({5'd0, c.yin})) && (ix < $signed({5'd0, c.xin}));
    fa = 32'(og) * 32'(c.xin) * 32'(c.yin) + 32'(iy[DIM_W:0]) * 32'(c.xin) + 32'(ix[DIM_W:0]);
    oa = 32'(og) * 32'(c.xout) * 32'(c.yout) + 32'(oy) * 32'(c.xout) + 32'(ox);
    for (int j = 0; j < int'(LANES); j++)
      lane_ok[j] = (32'(og) * LANES + 32'(j) < 32'(c.nif));
  end

  assign fb_rd.en   = run && in_bounds ? lane_ok : '0;
  assign fb_rd.addr = FB_AW'(fa);

  // stage 1 sideband
  logic             s1_valid, s1_first, s1_last, s1_inb;
  logic [LANES-1:0] s1_oen;
  logic [FB_AW-1:0] s1_oaddr;
  logic             run_done, done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; c <= '0; og <= '0; oy <= '0; ox <= '0; ky <= '0; kx <= '0;
      s1_valid <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_inb <= 1'b0;
      s1_oen <= '0; s1_oaddr <= '0; run_done <= 1'b0; done_q <= 1'b0;
    end else begin
      run_done <= 1'b0;
      done_q   <= run_done;
      s1_valid <= run;
      s1_first <= (ky == '0) && (kx == '0);
      s1_last  <= kx_end && ky_end;
      s1_inb   <= in_bounds;
      s1_oen   <= lane_ok;
      s1_oaddr <= FB_AW'(oa);
      if (start && !busy) begin
        run <= 1'b1;
        c   <= cfg;
        {og, oy, ox, ky, kx} <= '0;
      end else if (run) begin
        kx <= kx + 4'd1;
        if (kx_end) begin
          kx <= '0;
          ky <= ky + 4'd1;
          if (ky_end) begin
            ky <= '0;
            ox <= ox + 1'b1;
            if (ox_end) begin
              ox <= '0;
              oy <= oy + 1'b1;
              if (oy_end) begin
                oy <= '0;
                og <= og + 1'b1;
                if (og_end) begin
                  run      <= 1'b0;
                  run_done <= 1'b1;
                end
              end
            end
          end
        end
      end
    end
  end

  // running max / sum per lane
  feat_t [LANES-1:0] mx_q, mx_n;
  acc_t  [LANES-1:0] sm_q, sm_n;
  logic              any_q, any_n;    // a valid tap has been seen (max)

  always_comb begin
    any_n = s1_first ? s1_inb : (any_q || s1_inb);
    for (int j = 0; j < int'(LANES); j++) begin
      feat_t v;
      v = s1_inb ? fb_rdata[j] : '0;
      sm_n[j] = (s1_first ? acc_t'(0) : sm_q[j]) + acc_t'(v);
      if (s1_first || !any_q)
        mx_n[j] = v;
      else if (s1_inb && v > mx_q[j])
        mx_n[j] = v;
      else
        mx_n[j] = mx_q[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx_q <= '0; sm_q <= '0; any_q <= 1'b0;
      fb_wr <= '0;
    end else begin
      fb_wr.en <= '0;
      if (s1_valid) begin
        mx_q  <= mx_n;
        sm_q  <= sm_n;
        any_q <= any_n;
        if (s1_last) begin
          fb_wr.en   <= s1_oen;
          fb_wr.addr <= s1_oaddr;
          for (int j = 0; j < int'(LANES); j++)
            fb_wr.data[j] <= c.pool_avg
              ? sat_feat((sm_n[j] * acc_t'({1'b0, c.avg_recip})) >>> 16)
              : mx_n[j];
        end
      end
    end
  end

  assign busy = run || s1_valid || run_done || done_q;
  assign done = done_q;

endmodule
