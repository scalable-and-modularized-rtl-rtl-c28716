// conv_ctrl: loop counters and buffer-address generator of the CONV engine.
//
// A convolution layer is four nested loops: Loop-4 over output maps (Nof),
// Loop-3 over input maps (Nif), Loop-2 over output pixels (X x Y) and Loop-1 over
// the K x K kernel window. The hardware unrolls Loop-3 by LANES (one input map per
// adder-tree input) and Loop-4 by LANES (one adder tree per output map). When a
// layer has more than LANES input maps, the kernel window is swept once per group
// of LANES input maps before moving to the next pixel, so the accumulator keeps
// the whole partial sum and no partial sums go back to memory (Loop-1 finishes
// before Loop-2 advances). With the NIF parameter below LANES, Loop-3 is unrolled
// by NIF (the adder-tree fan-in) and Loop-4 by NOUT = NM / NIF; a group of NIF
// input maps then sits in NIF neighbouring banks, and the NOUT output maps of a
// pixel are written as NOUT / LANES chunks of LANES maps (one chunk per cycle,
// sequenced by conv_unit). The counter order, outermost first, is therefore:
//   og (output-map group) > oy > ox > ig (input-map group) > ky > kx.
// One read is issued per cycle while busy; the counters are reloaded from the
// layer descriptor on `start`, so one controller serves every CONV layer.
//
// Per issued cycle the outputs give: the feature-buffer read (shared word
// address, per-bank enable), a per-lane mask that is 0 where the window lies in
// the zero padding or the input map does not exist, the bank of the group's
// first input lane, the weight-buffer word, the first/last flags of the
// accumulation window, and the output word, chunk step and per-map write
// enables of the pixel being computed. All outputs are combinational from
// the counters. `done` pulses in the cycle after the last issue.
// The loop structure and unrolling follow the source design; stride, zero
// padding and the address layout are this design's choices.
module conv_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned NIF  = LANES,      // adder-tree fan-in; must divide LANES
  parameter int unsigned NOUT = NM / NIF    // output maps per group (multiple of LANES)
)
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  layer_cfg_t       cfg,
  output logic             busy,
  output logic             done,
  output logic             issue,
  output fb_rd_t           rd,
  output logic [NIF-1:0]   lane_mask,
  output logic [BANK_W-1:0] bank_base,  // bank of lane 0 of the current input group
  output logic [WB_AW-1:0] wb_addr,
  output logic             first,
  output logic             last,
  output logic [FB_AW-1:0] out_addr,   // word of chunk 0; chunk n adds n * out_step
  output logic [FB_AW-1:0] out_step,
  output logic [NOUT-1:0]  out_en
);

  layer_cfg_t c;
  logic [MAPS_W-1:0] og, ig, ngo, ngi;
  logic [DIM_W-1:0]  oy, ox;
  logic [3:0]        ky, kx;
  logic [WB_AW-1:0]  wb_base;   // first weight word of the current output group
  logic [WB_AW-1:0]  wb_off;    // offset inside the group: (ig*K + ky)*K + kx

  function automatic logic [MAPS_W-1:0] groups(input logic [MAPS_W-1:0] n);
    return MAPS_W'((n + MAPS_W'(NIF - 1)) / MAPS_W'(NIF));
  endfunction

  assign ngo = MAPS_W'((c.nof + MAPS_W'(NOUT - 1)) / MAPS_W'(NOUT));
  assign ngi = groups(c.nif);

  wire kx_end = (kx == c.k - 4'd1);
  wire ky_end = (ky == c.k - 4'd1);
  wire ig_end = (ig == ngi - 1'b1);
  wire ox_end = (ox == c.xout - 1'b1);
  wire oy_end = (oy == c.yout - 1'b1);
  wire og_end = (og == ngo - 1'b1);
  wire win_end = kx_end && ky_end && ig_end;

  // input coordinate of the current tap
  logic signed [DIM_W+4:0] iy, ix;
  logic                    in_bounds;
  logic [31:0]             fa, oa;

  always_comb begin
    iy = $signed({5'd0, oy}) * $signed({10'd0, c.stride}) + $signed({9'd0, ky}) - $signed({11'd0, c.pad});
    ix = $signed({5'd0, ox}) * $signed({10'd0, c.stride}) + $signed({9'd0, kx}) - $signed({11'd0, c.pad});
    in_bounds = (iy >= 0) && (ix >= 0) &&
                (iy < $signed({5'd0, c.yin})) && (ix < $signed({5'd0, c.xin}));
    fa = (32'(ig) * NIF / LANES) * 32'(c.xin) * 32'(c.yin) + 32'(iy[DIM_W:0]) * 32'(c.xin) + 32'(ix[DIM_W:0]);
    oa = (32'(og) * NOUT / LANES) * 32'(c.xout) * 32'(c.yout) + 32'(oy) * 32'(c.xout) + 32'(ox);
    for (int j = 0; j < int'(NIF); j++)
      lane_mask[j] = in_bounds && (32'(ig) * NIF + 32'(j) < 32'(c.nif));
    for (int p = 0; p < int'(NOUT); p++)
      out_en[p] = (32'(og) * NOUT + 32'(p) < 32'(c.nof));
  end

  assign bank_base = BANK_W'((32'(ig) * NIF) % LANES);
  assign out_step  = FB_AW'(32'(c.xout) * 32'(c.yout));

  always_comb begin
    rd.en = '0;
    for (int j = 0; j < int'(NIF); j++)
      rd.en[int'(bank_base) + j] = busy && lane_mask[j];
  end

  assign issue    = busy;
  assign rd.addr  = FB_AW'(fa);
  assign out_addr = FB_AW'(oa);
  assign wb_addr  = wb_base + wb_off;
  assign first    = (ig == '0) && (ky == '0) && (kx == '0);
  assign last     = win_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      c       <= '0;
      og      <= '0;
      ig      <= '0;
      oy      <= '0;
      ox      <= '0;
      ky      <= '0;
      kx      <= '0;
      wb_base <= '0;
      wb_off  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        c       <= cfg;
        {og, ig, oy, ox, ky, kx} <= '0;
        wb_base <= '0;
        wb_off  <= '0;
      end else if (busy) begin
        kx     <= kx + 4'd1;
        wb_off <= wb_off + 1'b1;
        if (kx_end) begin
          kx <= '0;
          ky <= ky + 4'd1;
          if (ky_end) begin
            ky <= '0;
            ig <= ig + 1'b1;
            if (ig_end) begin
              ig     <= '0;
              wb_off <= '0;
              ox     <= ox + 1'b1;
              if (ox_end) begin
                ox <= '0;
                oy <= oy + 1'b1;
                if (oy_end) begin
                  oy      <= '0;
                  og      <= og + 1'b1;
                  wb_base <= wb_base + wb_off + 1'b1;
                  if (og_end) begin
                    busy <= 1'b0;
                    done <= 1'b1;
                  end
                end
              end
            end
          end
        end
      end
    end
  end

endmodule
