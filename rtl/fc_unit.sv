// fc_unit: the FC engine. Computes a fully-connected layer y = W x (optional
// ReLU) as a special form of convolution whose kernel covers the whole input.
//
// The input vector is the previous layer's output: Nif maps of Xin x Yin pixels,
// read LANES maps at a time from the banked feature buffer. Each cycle one
// feature word (LANES inputs) meets one streamed weight word of NM = LANES*LANES
// weights (lane p*LANES+j: input lane j to output neuron p of the current group)
// on the shared multipliers. The FC engine has its own adder trees and
// accumulators, shared by all FC layers; it does not use the CONV trees.
// Counter order, outermost first: og (group of LANES outputs) > ig (group of LANES
// input maps) > pixel. Output neuron o is written to bank o % LANES, word
// o / LANES, i.e. as Nof maps of 1 x 1 for the next FC layer.
//
// FC weights are not stored on chip: they arrive through a FIFO while the layer
// runs (show-ahead: w_valid/w_data is the head, w_pop takes it). The engine
// stalls in any cycle where no weight word is available, so the layer time is
// set by the weight transfer when that is slower than the multipliers.
// Pipeline and `done` timing are as in conv_unit, counted from each issue.
// Sharing multipliers, separate FC adders and overlapping weight transfer with
// computation follow the source design; the FIFO handshake is this design's.
module fc_unit
  import cnn_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  layer_cfg_t              cfg,
  output logic                    busy,
  output logic                    done,
  output logic                    stall,
  output fb_rd_t                  fb_rd,
  input  feat_t [LANES-1:0]       fb_rdata,
  input  logic                    w_valid,
  input  wgt_t  [NM-1:0]          w_data,
  output logic                    w_pop,
  output logic                    mul_valid,
  output feat_t [NM-1:0]          mul_feat,
  output wgt_t  [NM-1:0]          mul_wgt,
  input  logic                    prod_valid,
  input  prod_t [NM-1:0]          prod,
  output fb_wr_t                  fb_wr
);

  layer_cfg_t        c;
  logic              run;
  logic [MAPS_W-1:0] og, ig, ngo, ngi;
  logic [MEM_W-1:0]  pix, npix;

  assign ngo  = MAPS_W'((c.nof + MAPS_W'(LANES - 1)) / MAPS_W'(LANES));
  assign ngi  = MAPS_W'((c.nif + MAPS_W'(LANES - 1)) / MAPS_W'(LANES));
  assign npix = MEM_W'(c.xin) * MEM_W'(c.yin);

  wire pix_end = (pix == npix - 1'b1);
  wire ig_end  = (ig == ngi - 1'b1);
  wire og_end  = (og == ngo - 1'b1);
  wire issue   = run && w_valid;

  logic [LANES-1:0] lane_mask, out_en;
  logic [31:0]      fa;
  always_comb begin
    fa = 32'(ig) * 32'(npix) + 32'(pix);
    for (int j = 0; j < int'(LANES); j++) begin
      lane_mask[j] = (32'(ig) * LANES + 32'(j) < 32'(c.nif));
      out_en[j]    = (32'(og) * LANES + 32'(j) < 32'(c.nof));
    end
  end

  assign fb_rd.en   = issue ? lane_mask : '0;
  assign fb_rd.addr = FB_AW'(fa);
  assign w_pop      = issue;
  assign stall      = run && !w_valid;

  typedef struct packed {
    logic             valid;
    logic             first;
    logic             last;
    logic [LANES-1:0] mask;
    logic [LANES-1:0] oen;
    logic [FB_AW-1:0] oaddr;
  } side_t;

  side_t s1, s2, s3, s4;
  wgt_t [NM-1:0] w_q;
  logic          run_done;
  logic [3:1]    done_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; c <= '0; og <= '0; ig <= '0; pix <= '0;
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0;
      w_q <= '0; run_done <= 1'b0; done_d <= '0;
    end else begin
      run_done <= 1'b0;
      if (start && !busy) begin
        run <= 1'b1;
        c   <= cfg;
        og  <= '0; ig <= '0; pix <= '0;
      end else if (issue) begin
        pix <= pix + 1'b1;
        if (pix_end) begin
          pix <= '0;
          ig  <= ig + 1'b1;
          if (ig_end) begin
            ig <= '0;
            og <= og + 1'b1;
            if (og_end) begin
              run      <= 1'b0;
              run_done <= 1'b1;
            end
          end
        end
      end
      s1 <= '{valid: issue, first: (ig == '0) && (pix == '0), last: ig_end && pix_end,
              mask: lane_mask, oen: out_en, oaddr: FB_AW'(og)};
      if (issue) w_q <= w_data;
      s2 <= s1;
      s3 <= s2;
      s4 <= s3;
      done_d <= {done_d[2:1], run_done};
    end
  end

  assign busy = run || s1.valid || s2.valid || s3.valid || (|done_d);
  assign done = done_d[3];

  always_comb begin
    mul_valid = s1.valid;
    for (int p = 0; p < int'(LANES); p++)
      for (int j = 0; j < int'(LANES); j++) begin
        mul_feat[p*LANES + j] = s1.mask[j] ? fb_rdata[j] : '0;
        mul_wgt [p*LANES + j] = w_q[p*LANES + j];
      end
  end

  logic [LANES-1:0]  t_valid, t_first, t_last, a_valid;
  acc_t [LANES-1:0]  t_sum;
  feat_t [LANES-1:0] a_data;

  for (genvar p = 0; p < int'(LANES); p++) begin : g_out
    adder_tree #(.N(LANES)) u_tree (
      .clk, .rst_n,
      .in_valid(prod_valid && s2.valid), .in_first(s2.first), .in_last(s2.last),
      .in_data(prod[p*LANES +: LANES]),
      .out_valid(t_valid[p]), .out_first(t_first[p]), .out_last(t_last[p]),
      .sum(t_sum[p])
    );
    accum_relu u_acc (
      .clk, .rst_n,
      .in_valid(t_valid[p]), .in_first(t_first[p]), .in_last(t_last[p]),
      .in_sum(t_sum[p]), .shift(c.shift), .relu(c.relu),
      .out_valid(a_valid[p]), .out_data(a_data[p])
    );
  end

  always_comb begin
    fb_wr.en   = (a_valid[0] && s4.valid && s4.last) ? s4.oen : '0;
    fb_wr.addr = s4.oaddr;
    for (int p = 0; p < int'(LANES); p++)
      fb_wr.data[p] = a_data[p];
  end

endmodule
