// conv_unit: the CONV engine. Computes one convolution layer (with optional
// ReLU) from the input feature buffer into the output feature buffer.
//
// Structure (default NIF = LANES): conv_ctrl walks the loops and issues one
// buffer read per cycle. LANES input maps are read in parallel (one bank each);
// every feature is sent to the LANES multipliers that serve the LANES output maps
// of the current group, so the shared multiplier array (outside this module) gets
// NM = LANES*LANES feature/weight pairs per cycle. Weight word lane p*LANES+j
// holds the weight from input map j to output map p of the current groups. LANES
// adder trees of fan-in LANES sum the products of one output map each, and LANES
// accumulators sum over the kernel window (and over input-map groups), then apply
// shift, ReLU and saturation. All LANES output maps of a pixel are written in one
// cycle.
//
// The NIF parameter narrows the adder trees: with NIF < LANES the engine reads
// NIF input maps per cycle (from NIF neighbouring banks), has NOUT = NM / NIF
// adder trees of fan-in NIF, and weight lane p*NIF+j holds the weight from input
// map j to output map p. The NOUT results of a pixel are then written as
// NOUT / LANES chunks on consecutive cycles, so every accumulation window must be
// at least NOUT / LANES taps long (ceil(Nif/NIF) * K * K >= NOUT / LANES).
//
// Pipeline (cycle of issue = 0): 1 buffer and weight data, 2 products,
// 3 tree sums, 4 output write (plus one cycle per extra chunk). One kernel tap
// per cycle, so a layer takes
// ceil(Nof/NOUT) * Xout * Yout * ceil(Nif/NIF) * K * K cycles plus 3 + NOUT/LANES.
// `done` pulses in the cycle of the last write; `busy` stays high until then.
// The adder trees (fan-in = the input maps served, NM / fan-in trees),
// accumulation and ReLU follow the source design; the pipeline depth and the
// chunked output write are this design's choices.
module conv_unit
  import cnn_pkg::*;
#(
  parameter int unsigned NIF  = LANES,      // adder-tree fan-in; must divide LANES
  parameter int unsigned NOUT = NM / NIF    // adder trees (output maps per group)
)
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  layer_cfg_t              cfg,
  output logic                    busy,
  output logic                    done,
  // input feature buffer (read data one cycle after the request)
  output fb_rd_t                  fb_rd,
  input  feat_t [LANES-1:0]       fb_rdata,
  // CONV weight buffer (read data one cycle after the address)
  output logic [WB_AW-1:0]        wb_raddr,
  input  wgt_t  [NM-1:0]          wb_rdata,
  // shared multipliers
  output logic                    mul_valid,
  output feat_t [NM-1:0]          mul_feat,
  output wgt_t  [NM-1:0]          mul_wgt,
  input  logic                    prod_valid,
  input  prod_t [NM-1:0]          prod,
  // output feature buffer
  output fb_wr_t                  fb_wr
);

  localparam int unsigned NCH = NOUT / LANES;   // write chunks per pixel

  logic              issue, c_first, c_last, c_done, c_busy;
  logic [NIF-1:0]    lane_mask;
  logic [NOUT-1:0]   out_en;
  logic [BANK_W-1:0] bank_base;
  logic [FB_AW-1:0]  out_addr, out_step;

  conv_ctrl #(.NIF(NIF), .NOUT(NOUT)) u_ctrl (
    .clk, .rst_n, .start, .cfg,
    .busy(c_busy), .done(c_done), .issue,
    .rd(fb_rd), .lane_mask, .bank_base, .wb_addr(wb_raddr),
    .first(c_first), .last(c_last), .out_addr, .out_step, .out_en
  );

  // sideband pipeline: stage 1 (data), 2 (products), 3 (sums), 4 (write)
  typedef struct packed {
    logic             valid;
    logic             first;
    logic             last;
    logic [NIF-1:0]    mask;
    logic [BANK_W-1:0] bank;
    logic [NOUT-1:0]   oen;
    logic [FB_AW-1:0]  oaddr;
    logic [FB_AW-1:0]  ostep;
  } side_t;

  side_t s1, s2, s3, s4;
  logic [NCH+2:1] done_d;
  logic [4:0]  shift_q;
  logic        relu_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      done_d  <= '0;
      shift_q <= '0;
      relu_q  <= 1'b0;
    end else begin
      s1 <= '{valid: issue, first: c_first, last: c_last, mask: lane_mask,
              bank: bank_base, oen: out_en, oaddr: out_addr, ostep: out_step};
      s2 <= s1;
      s3 <= s2;
      done_d <= {done_d[NCH+1:1], c_done};
      if (start && !c_busy) begin
        shift_q <= cfg.shift;
        relu_q  <= cfg.relu;
      end
    end
  end

  logic [7:0] h_cnt;   // next chunk to write from the hold register, 0 = none

  assign busy = c_busy || s1.valid || s2.valid || s3.valid || s4.valid || (h_cnt != '0);
  assign done = done_d[NCH+2];

  // multiplier operands: feature j broadcast to the NOUT output maps
  always_comb begin
    mul_valid = s1.valid;
    for (int p = 0; p < int'(NOUT); p++)
      for (int j = 0; j < int'(NIF); j++) begin
        mul_feat[p*NIF + j] = s1.mask[j] ? fb_rdata[int'(s1.bank) + j] : '0;
        mul_wgt [p*NIF + j] = wb_rdata[p*NIF + j];
      end
  end

  // adder trees and window accumulators, one per output map of the group
  logic [NOUT-1:0]  t_valid, t_first, t_last, a_valid;
  acc_t [NOUT-1:0]  t_sum;
  feat_t [NOUT-1:0] a_data;

  for (genvar p = 0; p < int'(NOUT); p++) begin : g_out
    adder_tree #(.N(NIF)) u_tree (
      .clk, .rst_n,
      .in_valid(prod_valid && s2.valid), .in_first(s2.first), .in_last(s2.last),
      .in_data(prod[p*NIF +: NIF]),
      .out_valid(t_valid[p]), .out_first(t_first[p]), .out_last(t_last[p]),
      .sum(t_sum[p])
    );
    accum_relu u_acc (
      .clk, .rst_n,
      .in_valid(t_valid[p]), .in_first(t_first[p]), .in_last(t_last[p]),
      .in_sum(t_sum[p]), .shift(shift_q), .relu(relu_q),
      .out_valid(a_valid[p]), .out_data(a_data[p])
    );
  end

  // output write: s3 carries the address of the window that closes in stage 3
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s4 <= '0;
    else        s4 <= s3;
  end

  // chunk 0 is written straight from the accumulators; chunks 1 .. NCH-1 follow
  // from a hold register on the next cycles
  wire w0 = a_valid[0] && s4.valid && s4.last;
  feat_t [NOUT-1:0] h_data;
  logic  [NOUT-1:0] h_en;
  logic [FB_AW-1:0] h_addr, h_step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_cnt  <= '0;
      h_data <= '0;
      h_en   <= '0;
      h_addr <= '0;
      h_step <= '0;
    end else if (w0 && NCH > 1) begin
      h_cnt  <= 8'd1;
      h_data <= a_data;
      h_en   <= s4.oen;
      h_addr <= s4.oaddr;
      h_step <= s4.ostep;
    end else if (h_cnt != '0) begin
      h_cnt <= (32'(h_cnt) == NCH - 1) ? '0 : h_cnt + 8'd1;
    end
  end

  always_comb begin
    if (w0) begin
      fb_wr.en   = s4.oen[LANES-1:0];
      fb_wr.addr = s4.oaddr;
      for (int b = 0; b < int'(LANES); b++)
        fb_wr.data[b] = a_data[b];
    end else begin
      fb_wr.en   = (h_cnt != '0) ? h_en[int'(h_cnt)*LANES +: LANES] : '0;
      fb_wr.addr = h_addr + FB_AW'(32'(h_cnt) * 32'(h_step));
      for (int b = 0; b < int'(LANES); b++)
        fb_wr.data[b] = h_data[int'(h_cnt)*LANES + b];
    end
  end

  // a window must not close while the previous pixel's chunks are still queued
  assert property (@(posedge clk) disable iff (!rst_n) !(w0 && h_cnt != '0))
    else $error("conv_unit: accumulation window shorter than NOUT/LANES taps");

endmodule
