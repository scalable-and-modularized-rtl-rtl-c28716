// cnn_top: the complete CNN accelerator.
//
// A network is run layer after layer on four kinds of engine: CONV (convolution +
// ReLU; two of them, with adder-tree fan-in LANES and SMALL_NIF), POOL (max / average), NORM (local response normalisation) and FC
// (fully connected + ReLU). CONV and FC share one array of NM = LANES*LANES
// multipliers; each has its own adder trees. All feature maps stay on chip in two
// banked feature buffers used in ping-pong fashion; the feature router gives the
// active engine the read side of one and the write side of the other. Weights
// arrive on one stream (w_valid/w_ready/w_data, NM weights per word) from an
// external memory transfer engine: CONV weights go into the weight buffer before
// their layer runs, FC weights flow through a FIFO while their layer runs.
//
// Use: while idle, write the layer table (cfg_*), the LRN scale table (lut_*)
// and the input image into buffer A through the host port (host_en = 1,
// host_sel = 0; map m in bank m % LANES, word (m/LANES)*X*Y + y*X + x). Pulse
// `start` and supply the weight stream in layer order. `done` pulses at the end;
// the result is in the buffer named by out_sel, read through the host port
// (read data one clock after the request). `cycles` is the run time in clocks
// and fc_stall is high in cycles where the FC engine waits for weights.
// The partitioning into these modules follows the source design; the port
// protocol is this design's choice.
module cnn_top
  import cnn_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // layer table and LRN scale table
  input  logic                          cfg_we,
  input  logic [$clog2(MAX_LAYERS)-1:0] cfg_addr,
  input  layer_cfg_t                    cfg_data,
  input  logic                          lut_we,
  input  logic [LUT_AW-1:0]             lut_addr,
  input  logic [SCALE_W-1:0]            lut_data,
  // run control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          out_sel,
  output logic [31:0]                   cycles,
  output logic                          fc_stall,
  // host access to the feature buffers (only while idle)
  input  logic                          host_en,
  input  logic                          host_sel,
  input  fb_rd_t                        host_rd,
  input  fb_wr_t                        host_wr,
  output feat_t [LANES-1:0]             host_rdata,
  // weight stream from external memory
  input  logic                          w_valid,
  output logic                          w_ready,
  input  wgt_t [NM-1:0]                 w_data
);

  layer_cfg_t  cfg;
  layer_kind_e kind;
  logic        in_sel;
  logic        conv_start, pool_start, norm_start, fc_start;
  logic        conv_done, pool_done, norm_done, fc_done;
  logic        conv_busy, pool_busy, norm_busy, fc_busy;
  logic        wbuf_accept, fifo_accept, wbuf_load;
  logic [WB_AW:0] wbuf_count;

  layer_controller u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .start,
    .busy, .done, .out_sel, .cycles,
    .cfg, .kind, .in_sel,
    .conv_start, .pool_start, .norm_start, .fc_start,
    .conv_done, .pool_done, .norm_done, .fc_done,
    .wbuf_accept, .fifo_accept, .wbuf_load, .wbuf_count
  );

  // ---------------- weight path ----------------
  logic             fifo_in_ready, fifo_valid, fifo_pop;
  wgt_t [NM-1:0]    fifo_data;
  logic [WB_AW-1:0] wb_raddr;
  wgt_t [NM-1:0]    wb_rdata;

  assign w_ready = wbuf_accept || (fifo_accept && fifo_in_ready);

  weight_buffer u_wbuf (
    .clk, .rst_n, .load(wbuf_load), .in_valid(w_valid && wbuf_accept),
    .in_data(w_data), .count(wbuf_count), .rd_addr(wb_raddr), .rd_data(wb_rdata)
  );

  fc_weight_fifo u_fifo (
    .clk, .rst_n, .flush(1'b0),
    .in_valid(w_valid && fifo_accept), .in_ready(fifo_in_ready), .in_data(w_data),
    .out_valid(fifo_valid), .out_data(fifo_data), .pop(fifo_pop)
  );

  // ---------------- feature buffers and router ----------------
  fb_rd_t a_rd, b_rd, conv_rd, pool_rd, norm_rd, fc_rd;
  fb_wr_t a_wr, b_wr, conv_wr, pool_wr, norm_wr, fc_wr;
  feat_t [LANES-1:0] a_rdata, b_rdata, eng_rdata;

  feature_buffer u_fbuf_a (.clk, .rd(a_rd), .rdata(a_rdata), .wr(a_wr));
  feature_buffer u_fbuf_b (.clk, .rd(b_rd), .rdata(b_rdata), .wr(b_wr));

  logic           conv_mvalid, fc_mvalid, m_valid, p_valid;
  feat_t [NM-1:0] conv_mfeat, fc_mfeat, m_feat;
  wgt_t  [NM-1:0] conv_mwgt, fc_mwgt, m_wgt;
  prod_t [NM-1:0] prod;

  feature_router u_router (
    .kind, .in_sel, .host_en(host_en && !busy), .host_sel,
    .conv_rd, .conv_wr, .pool_rd, .pool_wr, .norm_rd, .norm_wr, .fc_rd, .fc_wr,
    .host_rd, .host_wr, .eng_rdata, .host_rdata,
    .a_rd, .a_wr, .a_rdata, .b_rd, .b_wr, .b_rdata,
    .conv_mvalid, .conv_mfeat, .conv_mwgt, .fc_mvalid, .fc_mfeat, .fc_mwgt,
    .m_valid, .m_feat, .m_wgt
  );

  mult_array u_mult (
    .clk, .rst_n, .in_valid(m_valid), .feat(m_feat), .wgt(m_wgt),
    .out_valid(p_valid), .prod
  );

  // ---------------- engines ----------------
  // Two CONV engines share the multipliers and the weight buffer: u_conv with
  // adder-tree fan-in LANES for most layers and u_conv_s with fan-in SMALL_NIF
  // for layers with few input maps. The layer's conv_small bit picks one; the
  // other stays idle, and its requests are dropped here before the router.
  logic           convm_start, convs_start, convm_done, convs_done, convm_busy, convs_busy;
  fb_rd_t         convm_rd, convs_rd;
  fb_wr_t         convm_wr, convs_wr;
  logic [WB_AW-1:0] convm_waddr, convs_waddr;
  logic           convm_mvalid, convs_mvalid;
  feat_t [NM-1:0] convm_mfeat, convs_mfeat;
  wgt_t  [NM-1:0] convm_mwgt, convs_mwgt;

  assign convm_start = conv_start && !cfg.conv_small;
  assign convs_start = conv_start &&  cfg.conv_small;
  assign conv_done   = convm_done || convs_done;
  assign conv_busy   = convm_busy || convs_busy;

  always_comb begin
    if (convs_busy) begin
      conv_rd = convs_rd; conv_wr = convs_wr; wb_raddr = convs_waddr;
      conv_mvalid = convs_mvalid; conv_mfeat = convs_mfeat; conv_mwgt = convs_mwgt;
    end else begin
      conv_rd = convm_rd; conv_wr = convm_wr; wb_raddr = convm_waddr;
      conv_mvalid = convm_mvalid; conv_mfeat = convm_mfeat; conv_mwgt = convm_mwgt;
    end
  end

  conv_unit u_conv (
    .clk, .rst_n, .start(convm_start), .cfg, .busy(convm_busy), .done(convm_done),
    .fb_rd(convm_rd), .fb_rdata(eng_rdata), .wb_raddr(convm_waddr), .wb_rdata,
    .mul_valid(convm_mvalid), .mul_feat(convm_mfeat), .mul_wgt(convm_mwgt),
    .prod_valid(p_valid), .prod, .fb_wr(convm_wr)
  );

  conv_unit #(.NIF(SMALL_NIF)) u_conv_s (
    .clk, .rst_n, .start(convs_start), .cfg, .busy(convs_busy), .done(convs_done),
    .fb_rd(convs_rd), .fb_rdata(eng_rdata), .wb_raddr(convs_waddr), .wb_rdata,
    .mul_valid(convs_mvalid), .mul_feat(convs_mfeat), .mul_wgt(convs_mwgt),
    .prod_valid(p_valid), .prod, .fb_wr(convs_wr)
  );

  pool_unit u_pool (
    .clk, .rst_n, .start(pool_start), .cfg, .busy(pool_busy), .done(pool_done),
    .fb_rd(pool_rd), .fb_rdata(eng_rdata), .fb_wr(pool_wr)
  );

  norm_unit u_norm (
    .clk, .rst_n, .start(norm_start), .cfg, .busy(norm_busy), .done(norm_done),
    .lut_we, .lut_addr, .lut_data,
    .fb_rd(norm_rd), .fb_rdata(eng_rdata), .fb_wr(norm_wr)
  );

  fc_unit u_fc (
    .clk, .rst_n, .start(fc_start), .cfg, .busy(fc_busy), .done(fc_done),
    .stall(fc_stall), .fb_rd(fc_rd), .fb_rdata(eng_rdata),
    .w_valid(fifo_valid), .w_data(fifo_data), .w_pop(fifo_pop),
    .mul_valid(fc_mvalid), .mul_feat(fc_mfeat), .mul_wgt(fc_mwgt),
    .prod_valid(p_valid), .prod, .fb_wr(fc_wr)
  );

  // only one engine runs at a time
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({convm_busy, convs_busy, pool_busy, norm_busy, fc_busy}))
    else $error("cnn_top: two engines busy at once");

endmodule
