// feature_router: connects the two ping-pong feature buffers, the four layer
// engines, the host port and the shared multipliers.
//
// For the layer in progress (`kind`), the router passes that engine's read
// requests to the input buffer (`in_sel`: 0 = buffer A, 1 = buffer B) and its
// write requests to the other buffer, so each layer writes where the next one
// reads. The input buffer's read data goes to all engines; only the active one
// uses it. It also gives the shared multipliers to the CONV or the FC engine.
// While `host_en` is set no engine runs and the host port owns the buffer given
// by `host_sel`, for loading the image and reading results. Purely
// combinational. Selecting the data of two adjacent modules and assigning buffer
// outputs to POOL or the shared multipliers follow the source design; the host
// port is this design's choice.
module feature_router
  import cnn_pkg::*;
(
  input  layer_kind_e        kind,
  input  logic               in_sel,
  input  logic               host_en,
  input  logic               host_sel,
  // engine requests
  input  fb_rd_t             conv_rd,
  input  fb_wr_t             conv_wr,
  input  fb_rd_t             pool_rd,
  input  fb_wr_t             pool_wr,
  input  fb_rd_t             norm_rd,
  input  fb_wr_t             norm_wr,
  input  fb_rd_t             fc_rd,
  input  fb_wr_t             fc_wr,
  input  fb_rd_t             host_rd,
  input  fb_wr_t             host_wr,
  output feat_t [LANES-1:0]  eng_rdata,
  output feat_t [LANES-1:0]  host_rdata,
  // buffers
  output fb_rd_t             a_rd,
  output fb_wr_t             a_wr,
  input  feat_t [LANES-1:0]  a_rdata,
  output fb_rd_t             b_rd,
  output fb_wr_t             b_wr,
  input  feat_t [LANES-1:0]  b_rdata,
  // shared multipliers
  input  logic               conv_mvalid,
  input  feat_t [NM-1:0]     conv_mfeat,
  input  wgt_t  [NM-1:0]     conv_mwgt,
  input  logic               fc_mvalid,
  input  feat_t [NM-1:0]     fc_mfeat,
  input  wgt_t  [NM-1:0]     fc_mwgt,
  output logic               m_valid,
  output feat_t [NM-1:0]     m_feat,
  output wgt_t  [NM-1:0]     m_wgt
);

  fb_rd_t eng_rd;
  fb_wr_t eng_wr;

  always_comb begin
    unique case (kind)
      L_CONV:  begin eng_rd = conv_rd; eng_wr = conv_wr; end
      L_POOL:  begin eng_rd = pool_rd; eng_wr = pool_wr; end
      L_NORM:  begin eng_rd = norm_rd; eng_wr = norm_wr; end
      L_FC:    begin eng_rd = fc_rd;   eng_wr = fc_wr;   end
      default: begin eng_rd = '0;      eng_wr = '0;      end
    endcase

    if (host_en) begin
      a_rd = host_sel ? '0 : host_rd;
      a_wr = host_sel ? '0 : host_wr;
      b_rd = host_sel ? host_rd : '0;
      b_wr = host_sel ? host_wr : '0;
    end else begin
      a_rd = in_sel ? '0 : eng_rd;
      b_rd = in_sel ? eng_rd : '0;
      a_wr = in_sel ? eng_wr : '0;
      b_wr = in_sel ? '0 : eng_wr;
    end

    eng_rdata  = in_sel ? b_rdata : a_rdata;
    host_rdata = host_sel ? b_rdata : a_rdata;

    if (kind == L_FC) begin
      m_valid = fc_mvalid; m_feat = fc_mfeat; m_wgt = fc_mwgt;
    end else begin
      m_valid = conv_mvalid; m_feat = conv_mfeat; m_wgt = conv_mwgt;
    end
  end

endmodule
