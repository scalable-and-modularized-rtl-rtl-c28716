// feature_buffer: one on-chip feature memory of LANES separate banks.
//
// Feature maps are kept in separate RAMs so that LANES maps can be read (or
// written) in the same cycle: map m lives in bank m % LANES. Each bank is a
// simple dual-port RAM of DEPTH words with one write port and one registered
// read port; all banks share the address of a request and each has its own
// enable. Read data appears one clock after the request; a bank that is not
// enabled keeps its last read data. Banks are not initialised.
// The accelerator has two of these, used in ping-pong fashion: a layer reads
// one and writes the other. Separate per-map RAMs follow the source design; the
// bank count, depth and ping-pong use are this design's choices.
module feature_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = FB_DEPTH
) (
  input  logic              clk,
  input  fb_rd_t            rd,
  output feat_t [LANES-1:0] rdata,
  input  fb_wr_t            wr
);

  for (genvar b = 0; b < int'(LANES); b++) begin : g_bank
    feat_t mem [DEPTH];

    always_ff @(posedge clk) begin
      if (wr.en[b]) mem[wr.addr] <= feat_t'(wr.data[b]);
      if (rd.en[b]) rdata[b] <= mem[rd.addr];
    end
  end

endmodule
