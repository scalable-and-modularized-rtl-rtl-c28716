// weight_buffer: on-chip store of the weights of one CONV layer.
//
// CONV weights are transferred from external memory before the layer starts;
// the layer then reads one word of NM weights (one per shared multiplier) per
// cycle. Writes come from the weight stream in order: `load` restarts the write
// pointer at word 0 and every accepted word (in_valid) goes to the next word.
// `count` is the number of words written since the last `load`. Reads are
// synchronous: data one clock after rd_addr. DEPTH words of NM x WGT_W bits.
// Loading before computation follows the source design; the sequential write
// pointer and the depth are this design's choices.
module weight_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = WB_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic                      in_valid,
  input  wgt_t [NM-1:0]             in_data,
  output logic [$clog2(DEPTH):0]    count,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output wgt_t [NM-1:0]             rd_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [NM*WGT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (load)       count <= '0;
    else if (in_valid)   count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (in_valid && !load) mem[AW'(count)] <= in_data;
    rd_data <= mem[rd_addr];
  end

endmodule
