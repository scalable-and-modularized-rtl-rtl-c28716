// fc_weight_fifo: streaming buffer for FC weights.
//
// FC weights are used once each, so they are not stored for the whole layer:
// they stream in from external memory while the FC engine computes, and this
// FIFO absorbs the difference in rate between transfer and use. Input side is a
// valid/ready handshake (a word moves when in_valid && in_ready); output side is
// show-ahead: out_valid/out_data show the oldest word, `pop` removes it. Depth
// DEPTH words of NM weights; full and empty are tracked with an occupancy
// counter. A word written into an empty FIFO is visible in the next cycle.
// `flush` empties it. Overlapping FC weight transfer with computation follows the
// source design; the FIFO and its depth are this design's choices.
module fc_weight_fifo
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          in_valid,
  output logic          in_ready,
  input  wgt_t [NM-1:0] in_data,
  output logic          out_valid,
  output wgt_t [NM-1:0] out_data,
  input  logic          pop
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [NM*WGT_W-1:0] mem [DEPTH];
  logic [AW-1:0]       wp, rp;
  logic [AW:0]         cnt;

  wire push = in_valid && in_ready;
  wire take = pop && out_valid;

  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else if (flush) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (take) rp <= rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(take);
    end
  end

  // a pop is only legal while a word is shown
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid)
    else $error("fc_weight_fifo: pop while empty");

endmodule
