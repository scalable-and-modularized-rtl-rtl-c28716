// mult_array: the bank of NM signed multipliers shared by the CONV and FC engines.
//
// Each lane multiplies one feature by one weight; all products are registered,
// so results appear one clock after the operands (latency 1, one new set of
// operands per cycle). A valid bit travels with the data. The engine that owns
// the multipliers in a layer is selected by the feature router, outside this
// module. Sharing the multipliers between CONV and FC follows the source design;
// the single register stage is this design's choice.
module mult_array
  import cnn_pkg::*;
#(
  parameter int unsigned N = NM
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  feat_t [N-1:0]      feat,
  input  wgt_t  [N-1:0]      wgt,
  output logic               out_valid,
  output prod_t [N-1:0]      prod
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prod      <= '0;
    end else begin
      out_valid <= in_valid;
      for (int i = 0; i < int'(N); i++)
        prod[i] <= prod_t'(feat[i]) * prod_t'(wgt[i]);
    end
  end

endmodule
