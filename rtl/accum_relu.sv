// accum_relu: accumulates adder-tree sums over one kernel window and produces
// the output pixel: right shift, optional ReLU, saturation to a feature.
//
// A window is the stream of valid inputs from one marked "first" to one marked
// "last" (K*K positions times the number of input-map groups). On "first" the
// accumulator restarts from the input; on "last" the total is shifted right
// arithmetically by `shift` (the per-layer fixed-point scaling), clamped at zero
// when `relu` is set (ReLU = max(pixel, 0)) and saturated to FEAT_W bits. The
// result is registered and out_valid pulses for one cycle, one clock after the
// "last" input. Accumulating inside the window and ReLU follow the source design;
// the shift-and-saturate requantisation is this design's choice.
module accum_relu
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic       in_last,
  input  acc_t       in_sum,
  input  logic [4:0] shift,
  input  logic       relu,
  output logic       out_valid,
  output feat_t      out_data
);

  acc_t acc;
  acc_t total;
  acc_t scaled;

  always_comb begin
    total  = in_first ? in_sum : acc + in_sum;
    scaled = total >>> shift;
    if (relu && scaled < 0) scaled = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= total;
        if (in_last) out_data <= sat_feat(scaled);
      end
    end
  end

endmodule
