// adder_tree: sums N signed products with a balanced binary tree of adders.
//
// The fan-in N equals the number of input maps processed in parallel ("Nif" of
// the hardware); one tree serves one output map. Inputs are padded with zeros to
// the next power of two and reduced pairwise, level by level. The sum is
// registered: latency 1, one new set of inputs per cycle. The sideband bits
// (valid, first, last) travel with the sum so the accumulator behind the tree
// knows where a kernel window begins and ends. The structure (fan-in Nif, one tree
// per parallel output map) follows the source design; the register is this
// design's choice.
module adder_tree
  import cnn_pkg::*;
#(
  parameter int unsigned N = LANES
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_first,
  input  logic           in_last,
  input  prod_t [N-1:0]  in_data,
  output logic           out_valid,
  output logic           out_first,
  output logic           out_last,
  output acc_t           sum
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned P2     = 1 << LEVELS;

  acc_t tree [LEVELS+1][P2];
  acc_t sum_c;

  always_comb begin
    for (int l = 0; l <= int'(LEVELS); l++)
      for (int i = 0; i < int'(P2); i++)
        tree[l][i] = '0;
    for (int i = 0; i < int'(N); i++)
      tree[0][i] = acc_t'(in_data[i]);
    for (int l = 1; l <= int'(LEVELS); l++)
      for (int i = 0; i < int'(P2 >> l); i++)
        tree[l][i] = tree[l-1][2*i] + tree[l-1][2*i+1];
    sum_c = tree[LEVELS][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_first;
      out_last  <= in_last;
      sum       <= sum_c;
    end
  end

endmodule
