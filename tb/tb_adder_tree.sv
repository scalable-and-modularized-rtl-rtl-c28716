// tb_adder_tree: feeds random products (extremes included) into one adder tree
// and checks the registered sum and the sideband bits one clock later.
module tb_adder_tree;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, out_valid, out_first, out_last;
  prod_t [LANES-1:0] in_data;
  acc_t sum;
  int checks = 0, failures = 0;

  adder_tree dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_data,
                  .out_valid, .out_first, .out_last, .sum);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic longint exp_sum = 0;
      logic [2:0] sb;
      @(negedge clk);
      sb = 3'($urandom);
      {in_valid, in_first, in_last} = sb;
      for (int i = 0; i < int'(LANES); i++) begin
        int v;
        v = (t == 0) ? -(1 << (PROD_W - 1)) : (t == 1) ? (1 << (PROD_W - 1)) - 1
          : $signed($urandom_range((1 << PROD_W) - 1)) - (1 << (PROD_W - 1));
        in_data[i] = prod_t'(v);
        exp_sum += v;
      end
      @(negedge clk);
      checks += 2;
      if (longint'(sum) != exp_sum) begin
        failures++;
        if (failures < 10) $display("t=%0d sum %0d expected %0d", t, sum, exp_sum);
      end
      if ({out_valid, out_first, out_last} != sb) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
