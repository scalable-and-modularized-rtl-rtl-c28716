// tb_accum_relu: sends windows of random length (with idle cycles between the
// inputs) into the accumulator and checks the pixel it emits at each window end:
// shift, ReLU and saturation, computed by the reference model.
module tb_accum_relu;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, relu, out_valid;
  acc_t in_sum;
  logic [4:0] shift;
  feat_t out_data;
  int checks = 0, failures = 0, outs = 0;

  accum_relu dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_sum, .shift, .relu,
                  .out_valid, .out_data);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_sum = '0; relu = 0; shift = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      automatic int len = $urandom_range(1, 12);
      automatic longint acc = 0;
      int expv;
      @(negedge clk);
      shift = 5'($urandom_range(0, 10));
      relu  = w % 2;
      for (int i = 0; i < len; i++) begin
        automatic int v = $signed($urandom_range(400000)) - 200000;
        // idle cycle with garbage flags, must be ignored
        if ($urandom_range(3) == 0) begin
          in_valid = 0; in_first = 1; in_last = 1; in_sum = acc_t'(12345);
          @(negedge clk);
          checks++;
          if (out_valid) failures++;
        end
        in_valid = 1; in_first = (i == 0); in_last = (i == len - 1); in_sum = acc_t'(v);
        acc += v;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (i == len - 1) begin
          expv = requant(acc, int'(shift), relu);
          if (!out_valid || int'(out_data) != expv) begin
            failures++;
            if (failures < 10) $display("window %0d: got %0d (v=%0b) expected %0d", w, out_data, out_valid, expv);
          end
          outs++;
        end else if (out_valid) failures++;
      end
    end
    checks++;
    if (outs != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
