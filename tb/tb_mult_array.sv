// tb_mult_array: drives random feature/weight vectors into the shared multiplier
// array and checks every product, and the valid bit, one clock later.
module tb_mult_array;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, out_valid;
  feat_t [NM-1:0] feat;
  wgt_t  [NM-1:0] wgt;
  prod_t [NM-1:0] prod;
  int checks = 0, failures = 0;

  mult_array dut (.clk, .rst_n, .in_valid, .feat, .wgt, .out_valid, .prod);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; feat = '0; wgt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int ef [NM];
      int ew [NM];
      bit v;
      @(negedge clk);
      v = t % 3 != 0;
      in_valid = v;
      for (int i = 0; i < int'(NM); i++) begin
        // include the extremes of both ranges
        ef[i] = (t == 0) ? -512 : (t == 1) ? 511 : $signed($urandom_range(1023)) - 512;
        ew[i] = (t == 0) ? -128 : (t == 1) ? -128 : $signed($urandom_range(255)) - 128;
        feat[i] = feat_t'(ef[i]);
        wgt[i]  = wgt_t'(ew[i]);
      end
      @(negedge clk);
      checks++;
      if (out_valid !== v) begin failures++; $display("valid mismatch at %0d", t); end
      for (int i = 0; i < int'(NM); i++) begin
        checks++;
        if (int'(prod[i]) != ef[i] * ew[i]) begin
          failures++;
          if (failures < 10) $display("lane %0d: %0d * %0d gave %0d", i, ef[i], ew[i], int'(prod[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
