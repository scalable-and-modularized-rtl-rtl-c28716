// tb_weight_buffer: loads two layers' worth of weight words through the
// sequential write port (with gaps in the stream and a `load` restart between
// them), checks the word counter, and reads every word back with one clock of
// latency.
module tb_weight_buffer;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load, in_valid;
  wgt_t [NM-1:0] in_data, rd_data;
  logic [WB_AW:0] count;
  logic [WB_AW-1:0] rd_addr;
  int checks = 0, failures = 0;

  weight_buffer dut (.clk, .rst_n, .load, .in_valid, .in_data, .count, .rd_addr, .rd_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wgt_t [NM-1:0] pattern(input int layer, input int a);
    wgt_t [NM-1:0] v;
    for (int l = 0; l < int'(NM); l++) v[l] = wgt_t'(layer * 37 + a * 13 + l * 5);
    return v;
  endfunction

  initial begin
    load = 0; in_valid = 0; in_data = '0; rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int layer = 0; layer < 2; layer++) begin
      automatic int n = (layer == 0) ? 100 : 37;
      automatic int a = 0;
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (count != 0) failures++;
      while (a < n) begin
        in_valid = ($urandom_range(2) != 0);
        in_data = pattern(layer, a);
        if (in_valid) a++;
        @(negedge clk);
      end
      in_valid = 0;
      checks++;
      if (int'(count) != n) begin failures++; $display("count %0d expected %0d", count, n); end
      for (int r = 0; r < n; r++) begin
        rd_addr = WB_AW'(r);
        @(negedge clk);
        checks++;
        if (rd_data != pattern(layer, r)) begin
          failures++;
          if (failures < 10) $display("layer %0d word %0d wrong", layer, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
