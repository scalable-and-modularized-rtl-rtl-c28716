// tb_fc_weight_fifo: pushes and pops at random rates, mirrors the contents in a
// queue, and checks order, out_valid, in_ready (full after DEPTH words) and flush.
module tb_fc_weight_fifo;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, in_valid, in_ready, out_valid, pop;
  wgt_t [NM-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  int unsigned q [$];
  int unsigned seq = 0;
  bit saw_full = 0;

  fc_weight_fifo dut (.clk, .rst_n, .flush, .in_valid, .in_ready, .in_data, .out_valid,
                      .out_data, .pop);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; in_valid = 0; pop = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks += 2;
      if (out_valid != (q.size() > 0)) failures++;
      if (in_ready != (q.size() < 16)) failures++;
      if (!in_ready) saw_full = 1;
      if (out_valid) begin
        checks++;
        if (out_data[0] != wgt_t'(q[0]) || out_data[NM-1] != wgt_t'(q[0] >> 8)) begin
          failures++;
          if (failures < 10) $display("t=%0d head wrong", t);
        end
      end
      // phases: fill, drain, mixed
      in_valid = (t < 1000) ? ($urandom_range(3) != 0) : (t < 2000) ? ($urandom_range(3) == 0)
                                                        : $urandom_range(1);
      pop = out_valid && ((t < 1000) ? ($urandom_range(3) == 0) : (t < 2000) ? ($urandom_range(3) != 0)
                                                                  : $urandom_range(1));
      in_data = '0;
      in_data[0] = wgt_t'(seq);
      in_data[NM-1] = wgt_t'(seq >> 8);
      flush = (t == 3500);
      @(posedge clk);
      if (flush) q.delete();
      else begin
        if (pop) void'(q.pop_front());
        if (in_valid && in_ready) begin q.push_back(seq); seq++; end
      end
    end
    checks++;
    if (!saw_full) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
