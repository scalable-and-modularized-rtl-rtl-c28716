// tb_feature_buffer: writes random words to random banks and addresses of one
// feature buffer (with per-bank enables), keeps a copy here, and reads them back
// with random bank masks, checking one-clock read latency, that disabled banks
// hold their previous read data, and that a read and a write in the same cycle
// to the same word return the old data.
module tb_feature_buffer;
  import cnn_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  fb_rd_t rd;
  fb_wr_t wr;
  feat_t [LANES-1:0] rdata;
  int checks = 0, failures = 0;
  int model [LANES][FB_DEPTH];
  bit known [LANES][FB_DEPTH];

  feature_buffer dut (.clk, .rd, .rdata, .wr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_q [LANES];
    bit exp_k [LANES];
    rd = '0; wr = '0;
    for (int b = 0; b < int'(LANES); b++) exp_k[b] = 0;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      // random write
      wr.en = LANES'($urandom);
      wr.addr = FB_AW'($urandom_range(0, 63));
      for (int b = 0; b < int'(LANES); b++) wr.data[b] = FEAT_W'($urandom);
      // random read, sometimes to the word being written
      rd.en = LANES'($urandom);
      rd.addr = (t % 5 == 0) ? wr.addr : FB_AW'($urandom_range(0, 63));
      for (int b = 0; b < int'(LANES); b++)
        if (rd.en[b]) begin
          exp_q[b] = model[b][rd.addr];
          exp_k[b] = known[b][rd.addr];
        end
      @(negedge clk);
      for (int b = 0; b < int'(LANES); b++) begin
        if (wr.en[b]) begin
          model[b][wr.addr] = int'($signed(wr.data[b]));
          known[b][wr.addr] = 1;
        end
        if (exp_k[b]) begin
          checks++;
          if (int'(rdata[b]) != exp_q[b]) begin
            failures++;
            if (failures < 10) $display("t=%0d bank %0d: got %0d expected %0d", t, b, rdata[b], exp_q[b]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
