// tb_layer_controller: programs a five-layer table (CONV, NORM, POOL, FC, END)
// and plays the engines and the weight stream here. Checks the order of engine
// starts, that each engine starts only after the previous one is done, that a
// CONV layer starts only once exactly its weight words have been accepted, that
// the FC weight route is open only during the FC layer, the ping-pong select of
// every layer, the final done pulse and out_sel. The table is run twice, the
// second time with the CONV layer marked for the narrow CONV engine, whose weight
// word count differs.
module tb_layer_controller;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we, start, busy, done, out_sel, in_sel;
  logic [$clog2(MAX_LAYERS)-1:0] cfg_addr;
  layer_cfg_t cfg_data, cfg;
  layer_kind_e kind;
  logic [31:0] cycles;
  logic conv_start, pool_start, norm_start, fc_start;
  logic conv_done, pool_done, norm_done, fc_done;
  logic wbuf_accept, fifo_accept, wbuf_load;
  logic [WB_AW:0] wbuf_count;
  int checks = 0, failures = 0;

  layer_controller dut (.*);

  layer_cfg_t layers [5];
  int starts [$];
  int wwords_seen = 0, fifo_cycles = 0;
  bit dn = 0;

  // weight buffer counter model
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbuf_count <= '0;
    else if (wbuf_load) wbuf_count <= '0;
    else if (wbuf_accept) begin wbuf_count <= wbuf_count + 1'b1; wwords_seen++; end
    if (fifo_accept) fifo_cycles++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("%s wrong", what); end
  endtask

  // engine models: done some cycles after start
  initial begin
    conv_done = 0; pool_done = 0; norm_done = 0; fc_done = 0;
    forever begin
      @(posedge clk);
      #1;
      if (conv_start || pool_start || norm_start || fc_start) begin
        automatic int k = conv_start ? 0 : pool_start ? 1 : norm_start ? 2 : 3;
        automatic int expin = starts.size() % 2;
        starts.push_back(k);
        chk(int'(kind) == int'(layers[starts.size() - 1].kind), "kind at start");
        chk(in_sel == 1'(expin), "ping-pong select");
        if (k == 0) chk(int'(wbuf_count) == wwords(layers[0]), "weights loaded before CONV");
        if (k == 3) chk(fifo_accept, "fifo route during FC");
        repeat (5 + 3 * k) @(posedge clk);
        chk(busy, "busy while engine runs");
        #1;
        case (k) 0: conv_done = 1; 1: pool_done = 1; 2: norm_done = 1; default: fc_done = 1; endcase
        @(posedge clk);
        #1;
        {conv_done, pool_done, norm_done, fc_done} = '0;
      end
    end
  end

  always @(posedge clk) if (rst_n && done) dn <= 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_table();
    wwords_seen = 0; fifo_cycles = 0; dn = 0;
    starts.delete();
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 5'(i); cfg_data = layers[i];
    end
    @(negedge clk);
    cfg_we = 0;
    chk(!busy, "idle before start");
    start = 1;
    @(negedge clk);
    start = 0;
    wait (dn);
    @(negedge clk);
    chk(starts.size() == 4, "number of layers run");
    for (int i = 0; i < starts.size() && i < 4; i++) chk(starts[i] == (i == 0 ? 0 : i == 1 ? 2 : i == 2 ? 1 : 3), "start order");
    chk(wwords_seen == wwords(layers[0]), "weight words accepted");
    chk(fifo_cycles > 0, "fifo route opened");
    chk(out_sel == 1'b0, "out_sel after four layers");
    chk(!busy, "idle after done");
    chk(cycles > 0, "cycle counter");
  endtask

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_data = '0; start = 0;
    layers[0] = mk(L_CONV, 3, 1, 1, 8, 8, 8, 8, 10, 12, 4, 1, 0);
    layers[1] = mk(L_NORM, 5, 1, 0, 8, 8, 8, 8, 12, 12, 8, 0, 0);
    layers[2] = mk(L_POOL, 2, 2, 0, 8, 8, 4, 4, 12, 12, 0, 0, 0);
    layers[3] = mk(L_FC,   1, 1, 0, 4, 4, 1, 1, 12, 10, 4, 0, 0);
    layers[4] = '0; layers[4].kind = L_END;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_table();
    // same table with the CONV layer on the narrow engine (fewer weight words)
    layers[0].conv_small = 1'b1;
    chk(wwords(layers[0]) == 27, "narrow weight word count");
    run_table();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
