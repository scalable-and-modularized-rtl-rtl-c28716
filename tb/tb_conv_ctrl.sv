// tb_conv_ctrl: starts the CONV loop controller on two layer shapes and checks,
// cycle by cycle, every issued read address, lane mask, weight address,
// first/last flag and output address against nested loops written here in the
// loop order og > oy > ox > ig > ky > kx. Also checks the number of issue cycles
// and the done pulse.
module tb_conv_ctrl;
  import cnn_pkg::*;
  import tb_cnn_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, issue, first, last;
  layer_cfg_t cfg;
  fb_rd_t rd;
  logic [LANES-1:0] lane_mask, out_en;
  logic [WB_AW-1:0] wb_addr;
  logic [FB_AW-1:0] out_addr, out_step;
  logic [BANK_W-1:0] bank_base;
  int checks = 0, failures = 0;

  conv_ctrl dut (.clk, .rst_n, .start, .cfg, .busy, .done, .issue, .rd, .lane_mask,
                 .bank_base, .wb_addr, .first, .last, .out_addr, .out_step, .out_en);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input layer_cfg_t c);
    int k = int'(c.k), w = 0;
    @(negedge clk);
    cfg = c; start = 1;
    @(negedge clk);
    start = 0;
    for (int og = 0; og < groups(int'(c.nof)); og++)
      for (int oy = 0; oy < int'(c.yout); oy++)
        for (int ox = 0; ox < int'(c.xout); ox++) begin
          int wpix = og * groups(int'(c.nif)) * k * k;
          for (int ig = 0; ig < groups(int'(c.nif)); ig++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy = oy * int'(c.stride) + ky - int'(c.pad);
                int ix = ox * int'(c.stride) + kx - int'(c.pad);
                bit inb = iy >= 0 && ix >= 0 && iy < int'(c.yin) && ix < int'(c.xin);
                logic [LANES-1:0] m, oe;
                for (int j = 0; j < int'(LANES); j++) begin
                  m[j]  = inb && (ig * LANES + j < int'(c.nif));
                  oe[j] = og * LANES + j < int'(c.nof);
                end
                expect_eq("issue", issue, 1);
                expect_eq("rd.en", rd.en, m);
                if (inb)
                  expect_eq("rd.addr", rd.addr, ig * int'(c.xin) * int'(c.yin) + iy * int'(c.xin) + ix);
                expect_eq("wb_addr", wb_addr, wpix + (ig * k + ky) * k + kx);
                expect_eq("first", first, ig == 0 && ky == 0 && kx == 0);
                expect_eq("last", last, ig == groups(int'(c.nif)) - 1 && ky == k - 1 && kx == k - 1);
                expect_eq("out_addr", out_addr, (og * int'(c.yout) + oy) * int'(c.xout) + ox);
                expect_eq("out_en", out_en, oe);
                expect_eq("bank_base", bank_base, 0);
                expect_eq("out_step", out_step, int'(c.xout) * int'(c.yout));
                w++;
                @(negedge clk);
              end
        end
    expect_eq("done", done, 1);
    expect_eq("busy", busy, 0);
    expect_eq("issues", w, wwords(c) / groups(int'(c.nif)) / k / k * groups(int'(c.nif)) * k * k
                           * int'(c.xout) * int'(c.yout));
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(mk(L_CONV, 3, 2, 1, 7, 6, 4, 3, 10, 11, 0, 1, 0));
    run(mk(L_CONV, 2, 1, 0, 3, 3, 2, 2, 3, 20, 0, 1, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
