// layer_controller: runs the network layer after layer.
//
// The host writes one layer_cfg_t per layer into a table of MAX_LAYERS entries
// (cfg_we/cfg_addr/cfg_data) and pulses `start`. The controller then walks the
// table from entry 0 until an entry of kind L_END:
//   CONV  first loads the layer's weights into the weight buffer (the weight
//         stream is routed there, wbuf_accept, until
//         ceil(Nof/LANES)*ceil(Nif/LANES)*K*K words have arrived), then starts
//         the CONV engine;
//   FC    starts the FC engine at once and routes the weight stream into the FC
//         FIFO while it runs (fifo_accept) (transfer overlapped with computation);
//   POOL, NORM start their engine.
// After each engine's `done` the ping-pong buffers swap roles (in_sel toggles).
// `done` pulses when L_END is reached; out_sel then names the buffer holding the
// network's output. `cycles` counts the clock cycles of the last run.
// Layer-by-layer serial computation and the two weight-transfer policies follow
// the source design; the table format and this state machine are this design's.
module layer_controller
  import cnn_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_we,
  input  logic [$clog2(MAX_LAYERS)-1:0] cfg_addr,
  input  layer_cfg_t                    cfg_data,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          out_sel,
  output logic [31:0]                   cycles,
  // to the engines
  output layer_cfg_t                    cfg,
  output layer_kind_e                   kind,
  output logic                          in_sel,
  output logic                          conv_start,
  output logic                          pool_start,
  output logic                          norm_start,
  output logic                          fc_start,
  input  logic                          conv_done,
  input  logic                          pool_done,
  input  logic                          norm_done,
  input  logic                          fc_done,
  // weight stream steering
  output logic                          wbuf_accept,
  output logic                          fifo_accept,
  output logic                          wbuf_load,
  input  logic [WB_AW:0]                wbuf_count
);

  localparam int unsigned LW = $clog2(MAX_LAYERS);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_WLOAD, S_START, S_RUN, S_NEXT} state_e;

  layer_cfg_t table_q [MAX_LAYERS];
  state_e     st;
  logic [LW-1:0] idx;
  logic [WB_AW:0] need;

  always_ff @(posedge clk) begin
    if (cfg_we) table_q[cfg_addr] <= cfg_data;
  end

  assign kind = cfg.kind;
  assign busy = (st != S_IDLE);

  always_comb begin
    // weight words of a CONV layer: output groups x input groups x K x K, with the
    // group sizes of the engine that runs it
    if (cfg.conv_small)
      need = (WB_AW+1)'((cfg.nof + MAPS_W'(NM / SMALL_NIF - 1)) / MAPS_W'(NM / SMALL_NIF)) *
             (WB_AW+1)'((cfg.nif + MAPS_W'(SMALL_NIF - 1)) / MAPS_W'(SMALL_NIF)) *
             (WB_AW+1)'(cfg.k) * (WB_AW+1)'(cfg.k);
    else
      need = (WB_AW+1)'((cfg.nof + MAPS_W'(LANES - 1)) / MAPS_W'(LANES)) *
             (WB_AW+1)'((cfg.nif + MAPS_W'(LANES - 1)) / MAPS_W'(LANES)) *
             (WB_AW+1)'(cfg.k) * (WB_AW+1)'(cfg.k);
    wbuf_accept = (st == S_WLOAD) && !wbuf_load && (wbuf_count < need);
    fifo_accept = (st == S_START || st == S_RUN) && (cfg.kind == L_FC);
  end

  wire eng_done = (cfg.kind == L_CONV && conv_done) || (cfg.kind == L_POOL && pool_done) ||
                  (cfg.kind == L_NORM && norm_done) || (cfg.kind == L_FC && fc_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; cfg <= '0; in_sel <= 1'b0; out_sel <= 1'b0;
      done <= 1'b0; cycles <= '0; wbuf_load <= 1'b0;
      conv_start <= 1'b0; pool_start <= 1'b0; norm_start <= 1'b0; fc_start <= 1'b0;
    end else begin
      done <= 1'b0;
      wbuf_load <= 1'b0;
      conv_start <= 1'b0; pool_start <= 1'b0; norm_start <= 1'b0; fc_start <= 1'b0;
      if (st != S_IDLE) cycles <= cycles + 1;
      unique case (st)
        S_IDLE: if (start) begin
          st     <= S_FETCH;
          idx    <= '0;
          in_sel <= 1'b0;
          cycles <= '0;
        end
        S_FETCH: begin
          cfg <= table_q[idx];
          if (table_q[idx].kind == L_END) begin
            st      <= S_IDLE;
            done    <= 1'b1;
            out_sel <= in_sel;
          end else if (table_q[idx].kind == L_CONV) begin
            st        <= S_WLOAD;
            wbuf_load <= 1'b1;
          end else begin
            st <= S_START;
          end
        end
        S_WLOAD: if (!wbuf_load && wbuf_count >= need) st <= S_START;
        S_START: begin
          conv_start <= (cfg.kind == L_CONV);
          pool_start <= (cfg.kind == L_POOL);
          norm_start <= (cfg.kind == L_NORM);
          fc_start   <= (cfg.kind == L_FC);
          st         <= S_RUN;
        end
        S_RUN: if (eng_done) st <= S_NEXT;
        S_NEXT: begin
          in_sel <= !in_sel;
          idx    <= idx + 1'b1;
          st     <= (idx == LW'(MAX_LAYERS - 1)) ? S_IDLE : S_FETCH;
          done   <= (idx == LW'(MAX_LAYERS - 1));
          out_sel <= !in_sel;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
