// cnn_pkg: shared widths, constants and types of the modular CNN accelerator.
//
// The accelerator computes a CNN layer by layer with one engine per layer type
// (CONV, POOL, NORM, FC). All engines read one ping-pong feature buffer and write
// the other. A feature buffer has LANES banks; input map m of a layer lives in bank
// m % LANES at word (m / LANES) * X * Y + y * X + x. The main CONV engine feeds
// LANES input maps to each adder tree (the tree fan-in, "Nif" of the hardware) and
// has LANES adder trees, so NM = LANES * LANES multipliers work in parallel. A
// second, narrow CONV engine has fan-in SMALL_NIF and NM / SMALL_NIF trees, for
// layers with few input maps such as the first layer of a network (3 maps).
//
// Feature (10 bit) and weight (8 bit) widths follow the source design. LANES,
// buffer depths, the accumulator width and every field width of layer_cfg_t are
// this design's own choices. Features and weights are signed two's-complement
// fixed point; the position of the binary point is set per layer by a right shift
// applied to the accumulator (layer_cfg_t.shift).
package cnn_pkg;

  localparam int unsigned FEAT_W   = 10;               // feature width
  localparam int unsigned WGT_W    = 8;                // weight width
  localparam int unsigned LANES    = 8;                // adder-tree fan-in = banks = parallel output maps
  localparam int unsigned NM       = LANES * LANES;    // shared multipliers
  localparam int unsigned SMALL_NIF = 4;               // fan-in of the narrow CONV engine (divides LANES)
  localparam int unsigned PROD_W   = FEAT_W + WGT_W;   // one product
  localparam int unsigned ACC_W    = 32;               // accumulator width
  localparam int unsigned FB_DEPTH = 4096;             // words per feature-buffer bank
  localparam int unsigned FB_AW    = $clog2(FB_DEPTH);
  localparam int unsigned WB_DEPTH = 4096;             // CONV weight-buffer words (NM weights each)
  localparam int unsigned WB_AW    = $clog2(WB_DEPTH);
  localparam int unsigned DIM_W    = 8;                // X / Y of a map, up to 255
  localparam int unsigned MAPS_W   = 12;               // number of maps, up to 4095
  localparam int unsigned MAX_LAYERS = 32;             // entries of the layer table
  localparam int unsigned LUT_N    = 64;               // entries of the LRN scale table
  localparam int unsigned LUT_AW   = $clog2(LUT_N);
  localparam int unsigned SCALE_W  = 16;               // LRN scale, unsigned Q1.15
  localparam int unsigned BANK_W   = $clog2(LANES);
  localparam int unsigned MEM_W    = 16;               // width of weight/feature word counters

  typedef logic signed [FEAT_W-1:0] feat_t;
  typedef logic signed [WGT_W-1:0]  wgt_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  typedef enum logic [2:0] {
    L_CONV = 3'd0,
    L_POOL = 3'd1,
    L_NORM = 3'd2,
    L_FC   = 3'd3,
    L_END  = 3'd7
  } layer_kind_e;

  // One entry of the layer table. Output sizes are given by the host (the
  // compiler that produces the table), not computed in hardware.
  typedef struct packed {
    layer_kind_e       kind;
    logic [3:0]        k;          // kernel / pooling window / LRN local size
    logic [2:0]        stride;
    logic [1:0]        pad;
    logic [DIM_W-1:0]  xin;
    logic [DIM_W-1:0]  yin;
    logic [DIM_W-1:0]  xout;
    logic [DIM_W-1:0]  yout;
    logic [MAPS_W-1:0] nif;        // input maps (FC: input maps of xin*yin each)
    logic [MAPS_W-1:0] nof;        // output maps (FC: output neurons)
    logic [4:0]        shift;      // CONV/FC: accumulator right shift; NORM: LUT index shift
    logic              relu;       // apply max(x,0) to the result
    logic              pool_avg;   // POOL: 1 average, 0 max
    logic [16:0]       avg_recip;  // POOL average: round(65536 / (k*k)), unsigned Q1.16
    logic              conv_small; // CONV: run on the narrow engine (fan-in SMALL_NIF)
  } layer_cfg_t;

  // Read request to the LANES banks of a feature buffer (one shared address).
  typedef struct packed {
    logic [LANES-1:0] en;
    logic [FB_AW-1:0] addr;
  } fb_rd_t;

  // Write request to the LANES banks of a feature buffer (one shared address).
  typedef struct packed {
    logic [LANES-1:0]             en;
    logic [FB_AW-1:0]             addr;
    logic [LANES-1:0][FEAT_W-1:0] data;
  } fb_wr_t;

  // Saturate an accumulator value, shifted right arithmetically, to a feature.
  function automatic feat_t sat_feat(input acc_t v);
    acc_t maxv, minv;
    maxv = acc_t'((1 << (FEAT_W - 1)) - 1);
    minv = -acc_t'(1 << (FEAT_W - 1));
    if (v > maxv)      return feat_t'(maxv);
    else if (v < minv) return feat_t'(minv);
    else               return feat_t'(v);
  endfunction

endpackage
