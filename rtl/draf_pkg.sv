// draf_pkg: types and constants shared by the DRAF fabric.
//
// DRAF builds FPGA-style lookup tables out of small DRAM subarrays. Every
// LUT evaluation is an explicit precharge (PRE), activate (ACT) and restore
// (RST) of one DRAM row, so the subarrays take a 2-bit command instead of a
// read enable. Configuration (LUT truth tables, per-context phase and mode
// bits, routing selects) is written through one flat write bus, cfg_wr_t,
// which every block decodes by kind and unit number. The command set follows
// the DRAM operations named in the DRAF description; the bus format and the
// field widths are this design's own choice.
package draf_pkg;

  // DRAM subarray command, issued every internal clock cycle.
  typedef enum logic [1:0] {
    CMD_NOP = 2'd0,
    CMD_PRE = 2'd1,   // precharge bitlines, sense-amps lose their data
    CMD_ACT = 2'd2,   // activate: charge sharing and sensing of one row
    CMD_RST = 2'd3    // restore the cells of the open row from the sense-amps
  } dram_cmd_e;

  // What a configuration write addresses.
  typedef enum logic [3:0] {
    CFG_NONE     = 4'd0,
    CFG_LUT_ROW  = 4'd1,  // unit = BLE, idx = row, ctx = MAT, data = row bits
    CFG_BLE      = 4'd2,  // unit = BLE, ctx, data = {frac, bypass, phase}
    CFG_LOCAL    = 4'd3,  // unit = CLB, idx = BLE pin, ctx, data = select
    CFG_ROUTE    = 4'd4,  // idx = routing mux (tracks first, then sinks)
    CFG_DSP      = 4'd5,  // unit = DSP, ctx, data = phase
    CFG_BRAM     = 4'd6,  // unit = BRAM, ctx, data = {part, width, phase}
    CFG_GLOBAL   = 4'd7   // idx 0: phases per user cycle of ctx; idx 1: used-context mask
  } cfg_kind_e;

  localparam int unsigned CFG_CTX_W  = 4;
  localparam int unsigned CFG_UNIT_W = 8;
  localparam int unsigned CFG_IDX_W  = 12;
  localparam int unsigned CFG_DATA_W = 32;

  typedef struct packed {
    logic                  we;
    cfg_kind_e             kind;
    logic [CFG_UNIT_W-1:0] unit;
    logic [CFG_IDX_W-1:0]  idx;
    logic [CFG_CTX_W-1:0]  ctx;
    logic [CFG_DATA_W-1:0] data;
  } cfg_wr_t;

  // BRAM width modes (RAMB36-style aspect ratios).
  typedef enum logic [2:0] {
    BW_1 = 3'd0, BW_2 = 3'd1, BW_4 = 3'd2, BW_9 = 3'd3, BW_18 = 3'd4, BW_36 = 3'd5
  } bram_width_e;

endpackage
