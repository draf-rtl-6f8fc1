// bram_block: DRAF embedded memory block, 36 Kbit with configurable width.
//
// Storage is DEPTH36 words of 36 bits (1024 x 36 = 36 Kbit by default). The
// port width is set per context to 1, 2, 4, 9, 18 or 36 bits, as in the
// RAMB36-style block the DRAF description names. The address is in units of
// the selected width. In the 9/18/36-bit modes all 36 bits of a word are
// used; in the 1/2/4-bit modes only the 8 data bits of each 9-bit lane are,
// giving 32K x 1, 16K x 2 and 8K x 4.
//
// The memory is shared by all contexts. When the per-context part bit is
// set, the top CTX_W bits of the word index are replaced by the current
// context, which statically partitions the block between contexts.
//
// Access: at the block's configured phase (same instant as a LUT
// activation) the block reads the addressed entry into dout (read-first) and,
// if we is 1, writes din into it. dout holds until the next access.
// Configuration: CFG_BRAM, unit = UNIT, data = {part, width[2:0], phase}.
// The single read-first port and the once-per-user-cycle access are this
// design's choices; the DRAM row timing inside the block is not modelled.
module bram_block
  import draf_pkg::*;
#(
  parameter int unsigned DEPTH36 = 1024,
  parameter int unsigned N_CTX   = 8,
  parameter int unsigned PH_BITS = 4,
  parameter int unsigned T_PRE   = 2,
  parameter int unsigned T_ACT   = 2,
  parameter int unsigned T_RST   = 2,
  parameter int unsigned DELTA   = 3,
  parameter int unsigned UNIT    = 0,
  localparam int unsigned WA_W   = $clog2(DEPTH36),
  localparam int unsigned ADDR_W = WA_W + 5,
  localparam int unsigned CTX_W  = (N_CTX > 1) ? $clog2(N_CTX) : 1,
  localparam int unsigned CIP_W  = $clog2(DELTA + T_ACT)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [35:0]        din,
  input  logic               we,
  input  logic [CTX_W-1:0]   ctx,
  input  logic               run,
  input  logic [PH_BITS-1:0] cur_phase,
  input  logic [CIP_W-1:0]   cip,
  input  cfg_wr_t            cfg,
  output logic [35:0]        dout
);
  typedef struct packed {
    logic               part;
    bram_width_e        width;
    logic [PH_BITS-1:0] phase;
  } bram_cfg_t;

  bram_cfg_t   cfg_q [N_CTX];
  bram_cfg_t   cur;
  logic [35:0] mem [DEPTH36];
  logic        eval;
  dram_cmd_e   cmd_unused;

  logic [WA_W-1:0] word_raw, word;
  logic [35:0]     mask;     // bits of the word covered by the access
  int unsigned     lsb;      // position of the first bit of the access
  logic [35:0]     old_w, new_w, rdata;

  assign cur = cfg_q[ctx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CTX; c++) cfg_q[c] <= '0;
    end else if (cfg.we && cfg.kind == CFG_BRAM && cfg.unit == CFG_UNIT_W'(UNIT)) begin
      cfg_q[CTX_W'(cfg.ctx)] <= bram_cfg_t'(cfg.data[$bits(bram_cfg_t)-1:0]);
    end
  end

  lut_sequencer #(.PH_BITS(PH_BITS), .T_PRE(T_PRE), .T_ACT(T_ACT), .T_RST(T_RST), .DELTA(DELTA)) u_seq (
    .run, .cur_phase, .cip,
    .my_phase (cur.phase),
    .cmd      (cmd_unused),
    .eval
  );

  // Address split per width mode.
  always_comb begin
    word_raw = '0;
    lsb      = 0;
    mask     = '0;
    unique case (cur.width)
      BW_36: begin word_raw = addr[WA_W-1:0];   lsb = 0;                                   mask = {36{1'b1}};       end
      BW_18: begin word_raw = addr[WA_W:1];     lsb = 18*int'(addr[0]);                    mask = 36'h3FFFF << lsb; end
      BW_9:  begin word_raw = addr[WA_W+1:2];   lsb = 9*int'(addr[1:0]);                   mask = 36'h1FF << lsb;   end
      BW_4:  begin word_raw = addr[WA_W+2:3];   lsb = 9*int'(addr[2:1]) + 4*int'(addr[0]); mask = 36'hF << lsb;     end
      BW_2:  begin word_raw = addr[WA_W+3:4];   lsb = 9*int'(addr[3:2]) + 2*int'(addr[1:0]); mask = 36'h3 << lsb;   end
      default: begin word_raw = addr[WA_W+4:5]; lsb = 9*int'(addr[4:3]) + int'(addr[2:0]); mask = 36'h1 << lsb;     end
    endcase
    word = word_raw;
    if (cur.part)
      word[WA_W-1 -: CTX_W] = ctx;
  end

  assign old_w = mem[word];
  assign rdata = (old_w & mask) >> lsb;
  assign new_w = (old_w & ~mask) | ((din << lsb) & mask);

  always_ff @(posedge clk) begin
    if (eval && we) mem[word] <= new_w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    dout <= '0;
    else if (eval) dout <= rdata;
  end

endmodule
