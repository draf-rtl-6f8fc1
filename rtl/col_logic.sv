// col_logic: column logic of one DRAF LUT MAT.
//
// A conventional DRAM picks every n-th sense-amp with one shared column
// address. In DRAF each LUT output o has its own group of 2**COL_BITS
// sense-amps and its own column address, so the N_OUT outputs share the row
// address but can each use a different extra input. With the defaults
// (COL_BITS = 1, N_OUT = 2) each output is a 7-input function of 6 shared
// row bits and 1 private column bit.
//
// In fractured mode (frac = 1) every sense-amp drives its own output, which
// turns the LUT into SA_W functions of the row address alone (4 six-input
// functions by default). In normal mode the outputs above N_OUT are 0.
// The per-output column groups follow the DRAF BLE; the fractured-mode
// encoding is this design's choice. Purely combinational.
module col_logic #(
  parameter int unsigned COL_BITS = 1,
  parameter int unsigned N_OUT    = 2,
  localparam int unsigned SA_W    = N_OUT << COL_BITS,
  localparam int unsigned COLA_W  = (N_OUT*COL_BITS > 0) ? N_OUT*COL_BITS : 1
) (
  input  logic [SA_W-1:0]   sa,
  input  logic [COLA_W-1:0] col,
  input  logic              frac,
  output logic [SA_W-1:0]   dout
);
  localparam int unsigned GRP = 1 << COL_BITS;

  int unsigned col_sel [N_OUT];

  for (genvar o = 0; o < N_OUT; o++) begin : g_sel
    if (COL_BITS > 0) begin : g_col
      assign col_sel[o] = int'(col[o*COL_BITS +: COL_BITS]);
    end else begin : g_nocol
      assign col_sel[o] = 0;
    end
  end

  always_comb begin
    dout = '0;
    if (frac) begin
      dout = sa;
    end else begin
      for (int o = 0; o < N_OUT; o++)
        dout[o] = sa[o*GRP + col_sel[o]];
    end
  end

endmodule
