// lut_sequencer: per-LUT DRAM command timing of DRAF.
//
// A user cycle is split into phases. A LUT configured for phase p must see
// stable inputs when it activates, so it activates only after every LUT of a
// lower phase has sensed its output. Each phase lasts PL = DELTA + T_ACT
// internal cycles, where DELTA >= max(T_PRE, T_RST, routing delay): the
// restore of a producer LUT, the precharge of its consumer and the routing
// between them all overlap inside DELTA. For a LUT of phase p, with
// (cur_phase, cip) the phase number and the cycle inside it:
//   PRE  while cur_phase == p   and DELTA-T_PRE <= cip < DELTA
//        (precharge deferred until right before the activation)
//   ACT  while cur_phase == p   and cip >= DELTA      (eval on the first cycle)
//   RST  while cur_phase == p+1 and cip <  T_RST
// The output is valid from the start of phase p+1 until the next PRE, in the
// next user cycle. The order PRE-ACT-RST and the overlap follow DRAF; the
// cycle counts are parameters of this design. Combinational; the same logic
// serves all contexts, only the phase (my_phase) is per context.
module lut_sequencer
  import draf_pkg::*;
#(
  parameter int unsigned PH_BITS = 4,
  parameter int unsigned T_PRE   = 2,
  parameter int unsigned T_ACT   = 2,
  parameter int unsigned T_RST   = 2,
  parameter int unsigned DELTA   = 3,
  localparam int unsigned PL     = DELTA + T_ACT,
  localparam int unsigned CIP_W  = $clog2(PL)
) (
  input  logic               run,
  input  logic [PH_BITS-1:0] cur_phase,
  input  logic [CIP_W-1:0]   cip,
  input  logic [PH_BITS-1:0] my_phase,
  output dram_cmd_e          cmd,
  output logic               eval
);
  logic in_mine, in_next;

  assign in_mine = run && (cur_phase == my_phase);
  assign in_next = run && ({1'b0, cur_phase} == {1'b0, my_phase} + 1'b1);

  always_comb begin
    cmd = CMD_NOP;
    if (in_mine && cip >= CIP_W'(DELTA - T_PRE) && cip < CIP_W'(DELTA))
      cmd = CMD_PRE;
    else if (in_mine && cip >= CIP_W'(DELTA))
      cmd = CMD_ACT;
    else if (in_next && cip < CIP_W'(T_RST))
      cmd = CMD_RST;
  end

  assign eval = in_mine && (cip == CIP_W'(DELTA));

  initial begin
    assert (DELTA >= T_PRE && DELTA >= T_RST)
      else $error("lut_sequencer: DELTA must cover precharge and restore");
  end

endmodule
