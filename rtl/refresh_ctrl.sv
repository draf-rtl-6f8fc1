// refresh_ctrl: concurrent refresh of all DRAF subarrays.
//
// DRAM cells leak, so every REF_INTERVAL internal cycles (64 ms at the
// assumed 1 GHz internal clock) the controller raises busy and asks the
// user-cycle timing to pause at the next user-cycle boundary. Once paused it
// steps through REF_ROWS rows; for each row it drives ref_cmd with T_PRE
// cycles of PRE, T_ACT cycles of ACT and T_RST cycles of RST, and pulses
// ref_step on the last cycle so every CLB advances its shared row counter.
// All used contexts of all subarrays act at once (see context_counter).
// Then it releases the pause. The flip-flops of the mapped design hold during
// refresh because no user cycle ends. With the defaults a refresh takes
// 256 x 6 = 1536 internal cycles, about 1.5 us every 64 ms. The 256-row walk
// and the 64 ms period follow the DRAF description; the command timing and
// the 1 GHz clock are this design's assumptions.
module refresh_ctrl
  import draf_pkg::*;
#(
  parameter int unsigned REF_ROWS     = 256,
  parameter int unsigned REF_INTERVAL = 64000000,
  parameter int unsigned T_PRE        = 2,
  parameter int unsigned T_ACT        = 2,
  parameter int unsigned T_RST        = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      paused,
  output logic      pause_req,
  output logic      ref_mode,
  output dram_cmd_e ref_cmd,
  output logic      ref_step,
  output logic      busy
);
  localparam int unsigned T_ROW = T_PRE + T_ACT + T_RST;

  logic [$clog2(REF_INTERVAL)-1:0] timer;
  logic [$clog2(REF_ROWS+1)-1:0]   row_cnt;
  logic [$clog2(T_ROW)-1:0]        step;
  logic                            pend;

  assign pause_req = pend;
  assign busy      = pend;

  always_comb begin
    ref_cmd = CMD_NOP;
    if (ref_mode) begin
      if (32'(step) < T_PRE)              ref_cmd = CMD_PRE;
      else if (32'(step) < T_PRE + T_ACT) ref_cmd = CMD_ACT;
      else                                ref_cmd = CMD_RST;
    end
  end

  assign ref_step = ref_mode && (32'(step) == T_ROW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer    <= '0;
      pend     <= 1'b0;
      ref_mode <= 1'b0;
      row_cnt  <= '0;
      step     <= '0;
    end else begin
      if (32'(timer) == REF_INTERVAL - 1) begin
        timer <= '0;
        pend  <= 1'b1;
      end else begin
        timer <= timer + 1'b1;
      end

      if (pend && paused && !ref_mode && row_cnt == '0) begin
        ref_mode <= 1'b1;
        step     <= '0;
      end else if (ref_mode) begin
        if (ref_step) begin
          step <= '0;
          if (32'(row_cnt) == REF_ROWS - 1) begin
            row_cnt  <= '0;
            ref_mode <= 1'b0;
            pend     <= 1'b0;
          end else begin
            row_cnt <= row_cnt + 1'b1;
          end
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

endmodule
