// tb_refresh_ctrl: with a short interval, checks that the controller
// requests a pause, waits for paused, then issues exactly REF_ROWS row steps
// each made of T_PRE PRE, T_ACT ACT and T_RST RST cycles, releases the pause,
// and repeats every interval. A simple model plays the user-cycle timing.
module tb_refresh_ctrl;
  import draf_pkg::*;
  localparam int ROWS = 16, IVL = 400;
  logic clk = 0, rst_n = 0;
  logic paused, pause_req, ref_mode, ref_step, busy;
  dram_cmd_e ref_cmd;
  int checks = 0, failures = 0;
  int wait_cyc;

  refresh_ctrl #(.REF_ROWS(ROWS), .REF_INTERVAL(IVL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // User timing model: pauses 3 cycles after a request, resumes when dropped.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin paused <= 0; wait_cyc <= 0; end
    else if (pause_req && !paused) begin
      wait_cyc <= wait_cyc + 1;
      if (wait_cyc == 2) begin paused <= 1; wait_cyc <= 0; end
    end else if (!pause_req) paused <= 0;
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    t0 = 0;
    for (int rnd = 0; rnd < 3; rnd++) begin
      int n_steps, n_pre, n_act, n_rst, start;
      while (!pause_req) begin check(!ref_mode, "no refresh before request"); @(posedge clk); #1; t0++; end
      check(busy, "busy with request");
      while (!ref_mode) begin check(ref_cmd == CMD_NOP, "no command before paused"); @(posedge clk); #1; end
      check(paused, "refresh starts only when paused");
      n_steps = 0; n_pre = 0; n_act = 0; n_rst = 0;
      while (ref_mode) begin
        n_pre += (ref_cmd == CMD_PRE); n_act += (ref_cmd == CMD_ACT); n_rst += (ref_cmd == CMD_RST);
        if (ref_step) begin
          check(n_pre == 2 && n_act == 2 && n_rst == 2, "row = 2 PRE + 2 ACT + 2 RST");
          n_pre = 0; n_act = 0; n_rst = 0;
          n_steps++;
        end
        @(posedge clk); #1;
      end
      check(n_steps == ROWS, $sformatf("%0d rows refreshed", n_steps));
      check(!pause_req && !busy, "pause released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
