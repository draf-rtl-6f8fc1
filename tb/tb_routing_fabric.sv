// tb_routing_fabric: configures random routes (source -> track -> sink) in
// three contexts and checks every sink against the source its context
// selects, for random source values and context changes.
module tb_routing_fabric;
  import draf_pkg::*;
  localparam int NS = 40, NK = 24, NT = 16;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] src;
  logic [2:0] ctx;
  cfg_wr_t cfg;
  logic [NK-1:0] sink;
  int tsel [3][NT];
  int ksel [3][NK];
  int checks = 0, failures = 0;

  routing_fabric #(.N_SRC(NS), .N_SINK(NK), .N_TRACK(NT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    src = 0; ctx = 0; cfg = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < 3; c++) begin
      for (int t = 0; t < NT; t++) begin
        tsel[c][t] = $urandom_range(NS-1);
        cfg.we = 1; cfg.kind = CFG_ROUTE; cfg.ctx = 4'(c); cfg.idx = 12'(t); cfg.data = 32'(tsel[c][t]);
        @(posedge clk); #1;
      end
      for (int s = 0; s < NK; s++) begin
        ksel[c][s] = $urandom_range(NT-1);
        cfg.we = 1; cfg.kind = CFG_ROUTE; cfg.ctx = 4'(c); cfg.idx = 12'(NT + s); cfg.data = 32'(ksel[c][s]);
        @(posedge clk); #1;
      end
    end
    cfg.we = 0;
    for (int i = 0; i < 300; i++) begin
      int c;
      c = $urandom_range(2);
      ctx = 3'(c);
      src = {$urandom, $urandom};
      #1;
      for (int s = 0; s < NK; s++) begin
        checks++;
        if (sink[s] !== src[tsel[c][ksel[c][s]]]) begin failures++; $display("FAIL ctx %0d sink %0d", c, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
