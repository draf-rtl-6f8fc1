// tb_draf_top_full: the same two-context run as tb_draf_top with every
// parameter of draf_top at its default (64 ms refresh interval, so no
// refresh falls inside the run).
module tb_draf_top_full;
  draf_top_tb_core #(.FULL(1'b1), .N_UCYC(200)) u_core ();
endmodule
