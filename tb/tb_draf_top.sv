// tb_draf_top: end-to-end run of the DRAF array (see draf_top_tb_core) with
// a refresh interval of 3000 internal cycles so that several refresh pauses
// fall inside the run.
module tb_draf_top;
  draf_top_tb_core #(.FULL(1'b0), .REF_INTERVAL(3000), .N_UCYC(400)) u_core ();
endmodule
