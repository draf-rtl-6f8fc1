// tb_col_logic: exhaustive check of the DRAF column logic in normal and
// fractured mode, for the default (COL_BITS=1, N_OUT=2) and for the 4-output,
// 2-column-bit LUT of the BLE example (COL_BITS=2, N_OUT=4).
module tb_col_logic;
  int checks = 0, failures = 0;
  logic [3:0] sa_a, out_a; logic [1:0] col_a; logic frac_a;
  logic [15:0] sa_b, out_b; logic [7:0] col_b; logic frac_b;

  col_logic dut_a (.sa(sa_a), .col(col_a), .frac(frac_a), .dout(out_a));
  col_logic #(.COL_BITS(2), .N_OUT(4)) dut_b (.sa(sa_b), .col(col_b), .frac(frac_b), .dout(out_b));

  initial begin
    for (int f = 0; f < 2; f++)
      for (int s = 0; s < 16; s++)
        for (int c = 0; c < 4; c++) begin
          logic [3:0] exp;
          sa_a = 4'(s); col_a = 2'(c); frac_a = f[0];
          #1;
          if (f) exp = sa_a;
          else exp = {2'b00, sa_a[2 + col_a[1]], sa_a[col_a[0]]};
          checks++;
          if (out_a !== exp) begin failures++; $display("FAIL a s=%h c=%0d f=%0d got %h exp %h", s, c, f, out_a, exp); end
        end
    for (int i = 0; i < 500; i++) begin
      logic [15:0] exp;
      sa_b = 16'($urandom); col_b = 8'($urandom); frac_b = 1'($urandom);
      #1;
      exp = '0;
      if (frac_b) exp = sa_b;
      else for (int o = 0; o < 4; o++) exp[o] = sa_b[4*o + col_b[2*o +: 2]];
      checks++;
      if (out_b !== exp) begin failures++; $display("FAIL b"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
