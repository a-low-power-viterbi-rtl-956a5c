// tb_bm_unit: random soft symbols; every branch metric must equal the sum of
// distances |y - 0| or |y - 7| of the three code bits.
module tb_bm_unit;
  import vd_pkg::sym_t;
  sym_t [1:0] y;
  logic [1:0][7:0][5:0] bm;
  int checks = 0, failures = 0;
  bm_unit dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      y = {3'($urandom), 3'($urandom), 3'($urandom), 3'($urandom), 3'($urandom), 3'($urandom)};
      #1;
      for (int k = 0; k < 2; k++)
        for (int c = 0; c < 8; c++) begin
          int e, v;
          e = 0;
          for (int b = 0; b < 3; b++) begin
            v = int'(y[k][b]);
            e += c[b] ? (7 - v) : v;
          end
          checks++;
          if (int'(bm[k][c]) != e) begin
            failures++;
            if (failures < 5) $display("ERROR: k=%0d c=%0d got %0d exp %0d", k, c, bm[k][c], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end
endmodule
