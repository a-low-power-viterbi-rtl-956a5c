// tb_path_merge_detector: random survivor-memory images in which each column
// is made group-equal (all four rows of each of the first 12 groups equal)
// with a random probability, or else has exactly one unequal group; rows
// 48..63 are always random.  A reference
// recomputes the merged column (start of the unbroken run of merged columns,
// from column 3 up to the last up-to-date column; one past that column when
// it is not merged), gate/sel, and the tracked last up-to-date column.
module tb_path_merge_detector;
  localparam int COLS = 32;
  logic clk = 0, rst_n = 0, en = 0;
  logic [63:0][COLS-1:0][1:0] mem = '0;
  logic [COLS-1:0] gate, sel;
  logic [4:0] merge_col, valid_col;
  int checks = 0, failures = 0;
  int n_merge = 0, n_grow = 0;
  path_merge_detector dut (.*);
  always #5 clk = ~clk;

  int rvalid = COLS - 1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int pr, eqp;
      bit ceq[COLS];
      bit run;
      @(negedge clk);
      eqp = (n / 250) % 4 * 30;       // 0, 30, 60, 90 % chance of a merged column
      for (int k = 0; k < COLS; k++) begin
        ceq[k] = ($urandom_range(0, 99) < eqp);
        for (int s = 0; s < 64; s++) mem[s][k] = 2'($urandom);
        for (int g = 0; g < 12; g++) for (int j = 1; j < 4; j++) mem[4*g+j][k] = mem[4*g][k];
        if (!ceq[k]) begin
          // exactly one checked group differs, in one of its rows
          int g;
          g = $urandom_range(0, 11);
          mem[4*g + $urandom_range(1, 3)][k] = mem[4*g][k] ^ 2'($urandom_range(1, 3));
        end
      end
      // reference
      pr = (rvalid == COLS - 1) ? rvalid : rvalid + 1;
      run = 1;
      for (int k = COLS - 1; k >= 3; k--) begin
        if (k <= rvalid) begin
          run = run && ceq[k];
          if (run) pr = k;
        end
      end
      en = 1'($urandom_range(0, 4) != 0);
      #1;
      checks++;
      if (int'(merge_col) != pr || int'(valid_col) != rvalid) begin
        failures++;
        if (failures < 5) $display("ERROR: n=%0d merge %0d exp %0d valid %0d exp %0d", n, merge_col, pr, valid_col, rvalid);
      end
      for (int k = 0; k < COLS; k++) begin
        checks++;
        if (gate[k] !== (k <= pr) || sel[k] !== (k > pr)) begin
          failures++;
          if (failures < 5) $display("ERROR: n=%0d col %0d gate %b sel %b (P=%0d)", n, k, gate[k], sel[k], pr);
        end
      end
      if (en) begin
        if (pr < COLS - 1) n_merge++;
        if (pr == rvalid + 1) n_grow++;
        rvalid = pr;
      end
    end
    checks++;
    if (n_merge == 0 || n_grow == 0) begin failures++; $display("ERROR: merge %0d grow %0d", n_merge, n_grow); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
