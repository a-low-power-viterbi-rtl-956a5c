// tb_sst_output: random pre-decoded pairs pushed with a random enable; the
// output must be n XOR the pair pushed exactly COLS advances earlier.
module tb_sst_output;
  localparam int COLS = 32;
  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] i = '0, n = '0, o;
  int checks = 0, failures = 0;
  sst_output dut (.*);
  always #5 clk = ~clk;
  logic [1:0] hist[$];
  initial begin
    repeat (COLS) hist.push_back(2'b00);
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (1000) begin
      @(negedge clk);
      n = 2'($urandom);
      #1;
      checks++;
      if (o !== (n ^ hist[0])) begin
        failures++;
        if (failures < 5) $display("ERROR: got %b exp %b", o, n ^ hist[0]);
      end
      en = 1'($urandom_range(0, 3) != 0);
      i = 2'($urandom);
      if (en) begin hist.push_back(i); void'(hist.pop_front()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
