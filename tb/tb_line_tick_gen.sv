// Checks line_tick_gen: one tick every N cycles for several N, including the
// degenerate N = 1 and N = 0 (every cycle).
module tb_line_tick_gen;
  logic clk = 1'b0, rst_n, tick;
  logic [15:0] div;
  always #5 clk = ~clk;
  line_tick_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_div(int n, int expect_gap);
    int cyc, last, seen;
    @(negedge clk);
    rst_n = 1'b0; div = 16'(n);
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0; last = 0; seen = 0;
    while (seen < 8) begin
      @(negedge clk);
      cyc++;
      if (tick) begin
        checks++;
        if (cyc - last != expect_gap) begin
          failures++;
          $display("FAIL N=%0d gap %0d", n, cyc - last);
        end
        last = cyc;
        seen++;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; div = 16'd4;
    check_div(4, 4);
    check_div(32, 32);
    check_div(3, 3);
    check_div(1, 1);
    check_div(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
