// Checks refresh_pulse_gen: no pulse while disabled, then exactly one pulse
// every `period` cycles, for several periods, and the scheduler copy.
module tb_refresh_pulse_gen;
  logic clk = 1'b0, rst_n, en, pulse, sched_pulse;
  logic [23:0] period;
  always #5 clk = ~clk;
  refresh_pulse_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_period(int p);
    int last, cyc, n;
    @(negedge clk);
    en = 1'b0; period = 24'(p);
    repeat (3) @(negedge clk);
    checks++;
    if (pulse) failures++;
    en = 1'b1;
    last = 0; cyc = 0; n = 0;
    while (n < 6) begin
      @(negedge clk);
      cyc++;
      checks++;
      if (sched_pulse !== pulse) failures++;
      if (pulse) begin
        checks++;
        if (cyc - last != p) begin
          failures++;
          $display("FAIL period %0d: pulse after %0d", p, cyc - last);
        end
        last = cyc;
        n++;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; period = 24'd5;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_period(5);
    check_period(1);
    check_period(2);
    check_period(37);
    // 2,048-cycle sweep in a period of 2,500 cycles.
    check_period(2500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
