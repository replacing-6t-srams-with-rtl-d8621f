// Checks refresh_row_gen at its full size (256 rows, 8 cycles per row): one
// pulse gives rows 0..255 in order, 8 cycles apart, so the sweep takes 2,048
// cycles; block_port is high exactly while the sweep runs; a request held by
// a slow acceptor stays stable; a pulse during a sweep starts another.
module tb_refresh_row_gen;
  logic clk = 1'b0, rst_n, pulse, req_valid, req_ready, block_port, sweep_done;
  logic [7:0] req_set;
  always #5 clk = ~clk;
  refresh_row_gen dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(bit slow, bit extra_pulse);
    int t_first, t_prev, expect_row, t_done;
    @(negedge clk);
    pulse = 1'b1;
    @(negedge clk);
    pulse = 1'b0;
    expect_row = 0;
    t_first = -1;
    while (expect_row < 256) begin
      req_ready = slow ? ($urandom_range(0, 2) == 0) : 1'b1;
      if (expect_row == 100 && extra_pulse) pulse = 1'b1;
      @(posedge clk);
      checks++;
      if (!block_port) failures++;
      if (req_valid && req_ready) begin
        checks++;
        if (req_set != 8'(expect_row)) begin
          failures++;
          $display("FAIL row %0d expected %0d", req_set, expect_row);
        end
        if (t_first < 0) t_first = cyc;
        else if (!slow) begin
          checks++;
          if (cyc - t_prev != 8) begin
            failures++;
            $display("FAIL gap %0d", cyc - t_prev);
          end
        end
        t_prev = cyc;
        expect_row++;
      end
      @(negedge clk);
      pulse = 1'b0;
    end
    t_done = t_prev;
    if (!slow) begin
      checks++;
      // 256 rows, 8 cycles each: 2,048 cycles from the first row to the slot after the last.
      if (t_done - t_first + 8 != 2048) begin
        failures++;
        $display("FAIL sweep span %0d", t_done - t_first);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; pulse = 1'b0; req_ready = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (block_port || req_valid) failures++;
    sweep(0, 0);
    repeat (2) @(negedge clk);
    checks++;
    if (block_port) failures++;
    sweep(1, 1);
    // The pulse seen during that sweep starts another one.
    repeat (2) @(negedge clk);
    checks++;
    if (!block_port) begin
      failures++;
      $display("FAIL pending pulse lost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
