// Checks write_buffer (depth 8) against a queue model under random push and
// pop: order, contents, full/ready, count, and that nothing is lost or
// duplicated; also fills it completely and checks `full`.
module tb_write_buffer;
  logic clk = 1'b0, rst_n, in_valid, in_ready, out_valid, out_ready, full;
  logic [25:0] in_addr, out_addr;
  logic [511:0] in_data, out_data;
  logic [3:0] count;
  always #5 clk = ~clk;
  write_buffer dut (.*);

  typedef struct { logic [25:0] a; logic [511:0] d; } ent_t;
  ent_t q [$];
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int push_pct, int pop_pct);
    @(negedge clk);
    in_valid  = ($urandom_range(0, 99) < push_pct);
    out_ready = ($urandom_range(0, 99) < pop_pct);
    in_addr   = 26'($urandom);
    for (int i = 0; i < 16; i++) in_data[i*32 +: 32] = $urandom;
    #1;
    checks++;
    if (count != 4'(q.size()) || full != (q.size() == 8) || in_ready != (q.size() < 8)
        || out_valid != (q.size() > 0)) begin
      failures++;
      $display("FAIL flags: count=%0d model=%0d", count, q.size());
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_addr !== q[0].a || out_data !== q[0].d) begin
        failures++;
        $display("FAIL data order");
      end
    end
    @(posedge clk);
    if (out_valid && out_ready) void'(q.pop_front());
    if (in_valid && in_ready) q.push_back('{in_addr, in_data});
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 0; out_ready = 0; in_addr = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) step(100, 0);     // fill past full
    checks++;
    if (!full) failures++;
    for (int i = 0; i < 2000; i++) step(60, 50);
    for (int i = 0; i < 2000; i++) step(30, 80);
    for (int i = 0; i < 30; i++) step(0, 100);     // drain
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
