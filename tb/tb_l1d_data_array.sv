// Checks l1d_data_array at full size against a reference memory: random
// whole-set reads and per-way masked writes, one-cycle read latency, and
// read-before-write on a same-set collision.
module tb_l1d_data_array;
  typedef logic [511:0] line_t;
  logic clk = 1'b0, rd_en, wr_en;
  logic [7:0] rd_set, wr_set;
  logic [3:0] wr_mask;
  line_t rd_data [4], wr_data [4];
  always #5 clk = ~clk;
  l1d_data_array dut (.*);

  line_t ref_mem [256][4];
  int checks = 0, failures = 0;

  function automatic line_t rand_line();
    line_t l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t exp_rd [4];
    bit    pend;
    rd_en = 0; wr_en = 0; rd_set = 0; wr_set = 0; wr_mask = 0;
    for (int w = 0; w < 4; w++) wr_data[w] = '0;
    // Fill every set.
    for (int s = 0; s < 256; s++) begin
      @(negedge clk);
      wr_en = 1; wr_set = 8'(s); wr_mask = 4'hf;
      for (int w = 0; w < 4; w++) begin
        wr_data[w] = rand_line();
        ref_mem[s][w] = wr_data[w];
      end
    end
    pend = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pend) begin
        for (int w = 0; w < 4; w++) begin
          checks++;
          if (rd_data[w] !== exp_rd[w]) begin
            failures++;
            $display("FAIL set read way %0d", w);
          end
        end
      end
      rd_en  = ($urandom_range(0, 1) == 1);
      rd_set = 8'($urandom_range(0, 15));
      wr_en  = ($urandom_range(0, 1) == 1);
      wr_set = ($urandom_range(0, 3) == 0) ? rd_set : 8'($urandom_range(0, 15));
      wr_mask = 4'($urandom);
      for (int w = 0; w < 4; w++) wr_data[w] = rand_line();
      pend = rd_en;
      if (rd_en) for (int w = 0; w < 4; w++) exp_rd[w] = ref_mem[rd_set][w];
      if (wr_en) for (int w = 0; w < 4; w++) if (wr_mask[w]) ref_mem[wr_set][w] = wr_data[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
