// Checks way_switch with random lines and selects against a direct model.
module tb_way_switch;
  typedef logic [511:0] line_t;
  line_t cur [4], out [4], incoming;
  logic sel_new [4];
  logic [1:0] sel_src [4];
  way_switch #(.NWAYS(4), .elem_t(line_t)) dut (.*);

  int checks = 0, failures = 0;

  function automatic line_t rand_line();
    line_t l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int w = 0; w < 4; w++) begin
        cur[w] = rand_line();
        sel_new[w] = ($urandom_range(0, 3) == 0);
        sel_src[w] = 2'($urandom_range(0, 3));
      end
      incoming = rand_line();
      #1;
      for (int w = 0; w < 4; w++) begin
        checks++;
        if (out[w] !== (sel_new[w] ? incoming : cur[sel_src[w]])) begin
          failures++;
          $display("FAIL way %0d", w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
