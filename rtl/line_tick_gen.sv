// Global tick for the line counters.
//
// All line retention counters advance on a common tick that is 1/N of the chip
// clock, so a counter's smallest step is N cycles. N is a run-time input
// because it is set according to the variation conditions of each chip.
//
// Interface: `div` holds N (0 and 1 both give a tick every cycle); `tick` is a
// one-cycle pulse every N cycles. Timing: the first tick comes N cycles after
// reset. The counter style is this design's choice.
module line_tick_gen #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div,
  output logic             tick
);
  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt + 1'b1 >= div) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
