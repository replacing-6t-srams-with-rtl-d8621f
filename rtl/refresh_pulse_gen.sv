// Refresh pulse generation for the global-refresh scheme.
//
// The chip clock is divided down to a periodic one-cycle refresh pulse. The
// period is programmed in clock cycles so that a whole refresh sweep of the
// array ends before the retention time of the weakest cell of the cache runs
// out; the refresh rate is therefore the sweep time over the retention time.
// The pulse goes both to the refresh-row generator and, as `sched_pulse`, to
// the instruction scheduler, which may use it to plan around the lost port.
//
// Interface: `en` starts counting; `period` (>= 1) is read every time the
// counter reloads. Timing: the first pulse comes `period` cycles after `en`
// rises, then one every `period` cycles. The programmable period and the
// down-counter are this design's choice; the document gives only the rate.
module refresh_pulse_gen #(
  parameter int unsigned PERIOD_W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [PERIOD_W-1:0] period,
  output logic                pulse,
  output logic                sched_pulse
);
  logic [PERIOD_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else if (!en) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else begin
      pulse <= 1'b0;
      if (cnt + 1'b1 >= period) begin
        cnt   <= '0;
        pulse <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign sched_pulse = pulse;
endmodule
