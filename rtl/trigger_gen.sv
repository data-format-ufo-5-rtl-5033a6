// trigger_gen: frame trigger generator of the camera readout.
//
// After a start pulse it issues number_of_triggers one-cycle trigger pulses,
// the first two cycles after start and then one every period cycles, where
// period is trigger_period (register 0x9180) but never less than MIN_PERIOD
// (0x280). A stop pulse ends the sequence; a start while running restarts it.
// running is high from start until the last trigger has been issued;
// issued counts the triggers of the current sequence.
//
// The number of triggers and the period with its minimum are the register
// descriptions'; the start and stop controls, counting the period in clock
// cycles and sampling both settings at start are this design's choices.
module trigger_gen #(
  parameter int unsigned       CNT_W      = 32,
  parameter logic [CNT_W-1:0]  MIN_PERIOD = CNT_W'(32'h280)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  input  logic [CNT_W-1:0] number_of_triggers,
  input  logic [CNT_W-1:0] trigger_period,
  output logic             trigger,
  output logic             running,
  output logic [CNT_W-1:0] issued
);

  logic [CNT_W-1:0] period_q;
  logic [CNT_W-1:0] remaining;
  logic [CNT_W-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_q  <= MIN_PERIOD;
      remaining <= '0;
      timer     <= '0;
      running   <= 1'b0;
      trigger   <= 1'b0;
      issued    <= '0;
    end else begin
      trigger <= 1'b0;
      if (stop) begin
        running   <= 1'b0;
        remaining <= '0;
      end else if (start) begin
        period_q  <= (trigger_period < MIN_PERIOD) ? MIN_PERIOD : trigger_period;
        remaining <= number_of_triggers;
        timer     <= '0;
        issued    <= '0;
        running   <= (number_of_triggers != '0);
      end else if (running) begin
        if (timer == '0) begin
          trigger   <= 1'b1;
          issued    <= issued + 1'b1;
          remaining <= remaining - 1'b1;
          timer     <= period_q - 1'b1;
          if (remaining == CNT_W'(1)) running <= 1'b0;
        end else begin
          timer <= timer - 1'b1;
        end
      end
    end
  end

endmodule
