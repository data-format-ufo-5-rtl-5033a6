// frame_occupancy: counts the frames held in the DDR3 frame buffer and raises
// BUSY when the count reaches the configured maximum.
//
// frame_written pulses when a complete frame has gone into DDR, frame_sent
// when the DMA engine has taken one out; both may pulse in the same cycle.
// frames_pending (register 0x91B0) is written minus sent, and busy (BUSY_status
// in status3) is high while frames_pending >= max_frames (register 0x91A0).
// Both outputs are registered: they change the cycle after a pulse.
//
// That the count is written minus sent and that BUSY turns on at the
// threshold follows the register description; the count saturating at 0 and
// at its maximum, and busy staying on above the threshold, are this design's.
module frame_occupancy #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_written,
  input  logic             frame_sent,
  input  logic [CNT_W-1:0] max_frames,
  output logic [CNT_W-1:0] frames_pending,
  output logic             busy
);

  logic [CNT_W-1:0] next_cnt;

  always_comb begin
    next_cnt = frames_pending;
    if (frame_written && !frame_sent && frames_pending != '1)
      next_cnt = frames_pending + 1'b1;
    else if (frame_sent && !frame_written && frames_pending != '0)
      next_cnt = frames_pending - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frames_pending <= '0;
      busy           <= 1'b0;
    end else begin
      frames_pending <= next_cnt;
      busy           <= (next_cnt >= max_frames);
    end
  end

endmodule
