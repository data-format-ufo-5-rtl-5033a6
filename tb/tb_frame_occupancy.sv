// tb_frame_occupancy: drives random frame-written and frame-sent pulses
// (both together included) and compares frames_pending and busy, one cycle
// after each pulse, with a counting model; also changes the threshold and
// checks that busy turns on exactly when the count reaches it.
module tb_frame_occupancy;
  logic        clk = 0, rst_n = 0;
  logic        written = 0, sent = 0;
  logic [31:0] max_frames = 32'd4;
  logic [31:0] pending;
  logic        busy;
  int          model = 0;
  int checks = 0, failures = 0, busy_seen = 0, idle_seen = 0;

  frame_occupancy dut (.clk (clk), .rst_n (rst_n), .frame_written (written),
                       .frame_sent (sent), .max_frames (max_frames),
                       .frames_pending (pending), .busy (busy));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i == 1000) max_frames = 32'd7;
      // bias towards filling in the first half, draining in the second
      written = ($urandom_range(0, 99) < ((i % 400) < 200 ? 45 : 20));
      sent    = ($urandom_range(0, 99) < ((i % 400) < 200 ? 20 : 45));
      if (written && !sent) model++;
      else if (sent && !written && model > 0) model--;
      @(negedge clk);
      written = 0; sent = 0;
      checks++;
      if (pending !== 32'(model) || busy !== (model >= int'(max_frames))) begin
        failures++;
        $display("FAIL cycle %0d: pending %0d busy %b, model %0d", i, pending, busy, model);
      end
      if (busy) busy_seen++; else idle_seen++;
    end
    checks++;
    if (busy_seen == 0 || idle_seen == 0) begin
      failures++;
      $display("FAIL busy never toggled (%0d busy, %0d idle)", busy_seen, idle_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
