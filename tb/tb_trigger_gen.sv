// tb_trigger_gen: runs trigger sequences and checks the number of triggers,
// the spacing between them (the programmed period, or 0x280 when a shorter
// one is programmed), that the first comes two cycles after start, that
// nothing follows the last, and that stop ends a sequence early.
module tb_trigger_gen;
  logic        clk = 0, rst_n = 0;
  logic        start = 0, stop = 0;
  logic [31:0] ntrig = 0, period = 0;
  logic        trigger, running;
  logic [31:0] issued;
  int checks = 0, failures = 0;
  longint cyc = 0;

  trigger_gen dut (.clk (clk), .rst_n (rst_n), .start (start), .stop (stop),
                   .number_of_triggers (ntrig), .trigger_period (period),
                   .trigger (trigger), .running (running), .issued (issued));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // start a sequence and record trigger times until `window` cycles pass
  task automatic run(int n, int per, int stop_after, int window, int exp_n, int exp_per);
    longint t0, last;
    int count = 0;
    @(negedge clk);
    ntrig = n; period = per; start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc;
    for (int c = 0; c < window; c++) begin
      if (c == stop_after) stop = 1;
      @(posedge clk);
      #1;
      stop = 0;
      if (trigger) begin
        if (count == 0) check(cyc - t0 == 1, $sformatf("first trigger at +%0d", cyc - t0));
        else check(cyc - last == longint'(exp_per), $sformatf("spacing %0d exp %0d", cyc - last, exp_per));
        last = cyc;
        count++;
      end
    end
    check(count == exp_n, $sformatf("count %0d exp %0d", count, exp_n));
    check(!running, "still running");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 'h300, -1, 5 * 'h300 + 200, 5, 'h300);
    check(issued == 5, "issued count");
    run(3, 'h10, -1, 3 * 'h280 + 200, 3, 'h280);          // clamped to the minimum
    run(10, 'h280, 'h280 * 2 + 10, 12 * 'h280, 3, 'h280);  // stopped after 3
    run(0, 'h280, -1, 1000, 0, 'h280);                     // no triggers
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
