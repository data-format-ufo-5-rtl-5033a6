// tb_frame_header_gen: checks the frame header packet against the format's
// example header (0x51111111 .. 0x55555555, 0x50000440, 0x55000000,
// 0x50000000 for 1088 lines, frame 0, 10-bit, 16 outputs) and against the
// reference model for random settings; checks that the header keeps the
// captured settings while the inputs change, and that the frame number
// counts advance pulses.
module tb_frame_header_gen;
  import ufo5_pkg::*;
  import ufo5_ref_pkg::*;

  logic         clk = 0, rst_n = 0, capture = 0, advance = 0;
  logic [9:0]   start_addr;
  logic [6:0]   skip;
  logic [10:0]  lines;
  logic [23:0]  fr_ts, frame;
  adc_res_e     adc, frame_adc;
  out_mode_e    omode;
  logic [255:0] hdr;
  int checks = 0, failures = 0, nframes = 0;

  frame_header_gen dut (
    .clk (clk), .rst_n (rst_n), .capture (capture), .advance (advance),
    .cmosis_start_addr (start_addr), .skip_lines (skip), .number_of_lines (lines),
    .adc_res (adc), .output_mode (omode), .fr_timestep (fr_ts),
    .header (hdr), .frame_number (frame), .frame_adc_res (frame_adc));

  always #5 clk = ~clk;

  task automatic check(logic [255:0] exp, string what);
    checks++;
    if (hdr !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, hdr, exp);
    end
  endtask

  task automatic randomize_inputs();
    start_addr = 10'($urandom); skip = 7'($urandom); lines = 11'($urandom);
    fr_ts = 24'($urandom);
    adc = adc_res_e'($urandom_range(0, 2)); omode = out_mode_e'($urandom_range(0, 3));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start_addr = 0; skip = 0; lines = 11'h440; fr_ts = 0; adc = ADC_10BIT; omode = OUT_16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    capture = 1;
    @(negedge clk);
    capture = 0;
    check({32'h51111111, 32'h52222222, 32'h53333333, 32'h54444444,
           32'h55555555, 32'h50000440, 32'h55000000, 32'h50000000}, "example header");
    for (int i = 0; i < 200; i++) begin
      int s, k, l, f, a, o;
      randomize_inputs();
      s = int'(start_addr); k = int'(skip); l = int'(lines); f = int'(fr_ts);
      a = int'(adc); o = int'(omode);
      capture = 1;
      @(negedge clk);
      capture = 0;
      // the inputs move on; the header must not
      randomize_inputs();
      advance = ($urandom_range(0, 1) == 1);
      @(negedge clk);
      if (advance) nframes++;
      advance = 0;
      check(ref_frame_header(s, k, l, nframes, a, o, f), "captured header");
      checks++;
      if (frame_adc !== adc_res_e'(a)) begin
        failures++;
        $display("FAIL frame_adc_res");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
