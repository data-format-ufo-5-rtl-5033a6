// tb_frame_sequencer: runs whole frames through the sequencer at its default
// 128 packets per row and checks every packet against the reference model:
// frame header, pixel packets of each row in order, row-tail control words,
// frame tail. Frames are run
//   - at full throughput (source and sink always ready), checking that a
//     frame of L rows takes exactly 2 + L*129 cycles,
//   - with random gaps on the pixel source and random back-pressure on the
//     output, in 10, 11 and 12-bit mode, from different first rows,
//   - with zero lines (header then tail),
// and a trigger sent during a frame must be ignored and counted. The status
// inputs change while the tail waits, to check it was sampled before.
module tb_frame_sequencer;
  import ufo5_pkg::*;
  import ufo5_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         frame_start = 0;
  logic [9:0]   start_addr = 0;
  logic [6:0]   skip = 0;
  logic [10:0]  lines = 0, start_row = 0;
  adc_res_e     adc = ADC_10BIT;
  out_mode_e    omode = OUT_16;
  logic [23:0]  fr_ts = 0;
  status1_t     s1 = '0;
  status2_t     s2 = '0;
  status3_t     s3 = '0;
  logic [25:0]  ard = 0, awr = 0;
  logic         pix_valid = 0, pix_ready;
  pixel_vec_t   pix_data;
  logic         pkt_valid, pkt_ready = 0;
  logic [255:0] pkt_data;
  pkt_kind_e    pkt_kind;
  logic         frame_done, in_frame;
  logic [23:0]  frame_number;
  logic [15:0]  ignored;

  frame_sequencer dut (
    .clk (clk), .rst_n (rst_n), .frame_start (frame_start),
    .cmosis_start_addr (start_addr), .skip_lines (skip), .number_of_lines (lines),
    .start_row (start_row), .adc_res (adc), .output_mode (omode), .fr_timestep (fr_ts),
    .status1 (s1), .status2 (s2), .status3 (s3), .app_addr_rd (ard), .app_addr_wr (awr),
    .pix_valid (pix_valid), .pix_ready (pix_ready), .pix_data (pix_data),
    .pkt_valid (pkt_valid), .pkt_ready (pkt_ready), .pkt_data (pkt_data),
    .pkt_kind (pkt_kind), .frame_done (frame_done), .in_frame (in_frame),
    .frame_number (frame_number), .triggers_ignored (ignored));

  localparam int P = 128;

  int checks = 0, failures = 0;
  int src_gap_pct = 0, sink_gap_pct = 0;
  int cur_frame = 0;          // frame number the sequencer should be on
  int src_row = 0, src_pix = 0;
  int exp_ph = 0, exp_row = 0, exp_pix = 0;   // monitor's position in the frame
  logic [255:0] exp_tail;
  int stalls = 0, gaps = 0;
  logic [11:0] px [16];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixel source: beat for (frame, row, pixel) from the reference pattern
  always_comb
    for (int k = 0; k < 16; k++) pix_data[k] = ref_pixel(cur_frame, src_row, src_pix, k);

  always @(negedge clk) begin
    if (rst_n) begin
      if (!pix_valid || pix_ready) begin
        // previous beat taken (or none offered): decide on the next one
        pix_valid <= ($urandom_range(0, 99) >= src_gap_pct);
      end
      pkt_ready <= ($urandom_range(0, 99) >= sink_gap_pct);
    end
  end

  always @(posedge clk) begin
    if (pix_valid && pix_ready) begin
      if (src_pix == P - 1) begin src_pix <= 0; src_row <= src_row + 1; end
      else src_pix <= src_pix + 1;
    end
    if (pkt_valid && !pkt_ready) stalls++;
    if (in_frame && exp_ph == 1 && !pix_valid) gaps++;
  end

  // packet monitor
  always @(posedge clk) begin
    if (pkt_valid && pkt_ready) begin
      case (exp_ph)
        0: begin
          check(pkt_kind == PKT_FRAME_HEADER, "kind header");
          check(pkt_data == ref_frame_header(int'(start_addr), int'(skip), int'(lines), cur_frame,
                                           int'(adc), int'(omode), int'(fr_ts)),
                $sformatf("frame header %h", pkt_data));
          exp_ph = (lines == 0) ? 3 : 1;
          exp_row = 0; exp_pix = 0;
        end
        1: begin
          for (int k = 0; k < 16; k++) px[k] = ref_pixel(cur_frame, exp_row, exp_pix, k);
          check(pkt_kind == PKT_PIXELS, "kind pixels");
          check(pkt_data == ref_pixel_packet(int'(adc), int'(start_row) + exp_row, exp_pix, px),
                $sformatf("pixel packet row %0d pix %0d: %h", exp_row, exp_pix, pkt_data));
          if (exp_pix == P - 1) begin exp_ph = 2; exp_pix = 0; end
          else exp_pix++;
        end
        2: begin
          check(pkt_kind == PKT_ROW_TAIL, "kind row tail");
          check(pkt_data == ref_row_tail(int'(adc), int'(start_row) + exp_row, exp_row == 0),
                $sformatf("row tail %h", pkt_data));
          exp_row++;
          exp_ph = (exp_row == int'(lines)) ? 3 : 1;
        end
        3: begin
          check(pkt_kind == PKT_FRAME_TAIL, "kind tail");
          check(pkt_data == exp_tail, $sformatf("frame tail %h", pkt_data));
          exp_ph = 4;
        end
        default: check(0, "packet after frame tail");
      endcase
    end
  end

  task automatic run_frame(int nlines, int first_row, adc_res_e res, int src_gap, int sink_gap,
                           bit extra_trigger, output int cycles);
    int t;
    @(negedge clk);
    lines = 11'(nlines); start_row = 11'(first_row); adc = res;
    omode = out_mode_e'($urandom_range(0, 3));
    start_addr = 10'($urandom); skip = 7'($urandom); fr_ts = 24'($urandom);
    s1 = status1_t'($urandom); s2 = status2_t'($urandom); s3 = status3_t'($urandom);
    ard = 26'($urandom); awr = 26'($urandom);
    exp_tail = ref_frame_tail(pack_status1(s1), pack_status2(s2), pack_status3(s3), int'(ard), int'(awr));
    src_gap_pct = src_gap; sink_gap_pct = sink_gap;
    src_row = 0; src_pix = 0; exp_ph = 0;
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    t = 0;
    while (!frame_done) begin
      @(negedge clk);
      t++;
      if (extra_trigger && t == 50) begin
        frame_start = 1;
        @(negedge clk);
        frame_start = 0;
        t++;
      end
      // once the tail is offered, disturb the status inputs
      if (pkt_kind == PKT_FRAME_TAIL && pkt_valid) begin
        s1 = ~s1; s2 = ~s2; s3 = ~s3; ard = ~ard;
      end
    end
    cycles = t;
    check(exp_ph == 4, $sformatf("frame ended in phase %0d", exp_ph));
    check(frame_number == 24'(cur_frame + 1), "frame number advanced");
    cur_frame++;
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // full throughput: the output never waits
    run_frame(3, 0, ADC_10BIT, 0, 0, 0, cyc);
    check(cyc == 2 + 3 * (P + 1), $sformatf("full-rate frame took %0d cycles, exp %0d",
                                             cyc, 2 + 3 * (P + 1)));
    run_frame(4, 1000, ADC_12BIT, 30, 30, 1, cyc);
    check(ignored == 16'd1, $sformatf("ignored triggers %0d", ignored));
    run_frame(2, 5, ADC_11BIT, 10, 50, 0, cyc);
    run_frame(0, 0, ADC_12BIT, 0, 20, 0, cyc);
    run_frame(1, 2047, ADC_10BIT, 50, 10, 0, cyc);
    check(stalls > 0 && gaps > 0, $sformatf("stalls %0d gaps %0d", stalls, gaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
