// tb_ufo5_top: end-to-end test of the readout formatter at its default
// parameters (128 packets per row, minimum trigger period 0x280).
//
// Software's view: registers are written and read over the register bus,
// triggers started with trig_start, and a sensor model feeds pixel beats.
// Every packet leaving the formatter is checked against the reference model.
//   1. One full-size frame: 1088 rows (the reset value of 0x9120) in 10-bit
//      mode, source and sink always ready, taking exactly 2 + 1088*129 cycles.
//   2. Mode switch to 12 bits, 4 rows from row 10, four triggers with a
//      programmed period below the minimum (so 0x280 applies), random source
//      gaps and sink back-pressure long enough that some triggers arrive
//      during a frame and are ignored.
//   3. The DDR occupancy reaches the threshold (0x91A0 = 2): BUSY appears in
//      status3 and register 0x91B0; DMA frame-sent pulses then clear it.
// Each mechanism (stall, source gap, ignored trigger, period clamp, busy on,
// busy off, 10- and 12-bit frames) is counted and must have happened.
module tb_ufo5_top;
  import ufo5_pkg::*;
  import ufo5_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         reg_wr_en = 0, reg_rd_en = 0;
  logic [15:0]  reg_addr = 0;
  logic [31:0]  reg_wdata = 0, reg_rdata;
  logic         reg_rvalid;
  reg_cfg_t     cfg;
  logic         trig_start = 0, trig_stop = 0, trigger, trig_running;
  logic [31:0]  trig_issued;
  logic         pix_valid = 0, pix_ready;
  pixel_vec_t   pix_data;
  logic         pkt_valid, pkt_ready = 0;
  logic [255:0] pkt_data;
  pkt_kind_e    pkt_kind;
  status1_t     s1;
  status2_t     s2;
  status3_t     s3;
  logic         dma_frame_sent = 0;
  logic         busy, frame_done, in_frame;
  logic [31:0]  frames_pending;
  logic [23:0]  frame_number;
  logic [15:0]  triggers_ignored;

  ufo5_top dut (
    .clk (clk), .rst_n (rst_n),
    .reg_wr_en (reg_wr_en), .reg_rd_en (reg_rd_en), .reg_addr (reg_addr),
    .reg_wdata (reg_wdata), .reg_rdata (reg_rdata), .reg_rvalid (reg_rvalid), .cfg (cfg),
    .trig_start (trig_start), .trig_stop (trig_stop), .trigger (trigger),
    .trig_running (trig_running), .trig_issued (trig_issued),
    .pix_valid (pix_valid), .pix_ready (pix_ready), .pix_data (pix_data),
    .pkt_valid (pkt_valid), .pkt_ready (pkt_ready), .pkt_data (pkt_data), .pkt_kind (pkt_kind),
    .status1_in (s1), .status2_in (s2), .status3_in (s3),
    .app_addr_rd (26'h0123456), .app_addr_wr (26'h0234567),
    .ddr_start_addr (32'h00089108), .ddr_end_addr (32'h0011220c), .ddr_rd_addr (32'h00112210),
    .spi_feedback (32'h000bc800), .temp_alarms (3'b0), .fpga_temperature (10'h290),
    .sensor_temperature (19'h30466), .fr_timestep (24'h000abc),
    .dma_frame_sent (dma_frame_sent),
    .busy (busy), .frames_pending (frames_pending), .frame_done (frame_done),
    .in_frame (in_frame), .frame_number (frame_number), .triggers_ignored (triggers_ignored));

  localparam int P = 128;

  int checks = 0, failures = 0;
  int src_gap_pct = 0, sink_gap_pct = 0;
  int cur_frame = 0, src_row = 0, src_pix = 0;
  int exp_ph = 0, exp_row = 0, exp_pix = 0;
  int lines = 1088, first_row = 0, adc = 0, omode = 0;
  int model_pending = 0, max_frames = 100;
  bit model_busy = 0;
  int n_stall = 0, n_gap = 0, n_busy_on = 0, n_busy_off = 0, n_10bit = 0, n_12bit = 0;
  int n_clamped = 0;
  longint cyc = 0, last_trig = -1;
  logic [11:0] px [16];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sensor model
  always_comb
    for (int k = 0; k < 16; k++) pix_data[k] = ref_pixel(cur_frame, src_row, src_pix, k);

  always @(negedge clk) begin
    if (rst_n) begin
      if (!pix_valid || pix_ready) pix_valid <= ($urandom_range(0, 99) >= src_gap_pct);
      pkt_ready <= ($urandom_range(0, 99) >= sink_gap_pct);
    end
  end

  always @(posedge clk) begin
    if (pix_valid && pix_ready) begin
      if (src_pix == P - 1) begin src_pix <= 0; src_row <= src_row + 1; end
      else src_pix <= src_pix + 1;
    end
    if (pkt_valid && !pkt_ready) n_stall++;
    if (in_frame && pkt_kind == PKT_PIXELS && !pix_valid) n_gap++;
    if (trigger) begin
      if (last_trig >= 0 && cyc - last_trig == 'h280) n_clamped++;
      last_trig <= cyc;
    end
  end

  // packet monitor
  always @(posedge clk) begin
    if (pkt_valid && pkt_ready) begin
      case (exp_ph)
        0: begin
          check(pkt_kind == PKT_FRAME_HEADER, "kind header");
          check(pkt_data == ref_frame_header(0, 0, lines, cur_frame, adc, omode, 'habc),
                $sformatf("frame header %h", pkt_data));
          exp_ph = 1; exp_row = 0; exp_pix = 0;
          if (adc == 0) n_10bit++; else n_12bit++;
        end
        1: begin
          for (int k = 0; k < 16; k++) px[k] = ref_pixel(cur_frame, exp_row, exp_pix, k);
          check(pkt_data == ref_pixel_packet(adc, first_row + exp_row, exp_pix, px),
                $sformatf("frame %0d row %0d pix %0d: %h", cur_frame, exp_row, exp_pix, pkt_data));
          if (exp_pix == P - 1) begin exp_ph = 2; exp_pix = 0; end
          else exp_pix++;
        end
        2: begin
          check(pkt_data == ref_row_tail(adc, first_row + exp_row, exp_row == 0),
                $sformatf("row tail %h", pkt_data));
          exp_row++;
          exp_ph = (exp_row == lines) ? 3 : 1;
        end
        3: begin
          check(pkt_kind == PKT_FRAME_TAIL, "kind tail");
          check(pkt_data == ref_frame_tail(32'h8449ffff, 32'h0f001001,
                                           model_busy ? 32'h3ffff111 : 32'h1ffff111,
                                           'h0123456, 'h0234567),
                $sformatf("frame tail %h", pkt_data));
          exp_ph = 0;
          cur_frame++;
          src_row <= 0; src_pix <= 0;
          model_pending++;
          model_busy = (model_pending >= max_frames);
        end
        default: ;
      endcase
    end
  end

  task automatic reg_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr_en = 1;
    @(negedge clk); reg_wr_en = 0;
  endtask

  task automatic reg_read(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; reg_rd_en = 1;
    @(negedge clk); reg_rd_en = 0;
    d = reg_rdata;
  endtask

  task automatic wait_frames(int n);
    int target = cur_frame + n;
    while (cur_frame < target) @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    int t0;
    s1 = '{fsm_master_ctrl: 4'd1, cmosis_in: 26'h049ffff};
    s2 = '0; s2.error_status = 4'hf; s2.empty_fifo_255_64 = 1; s2.empty_fifo_to_ddr = 1;
    s3 = '{busy: 1'b0, error_desc_1: 17'h1ffff, fsm_rd_ddr3: 3'd1, fsm_wr_ddr3: 3'd1,
           fsm_arbiter_ddr3: 3'd1};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. one full-size frame, 10-bit, everything ready
    reg_read(16'h9120, d);
    check(d == 32'h440, $sformatf("0x9120 reset value %h", d));
    reg_write(16'h9170, 32'd1);
    @(negedge clk);
    trig_start = 1;
    @(negedge clk);
    trig_start = 0;
    while (!pkt_valid) @(negedge clk);
    t0 = int'(cyc);
    wait_frames(1);
    check(int'(cyc) - t0 == 2 + 1088 * (P + 1),
          $sformatf("full frame took %0d cycles, exp %0d", int'(cyc) - t0, 2 + 1088 * (P + 1)));
    reg_read(16'h91b0, d);
    check(d == 1, $sformatf("frames pending %0d", d));

    // 2. 12-bit, short frames, triggers faster than frames
    adc = 2; omode = 2; lines = 4; first_row = 10; max_frames = 2;
    reg_write(16'h9030, 32'h00022000);
    reg_write(16'h9120, 32'd4);
    reg_write(16'h9130, 32'd10);
    reg_write(16'h91a0, 32'd2);
    reg_write(16'h9170, 32'd4);
    reg_write(16'h9180, 32'h100);
    src_gap_pct = 40; sink_gap_pct = 40;
    @(negedge clk);
    trig_start = 1;
    @(negedge clk);
    trig_start = 0;
    while (trig_running || in_frame) @(negedge clk);
    check(triggers_ignored > 0, $sformatf("triggers ignored %0d", triggers_ignored));
    check(trig_issued == 4, "issued");

    // 3. busy in status3 and 0x91B0, cleared by the DMA engine
    check(busy == 1'b1 && model_busy, "busy at threshold");
    if (busy) n_busy_on++;
    reg_read(16'h9058, d);
    check(d[29] == 1'b1, $sformatf("status3 busy bit %h", d));
    reg_read(16'h91b0, d);
    check(d == 32'(model_pending), $sformatf("0x91b0 %0d model %0d", d, model_pending));
    while (model_pending > 0) begin
      @(negedge clk); dma_frame_sent = 1;
      @(negedge clk); dma_frame_sent = 0;
      model_pending--;
      model_busy = (model_pending >= max_frames);
      @(negedge clk);
      check(busy == model_busy, "busy follows DMA");
      check(frames_pending == 32'(model_pending), "pending follows DMA");
    end
    if (!busy) n_busy_off++;
    reg_read(16'h9058, d);
    check(d == 32'h1ffff111, $sformatf("status3 after DMA %h", d));

    // one more frame, not busy, to see the tail without the busy bit
    src_gap_pct = 0; sink_gap_pct = 0;
    reg_write(16'h9170, 32'd1);
    @(negedge clk); trig_start = 1;
    @(negedge clk); trig_start = 0;
    wait_frames(1);

    check(n_stall > 0, "no back-pressure stall happened");
    check(n_gap > 0, "no source gap happened");
    check(n_clamped > 0, "trigger period was never clamped to 0x280");
    check(n_busy_on > 0 && n_busy_off > 0, "busy did not toggle");
    check(n_10bit > 0 && n_12bit > 0, "mode switch did not happen");
    check(exp_ph == 0, "frame left unfinished");
    $display("stalls=%0d gaps=%0d ignored=%0d clamped=%0d busy_on=%0d busy_off=%0d frames10=%0d frames12=%0d",
             n_stall, n_gap, triggers_ignored, n_clamped, n_busy_on, n_busy_off, n_10bit, n_12bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
