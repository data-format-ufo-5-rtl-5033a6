// tb_reg_bank: reads the whole register window 0x9000..0x91BF after reset,
// with the read-only sources driven to the values of the camera's register
// dump, and compares every word with that dump (mirrors and zero words
// included). Then checks writes and read-back, read-only registers ignoring
// writes, field masks of 0x9030 and 0x9150, the single-word 0x91A0, the
// one-cycle read latency, the unmirrored 0x9100 and the settings output.
module tb_reg_bank;
  import ufo5_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        wr_en = 0, rd_en = 0;
  logic [15:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic        rvalid;
  reg_cfg_t    cfg;
  int checks = 0, failures = 0;

  // register dump, 0x9000..0x91B0, four words per 16-byte row
  localparam logic [31:0] DUMP [28][4] = '{
    '{32'h0000c800, 0, 32'h0000c800, 0}, '{32'h000bc800, 0, 32'h000bc800, 0},
    '{32'h00000004, 0, 32'h00000004, 0}, '{32'h00000005, 0, 32'h00000005, 0},
    '{32'h00000201, 0, 32'h00000201, 0}, '{32'h8449ffff, 32'h0f001001, 32'h3ffff111, 0},
    '{0, 0, 0, 0}, '{32'h00089108, 32'h0011220c, 32'h00112210, 0},
    '{0, 0, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 0, 0},
    '{0, 0, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 0, 0},
    '{32'h00001000, 0, 0, 0}, '{32'h14830466, 0, 32'h14830466, 0},
    '{32'h00000440, 0, 32'h00000440, 0}, '{0, 0, 0, 0},
    '{32'h00000025, 0, 32'h00000025, 0}, '{32'h02800000, 0, 32'h02800000, 0},
    '{0, 0, 0, 0}, '{32'h00000080, 0, 32'h00000080, 0},
    '{32'h00000280, 0, 32'h00000280, 0}, '{32'h07735940, 0, 32'h07735940, 0},
    '{32'h00000064, 0, 0, 0}, '{0, 0, 0, 0}};

  reg_bank dut (
    .clk (clk), .rst_n (rst_n), .wr_en (wr_en), .rd_en (rd_en), .addr (addr),
    .wdata (wdata), .rdata (rdata), .rvalid (rvalid),
    .spi_feedback (32'h000bc800), .status1_word (32'h8449ffff),
    .status2_word (32'h0f001001), .status3_word (32'h3ffff111),
    .ddr_start_addr (32'h00089108), .ddr_end_addr (32'h0011220c),
    .ddr_rd_addr (32'h00112210), .temp_alarms (3'b000),
    .fpga_temperature (10'h290), .sensor_temperature (19'h30466),
    .frames_pending (32'h0), .cfg (cfg));

  always #5 clk = ~clk;

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr_en = 1;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd_check(logic [15:0] a, logic [31:0] exp, string what);
    @(negedge clk); addr = a; rd_en = 1;
    @(negedge clk); rd_en = 0;
    checks++;
    if (!rvalid || rdata !== exp) begin
      failures++;
      $display("FAIL %s @%h: got %h (rvalid %b) exp %h", what, a, rdata, rvalid, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the dump, word by word
    for (int r = 0; r < 28; r++)
      for (int w = 0; w < 4; w++)
        rd_check(16'h9000 + 16'(r * 16 + w * 4), DUMP[r][w], "dump");
    // rvalid is only a one-cycle pulse
    @(negedge clk);
    checks++;
    if (rvalid) begin failures++; $display("FAIL rvalid stuck"); end
    // outside the window
    rd_check(16'h8000, 32'h0, "outside");
    // read/write registers, at +0 and through the +8 mirror
    wr(16'h9000, 32'hdeadbeef);  rd_check(16'h9008, 32'hdeadbeef, "cmosis mirror");
    wr(16'h9128, 32'h00000004);  rd_check(16'h9120, 32'h00000004, "rows via mirror");
    wr(16'h90a0, 32'h12345678);  rd_check(16'h90a0, 32'h12345678, "param1");
    wr(16'h90b0, 32'hffffffff);  rd_check(16'h90b0, 32'h000007ff, "param2 mask");
    wr(16'h9150, 32'hffffffff);  rd_check(16'h9150, 32'h0fffffff, "gain mask");
    wr(16'h9030, 32'hffffffff);  rd_check(16'h9030, 32'h00033105, "0x9030 fields");
    // +4 writes go nowhere
    wr(16'h9044, 32'h11111111);  rd_check(16'h9040, 32'h00000201, "+4 write ignored");
    // read-only registers ignore writes
    wr(16'h9010, 32'h0);         rd_check(16'h9010, 32'h000bc800, "feedback RO");
    wr(16'h9050, 32'h0);         rd_check(16'h9050, 32'h8449ffff, "status RO");
    // 0x9100 and 0x91A0 have no mirror
    wr(16'h9108, 32'h00000077);  rd_check(16'h9100, 32'h00001000, "9108 no mirror");
    wr(16'h91a8, 32'h00000009);  rd_check(16'h91a0, 32'h00000064, "91a8 no mirror");
    wr(16'h91a0, 32'h00000009);  rd_check(16'h91a0, 32'h00000009, "max frames");
    // settings output
    checks++;
    if (cfg.adc_res !== ADC_RSVD || cfg.output_mode !== OUT_2 || cfg.bit_mode !== 1'b1 ||
        cfg.number_of_rows !== 32'd4 || cfg.max_frames_in_ddr !== 32'd9 ||
        cfg.adc_gain !== 8'hff || cfg.phi_deg !== 5'h1f || cfg.cmosis_param_2 !== 11'h7ff) begin
      failures++;
      $display("FAIL cfg output");
    end
    // random write/read of plain 32-bit registers
    for (int i = 0; i < 100; i++) begin
      automatic int slots[10] = '{'h00, 'h02, 'h04, 'h0c, 'h0a, 'h13, 'h14, 'h17, 'h18, 'h19};
      automatic logic [15:0] a = 16'h9000 + 16'(slots[$urandom_range(0, 9)] * 16);
      automatic logic [31:0] d = $urandom;
      wr(a + 16'(8 * $urandom_range(0, 1)), d);
      rd_check(a + 16'(8 * $urandom_range(0, 1)), d, "random rw");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
