// tb_pixel_packet_packer: checks payload packets against the format's 10-bit
// example packet (0x80A00000, two zero words, 160 bits of pixels), the 12-bit
// packet headers of its example row (0x80C00172 .. 0x80C0017F), the row-tail
// headers 0xC0C0007F (first row) and 0xC0C00100 (later rows), and the
// reference model for random pixels in 10, 11 and 12-bit mode.
module tb_pixel_packet_packer;
  import ufo5_pkg::*;
  import ufo5_ref_pkg::*;

  adc_res_e     adc;
  logic         row_tail, first_row;
  logic [10:0]  row;
  logic [6:0]   pnum;
  pixel_vec_t   pixels;
  logic [255:0] pkt;
  logic [11:0]  px [16];
  int checks = 0, failures = 0;

  pixel_packet_packer dut (.adc_res (adc), .row_tail (row_tail), .first_row (first_row),
                           .row_number (row), .pixel_number (pnum), .pixels (pixels),
                           .packet (pkt));

  task automatic check(logic [255:0] exp, string what);
    checks++;
    if (pkt !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, pkt, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 10-bit example: pixels of outputs 0..15, read from the example's 160 bits
    px = '{12'h165, 12'h179, 12'h136, 12'h1d9, 12'h1b1, 12'h125, 12'h1db, 12'h156,
           12'h157, 12'h259, 12'h1c1, 12'h195, 12'h1c7, 12'h35a, 12'h25a, 12'h359};
    for (int k = 0; k < 16; k++) pixels[k] = px[k];
    adc = ADC_10BIT; row_tail = 0; first_row = 0; row = 0; pnum = 0;
    #1;
    check({32'h80a00000, 32'h0, 32'h0, 160'h595794d9d96c52576d5655e597059571f5a96b59},
          "10-bit example packet");
    // 12-bit example row: headers of row 1, pixel numbers 114..127
    adc = ADC_12BIT; row = 11'd1;
    for (int p = 114; p < 128; p++) begin
      pnum = 7'(p);
      #1;
      checks++;
      if (pkt[255:224] !== (32'h80c00100 | 32'(p))) begin
        failures++;
        $display("FAIL 12-bit header %h", pkt[255:224]);
      end
      checks++;
      if (pkt[223:192] !== 32'h0) begin
        failures++;
        $display("FAIL 12-bit gap %h", pkt[223:192]);
      end
    end
    // row tails
    row_tail = 1; first_row = 1; row = 0;
    #1;
    checks++;
    if (pkt[255:224] !== 32'hc0c0007f) begin
      failures++;
      $display("FAIL first row tail %h", pkt[255:224]);
    end
    first_row = 0; row = 1;
    #1;
    checks++;
    if (pkt[255:224] !== 32'hc0c00100) begin
      failures++;
      $display("FAIL row tail %h", pkt[255:224]);
    end
    // random
    for (int i = 0; i < 600; i++) begin
      adc = adc_res_e'($urandom_range(0, 2)); row = 11'($urandom); pnum = 7'($urandom);
      row_tail = ($urandom_range(0, 4) == 0); first_row = 1'($urandom);
      for (int k = 0; k < 16; k++) begin
        px[k] = 12'($urandom);
        pixels[k] = px[k];
      end
      #1;
      if (row_tail) check(ref_row_tail(int'(adc), int'(row), first_row), "random row tail");
      else          check(ref_pixel_packet(int'(adc), int'(row), int'(pnum), px), "random pixel packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
