// pixel_packet_packer: builds one 256-bit payload packet of the UFO 5 format.
//
// A pixel packet holds one pixel from each of the 16 sensor outputs: pixel
// number p of output k, for p = 0..127 along the row. Layout, most significant
// bits first:
//   [255:224] header {8'h80, pixel_size, 0, row_number[10:0], 0, pixel_number[6:0]}
//   zero gap, 64 bits at 10 bit/pixel, 32 bits at 12 bit/pixel
//   [16*N-1:0] pixels, output 0 first (most significant), output 15 last,
//              N = 10, 11 or 12 bits per pixel
// pixel_size is N itself (0xA, 0xB, 0xC). The 10- and 12-bit layouts are the
// format's; for 11 bits the same rule (pixels packed at the bottom, the gap
// filling the rest) is this design's extension. In N-bit mode only the low N
// bits of each input pixel are used.
//
// With row_tail set the packet is the row-tail control word sent after the
// last pixel packet of a row: header tag 8'hC0, the row just finished, pixel
// number 127 for the first row of a frame and 0 for all later rows (as the
// format's examples show), a zero word, then the fixed 192-bit body.
// Purely combinational.
module pixel_packet_packer
  import ufo5_pkg::*;
(
  input  adc_res_e            adc_res,
  input  logic                row_tail,
  input  logic                first_row,
  input  logic [ROW_W-1:0]    row_number,
  input  logic [PIXNUM_W-1:0] pixel_number,
  input  pixel_vec_t          pixels,
  output logic [PKT_W-1:0]    packet
);

  logic [3:0]   nbits;
  logic [191:0] body10, body11, body12;

  always_comb begin
    nbits  = pixel_bits(adc_res);
    body10 = '0;
    body11 = '0;
    body12 = '0;
    for (int k = 0; k < NUM_OUTPUTS; k++) begin
      body10[(NUM_OUTPUTS-1-k)*10 +: 10] = pixels[k][9:0];
      body11[(NUM_OUTPUTS-1-k)*11 +: 11] = pixels[k][10:0];
      body12[(NUM_OUTPUTS-1-k)*12 +: 12] = pixels[k][11:0];
    end
  end

  always_comb begin
    if (row_tail) begin
      packet = {packet_header(ROW_TAIL_PKT_TAG, nbits, row_number,
                              first_row ? PIXNUM_W'(127) : PIXNUM_W'(0)),
                32'h0, ROW_TAIL_BODY};
    end else begin
      packet[255:192] = {packet_header(PIXEL_PKT_TAG, nbits, row_number, pixel_number), 32'h0};
      case (adc_res)
        ADC_10BIT: packet[191:0] = body10;
        ADC_11BIT: packet[191:0] = body11;
        default:   packet[191:0] = body12;
      endcase
    end
  end

endmodule
