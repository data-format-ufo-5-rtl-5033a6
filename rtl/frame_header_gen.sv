// frame_header_gen: frame configuration register, frame counter and 256-bit
// frame header packet of the UFO 5 format.
//
// On capture the frame's configuration (sensor start address, skipped lines,
// number of lines, ADC resolution, output mode, fast-reject time step) is
// stored, so that a frame keeps the settings it started with; on advance the
// 24-bit frame number, 0 after reset, counts up. The header is built from the
// stored values, eight 32-bit words tagged 4'h5, word 1 in bits [255:224]:
//   1..5  fixed patterns 0x51111111 .. 0x55555555 (frame marker)
//   6     {4'h5, CMOSIS_start_addr[9:0], skip_lines[6:0], number_of_lines[10:0]}
//   7     {4'h5, 4'h5, frame_number[23:0]}
//   8     {4'h5, ADC_Resolution[1:0], Output_mode[1:0], FR_timestep[23:0]}
// The stored resolution is also output for packing the frame's pixels. Outputs change the cycle after capture or advance.
//
// The word layouts are the format's. Storing the settings per frame, the
// counter starting at 0 (the format's example header carries frame 0) and
// word 1 in the most significant bits are this design's choices.
module frame_header_gen
  import ufo5_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             capture,
  input  logic             advance,
  input  logic [9:0]       cmosis_start_addr,
  input  logic [6:0]       skip_lines,
  input  logic [ROW_W-1:0] number_of_lines,
  input  adc_res_e         adc_res,
  input  out_mode_e        output_mode,
  input  logic [23:0]      fr_timestep,
  output logic [PKT_W-1:0] header,
  output logic [23:0]      frame_number,
  output adc_res_e         frame_adc_res
);

  logic [9:0]  start_q;
  logic [6:0]  skip_q;
  logic [ROW_W-1:0] lines_q;
  out_mode_e   mode_q;
  logic [23:0] fr_ts_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q       <= '0;
      skip_q        <= '0;
      lines_q   <= '0;
      frame_adc_res <= ADC_10BIT;
      mode_q        <= OUT_16;
      fr_ts_q       <= '0;
      frame_number  <= '0;
    end else begin
      if (capture) begin
        start_q       <= cmosis_start_addr;
        skip_q        <= skip_lines;
        lines_q   <= number_of_lines;
        frame_adc_res <= adc_res;
        mode_q        <= output_mode;
        fr_ts_q       <= fr_timestep;
      end
      if (advance) frame_number <= frame_number + 24'd1;
    end
  end

  always_comb begin
    header = {
      {4'h5, 28'h1111111},
      {4'h5, 28'h2222222},
      {4'h5, 28'h3333333},
      {4'h5, 28'h4444444},
      {4'h5, 28'h5555555},
      {4'h5, start_q, skip_q, lines_q},
      {4'h5, 4'h5, frame_number},
      {4'h5, frame_adc_res, mode_q, fr_ts_q}
    };
  end

endmodule
