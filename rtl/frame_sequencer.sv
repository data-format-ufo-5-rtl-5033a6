// frame_sequencer: turns sensor pixel beats into the UFO 5 packet stream.
//
// On a frame_start pulse (ignored, and counted, while a frame is in progress)
// the sequencer latches the frame configuration and emits, as 256-bit packets:
//   1. the frame header (frame_header_gen),
//   2. for each of number_of_lines rows, starting at row start_row:
//      PKTS_PER_ROW pixel packets, pixel_number 0..PKTS_PER_ROW-1, each
//      carrying one beat of 16 pixels from the sensor outputs, then the
//      row-tail control word (pixel_packet_packer),
//   3. the frame tail (frame_tail_gen), with the status words sampled on the
//      clock edge at which the sequencer moves to the tail.
// The frame number in the header starts at 0 after reset and counts frames
// whose tail has been sent; frame_done pulses then.
//
// Interface: the pixel input and packet output are valid/ready streams; a
// transfer happens on a clock edge where both are high, and a source keeps
// valid and data steady until then. Pixel beats pass straight through to the
// output in the same cycle (no buffer); header, row tail and frame tail are
// generated here, one per cycle when the output is ready. With a ready sink
// and a pixel beat every cycle a frame of L rows takes 2 + L*(PKTS_PER_ROW+1)
// cycles.
//
// The packet formats and the 128 packets per row are the format's. The order
// of packets in a frame, the ignoring of early triggers, latching the
// configuration at frame start, and the handshakes are this design's choices.
module frame_sequencer
  import ufo5_pkg::*;
#(
  parameter int unsigned PKTS_PER_ROW = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  // frame configuration, latched at frame_start
  input  logic                frame_start,
  input  logic [9:0]          cmosis_start_addr,
  input  logic [6:0]          skip_lines,
  input  logic [ROW_W-1:0]    number_of_lines,
  input  logic [ROW_W-1:0]    start_row,
  input  adc_res_e            adc_res,
  input  out_mode_e           output_mode,
  input  logic [23:0]         fr_timestep,
  // status for the frame tail
  input  status1_t            status1,
  input  status2_t            status2,
  input  status3_t            status3,
  input  logic [25:0]         app_addr_rd,
  input  logic [25:0]         app_addr_wr,
  // pixel input stream
  input  logic                pix_valid,
  output logic                pix_ready,
  input  pixel_vec_t          pix_data,
  // packet output stream
  output logic                pkt_valid,
  input  logic                pkt_ready,
  output logic [PKT_W-1:0]    pkt_data,
  output pkt_kind_e           pkt_kind,
  // events and state
  output logic                frame_done,
  output logic                in_frame,
  output logic [23:0]         frame_number,
  output logic [15:0]         triggers_ignored
);

  typedef enum logic [2:0] {S_IDLE, S_HEADER, S_PIXELS, S_ROW_TAIL, S_TAIL} state_e;

  localparam int unsigned PCNT_W = (PKTS_PER_ROW > 1) ? $clog2(PKTS_PER_ROW) : 1;

  state_e              state;
  adc_res_e            frame_adc_res;
  logic [ROW_W-1:0]    row;          // row_number_reg of the current row
  logic [ROW_W-1:0]    rows_left;    // rows still to send, current one included
  logic [PCNT_W-1:0]   pix_num;      // pixel_number_reg of the next pixel packet
  logic                first_row;

  logic [PKT_W-1:0]    header_pkt, tail_pkt, payload_pkt;
  logic                fire, start_frame, last_before_tail, frame_done_next;

  assign start_frame      = (state == S_IDLE) && frame_start;
  // the packet now leaving is the last one before the frame tail
  assign last_before_tail = fire && (((state == S_HEADER) && (rows_left == '0)) ||
                                     ((state == S_ROW_TAIL) && (rows_left == ROW_W'(1))));

  frame_header_gen u_header (
    .clk               (clk),
    .rst_n             (rst_n),
    .capture           (start_frame),
    .advance           (frame_done_next),
    .cmosis_start_addr (cmosis_start_addr),
    .skip_lines        (skip_lines),
    .number_of_lines   (number_of_lines),
    .adc_res           (adc_res),
    .output_mode       (output_mode),
    .fr_timestep       (fr_timestep),
    .header            (header_pkt),
    .frame_number      (frame_number),
    .frame_adc_res     (frame_adc_res)
  );

  frame_tail_gen u_tail (
    .clk         (clk),
    .rst_n       (rst_n),
    .capture     (last_before_tail),
    .status1     (status1),
    .status2     (status2),
    .status3     (status3),
    .app_addr_rd (app_addr_rd),
    .app_addr_wr (app_addr_wr),
    .tail        (tail_pkt)
  );

  pixel_packet_packer u_packer (
    .adc_res      (frame_adc_res),
    .row_tail     (state == S_ROW_TAIL),
    .first_row    (first_row),
    .row_number   (row),
    .pixel_number (PIXNUM_W'(pix_num)),
    .pixels       (pix_data),
    .packet       (payload_pkt)
  );

  always_comb begin
    pix_ready = 1'b0;
    pkt_valid = 1'b0;
    pkt_data  = payload_pkt;
    pkt_kind  = PKT_PIXELS;
    unique case (state)
      S_IDLE: ;
      S_HEADER: begin
        pkt_valid = 1'b1;
        pkt_data  = header_pkt;
        pkt_kind  = PKT_FRAME_HEADER;
      end
      S_PIXELS: begin
        pkt_valid = pix_valid;
        pix_ready = pkt_ready;
      end
      S_ROW_TAIL: begin
        pkt_valid = 1'b1;
        pkt_kind  = PKT_ROW_TAIL;
      end
      S_TAIL: begin
        pkt_valid = 1'b1;
        pkt_data  = tail_pkt;
        pkt_kind  = PKT_FRAME_TAIL;
      end
      default: ;
    endcase
  end

  assign fire            = pkt_valid && pkt_ready;
  assign frame_done_next  = fire && (state == S_TAIL);
  assign in_frame = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      row              <= '0;
      rows_left        <= '0;
      pix_num          <= '0;
      first_row        <= 1'b0;
      frame_done       <= 1'b0;
      triggers_ignored <= '0;
    end else begin
      frame_done <= frame_done_next;
      if (frame_start && state != S_IDLE)
        triggers_ignored <= triggers_ignored + 16'd1;
      unique case (state)
        S_IDLE: if (start_frame) begin
          row       <= start_row;
          rows_left <= number_of_lines;
          pix_num   <= '0;
          first_row <= 1'b1;
          state     <= S_HEADER;
        end
        S_HEADER: if (fire) state <= (rows_left == '0) ? S_TAIL : S_PIXELS;
        S_PIXELS: if (fire) begin
          if (pix_num == PCNT_W'(PKTS_PER_ROW - 1)) begin
            pix_num <= '0;
            state   <= S_ROW_TAIL;
          end else begin
            pix_num <= pix_num + 1'b1;
          end
        end
        S_ROW_TAIL: if (fire) begin
          first_row <= 1'b0;
          row       <= row + 1'b1;
          rows_left <= rows_left - 1'b1;
          state     <= (rows_left == ROW_W'(1)) ? S_TAIL : S_PIXELS;
        end
        S_TAIL: if (fire) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A packet offered on the output stays offered, unchanged, until taken.
  a_pkt_hold: assert property (@(posedge clk) disable iff (!rst_n)
    pkt_valid && !pkt_ready |=> pkt_valid && $stable(pkt_data));

endmodule
