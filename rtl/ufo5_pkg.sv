// ufo5_pkg: shared constants, types and word-packing functions of the UFO 5
// camera data format.
//
// Everything the camera sends travels in 256-bit packets made of eight 32-bit
// words, the first word in the most significant position. A frame is a header
// packet, then for each sensor row 128 pixel packets and one row-tail control
// packet, then a tail packet. Pixel packets carry one pixel from each of the
// 16 sensor outputs. The field layouts of the header, the tail and the three
// status words are the format's own; the functions below pack them so that
// every module that needs a word builds it the same way.
//
// Choices of this implementation, not of the format: the widths of the DDR3
// state codes (3 bits), error_status (4 bits), error_desc_1 (17 bits) and the
// FIFO counters (10 and 8 bits) were derived by matching the format's field
// lists against its example status words.
package ufo5_pkg;

  localparam int unsigned NUM_OUTPUTS = 16;   // sensor outputs, one pixel each per packet
  localparam int unsigned PKT_W       = 256;  // packet width
  localparam int unsigned PIX_MAX_W   = 12;   // widest pixel
  localparam int unsigned ROW_W       = 11;   // row_number_reg
  localparam int unsigned PIXNUM_W    = 7;    // pixel_number_reg, 0..127

  typedef logic [PIX_MAX_W-1:0] pixel_t;
  typedef pixel_t [NUM_OUTPUTS-1:0] pixel_vec_t;  // element k = sensor output k

  // ADC_Resolution code (header word 8, register 0x9030)
  typedef enum logic [1:0] {
    ADC_10BIT = 2'd0,
    ADC_11BIT = 2'd1,
    ADC_12BIT = 2'd2,
    ADC_RSVD  = 2'd3
  } adc_res_e;

  // Output_mode code (header word 8, register 0x9030)
  typedef enum logic [1:0] {
    OUT_16 = 2'd0,
    OUT_8  = 2'd1,
    OUT_4  = 2'd2,
    OUT_2  = 2'd3
  } out_mode_e;

  // What the packet on the output stream is
  typedef enum logic [1:0] {
    PKT_FRAME_HEADER = 2'd0,
    PKT_PIXELS       = 2'd1,
    PKT_ROW_TAIL     = 2'd2,
    PKT_FRAME_TAIL   = 2'd3
  } pkt_kind_e;

  // First byte of the 32-bit packet header
  localparam logic [7:0] PIXEL_PKT_TAG    = 8'h80;
  localparam logic [7:0] ROW_TAIL_PKT_TAG = 8'hC0;

  // 192-bit body of the row-tail control word (three 64-bit words)
  localparam logic [191:0] ROW_TAIL_BODY =
    {64'h5055055005505505, 64'h0550550555055055, 64'h5505505550550550};

  // status1 = {1'b1, 1'b0, FSM_Master_Ctrl, status_bit_int_CMOSIS_IN[25:0]}
  typedef struct packed {
    logic [3:0]  fsm_master_ctrl;
    logic [25:0] cmosis_in;
  } status1_t;

  // status2 = {3'b0, end_of_all_FR, error_status, rd_data_count_fifo_255_64,
  //            full_FIFO_255_64, empty_FIFO_255_64, 2'b0,
  //            wr_data_count_fifo_DATA_to_DDR, full_FIFO_data_to_DDR,
  //            empty_FIFO_Data_to_DDR}
  typedef struct packed {
    logic        end_of_all_fr;
    logic [3:0]  error_status;
    logic [9:0]  rd_count_fifo_255_64;
    logic        full_fifo_255_64;
    logic        empty_fifo_255_64;
    logic [7:0]  wr_count_fifo_to_ddr;
    logic        full_fifo_to_ddr;
    logic        empty_fifo_to_ddr;
  } status2_t;

  // status3 = {2'b0, BUSY_status, error_desc_1, 1'b0, FSM_RD_DDR3, 1'b0,
  //            FSM_WR_DDR3, 1'b0, FSM_ARBITER_DDR3}
  typedef struct packed {
    logic        busy;
    logic [16:0] error_desc_1;
    logic [2:0]  fsm_rd_ddr3;
    logic [2:0]  fsm_wr_ddr3;
    logic [2:0]  fsm_arbiter_ddr3;
  } status3_t;

  // Writable settings of the register bank, as the rest of the design sees them
  typedef struct packed {
    logic [31:0] cmosis_param;        // 0x9000
    logic [31:0] spi_speed;           // 0x9020
    out_mode_e   output_mode;         // 0x9030 [17:16]
    adc_res_e    adc_res;             // 0x9030 [13:12]
    logic        bit_mode;            // 0x9030 [8]
    logic [31:0] control;             // 0x9040
    logic [31:0] cmosis_param_1;      // 0x90a0
    logic [10:0] cmosis_param_2;      // 0x90b0 threshold line
    logic [31:0] skip_lines;          // 0x90c0
    logic [31:0] rawdata_pkt_addr;    // 0x9100
    logic [31:0] number_of_rows;      // 0x9120
    logic [31:0] start_pos;           // 0x9130
    logic [31:0] exp_time_ext;        // 0x9140
    logic [7:0]  adc_gain;            // 0x9150 [27:20]
    logic [4:0]  motor_x;             // 0x9150 [19:15]
    logic [4:0]  motor_y;             // 0x9150 [14:10]
    logic [4:0]  motor_z;             // 0x9150 [9:5]
    logic [4:0]  phi_deg;             // 0x9150 [4:0]
    logic [31:0] number_of_triggers;  // 0x9170
    logic [31:0] trigger_period;      // 0x9180
    logic [31:0] temp_sample_period;  // 0x9190
    logic [31:0] max_frames_in_ddr;   // 0x91a0
  } reg_cfg_t;

  function automatic logic [31:0] pack_status1(status1_t s);
    return {1'b1, 1'b0, s.fsm_master_ctrl, s.cmosis_in};
  endfunction

  function automatic logic [31:0] pack_status2(status2_t s);
    return {3'b000, s.end_of_all_fr, s.error_status, s.rd_count_fifo_255_64,
            s.full_fifo_255_64, s.empty_fifo_255_64, 2'b00,
            s.wr_count_fifo_to_ddr, s.full_fifo_to_ddr, s.empty_fifo_to_ddr};
  endfunction

  function automatic logic [31:0] pack_status3(status3_t s);
    return {2'b00, s.busy, s.error_desc_1, 1'b0, s.fsm_rd_ddr3, 1'b0,
            s.fsm_wr_ddr3, 1'b0, s.fsm_arbiter_ddr3};
  endfunction

  // Bits per pixel for an ADC_Resolution code; the reserved code reads as 12.
  function automatic logic [3:0] pixel_bits(adc_res_e r);
    case (r)
      ADC_10BIT: return 4'd10;
      ADC_11BIT: return 4'd11;
      default:   return 4'd12;
    endcase
  endfunction

  // 32-bit header of a pixel packet or row-tail control word:
  // {tag, pixel_size_reg(4), 0, row_number_reg(11), 0, pixel_number_reg(7)}
  function automatic logic [31:0] packet_header(logic [7:0] tag, logic [3:0] pix_size,
                                                logic [ROW_W-1:0] row,
                                                logic [PIXNUM_W-1:0] pix_num);
    return {tag, pix_size, 1'b0, row, 1'b0, pix_num};
  endfunction

endpackage
