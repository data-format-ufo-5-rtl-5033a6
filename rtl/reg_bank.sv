// reg_bank: control and status register bank of the camera readout.
//
// 32-bit registers on a 16-byte grid from BASE_ADDR (0x9000). A register
// answers at offset +0 and, mirrored, at +8 of its 16-byte slot; +4 and +C
// read zero. Two slots hold three registers each at +0, +4, +8: the status
// words (0x9050) and the DDR memory pointers (0x9070). 0x9100 and 0x91A0
// answer at +0 only. Unlisted addresses read zero and ignore writes.
// Accesses are whole 32-bit words: address bits [1:0] are ignored.
//
//   0x9000 RW CMOSIS configuration            0x9010 RO sensor write-back feedback
//   0x9020 RW SPI speed grade                 0x9030 RW/RO {Output_mode[17:16],
//   0x9040 RW control                               ADC_Resolution[13:12],
//   0x9050 RO status1, status2, status3             bit_mode[8], firmware version[7:0] RO}
//   0x9070 RO DDR start, end, read address    0x90A0 RW CMOSIS_PARAM_1
//   0x90B0 RW CMOSIS_PARAM_2 [10:0]           0x90C0 RW SKIPE_LINES
//   0x9100 RW RAWDATA_PKT_ADDR                0x9110 RO {temp alarms[31:29],
//   0x9120 RW number of rows                        FPGA temperature[28:19], sensor temperature[18:0]}
//   0x9130 RW first row (start position)      0x9140 RW EXP_TIME_EXT
//   0x9150 RW {4'h0, ADC gain[7:0], motor X, Y, Z, phi[4:0] each}
//   0x9170 RW NUMBER_OF_TRIGGERS              0x9180 RW TRIGGER_PERIOD
//   0x9190 RW temperature sample period       0x91A0 RW max frames in DDR
//   0x91B0 RO frames in DDR not yet sent
//
// The map, the field layouts and the mirroring (as a register dump of the
// camera shows it) follow the format description. Reset values are the
// values of that dump; the bus (one write or read per cycle, read data
// registered and flagged by rvalid the cycle after rd_en) is this design's.
module reg_bank
  import ufo5_pkg::*;
#(
  parameter logic [15:0] BASE_ADDR   = 16'h9000,
  parameter logic [7:0]  FW_VERSION  = 8'd5
) (
  input  logic        clk,
  input  logic        rst_n,
  // register bus, byte addresses
  input  logic        wr_en,
  input  logic        rd_en,
  input  logic [15:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rvalid,
  // read-only sources
  input  logic [31:0] spi_feedback,
  input  logic [31:0] status1_word,
  input  logic [31:0] status2_word,
  input  logic [31:0] status3_word,
  input  logic [31:0] ddr_start_addr,
  input  logic [31:0] ddr_end_addr,
  input  logic [31:0] ddr_rd_addr,
  input  logic [2:0]  temp_alarms,
  input  logic [9:0]  fpga_temperature,
  input  logic [18:0] sensor_temperature,
  input  logic [31:0] frames_pending,
  // settings
  output reg_cfg_t    cfg
);

  logic        in_range;
  logic [4:0]  slot;
  logic [1:0]  sub;
  logic        mirror_hit;   // +0 or +8
  logic [31:0] rd_word;

  assign in_range   = (addr[15:9] == BASE_ADDR[15:9]);
  assign slot       = addr[8:4];
  assign sub        = addr[3:2];
  assign mirror_hit = (sub[0] == 1'b0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.cmosis_param       <= 32'h0000C800;
      cfg.spi_speed          <= 32'h00000004;
      cfg.output_mode        <= OUT_16;
      cfg.adc_res            <= ADC_10BIT;
      cfg.bit_mode           <= 1'b0;
      cfg.control            <= 32'h00000201;
      cfg.cmosis_param_1     <= 32'h0;
      cfg.cmosis_param_2     <= 11'h0;
      cfg.skip_lines         <= 32'h0;
      cfg.rawdata_pkt_addr   <= 32'h00001000;
      cfg.number_of_rows     <= 32'h00000440;
      cfg.start_pos          <= 32'h0;
      cfg.exp_time_ext       <= 32'h00000025;
      {cfg.adc_gain, cfg.motor_x, cfg.motor_y, cfg.motor_z, cfg.phi_deg} <= 28'h2800000;
      cfg.number_of_triggers <= 32'h00000080;
      cfg.trigger_period     <= 32'h00000280;
      cfg.temp_sample_period <= 32'h07735940;
      cfg.max_frames_in_ddr  <= 32'h00000064;
    end else if (wr_en && in_range && mirror_hit) begin
      unique case (slot)
        5'h00: cfg.cmosis_param   <= wdata;
        5'h02: cfg.spi_speed      <= wdata;
        5'h03: begin
          cfg.output_mode <= out_mode_e'(wdata[17:16]);
          cfg.adc_res     <= adc_res_e'(wdata[13:12]);
          cfg.bit_mode    <= wdata[8];
        end
        5'h04: cfg.control        <= wdata;
        5'h0A: cfg.cmosis_param_1 <= wdata;
        5'h0B: cfg.cmosis_param_2 <= wdata[10:0];
        5'h0C: cfg.skip_lines     <= wdata;
        5'h10: if (sub == 2'd0) cfg.rawdata_pkt_addr <= wdata;
        5'h12: cfg.number_of_rows <= wdata;
        5'h13: cfg.start_pos      <= wdata;
        5'h14: cfg.exp_time_ext   <= wdata;
        5'h15: {cfg.adc_gain, cfg.motor_x, cfg.motor_y, cfg.motor_z, cfg.phi_deg} <= wdata[27:0];
        5'h17: cfg.number_of_triggers <= wdata;
        5'h18: cfg.trigger_period     <= wdata;
        5'h19: cfg.temp_sample_period <= wdata;
        5'h1A: if (sub == 2'd0) cfg.max_frames_in_ddr <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    rd_word = 32'h0;
    if (in_range) begin
      unique case (slot)
        5'h05: unique case (sub)
          2'd0: rd_word = status1_word;
          2'd1: rd_word = status2_word;
          2'd2: rd_word = status3_word;
          default: rd_word = 32'h0;
        endcase
        5'h07: unique case (sub)
          2'd0: rd_word = ddr_start_addr;
          2'd1: rd_word = ddr_end_addr;
          2'd2: rd_word = ddr_rd_addr;
          default: rd_word = 32'h0;
        endcase
        5'h10: if (sub == 2'd0) rd_word = cfg.rawdata_pkt_addr;
        5'h1A: if (sub == 2'd0) rd_word = cfg.max_frames_in_ddr;
        default: if (mirror_hit) begin
          unique case (slot)
            5'h00: rd_word = cfg.cmosis_param;
            5'h01: rd_word = spi_feedback;
            5'h02: rd_word = cfg.spi_speed;
            5'h03: rd_word = {14'b0, cfg.output_mode, 2'b0, cfg.adc_res, 3'b0,
                              cfg.bit_mode, FW_VERSION};
            5'h04: rd_word = cfg.control;
            5'h0A: rd_word = cfg.cmosis_param_1;
            5'h0B: rd_word = {21'b0, cfg.cmosis_param_2};
            5'h0C: rd_word = cfg.skip_lines;
            5'h11: rd_word = {temp_alarms, fpga_temperature, sensor_temperature};
            5'h12: rd_word = cfg.number_of_rows;
            5'h13: rd_word = cfg.start_pos;
            5'h14: rd_word = cfg.exp_time_ext;
            5'h15: rd_word = {4'h0, cfg.adc_gain, cfg.motor_x, cfg.motor_y,
                              cfg.motor_z, cfg.phi_deg};
            5'h17: rd_word = cfg.number_of_triggers;
            5'h18: rd_word = cfg.trigger_period;
            5'h19: rd_word = cfg.temp_sample_period;
            5'h1B: rd_word = frames_pending;
            default: rd_word = 32'h0;
          endcase
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= 32'h0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd_en;
      if (rd_en) rdata <= rd_word;
    end
  end

endmodule
