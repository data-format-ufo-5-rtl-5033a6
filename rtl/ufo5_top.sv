// ufo5_top: camera-side readout formatter of the UFO 5 data format.
//
// Software programs the register bank; a trigger generator then issues frame
// triggers, each of which (when no frame is in progress) makes the frame
// sequencer emit one frame as 256-bit packets: frame header, for every row
// 128 pixel packets of 16 pixels (one per sensor output) and a row-tail
// control word, then the frame tail with the status words. Finished frames
// are counted into the DDR3 frame buffer occupancy, and frames taken out by
// the DMA engine counted out; BUSY rises when the buffer holds the configured
// maximum and is reported in status3 and register 0x91B0.
//
// Settings taken from the registers: ADC_Resolution and Output_mode from
// 0x9030, CMOSIS start address [30:21] and skip lines [6:0] from
// CMOSIS_PARAM_1 (0x90A0), number of lines from 0x9120, first row from 0x9130,
// trigger count and period from 0x9170/0x9180, the busy threshold from 0x91A0.
//
// The sensor, its SPI configuration, the FIFOs and DDR3 controller behind the
// packet stream, the master control state machine, fast reject and the
// temperature monitor are outside this design: their state and status arrive
// on input ports and appear unchanged in the status words and registers, and
// all register settings leave on cfg. The busy field of status3_in is
// replaced by the occupancy counter's own busy. Trigger start and stop are
// ports here because the control register's bit assignment is not part of
// this design.
module ufo5_top
  import ufo5_pkg::*;
#(
  parameter int unsigned PKTS_PER_ROW = 128,
  parameter logic [31:0] MIN_PERIOD   = 32'h280
) (
  input  logic             clk,
  input  logic             rst_n,
  // register bus
  input  logic             reg_wr_en,
  input  logic             reg_rd_en,
  input  logic [15:0]      reg_addr,
  input  logic [31:0]      reg_wdata,
  output logic [31:0]      reg_rdata,
  output logic             reg_rvalid,
  output reg_cfg_t         cfg,
  // triggering
  input  logic             trig_start,
  input  logic             trig_stop,
  output logic             trigger,
  output logic             trig_running,
  output logic [31:0]      trig_issued,
  // sensor pixel stream: one pixel per output per beat
  input  logic             pix_valid,
  output logic             pix_ready,
  input  pixel_vec_t       pix_data,
  // packet stream towards the DDR3 frame buffer
  output logic             pkt_valid,
  input  logic             pkt_ready,
  output logic [PKT_W-1:0] pkt_data,
  output pkt_kind_e        pkt_kind,
  // state of the parts around the formatter
  input  status1_t         status1_in,
  input  status2_t         status2_in,
  input  status3_t         status3_in,
  input  logic [25:0]      app_addr_rd,
  input  logic [25:0]      app_addr_wr,
  input  logic [31:0]      ddr_start_addr,
  input  logic [31:0]      ddr_end_addr,
  input  logic [31:0]      ddr_rd_addr,
  input  logic [31:0]      spi_feedback,
  input  logic [2:0]       temp_alarms,
  input  logic [9:0]       fpga_temperature,
  input  logic [18:0]      sensor_temperature,
  input  logic [23:0]      fr_timestep,
  input  logic             dma_frame_sent,
  // formatter state
  output logic             busy,
  output logic [31:0]      frames_pending,
  output logic             frame_done,
  output logic             in_frame,
  output logic [23:0]      frame_number,
  output logic [15:0]      triggers_ignored
);

  status3_t    status3;

  always_comb begin
    status3      = status3_in;
    status3.busy = busy;
  end

  reg_bank u_regs (
    .clk                (clk),
    .rst_n              (rst_n),
    .wr_en              (reg_wr_en),
    .rd_en              (reg_rd_en),
    .addr               (reg_addr),
    .wdata              (reg_wdata),
    .rdata              (reg_rdata),
    .rvalid             (reg_rvalid),
    .spi_feedback       (spi_feedback),
    .status1_word       (pack_status1(status1_in)),
    .status2_word       (pack_status2(status2_in)),
    .status3_word       (pack_status3(status3)),
    .ddr_start_addr     (ddr_start_addr),
    .ddr_end_addr       (ddr_end_addr),
    .ddr_rd_addr        (ddr_rd_addr),
    .temp_alarms        (temp_alarms),
    .fpga_temperature   (fpga_temperature),
    .sensor_temperature (sensor_temperature),
    .frames_pending     (frames_pending),
    .cfg                (cfg)
  );

  trigger_gen #(
    .CNT_W      (32),
    .MIN_PERIOD (MIN_PERIOD)
  ) u_trig (
    .clk                (clk),
    .rst_n              (rst_n),
    .start              (trig_start),
    .stop               (trig_stop),
    .number_of_triggers (cfg.number_of_triggers),
    .trigger_period     (cfg.trigger_period),
    .trigger            (trigger),
    .running            (trig_running),
    .issued             (trig_issued)
  );

  frame_sequencer #(
    .PKTS_PER_ROW (PKTS_PER_ROW)
  ) u_seq (
    .clk               (clk),
    .rst_n             (rst_n),
    .frame_start       (trigger),
    .cmosis_start_addr (cfg.cmosis_param_1[30:21]),
    .skip_lines        (cfg.cmosis_param_1[6:0]),
    .number_of_lines   (cfg.number_of_rows[ROW_W-1:0]),
    .start_row         (cfg.start_pos[ROW_W-1:0]),
    .adc_res           (cfg.adc_res),
    .output_mode       (cfg.output_mode),
    .fr_timestep       (fr_timestep),
    .status1           (status1_in),
    .status2           (status2_in),
    .status3           (status3),
    .app_addr_rd       (app_addr_rd),
    .app_addr_wr       (app_addr_wr),
    .pix_valid         (pix_valid),
    .pix_ready         (pix_ready),
    .pix_data          (pix_data),
    .pkt_valid         (pkt_valid),
    .pkt_ready         (pkt_ready),
    .pkt_data          (pkt_data),
    .pkt_kind          (pkt_kind),
    .frame_done        (frame_done),
    .in_frame          (in_frame),
    .frame_number      (frame_number),
    .triggers_ignored  (triggers_ignored)
  );

  frame_occupancy #(
    .CNT_W (32)
  ) u_occ (
    .clk            (clk),
    .rst_n          (rst_n),
    .frame_written  (frame_done),
    .frame_sent     (dma_frame_sent),
    .max_frames     (cfg.max_frames_in_ddr),
    .frames_pending (frames_pending),
    .busy           (busy)
  );

endmodule
