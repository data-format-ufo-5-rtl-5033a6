// tb_frame_tail_gen: checks the frame tail packet against the format's example
// tail (0x0AAAAAAA, 0x840DFFFF, 0x0F001001, 0x28000111, ..., 0x00000000,
// 0x01111111), the status words of the register dump (0x8449FFFF,
// 0x0F001001, 0x3FFFF111) and the reference model for random status fields,
// and that the tail holds its snapshot while the inputs change.
module tb_frame_tail_gen;
  import ufo5_pkg::*;
  import ufo5_ref_pkg::*;

  logic         clk = 0, rst_n = 0, capture = 0;
  status1_t     s1;
  status2_t     s2;
  status3_t     s3;
  logic [25:0]  rd, wr;
  logic [255:0] tail, exp;
  int checks = 0, failures = 0;

  frame_tail_gen dut (.clk (clk), .rst_n (rst_n), .capture (capture),
                      .status1 (s1), .status2 (s2), .status3 (s3),
                      .app_addr_rd (rd), .app_addr_wr (wr), .tail (tail));

  always #5 clk = ~clk;

  task automatic check_word(int idx, logic [31:0] e, string what);
    checks++;
    if (tail[32*(7-idx) +: 32] !== e) begin
      failures++;
      $display("FAIL %s word %0d: got %h exp %h", what, idx + 1, tail[32*(7-idx) +: 32], e);
    end
  endtask

  task automatic snap();
    capture = 1;
    @(negedge clk);
    capture = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // example tail
    s1 = '{fsm_master_ctrl: 4'd1, cmosis_in: 26'h00DFFFF};
    s2 = '0; s2.error_status = 4'hF; s2.empty_fifo_255_64 = 1'b1; s2.empty_fifo_to_ddr = 1'b1;
    s3 = '0; s3.busy = 1'b1; s3.error_desc_1 = 17'h08000;
    s3.fsm_rd_ddr3 = 3'd1; s3.fsm_wr_ddr3 = 3'd1; s3.fsm_arbiter_ddr3 = 3'd1;
    rd = 26'h2123456; wr = 26'h0654321;
    snap();
    check_word(0, 32'h0AAAAAAA, "example");
    check_word(1, 32'h840DFFFF, "example");
    check_word(2, 32'h0F001001, "example");
    check_word(3, 32'h28000111, "example");
    check_word(4, 32'h02123456, "example");
    check_word(5, 32'h00654321, "example");
    check_word(6, 32'h00000000, "example");
    check_word(7, 32'h01111111, "example");
    // register dump status words
    s1.cmosis_in = 26'h049FFFF; s3.error_desc_1 = 17'h1FFFF;
    snap();
    check_word(1, 32'h8449FFFF, "dump");
    check_word(3, 32'h3FFFF111, "dump");
    for (int i = 0; i < 200; i++) begin
      s1 = status1_t'($urandom); s2 = status2_t'($urandom); s3 = status3_t'($urandom);
      rd = 26'($urandom); wr = 26'($urandom);
      exp = ref_frame_tail(
            ref_status1(int'(s1.fsm_master_ctrl), int'(s1.cmosis_in)),
            ref_status2(int'(s2.end_of_all_fr), int'(s2.error_status),
                        int'(s2.rd_count_fifo_255_64), int'(s2.full_fifo_255_64),
                        int'(s2.empty_fifo_255_64), int'(s2.wr_count_fifo_to_ddr),
                        int'(s2.full_fifo_to_ddr), int'(s2.empty_fifo_to_ddr)),
            ref_status3(int'(s3.busy), int'(s3.error_desc_1), int'(s3.fsm_rd_ddr3),
                        int'(s3.fsm_wr_ddr3), int'(s3.fsm_arbiter_ddr3)),
            int'(rd), int'(wr));
      snap();
      s1 = ~s1; s2 = ~s2; s3 = ~s3; rd = ~rd; wr = ~wr;
      @(negedge clk);
      checks++;
      if (tail !== exp) begin
        failures++;
        $display("FAIL random tail %h exp %h", tail, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
