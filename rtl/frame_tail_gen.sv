// frame_tail_gen: status snapshot and 256-bit frame tail packet of the UFO 5
// format.
//
// On capture the three status words and the DDR3 read and write addresses
// are stored; the tail is built from the stored copy, so it stays the same
// however long the output waits. The tail is eight 32-bit words, word 1 in
// bits [255:224]:
//   1  0x0AAAAAAA (tail marker)
//   2  status1          3  status2          4  status3
//   5  {4'h0, 2'h0, app_addr_rd[25:0]}  DDR3 read address
//   6  {4'h0, 2'h0, app_addr_wr[25:0]}  DDR3 write address
//   7  0x00000000       8  0x01111111
// The tail changes the cycle after capture.
//
// The word layouts are the format's; the status words arrive as structures
// and are packed with the shared functions of ufo5_pkg. Taking a snapshot is
// this design's choice.
module frame_tail_gen
  import ufo5_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             capture,
  input  status1_t         status1,
  input  status2_t         status2,
  input  status3_t         status3,
  input  logic [25:0]      app_addr_rd,
  input  logic [25:0]      app_addr_wr,
  output logic [PKT_W-1:0] tail
);

  logic [31:0] s1_q, s2_q, s3_q;
  logic [25:0] rd_q, wr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
      rd_q <= '0;
      wr_q <= '0;
    end else if (capture) begin
      s1_q <= pack_status1(status1);
      s2_q <= pack_status2(status2);
      s3_q <= pack_status3(status3);
      rd_q <= app_addr_rd;
      wr_q <= app_addr_wr;
    end
  end

  always_comb begin
    tail = {
      {4'h0, 28'hAAAAAAA},
      s1_q,
      s2_q,
      s3_q,
      {4'h0, 2'h0, rd_q},
      {4'h0, 2'h0, wr_q},
      {4'h0, 28'h0000000},
      {4'h0, 28'h1111111}
    };
  end

endmodule
