// ufo5_ref_pkg: reference model of the UFO 5 packet formats for the
// testbenches. It rebuilds each packet from integer arithmetic (shifts and
// ORs of field values at their bit offsets), independently of the RTL's
// concatenations, and defines the synthetic pixel pattern that the sources
// drive and the checkers expect.
package ufo5_ref_pkg;

  // Synthetic pixel value of output k, pixel number p, row r, frame f (12 bits)
  function automatic logic [11:0] ref_pixel(int f, int r, int p, int k);
    int unsigned h;
    h = (f * 7919) ^ (r * 104729) ^ (p * 1299709) ^ (k * 15485863);
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    return 12'(h ^ (h >> 15));
  endfunction

  function automatic int ref_bits(int adc_res);
    return (adc_res == 0) ? 10 : (adc_res == 1) ? 11 : 12;
  endfunction

  // Pixel packet, pixels given as 16 values, output 0 first
  function automatic logic [255:0] ref_pixel_packet(int adc_res, int row, int pnum,
                                                     logic [11:0] px [16]);
    logic [255:0] v;
    logic [31:0]  h;
    int n;
    n = ref_bits(adc_res);
    h = 32'h80000000 | 32'(n << 20) | 32'((row & 'h7ff) << 8) | 32'(pnum & 'h7f);
    v = {h, 224'h0};
    for (int k = 0; k < 16; k++)
      v = v | (256'(px[k] & ((1 << n) - 1)) << ((15 - k) * n));
    return v;
  endfunction

  function automatic logic [255:0] ref_row_tail(int adc_res, int row, bit first);
    logic [255:0] v;
    logic [31:0]  h;
    h = 32'hC0000000 | 32'(ref_bits(adc_res) << 20) | 32'((row & 'h7ff) << 8) |
        (first ? 32'h7f : 32'h0);
    v = {h, 224'h0};
    v = v | (256'(64'h5055055005505505) << 128) | (256'(64'h0550550555055055) << 64) |
        256'(64'h5505505550550550);
    return v;
  endfunction

  function automatic logic [255:0] ref_frame_header(int start_addr, int skip, int lines,
                                                     int frame, int adc_res, int out_mode,
                                                     int fr_ts);
    logic [31:0] w [8];
    logic [255:0] v;
    w[0] = 32'h51111111; w[1] = 32'h52222222; w[2] = 32'h53333333;
    w[3] = 32'h54444444; w[4] = 32'h55555555;
    w[5] = 32'h50000000 | ((start_addr & 'h3ff) << 18) | ((skip & 'h7f) << 11) | (lines & 'h7ff);
    w[6] = 32'h55000000 | (frame & 'hffffff);
    w[7] = 32'h50000000 | ((adc_res & 3) << 26) | ((out_mode & 3) << 24) | (fr_ts & 'hffffff);
    v = '0;
    for (int i = 0; i < 8; i++) v = v | (256'(w[i]) << (32 * (7 - i)));
    return v;
  endfunction

  function automatic logic [255:0] ref_frame_tail(logic [31:0] s1, logic [31:0] s2,
                                                   logic [31:0] s3, int rd, int wr);
    logic [31:0] w [8];
    logic [255:0] v;
    w[0] = 32'h0AAAAAAA; w[1] = s1; w[2] = s2; w[3] = s3;
    w[4] = rd & 'h3ffffff; w[5] = wr & 'h3ffffff; w[6] = 0; w[7] = 32'h01111111;
    v = '0;
    for (int i = 0; i < 8; i++) v = v | (256'(w[i]) << (32 * (7 - i)));
    return v;
  endfunction

  // status words from field values, by arithmetic on bit offsets
  function automatic logic [31:0] ref_status1(int fsm, int cmosis_in);
    return 32'h80000000 | ((fsm & 'hf) << 26) | (cmosis_in & 'h3ffffff);
  endfunction

  function automatic logic [31:0] ref_status2(int eof, int err, int rdc, int f1, int e1,
                                              int wrc, int f2, int e2);
    return ((eof & 1) << 28) | ((err & 'hf) << 24) | ((rdc & 'h3ff) << 14) | ((f1 & 1) << 13) |
           ((e1 & 1) << 12) | ((wrc & 'hff) << 2) | ((f2 & 1) << 1) | (e2 & 1);
  endfunction

  function automatic logic [31:0] ref_status3(int busy, int err, int rd, int wr, int arb);
    return ((busy & 1) << 29) | ((err & 'h1ffff) << 12) | ((rd & 7) << 8) | ((wr & 7) << 4) |
           (arb & 7);
  endfunction

endpackage
