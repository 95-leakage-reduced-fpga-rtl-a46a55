// tb_cfg_pkg: configuration records used by the testbenches, built from the
// record layout of fpga_pkg.
//
// rca_tile(t): tile t of an 8-bit ripple-carry adder mapped on one island.
// Channel plan: a[i] on track i, b[i] on track 8+i, carry on track 16. Tile t
// adds bits 2t and 2t+1 (five CLB inputs: a, b of both bits and the carry;
// three outputs: both sums and the carry out). Sums replace the consumed a
// bits on tracks 2t, 2t+1; the carry out replaces the carry on track 16.
//   BLE0: s[2t]   = a ^ b ^ c            BLE1: c' = maj(a, b, c)
//   BLE2: s[2t+1] = a' ^ b' ^ c'         BLE3: c'' = maj(a', b', c')
//
// reg_tile(trk): registers the tracks listed in trk (up to three; a value of
// W or more leaves that BLE unused) and writes them back onto the same tracks.
package tb_cfg_pkg;
  import fpga_pkg::*;

  localparam int unsigned CARRY_TRK = 16;
  localparam logic [XSEL_W-1:0] XS_NONE = '1;   // crossbar: reads 0
  localparam logic [TSEL_W-1:0] TS_NONE = '1;   // pin: reads 0

  function automatic logic [2**K-1:0] tt_xor3();
    logic [2**K-1:0] t;
    for (int j = 0; j < 2**K; j++) t[j] = ^(j[2:0]);
    return t;
  endfunction

  function automatic logic [2**K-1:0] tt_maj3();
    logic [2**K-1:0] t;
    for (int j = 0; j < 2**K; j++) t[j] = (j[0] & j[1]) | (j[0] & j[2]) | (j[1] & j[2]);
    return t;
  endfunction

  function automatic logic [2**K-1:0] tt_buf();
    logic [2**K-1:0] t;
    for (int j = 0; j < 2**K; j++) t[j] = j[0];
    return t;
  endfunction

  function automatic clb_cfg_t rca_clb();
    clb_cfg_t c;
    c = '0;
    // BLE0: s0 = pin0 ^ pin1 ^ pin4
    c.ble[0].truth = tt_xor3();
    c.ble[0].in_sel[0] = 0; c.ble[0].in_sel[1] = 1; c.ble[0].in_sel[2] = 4; c.ble[0].in_sel[3] = XS_NONE;
    // BLE1: c1 = maj(pin0, pin1, pin4)
    c.ble[1].truth = tt_maj3();
    c.ble[1].in_sel[0] = 0; c.ble[1].in_sel[1] = 1; c.ble[1].in_sel[2] = 4; c.ble[1].in_sel[3] = XS_NONE;
    // BLE2: s1 = pin2 ^ pin3 ^ c1 (BLE1 feedback)
    c.ble[2].truth = tt_xor3();
    c.ble[2].in_sel[0] = 2; c.ble[2].in_sel[1] = 3; c.ble[2].in_sel[2] = XSEL_W'(I + 1); c.ble[2].in_sel[3] = XS_NONE;
    // BLE3: c2 = maj(pin2, pin3, c1)
    c.ble[3].truth = tt_maj3();
    c.ble[3].in_sel[0] = 2; c.ble[3].in_sel[1] = 3; c.ble[3].in_sel[2] = XSEL_W'(I + 1); c.ble[3].in_sel[3] = XS_NONE;
    c.out_sel[0] = 0; c.out_sel[1] = 2; c.out_sel[2] = 3;
    return c;
  endfunction

  function automatic tile_cfg_t rca_tile(int t);
    tile_cfg_t c;
    c = '0;
    c.clb = rca_clb();
    c.cb.ipin_sel[0] = TSEL_W'(2*t);
    c.cb.ipin_sel[1] = TSEL_W'(8 + 2*t);
    c.cb.ipin_sel[2] = TSEL_W'(2*t + 1);
    c.cb.ipin_sel[3] = TSEL_W'(9 + 2*t);
    c.cb.ipin_sel[4] = TSEL_W'(CARRY_TRK);
    c.cb.opin_drv[2*t]      = 2'd1;
    c.cb.opin_drv[2*t + 1]  = 2'd2;
    c.cb.opin_drv[CARRY_TRK] = 2'd3;
    for (int w = 0; w < W; w++) c.sb.route[w] = SB_STRAIGHT;
    return c;
  endfunction

  function automatic tile_cfg_t reg_tile(int trk0, int trk1, int trk2);
    tile_cfg_t c;
    int trk[3];
    trk = '{trk0, trk1, trk2};
    c = '0;
    for (int p = 0; p < I; p++) c.cb.ipin_sel[p] = TS_NONE;
    for (int b = 0; b < N; b++)
      for (int k = 0; k < K; k++) c.clb.ble[b].in_sel[k] = XS_NONE;
    for (int j = 0; j < 3; j++) begin
      if (trk[j] < W) begin
        c.cb.ipin_sel[j] = TSEL_W'(trk[j]);
        c.clb.ble[j].truth = tt_buf();
        c.clb.ble[j].use_ff = 1'b1;
        c.clb.ble[j].in_sel[0] = XSEL_W'(j);
        c.clb.out_sel[j] = OSEL_W'(j);
        c.cb.opin_drv[trk[j]] = 2'(j + 1);
      end
    end
    for (int w = 0; w < W; w++) c.sb.route[w] = SB_STRAIGHT;
    return c;
  endfunction

  // Channel word carrying operands a, b and carry-in.
  function automatic logic [W-1:0] rca_chan(logic [7:0] a, logic [7:0] b, logic cin);
    logic [W-1:0] v;
    v = '0;
    v[7:0]  = a;
    v[15:8] = b;
    v[CARRY_TRK] = cin;
    return v;
  endfunction

  // Sum (bit 8 = carry out) read back from a channel word.
  function automatic logic [8:0] rca_sum(logic [W-1:0] v);
    return {v[CARRY_TRK], v[7:0]};
  endfunction

endpackage
