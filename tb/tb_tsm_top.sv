// End-to-end test of the Track-Sorter-Master board (tsm_top at its default
// parameters). Random trigger data (PRW and full track data of the seven
// boards, two theta words) are applied every bunch crossing, and the TRACK
// and theta outputs are compared with a reference model of the whole board,
// with their latency: first track word three cycles after the inputs are
// sampled, second word one cycle later, theta valid during both.
//
// The power states and configurations walked through exercise every
// mechanism of the board, each counted and required at least once:
//   default sorting with both tracks from TSMD0, both from TSMD1, one each;
//   a TSMD powered off, its half disabled in the TSMS sort;
//   TSMS powered off, automatic back-up processing in both TSMDs;
//   TSMS and one TSMD off, the remaining TSMD running alone;
//   back-up processing forced through the configuration registers;
//   fake rejection of second-choice tracks and a quality threshold;
//   PI register writes and reads in each chip, PI forwarding to a trigger
//   board, a configuration write through the JTAG chain read back over the
//   PI, and IDCODE reads through the JTAG chain with chips bypassed.
module tb_tsm_top;
  import tsm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  localparam logic [7:0] GADDR = 8'h3C;
  localparam logic [3:0] JADD = 4'h6, BADD = 4'hB;

  logic bx_phase;
  logic n_pwren_sort = 0, n_pwren_d0 = 0, n_pwren_d1 = 0;
  prw_t prw_in [N_BOARDS];
  logic [7:0] prw_out [N_BOARDS];
  logic prw_oe [N_BOARDS], strobe_trb [N_BOARDS];
  logic nwrite_trb;
  trk_t trk_in [N_BOARDS];
  logic [7:0] theta_in [2];
  track_t track_out;
  logic [15:0] theta_out;
  logic nprog = 1, strobe = 0, nwrite = 1;
  logic [7:0] picd_in = 0, picd_out;
  logic picd_oe;
  logic tck = 0, tms = 1, tdi = 0, tdo;
  logic seu_we = 0;
  logic [4:0] seu_waddr = 0, seu_raddr = 0;
  logic [14:0] seu_wdata = 0, seu_rdata;

  tsm_top dut (.*, .gaddr(GADDR), .jadd(JADD), .badd(BADD));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- Parallel Interface ----------------------------------------------------
  task automatic pi_cycle(input logic [7:0] b, input logic wr, output logic [7:0] rd);
    @(negedge clk);
    picd_in = wr ? b : 8'h00; nwrite = !wr; strobe = 1;
    @(negedge clk); @(negedge clk);
    rd = picd_oe ? picd_out : 8'hEE;
    strobe = 0;
    @(negedge clk);
    nwrite = 1;
  endtask

  task automatic pi_access(input logic [7:0] id, input logic [1:0] ra, input logic wr,
                           input logic [7:0] v, output logic [7:0] rd);
    logic [7:0] d;
    @(negedge clk); nprog = 0;
    pi_cycle(GADDR, 1, d); pi_cycle(id, 1, d); pi_cycle({6'h0, ra}, 1, d);
    pi_cycle(v, wr, rd);
    @(negedge clk); nprog = 1;
  endtask

  // ---- JTAG --------------------------------------------------------------------
  task automatic pulse(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (4) @(negedge clk);
    o = tdo;
    tck = 1;
    repeat (4) @(negedge clk);
    tck = 0;
  endtask

  task automatic go(input logic m);
    logic o;
    pulse(m, 0, o);
  endtask

  task automatic jtag_read_ids(input int n, output logic [95:0] q);
    logic o;
    repeat (5) go(1);
    go(0); go(1); go(0); go(0);
    q = '0;
    for (int i = 0; i < 32 * n; i++) begin
      pulse(i == 32 * n - 1, 0, o);
      q[i] = o;
    end
    go(1); go(0);
  endtask

  // from Run-Test/Idle, shift n bits (LSB first) through the whole chain's IR or DR
  task automatic jtag_shift(input bit ir, input int n, input logic [63:0] din);
    logic o;
    go(1);
    if (ir) go(1);
    go(0); go(0);
    for (int i = 0; i < n; i++) pulse(i == n - 1, din[i], o);
    go(1); go(0);
  endtask

  // ---- reference model ---------------------------------------------------------
  logic [7:0] s_mode, s_qmin, s_mask;
  logic [7:0] d_mode [2], d_qmin [2];

  task automatic cfg_defaults(input bit s, input bit d0, input bit d1);
    if (s)  begin s_mode = 8'h01; s_qmin = 8'h01; s_mask = 8'h7F; end
    if (d0) begin d_mode[0] = 8'h01; d_qmin[0] = 8'h01; end
    if (d1) begin d_mode[1] = 8'h01; d_qmin[1] = 8'h01; end
  endtask

  int c_two_d0 = 0, c_two_d1 = 0, c_split = 0, c_half_off = 0, c_backup_auto = 0;
  int c_single = 0, c_backup_forced = 0, c_fake_rej = 0, c_qmin = 0;
  int c_pi_rw = 0, c_pi_fwd = 0, c_jtag_bypass = 0, c_jtag_cfg = 0;

  function automatic track_t word(trk_t t, int board, bit second);
    track_t w;
    w.valid = 1; w.second = second; w.board = 3'(board); w.trk = t;
    return w;
  endfunction

  task automatic ref_bx(input prw_t p [N_BOARDS], input trk_t tk [N_BOARDS],
                        output track_t w0, output track_t w1);
    bit on_s = !n_pwren_sort, on [2];
    bit bk [2];
    int b1 = -1, b2 = -1, s1 = -1, s2 = -1;
    on[0] = !n_pwren_d0; on[1] = !n_pwren_d1;
    w0 = '0; w1 = '0;
    for (int j = 0; j < 2; j++) bk[j] = d_mode[j][1] || (d_mode[j][0] && !on_s);
    if (on_s) begin
      for (int i = 0; i < 7; i++) begin
        int sc;
        bit hon = (i < 4) ? on[0] : on[1];
        if (p[i].quality == 0 || !s_mask[i]) continue;
        if (p[i].quality < s_qmin[2:0]) begin c_qmin++; continue; end
        if (s_mode[2] && p[i].second) begin c_fake_rej++; continue; end
        if (s_mode[0] && !hon) continue;
        sc = (int'(p[i].quality) * 2 + (p[i].second ? 0 : 1)) * 16 + (15 - i);
        if (sc > s1) begin s2 = s1; b2 = b1; s1 = sc; b1 = i; end
        else if (sc > s2) begin s2 = sc; b2 = i; end
      end
      if (b1 >= 0 && on[b1 >= 4] && !bk[b1 >= 4]) w0 = word(tk[b1], b1, 0);
      if (b2 >= 0 && on[b2 >= 4] && !bk[b2 >= 4]) w1 = word(tk[b2], b2, 1);
      if (b1 >= 0 && b2 >= 0) begin
        if (b1 < 4 && b2 < 4) c_two_d0++;
        else if (b1 >= 4 && b2 >= 4) c_two_d1++;
        else c_split++;
        if (!on[0] || !on[1]) c_half_off++;
      end
    end
    for (int j = 0; j < 2; j++) begin
      int b = -1;
      if (!(on[j] && bk[j])) continue;
      for (int i = 0; i < (j == 0 ? 4 : 3); i++) begin
        int k = j * 4 + i;
        if (tk[k].quality != 0 && tk[k].quality >= d_qmin[j][2:0] &&
            (b < 0 || tk[k].quality > tk[b].quality)) b = k;
      end
      if (b >= 0) begin
        if (j == 0) w0 = word(tk[b], b, 0); else w1 = word(tk[b], b, 1);
        if (!on_s && d_mode[j][0]) c_backup_auto++;
        if (d_mode[j][1]) c_backup_forced++;
        if (!on_s && !on[1 - j]) c_single++;
      end
    end
  endtask

  // ---- trigger traffic -----------------------------------------------------------
  task automatic run_bx(input int n);
    track_t e0, e1, p1;
    logic [15:0] eth, pth;
    bit pend0 = 0, pend1 = 0;
    @(negedge clk);
    while (bx_phase) @(negedge clk);
    for (int t = 0; t <= n; t++) begin
      // phase 0: second word of crossing t-2
      if (pend1) check($sformatf("word1 t=%0d", t), track_out == p1 && theta_out == pth);
      if (t < n) begin
        for (int i = 0; i < 7; i++) begin
          trk_in[i] = trk_t'(25'($urandom));
          if ($urandom_range(0, 2) == 0) trk_in[i].quality = 0;
          prw_in[i] = prw_t'(13'($urandom));
          prw_in[i].quality = trk_in[i].quality;
        end
        theta_in[0] = 8'($urandom); theta_in[1] = 8'($urandom);
      end
      @(negedge clk);
      // phase 1: first word of crossing t-1
      if (pend0) check($sformatf("word0 t=%0d", t), track_out == e0 && theta_out == eth);
      pend1 = pend0;
      p1 = e1;
      pth = eth;
      if (t < n) begin
        ref_bx(prw_in, trk_in, e0, e1);
        eth = n_pwren_sort ? 16'h0 : {theta_in[1], theta_in[0]};
      end
      pend0 = t < n;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    logic [95:0] q;
    logic [31:0] id_s, id_0, id_1;
    id_s = {4'h1, 8'h54, 4'h0, JADD, BADD, 7'h00, 1'b1};
    id_0 = {4'h1, 8'h54, 4'h1, JADD, BADD, 7'h00, 1'b1};
    id_1 = {4'h1, 8'h54, 4'h2, JADD, BADD, 7'h00, 1'b1};
    for (int i = 0; i < 7; i++) begin prw_in[i] = '0; trk_in[i] = '0; end
    theta_in = '{8'h0, 8'h0};
    cfg_defaults(1, 1, 1);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // default processing, all chips on
    run_bx(400);
    // one TSMD off at a time
    n_pwren_d1 = 1; run_bx(200);
    n_pwren_d1 = 0; cfg_defaults(0, 0, 1);
    n_pwren_d0 = 1; run_bx(200);
    n_pwren_d0 = 0; cfg_defaults(0, 1, 0);
    // TSMS off: back-up processing
    n_pwren_sort = 1; run_bx(300);
    // TSMS and TSMD1 off: TSMD0 alone
    n_pwren_d1 = 1; run_bx(200);
    n_pwren_d1 = 0; cfg_defaults(0, 0, 1);
    n_pwren_sort = 0; cfg_defaults(1, 0, 0);
    run_bx(50);

    // PI: write and read back a register in each chip
    pi_access(PI_ID_TSMS, 2'(CFG_QMIN), 1, 8'h03, v);
    pi_access(PI_ID_TSMS, 2'(CFG_QMIN), 0, 8'h00, v);
    check("pi tsms", v == 8'h03); c_pi_rw += (v == 8'h03);
    s_qmin = 8'h03;
    pi_access(PI_ID_TSMS, 2'(CFG_MODE), 1, 8'h05, v);
    s_mode = 8'h05;
    pi_access(PI_ID_TSMD0, 2'(CFG_QMIN), 1, 8'h02, v);
    pi_access(PI_ID_TSMD0, 2'(CFG_QMIN), 0, 8'h00, v);
    check("pi tsmd0", v == 8'h02); c_pi_rw += (v == 8'h02);
    d_qmin[0] = 8'h02;
    pi_access(PI_ID_TSMD1, 2'(CFG_STATUS), 0, 8'h00, v);
    check($sformatf("pi tsmd1 status %h", v), v == 8'h03); c_pi_rw += (v == 8'h03);
    run_bx(300);

    // forced back-up processing with the TSMS sort disabled by its mask
    pi_access(PI_ID_TSMS, 2'(CFG_MASK), 1, 8'h00, v); s_mask = 8'h00;
    pi_access(PI_ID_TSMD0, 2'(CFG_MODE), 1, 8'h02, v); d_mode[0] = 8'h02;
    pi_access(PI_ID_TSMD1, 2'(CFG_MODE), 1, 8'h02, v); d_mode[1] = 8'h02;
    run_bx(200);

    // PI forwarding to trigger board 2
    begin
      int st = 0;
      logic [7:0] d;
      @(negedge clk); nprog = 0;
      pi_cycle(GADDR, 1, d); pi_cycle(PI_ID_TRB0 + 8'd2, 1, d);
      fork
        pi_cycle(8'h5D, 1, d);
        repeat (4) begin
          @(posedge clk);
          if (strobe_trb[2] && prw_oe[2] && prw_out[2] == 8'h5D && !nwrite_trb) st++;
        end
      join
      prw_in[2] = prw_t'({5'h0, 8'hB4});
      pi_cycle(8'h00, 0, d);
      @(negedge clk); nprog = 1;
      check("pi forward write", st > 0);
      check($sformatf("pi forward read %h", d), d == 8'hB4);
      c_pi_fwd += (st > 0 && d == 8'hB4);
    end

    // JTAG configuration write into TSMD0, the other chips in BYPASS; the
    // chain is TDI -> TSMD0 -> TSMD1 -> TSMS -> TDO, so the TSMS bits go first
    repeat (5) go(1);
    go(0);
    jtag_shift(1, 12, {52'h0, 4'h8, 4'hF, 4'hF});
    jtag_shift(0, 13, {51'h0, 1'b1, 2'(CFG_QMIN), 8'h06, 1'b0, 1'b0});
    pi_access(PI_ID_TSMD0, 2'(CFG_QMIN), 0, 8'h00, v);
    check($sformatf("jtag write seen over pi %h", v), v == 8'h06);
    c_jtag_cfg += (v == 8'h06);
    d_qmin[0] = 8'h06;
    pi_access(PI_ID_TSMD1, 2'(CFG_QMIN), 0, 8'h00, v);
    check("bypassed chip unchanged", v == d_qmin[1]);

    // JTAG chain: all three chips, then with chips bypassed
    jtag_read_ids(3, q);
    check($sformatf("jtag 3 chips %h", q), q == {id_0, id_1, id_s});
    n_pwren_d1 = 1;
    jtag_read_ids(2, q);
    check($sformatf("jtag without tsmd1 %h", q[63:0]), q[63:0] == {id_0, id_s});
    n_pwren_sort = 1;
    jtag_read_ids(1, q);
    check($sformatf("jtag tsmd0 only %h", q[31:0]), q[31:0] == id_0);
    c_jtag_bypass += (q[31:0] == id_0);
    n_pwren_sort = 0; n_pwren_d1 = 0;

    // irradiation test register, side by side on the same top
    for (int a = 0; a < 30; a++) begin
      @(negedge clk); seu_we = 1; seu_waddr = 5'(a); seu_wdata = 15'(a * 1021 + 7);
    end
    @(negedge clk); seu_we = 0;
    for (int a = 0; a < 30; a++) begin
      seu_raddr = 5'(a); @(posedge clk); #1;
      check($sformatf("seu word %0d", a), seu_rdata == 15'(a * 1021 + 7));
    end

    $display("mechanisms: two_d0=%0d two_d1=%0d split=%0d half_off=%0d backup_auto=%0d single=%0d",
             c_two_d0, c_two_d1, c_split, c_half_off, c_backup_auto, c_single);
    $display("            backup_forced=%0d fake_rej=%0d qmin=%0d pi_rw=%0d pi_fwd=%0d jtag_bypass=%0d jtag_cfg=%0d",
             c_backup_forced, c_fake_rej, c_qmin, c_pi_rw, c_pi_fwd, c_jtag_bypass, c_jtag_cfg);
    check("mech two_d0", c_two_d0 > 0);
    check("mech two_d1", c_two_d1 > 0);
    check("mech split", c_split > 0);
    check("mech half_off", c_half_off > 0);
    check("mech backup_auto", c_backup_auto > 0);
    check("mech single tsmd", c_single > 0);
    check("mech backup_forced", c_backup_forced > 0);
    check("mech fake rejection", c_fake_rej > 0);
    check("mech quality threshold", c_qmin > 0);
    check("mech pi rw", c_pi_rw == 3);
    check("mech pi forward", c_pi_fwd > 0);
    check("mech jtag bypass", c_jtag_bypass > 0);
    check("mech jtag configuration", c_jtag_cfg > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
