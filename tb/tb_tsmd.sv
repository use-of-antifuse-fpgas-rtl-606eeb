// Self-checking test of the TSMD chip, with a 4-input TSMD0 (slot 0) and a
// 3-input TSMD1 (slot 1) side by side. Random track data are applied every
// bunch crossing. In default processing the testbench plays the TSMS and
// sends random one-hot Select words one crossing later; in back-up processing
// (TSMS power enable high, or forced through the configuration register) the
// chips must output their best track in their own slot. Word contents, board
// numbers, output enables and timing are compared with a reference model:
// first-slot word in the phase-1 cycle one crossing after the inputs,
// second-slot word in the following phase-0 cycle.
module tb_tsmd;
  import tsm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bx_phase = 0;
  always #5 clk = !clk;
  always_ff @(posedge clk) bx_phase <= rst_n ? !bx_phase : 1'b0;

  localparam logic [7:0] GADDR = 8'h44;

  logic n_pwren_sort = 0;
  trk_t trk0 [4], trk1 [3];
  logic [3:0] sf0 = 0, ss0 = 0, sf1 = 0, ss1 = 0;
  track_t out0, out1;
  logic oe0, oe1;
  logic nprog = 1, strobe = 0, nwrite = 1;
  logic [7:0] picd_in = 0, po0, po1;
  logic pe0, pe1, tdo0, tdo1;

  tsmd #(.N_IN(4), .BOARD0(0), .SLOT(1'b0), .CHIP_ID(PI_ID_TSMD0)) dut0 (
    .clk, .rst_n, .bx_phase, .gaddr(GADDR), .jadd(4'h0), .badd(4'h0),
    .n_pwren_sort, .n_pwren_other(1'b0), .trk_in(trk0), .sel_first(sf0), .sel_second(ss0),
    .track_out(out0), .track_oe(oe0), .nprog, .strobe, .nwrite, .picd_in,
    .picd_out(po0), .picd_oe(pe0), .tck(1'b0), .tms(1'b1), .tdi(1'b0), .tdo(tdo0));
  tsmd #(.N_IN(3), .BOARD0(4), .SLOT(1'b1), .CHIP_ID(PI_ID_TSMD1)) dut1 (
    .clk, .rst_n, .bx_phase, .gaddr(GADDR), .jadd(4'h0), .badd(4'h0),
    .n_pwren_sort, .n_pwren_other(1'b0), .trk_in(trk1), .sel_first(sf1), .sel_second(ss1),
    .track_out(out1), .track_oe(oe1), .nprog, .strobe, .nwrite, .picd_in,
    .picd_out(po1), .picd_oe(pe1), .tck(1'b0), .tms(1'b1), .tdi(1'b0), .tdo(tdo1));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pi_cycle(input logic [7:0] b);
    @(negedge clk);
    picd_in = b; nwrite = 0; strobe = 1;
    @(negedge clk); @(negedge clk);
    strobe = 0;
    @(negedge clk);
    nwrite = 1;
  endtask

  task automatic pi_write(input logic [7:0] id, input logic [1:0] ra, input logic [7:0] v);
    @(negedge clk); nprog = 0;
    pi_cycle(GADDR); pi_cycle(id); pi_cycle({6'h0, ra}); pi_cycle(v);
    @(negedge clk); nprog = 1;
  endtask

  function automatic track_t word(trk_t t, int board, bit second);
    track_t w;
    w.valid = 1; w.second = second; w.board = 3'(board); w.trk = t;
    return w;
  endfunction

  // best track of a half chamber: highest quality >= qmin, lowest index on ties
  function automatic int best(trk_t t [4], int n, int qmin);
    int b = -1;
    for (int i = 0; i < n; i++)
      if (t[i].quality != 0 && t[i].quality >= qmin && (b < 0 || t[i].quality > t[b].quality)) b = i;
    return b;
  endfunction

  int qmin = 1;
  int n_default = 0, n_backup = 0;

  // n crossings; backup = expected processing mode
  task automatic run_bx(input int n, input bit backup);
    trk_t c0 [4], c1 [4];
    track_t e0a, e0b, e1a, e1b;   // expected words: chip, slot a (first) / b (second)
    bit pend = 0;
    @(negedge clk);
    while (bx_phase) @(negedge clk);
    for (int t = 0; t <= n; t++) begin
      // phase 0 of crossing t: expected second-slot words of crossing t-2 visible
      if (pend) begin
        check($sformatf("slot1 d0 t=%0d", t), oe0 == e0b.valid && (!e0b.valid || out0 == e0b));
        check($sformatf("slot1 d1 t=%0d", t), oe1 == e1b.valid && (!e1b.valid || out1 == e1b));
      end
      // play the TSMS for crossing t-1 (held for both cycles of crossing t)
      {sf0, ss0, sf1, ss1} = '0;
      e0a = '0; e0b = '0; e1a = '0; e1b = '0;
      if (t > 0) begin
        if (backup) begin
          int b0, b1;
          b0 = best(c0, 4, qmin);
          b1 = best(c1, 3, qmin);
          if (b0 >= 0) e0a = word(c0[b0], b0, 0);
          if (b1 >= 0) e1b = word(c1[b1], 4 + b1, 1);
          // the Select lines are ignored in back-up processing
          sf0 = 4'(1 << $urandom_range(0, 3));
          ss1 = 4'(1 << $urandom_range(0, 2));
          n_backup++;
        end else begin
          int f = $urandom_range(0, 7), s = $urandom_range(0, 7);
          if (s == f) s = 7;
          if (f < 4) begin sf0 = 4'(1 << f); e0a = word(c0[f], f, 0); end
          else if (f < 7) begin sf1 = 4'(1 << (f - 4)); e1a = word(c1[f - 4], f, 0); end
          if (s < 4) begin ss0 = 4'(1 << s); e0b = word(c0[s], s, 1); end
          else if (s < 7) begin ss1 = 4'(1 << (s - 4)); e1b = word(c1[s - 4], s, 1); end
          n_default++;
        end
      end
      // new inputs for crossing t
      for (int i = 0; i < 4; i++) begin
        c0[i] = trk_t'(25'($urandom));
        c1[i] = trk_t'(25'($urandom));
        if ($urandom_range(0, 3) == 0) c0[i].quality = 0;
        if ($urandom_range(0, 3) == 0) c1[i].quality = 0;
        trk0[i] = c0[i];
        if (i < 3) trk1[i] = c1[i];
      end
      @(negedge clk);  // phase 1: first-slot words of crossing t-1
      if (t > 0) begin
        check($sformatf("slot0 d0 t=%0d", t), oe0 == e0a.valid && (!e0a.valid || out0 == e0a));
        check($sformatf("slot0 d1 t=%0d", t), oe1 == e1a.valid && (!e1a.valid || out1 == e1a));
      end
      pend = t > 0;
      if (t < n) @(negedge clk);
    end
    @(negedge clk);
    check("slot1 d0 last", oe0 == e0b.valid && (!e0b.valid || out0 == e0b));
    check("slot1 d1 last", oe1 == e1b.valid && (!e1b.valid || out1 == e1b));
    {sf0, ss0, sf1, ss1} = '0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) trk0[i] = '0;
    for (int i = 0; i < 3; i++) trk1[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_bx(300, 0);
    // TSMS powered off: automatic back-up processing
    n_pwren_sort = 1;
    run_bx(300, 1);
    n_pwren_sort = 0;
    run_bx(50, 0);
    // back-up forced by configuration, with a quality threshold
    pi_write(PI_ID_TSMD0, 2'(CFG_MODE), 8'h03);
    pi_write(PI_ID_TSMD1, 2'(CFG_MODE), 8'h03);
    pi_write(PI_ID_TSMD0, 2'(CFG_QMIN), 8'h05);
    pi_write(PI_ID_TSMD1, 2'(CFG_QMIN), 8'h05);
    qmin = 5;
    run_bx(300, 1);
    check("both modes exercised", n_default > 0 && n_backup > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
