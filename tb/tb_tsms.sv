// Self-checking test of the TSMS chip. Random Preselect Words are applied
// every bunch crossing under a series of configurations (set through the
// Parallel Interface) and power states of the TSMDs; the Select words and the
// theta output are compared with a reference model, including their timing:
// Select must appear in the cycle after the crossing's phase-1 cycle and
// Theta(15:0) one cycle later. Also checked: PRWs ignored while nProg is low,
// and PI forwarding to one trigger board (strobe, data and read-back path).
module tb_tsms;
  import tsm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bx_phase = 0;
  always #5 clk = !clk;
  always_ff @(posedge clk) bx_phase <= rst_n ? !bx_phase : 1'b0;

  localparam logic [7:0] GADDR = 8'h21;

  logic n_pwren_d0 = 0, n_pwren_d1 = 0;
  prw_t prw_in [N_BOARDS];
  logic [PI_W-1:0] prw_out [N_BOARDS];
  logic prw_oe [N_BOARDS], strobe_trb [N_BOARDS];
  logic nwrite_trb;
  logic [7:0] theta_in [2];
  logic [3:0] sel_d0_first, sel_d0_second, sel_d1_first, sel_d1_second;
  logic [15:0] theta_out;
  logic nprog = 1, strobe = 0, nwrite = 1;
  logic [7:0] picd_in = 0, picd_out;
  logic picd_oe, tdo;

  tsms dut (.clk, .rst_n, .bx_phase, .gaddr(GADDR), .jadd(4'h3), .badd(4'h9),
            .n_pwren_d0, .n_pwren_d1, .prw_in, .prw_out, .prw_oe, .strobe_trb,
            .nwrite_trb, .theta_in, .sel_d0_first, .sel_d0_second, .sel_d1_first,
            .sel_d1_second, .theta_out, .nprog, .strobe, .nwrite, .picd_in,
            .picd_out, .picd_oe, .tck(1'b0), .tms(1'b1), .tdi(1'b0), .tdo);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- PI helpers ------------------------------------------------------------
  task automatic pi_cycle(input logic [7:0] b, input logic wr, output logic [7:0] rd);
    @(negedge clk);
    picd_in = wr ? b : 8'h00; nwrite = !wr; strobe = 1;
    @(negedge clk); @(negedge clk);
    rd = picd_oe ? picd_out : 8'hXX;
    strobe = 0;
    @(negedge clk);
    nwrite = 1;
  endtask

  task automatic pi_write(input logic [1:0] ra, input logic [7:0] v);
    logic [7:0] d;
    @(negedge clk); nprog = 0;
    pi_cycle(GADDR, 1, d); pi_cycle(PI_ID_TSMS, 1, d); pi_cycle({6'h0, ra}, 1, d);
    pi_cycle(v, 1, d);
    @(negedge clk); nprog = 1;
  endtask

  task automatic pi_read(input logic [1:0] ra, output logic [7:0] v);
    logic [7:0] d;
    @(negedge clk); nprog = 0;
    pi_cycle(GADDR, 1, d); pi_cycle(PI_ID_TSMS, 1, d); pi_cycle({6'h0, ra}, 1, d);
    pi_cycle(8'h00, 0, v);
    @(negedge clk); nprog = 1;
  endtask

  // ---- reference model -----------------------------------------------------
  logic [7:0] c_mode = 8'h01, c_qmin = 8'h01, c_mask = 8'h7F;

  function automatic void ref_sel(input prw_t p [N_BOARDS], input logic d0_off, input logic d1_off,
                                  output logic [3:0] e0f, output logic [3:0] e0s,
                                  output logic [3:0] e1f, output logic [3:0] e1s);
    int b1 = -1, b2 = -1, s1 = -1, s2 = -1;
    for (int i = 0; i < 7; i++) begin
      bit ok;
      int sc;
      ok = p[i].quality != 0 && p[i].quality >= c_qmin[2:0] && c_mask[i] &&
           !(c_mode[2] && p[i].second) &&
           (!c_mode[0] || (i < 4 ? !d0_off : !d1_off));
      if (!ok) continue;
      sc = (int'(p[i].quality) * 2 + (p[i].second ? 0 : 1)) * 16 + (15 - i);
      if (sc > s1) begin s2 = s1; b2 = b1; s1 = sc; b1 = i; end
      else if (sc > s2) begin s2 = sc; b2 = i; end
    end
    e0f = (b1 >= 0 && b1 < 4) ? 4'(1 << b1) : 4'h0;
    e1f = (b1 >= 4) ? 4'(1 << (b1 - 4)) : 4'h0;
    e0s = (b2 >= 0 && b2 < 4) ? 4'(1 << b2) : 4'h0;
    e1s = (b2 >= 4) ? 4'(1 << (b2 - 4)) : 4'h0;
  endfunction

  int two_from_d0 = 0, two_from_d1 = 0, split = 0;

  // run n crossings of random PRWs; Select checked one crossing later
  task automatic run_bx(input int n, input bit sparse);
    logic [3:0] e0f, e0s, e1f, e1s, p0f, p0s, p1f, p1s;
    logic [15:0] exp_theta, prev_theta;
    bit have_prev = 0;
    // wait for a phase-0 cycle
    @(negedge clk);
    while (bx_phase) @(negedge clk);
    for (int t = 0; t <= n; t++) begin
      // phase 0 cycle of crossing t: check crossing t-1's Select, apply new inputs
      if (have_prev) begin
        check($sformatf("sel t=%0d", t),
              sel_d0_first == p0f && sel_d0_second == p0s &&
              sel_d1_first == p1f && sel_d1_second == p1s);
        if (p0f != 0 && p0s != 0) two_from_d0++;
        if (p1f != 0 && p1s != 0) two_from_d1++;
        if ((p0f != 0 && p1s != 0) || (p1f != 0 && p0s != 0)) split++;
      end
      if (t < n) begin
        for (int i = 0; i < 7; i++) begin
          prw_in[i] = prw_t'(13'($urandom));
          if (sparse && $urandom_range(0, 2) != 0) prw_in[i].quality = 0;
        end
        theta_in[0] = 8'($urandom); theta_in[1] = 8'($urandom);
        ref_sel(prw_in, n_pwren_d0, n_pwren_d1, e0f, e0s, e1f, e1s);
        exp_theta = {theta_in[1], theta_in[0]};
      end
      @(negedge clk);  // phase 1
      if (have_prev) check($sformatf("theta t=%0d", t), theta_out == prev_theta);
      {p0f, p0s, p1f, p1s} = {e0f, e0s, e1f, e1s};
      prev_theta = exp_theta;
      have_prev = (t < n);
      if (t < n) @(negedge clk);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, d;
    for (int i = 0; i < 7; i++) prw_in[i] = '0;
    theta_in = '{8'h0, 8'h0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_bx(300, 0);
    run_bx(300, 1);
    // TSMD1 off: both tracks from the TSMD0 half
    n_pwren_d1 = 1; run_bx(200, 0);
    pi_read(2'(CFG_STATUS), v);
    check($sformatf("status %h", v), v[1:0] == 2'b01);
    n_pwren_d1 = 0; n_pwren_d0 = 1; run_bx(200, 0);
    n_pwren_d0 = 0;
    // fake rejection and a quality threshold
    pi_write(2'(CFG_MODE), 8'h05); c_mode = 8'h05;
    pi_write(2'(CFG_QMIN), 8'h04); c_qmin = 8'h04;
    pi_read(2'(CFG_QMIN), v);
    check("qmin read back", v == 8'h04);
    run_bx(300, 0);
    // board mask, manual mode with a TSMD off (mask alone decides)
    pi_write(2'(CFG_MASK), 8'h5B); c_mask = 8'h5B;
    pi_write(2'(CFG_MODE), 8'h00); c_mode = 8'h00;
    pi_write(2'(CFG_QMIN), 8'h01); c_qmin = 8'h01;
    n_pwren_d0 = 1; run_bx(200, 1);
    n_pwren_d0 = 0;
    check("two tracks from TSMD0 seen", two_from_d0 > 0);
    check("two tracks from TSMD1 seen", two_from_d1 > 0);
    check("one track from each seen", split > 0);
    // PRWs are ignored while nProg is low
    for (int i = 0; i < 7; i++) prw_in[i] = prw_t'({3'd7, 10'h0});
    @(negedge clk); nprog = 0;
    repeat (6) @(negedge clk);
    check("no select while nProg low", {sel_d0_first, sel_d1_first, sel_d0_second, sel_d1_second} == 0);
    // forwarding to trigger board 5
    pi_cycle(GADDR, 1, d); pi_cycle(PI_ID_TRB0 + 8'd5, 1, d);
    begin
      int strobes5 = 0, others = 0, oe5 = 0;
      fork
        begin
          pi_cycle(8'hC7, 1, d);
          prw_in[5] = prw_t'({5'h0, 8'h96});
          pi_cycle(8'h00, 0, v);
        end
        repeat (8) begin
          @(posedge clk);
          if (strobe_trb[5]) strobes5++;
          if (prw_oe[5] && prw_out[5] == 8'hC7) oe5++;
          for (int i = 0; i < 7; i++) if (i != 5 && (strobe_trb[i] || prw_oe[i])) others++;
        end
      join
      check("strobe forwarded to board 5", strobes5 > 0 && others == 0);
      check("write data on board 5 lines", oe5 > 0);
      check($sformatf("read from board 5 %h", v), v == 8'h96);
    end
    @(negedge clk); nprog = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
