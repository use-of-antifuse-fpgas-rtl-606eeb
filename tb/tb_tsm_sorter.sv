// Self-checking test of tsm_sorter: random ranks and enables for the 7-input
// TSMS configuration and the 4-input TSMD configuration, compared with a
// reference that scores every candidate as rank*16 + (15 - index) and takes
// the two highest scores. Also covers all-disabled and single-enabled cases.
module tb_tsm_sorter;
  import tsm_pkg::*;

  int checks = 0, failures = 0;

  rank_t r7 [7];
  logic  e7 [7];
  logic  f7v, s7v;
  logic [2:0] f7i, s7i;
  rank_t r4 [4];
  logic  e4 [4];
  logic  f4v, s4v;
  logic [1:0] f4i, s4i;

  tsm_sorter #(.N(7)) dut7 (.rank(r7), .en(e7), .first_vld(f7v), .first_idx(f7i),
                            .second_vld(s7v), .second_idx(s7i));
  tsm_sorter #(.N(4)) dut4 (.rank(r4), .en(e4), .first_vld(f4v), .first_idx(f4i),
                            .second_vld(s4v), .second_idx(s4i));

  // reference: returns best and second-best index, -1 when none
  function automatic void ref_best2(input int n, input int rk [7], input bit en [7],
                                    output int b1, output int b2);
    int s1 = -1, s2 = -1;
    b1 = -1; b2 = -1;
    for (int i = 0; i < n; i++) begin
      int sc;
      if (!en[i]) continue;
      sc = rk[i] * 16 + (15 - i);
      if (sc > s1) begin s2 = s1; b2 = b1; s1 = sc; b1 = i; end
      else if (sc > s2) begin s2 = sc; b2 = i; end
    end
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rk [7];
    bit en [7];
    int b1, b2;
    for (int t = 0; t < 3000; t++) begin
      int mode;
      mode = t % 4;
      for (int i = 0; i < 7; i++) begin
        // mode 0: full random, 1: few distinct ranks (ties), 2: sparse, 3: none/one enabled
        rk[i] = (mode == 1) ? $urandom_range(0, 2) + 12 : $urandom_range(0, 15);
        en[i] = (mode == 2) ? ($urandom_range(0, 3) == 0) :
                (mode == 3) ? (t % 9 == i) : $urandom_range(0, 1);
        r7[i] = rank_t'(rk[i]);
        e7[i] = en[i];
        if (i < 4) begin r4[i] = rank_t'(rk[i]); e4[i] = en[i]; end
      end
      #1;
      ref_best2(7, rk, en, b1, b2);
      check($sformatf("N7 first t=%0d", t), f7v == (b1 >= 0) && (b1 < 0 || f7i == 3'(b1)));
      check($sformatf("N7 second t=%0d", t), s7v == (b2 >= 0) && (b2 < 0 || s7i == 3'(b2)));
      ref_best2(4, rk, en, b1, b2);
      check($sformatf("N4 first t=%0d", t), f4v == (b1 >= 0) && (b1 < 0 || f4i == 2'(b1)));
      check($sformatf("N4 second t=%0d", t), s4v == (b2 >= 0) && (b2 < 0 || s4i == 2'(b2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
