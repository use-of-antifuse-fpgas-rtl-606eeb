// Self-checking test of tsm_jtag_net: for every combination of the three
// power enables and random TDI/TMS/TCK and chip TDO values, the chain must
// pass through the powered chips in the order TSMD0, TSMD1, Sorter and skip
// the others, and a powered-off chip must see its JTAG inputs held low.
module tb_tsm_jtag_net;
  int checks = 0, failures = 0;

  logic tck, tms, tdi, tdo;
  logic [2:0] n_pwren, chip_tck, chip_tms, chip_tdi, chip_tdo;

  tsm_jtag_net dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 800; t++) begin
      logic exp_node;
      n_pwren  = 3'(t % 8);
      tck = 1'($urandom); tms = 1'($urandom); tdi = 1'($urandom);
      chip_tdo = 3'($urandom);
      #1;
      exp_node = tdi;
      for (int i = 0; i < 3; i++) begin
        if (!n_pwren[i]) begin
          check($sformatf("chip %0d tdi t=%0d", i, t), chip_tdi[i] == exp_node);
          check($sformatf("chip %0d tck/tms", i), chip_tck[i] == tck && chip_tms[i] == tms);
          exp_node = chip_tdo[i];
        end else begin
          check($sformatf("chip %0d isolated", i), {chip_tdi[i], chip_tck[i], chip_tms[i]} == 3'b000);
        end
      end
      check($sformatf("tdo t=%0d pw=%b", t, n_pwren), tdo == exp_node);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
