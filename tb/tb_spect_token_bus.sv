// Test of the token bus: random PD categories; BT must sit at the first
// congested PD, RT at the first empty PD, the bus must carry the BT
// holder's path, and the end of re-distribution and overflow must be
// flagged by counting congested and empty PDs.
module tb_spect_token_bus;
  import spect_pkg::*;

  localparam int M = 64;
  logic [M-1:0] empty, congested, bt_hold, rt_hold;
  path_t bus_src [M];
  path_t bus;
  logic xfer, done, overflow;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_xfer = 0, n_done = 0;

  spect_token_bus #(.M(M)) dut (.empty, .congested, .bus_src, .bt_hold, .rt_hold,
                                .bus, .xfer, .done, .overflow);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int fc, fe, pe_cong, pe_empty;
      // vary the mix so that every outcome occurs
      pe_cong  = $urandom_range(0, 40);
      pe_empty = $urandom_range(0, 40);
      if (it % 4 == 1) pe_empty = 0;
      if (it % 4 == 2) pe_cong = 0;
      for (int i = 0; i < M; i++) begin
        int r;
        r = $urandom_range(0, 99);
        congested[i] = (r < pe_cong);
        empty[i]     = !congested[i] && (r >= 99 - pe_empty);
        bus_src[i]   = {1'b1, 10'($urandom), {$urandom, $urandom}};
      end
      #1;
      fc = -1; fe = -1;
      for (int i = M - 1; i >= 0; i--) begin
        if (congested[i]) fc = i;
        if (empty[i]) fe = i;
      end
      check(bt_hold == ((fc >= 0) ? (M'(1) << fc) : '0), "BT position");
      check(rt_hold == ((fe >= 0) ? (M'(1) << fe) : '0), "RT position");
      check(done == (fc < 0), "done");
      check(overflow == (fc >= 0 && fe < 0), "overflow");
      check(xfer == (fc >= 0 && fe >= 0), "transfer");
      if (fc >= 0) check(bus == bus_src[fc], "bus data");
      if (overflow) n_ovf++;
      if (xfer) n_xfer++;
      if (done) n_done++;
      #1;
    end
    check(n_ovf > 0 && n_xfer > 0 && n_done > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
