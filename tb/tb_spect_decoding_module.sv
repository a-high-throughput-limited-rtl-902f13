// Test of the decoding module on its own (M = 64, v = 4, T = 8, R = 1), with
// the correction module replaced by a testbench model that returns the
// minimum of each snapshot after a random delay, sometimes later than the
// module needs it, so that waiting for E is exercised.
//
// Frames of random information bits are encoded with the memory-19
// systematic code, sent through a BPSK/AWGN channel at several Eb/N0 values,
// quantised and streamed into the decoder, followed by 64 zero-tail pairs.
// A set-based reference of the algorithm runs alongside; per depth the test
// checks the number of survivors, the underflow retries, the number of
// broadcast-receive cycles (equal to the number of parents with both
// children surviving when no overflow occurs) and the overflow re-purges,
// and that each depth costs exactly one cycle plus one per such event. Each
// snapshot must come on every v-th depth, carry the reference minimum
// distance, hold a best path's oldest bits at its minimum entry and carry
// the right output flag and block index. Frames with a noise burst and with
// erased samples force underflow retries and overflow truncation.
module tb_spect_decoding_module;
  import spect_pkg::*;
  import spect_ref_pkg::*;

  localparam int M  = 64;
  localparam int V  = 4;
  localparam int LV = PLEN / V;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_ready;
  soft_t in_r0 = '0, in_r1 = '0;
  logic ev_depth, ev_xfer, ev_overflow, ev_trunc, ev_underflow, ev_wait_e;
  logic [6:0] survivors;
  logic e_ready = 0, e_take, snap_load, snap_emit;
  dist_t e_value = '0;
  logic [2*M-1:0] snap_valid;
  dist_t snap_d [2*M];
  logic [V-1:0] snap_bits [2*M];
  logic [15:0] snap_block;

  spect_decoding_module dut (
    .clk, .rst_n, .start, .in_valid, .in_ready, .in_r0, .in_r1,
    .e_ready, .e_value, .e_take, .snap_load, .snap_valid, .snap_d, .snap_bits,
    .snap_emit, .snap_block,
    .ev_depth, .ev_xfer, .ev_overflow, .ev_trunc, .ev_underflow, .ev_wait_e,
    .survivors
  );

  // correction model: E of the last snapshot, ready 1..V+2 cycles after it
  int e_delay = -1;
  int tot_wait = 0;

  always @(posedge clk) begin
    if (e_take) e_ready <= 0;
    if (snap_load) begin
      int mn;
      mn = 1 << 20;
      for (int q = 0; q < 2 * M; q++)
        if (snap_valid[q] && int'(snap_d[q]) < mn) mn = int'(snap_d[q]);
      e_value <= dist_t'(mn);
      e_ready <= 0;
      e_delay = $urandom_range(0, 3 * V);
    end else if (e_delay == 0) begin
      e_ready <= 1;
      e_delay = -1;
    end else if (e_delay > 0) begin
      e_delay--;
    end
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int tot_xfer = 0, tot_ovf = 0, tot_udf = 0, tot_trunc = 0, tot_corr = 0, tot_out = 0;
  int tot_depth = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  spect_ref rm;

  // frame data
  int sym0[$], sym1[$];
  bit info[$];
  int feed_idx, depth_idx, blocks_seen, bit_errors;
  bit best_known[int];
  bit [31:0] best_sets[int][$];
  longint snap_cycle[int];
  longint cyc = 0;
  // events since the last committed depth
  int e_xfer, e_ovf, e_udf, e_trunc, e_wait, cyc_since;
  int prev_cong, prev_over;
  bit prev_valid, synced;
  bit feed_pend = 0;
  int frame_ovf, frame_xfer, frame_depths;

  // Everything is sampled at the falling edge: the event outputs then say
  // what the coming rising edge does.
  always @(negedge clk) begin
    cyc++;
    if (rst_n && !start) begin
      cyc_since++;
      if (ev_xfer) e_xfer++;
      if (ev_overflow) e_ovf++;
      if (ev_trunc) e_trunc++;
      if (ev_underflow) e_udf++;
      if (ev_wait_e) e_wait++;
      if (ev_depth) begin
        int k_before;
        if (synced) begin
          check(int'(survivors) == rm.paths.size(), "survivor count");
          if (prev_valid && prev_over == 0 && !rm.desync)
            check(e_xfer == prev_cong, "transfers = congested PDs");
          if (prev_valid && !rm.desync) check(e_ovf == prev_over, "overflow count");
        end
        if (prev_valid) check(cyc_since == 1 + e_xfer + e_ovf + e_trunc + e_udf + e_wait, "cycles per depth");
        k_before = rm.snaps;
        rm.step(sym0[depth_idx], sym1[depth_idx]);
        check(snap_load == rm.took_snap, "snapshot on every v-th depth");
        check(e_take == (rm.took_snap && k_before > 0), "E taken on correction depths");
        if (snap_load) begin
          int mn, arg;
          bit hit;
          mn = 1 << 20; arg = 0; hit = 0;
          for (int q = 0; q < 2 * M; q++)
            if (snap_valid[q] && int'(snap_d[q]) < mn) begin mn = int'(snap_d[q]); arg = q; end
          if (synced) check(mn == rm.snap_min, "snapshot minimum");
          foreach (rm.best_bits[q]) if (rm.best_bits[q][V-1:0] == snap_bits[arg]) hit = 1;
          if (synced) check(hit, "snapshot bits of a best path");
          check(snap_emit == (k_before >= LV - 1), "snapshot emit flag");
          if (snap_emit) check(int'(snap_block) == k_before - (LV - 1), "snapshot block index");
        end
        if (synced && !rm.desync) check(e_udf == rm.under, "underflow retries");
        tot_xfer += e_xfer; tot_ovf += e_ovf; tot_udf += e_udf; tot_trunc += e_trunc;
        frame_xfer += e_xfer; frame_ovf += e_ovf;
        if (rm.e_used > 0) tot_corr++;
        if (rm.desync) synced = 0;
        prev_cong = rm.cong; prev_over = rm.over; prev_valid = 1;
        e_xfer = 0; e_ovf = 0; e_udf = 0; e_trunc = 0; e_wait = 0; cyc_since = 0;
        depth_idx++;
        tot_depth++; frame_depths++;
      end
      if (ev_wait_e) tot_wait++;
      // input side: a handshake seen at the last falling edge completed at
      // the rising edge since; present the next pair
      if (feed_pend) feed_idx++;
      in_valid <= (feed_idx < sym0.size());
      if (feed_idx < sym0.size()) begin
        in_r0 <= soft_t'(sym0[feed_idx]);
        in_r1 <= soft_t'(sym1[feed_idx]);
      end
      feed_pend = (feed_idx < sym0.size()) && in_ready;
    end
  end

  task automatic run_frame(int nbits, real ebn0_db, bit noiseless, int burst_at = -1,
                          int erase_at = -1);
    bit [PLEN-1:0] h = '0;
    real sigma = $sqrt(1.0 / (10.0 ** (ebn0_db / 10.0)));
    info = {}; sym0 = {}; sym1 = {};
    for (int i = 0; i < nbits + PLEN; i++) begin
      bit u = (i < nbits) ? bit'($urandom_range(0, 1)) : 1'b0;
      real x0, x1;
      if (i < nbits) info.push_back(u);
      h = {h[PLEN-2:0], u};
      x0 = u ? -1.0 : 1.0;
      x1 = enc_parity(h) ? -1.0 : 1.0;
      if (!noiseless) begin
        x0 += sigma * gauss();
        x1 += sigma * gauss();
      end
      if (burst_at >= 0 && i >= burst_at && i < burst_at + 16) begin
        // burst of strong random samples: nothing fits, the depth retries
        x0 = ($urandom_range(0, 1) != 0) ? 4.0 : -4.0;
        x1 = ($urandom_range(0, 1) != 0) ? 4.0 : -4.0;
      end
      if (erase_at >= 0 && i >= erase_at && i < erase_at + 40) begin
        // erased samples: every path ties, the path count doubles until
        // overflow re-purges would empty the set and truncation steps in
        x0 = 0.0;
        x1 = 0.0;
      end
      sym0.push_back(quant(x0));
      sym1.push_back(quant(x1));
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    rm.reset();
    best_known.delete(); best_sets.delete(); snap_cycle.delete();
    feed_idx = 0; feed_pend = 0; depth_idx = 0; blocks_seen = 0; bit_errors = 0;
    e_xfer = 0; e_ovf = 0; e_udf = 0; e_trunc = 0; e_wait = 0; cyc_since = 0;
    prev_valid = 0; synced = 1; frame_ovf = 0; frame_xfer = 0; frame_depths = 0;
    start = 0;
    wait (depth_idx == nbits + PLEN);
    repeat (4) @(negedge clk);
    check(depth_idx == nbits + PLEN, "all depths decoded");
    $display("frame %0d bits at %0.1f dB%s%s: overflows %0d, transfers/depth %0.2f%s",
             nbits, ebn0_db, noiseless ? " (noiseless)" : "", (burst_at >= 0) ? " with burst" : (erase_at >= 0) ? " with erasures" : "", frame_ovf,
             real'(frame_xfer) / real'(frame_depths), synced ? "" : ", truncation hit");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rm = new(M, V, 8 << 2, 1 << 2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(256, 99.0, 1);
    run_frame(512, 4.0, 0);
    run_frame(512, 2.0, 0);
    run_frame(512, 4.0, 0, 300);
    run_frame(512, 4.0, 0, -1, 200);
    $display("totals: depths %0d transfers %0d overflows %0d underflows %0d truncations %0d corrections %0d waits %0d",
             tot_depth, tot_xfer, tot_ovf, tot_udf, tot_trunc, tot_corr, tot_wait);
    check(tot_xfer > 0, "re-distribution happened");
    check(tot_ovf > 0, "overflow happened");
    check(tot_udf > 0, "underflow retry happened");
    check(tot_corr > 0, "non-zero correction E applied");
    check(tot_trunc > 0, "overflow truncation happened");
    check(tot_wait > 0, "waited for E");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
