// Throughput sweep of the SPEC-T decoder with M = 128 survivors (v = 4,
// T = 8, R = 1): the same checks as the default-size end-to-end test, over
// the Eb/N0 sweep, reporting overflows per 1024-bit frame and
// broadcast-receive operations per depth for the larger path array.
module tb_spect_decoder_m128;
  import spect_pkg::*;
  import spect_ref_pkg::*;

  localparam int M  = 128;
  localparam int V  = 4;
  localparam int LV = PLEN / V;
  localparam int FRAMES = 4;     // frames per Eb/N0 point
  localparam bit VERBOSE = 0;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_ready;
  soft_t in_r0 = '0, in_r1 = '0;
  logic out_valid;
  logic [V-1:0] out_bits;
  logic [15:0] out_block;
  logic ev_depth, ev_xfer, ev_overflow, ev_trunc, ev_underflow, ev_wait_e;
  logic [7:0] survivors;

  spect_decoder #(.M(M)) dut (
    .clk, .rst_n, .start, .in_valid, .in_ready, .in_r0, .in_r1,
    .out_valid, .out_bits, .out_block,
    .ev_depth, .ev_xfer, .ev_overflow, .ev_trunc, .ev_underflow, .ev_wait_e,
    .survivors
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int tot_xfer = 0, tot_ovf = 0, tot_udf = 0, tot_trunc = 0, tot_corr = 0, tot_out = 0;
  int tot_depth = 0;
  int bit_errors;

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
  int feed_idx, depth_idx, blocks_seen;
  bit best_known[int];
  bit [31:0] best_sets[int][$];
  longint snap_cycle[int];
  longint cyc = 0;
  // events since the last committed depth
  int e_xfer, e_ovf, e_udf, e_trunc, e_wait, cyc_since;
  int prev_cong, prev_over;
  bit prev_valid, synced;
  bit feed_pend = 0;
  int frame_ovf, frame_xfer, frame_depths, frame_surv;

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
        if (synced && !rm.desync) check(e_udf == rm.under, "underflow retries");
        tot_xfer += e_xfer; tot_ovf += e_ovf; tot_udf += e_udf; tot_trunc += e_trunc;
        frame_xfer += e_xfer; frame_ovf += e_ovf;
        if (rm.e_used > 0) tot_corr++;
        if (rm.took_snap && k_before >= LV - 1) begin
          best_sets[k_before - (LV - 1)] = rm.best_bits;
          best_known[k_before - (LV - 1)] = 1;
          snap_cycle[k_before - (LV - 1)] = cyc;
        end
        if (rm.desync) synced = 0;
        prev_cong = rm.cong; prev_over = rm.over; prev_valid = 1;
        e_xfer = 0; e_ovf = 0; e_udf = 0; e_trunc = 0; e_wait = 0; cyc_since = 0;
        depth_idx++;
        tot_depth++; frame_depths++; frame_surv += int'(survivors);
      end
      if (out_valid) begin
        int j;
        bit hit;
        j = int'(out_block);
        hit = 0;
        tot_out++;
        blocks_seen++;
        check(best_known.exists(j), "output block expected");
        if (best_known.exists(j)) begin
          bit [31:0] cand[$];
          cand = best_sets[j];
          foreach (cand[q]) if (cand[q][V-1:0] == out_bits) hit = 1;
          if (synced) check(hit, "output bits are those of a best path");
          check(cyc - snap_cycle[j] == 64'(V + 1), "output latency v+1 cycles");
        end
        for (int b = 0; b < V; b++)
          if (j * V + b < info.size() && out_bits[b] != info[j * V + b]) bit_errors++;
      end
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
    prev_valid = 0; synced = 1; frame_ovf = 0; frame_xfer = 0; frame_depths = 0; frame_surv = 0;
    start = 0;
    wait (blocks_seen == nbits / V + 1);
    repeat (4) @(negedge clk);
    check(depth_idx == nbits + PLEN, "all depths decoded");
    if (VERBOSE) $display("frame %0d bits at %0.1f dB%s%s: bit errors %0d, overflows %0d, transfers/depth %0.2f%s",
             nbits, ebn0_db, noiseless ? " (noiseless)" : "", (burst_at >= 0) ? " with burst" : (erase_at >= 0) ? " with erasures" : "", bit_errors, frame_ovf,
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
    check(bit_errors == 0, "noiseless frame decodes exactly");
    // Eb/N0 sweep of the throughput table: overflows per 1024-bit frame
    // (DL_o) and broadcast-receive operations per depth (NC_r)
    for (int snr = 2; snr <= 6; snr++) begin
      int o, x, d, be, sv;
      o = 0; x = 0; d = 0; be = 0; sv = 0;
      for (int f = 0; f < FRAMES; f++) begin
        run_frame(1024, real'(snr), 0);
        o += frame_ovf; x += frame_xfer; d += frame_depths; be += bit_errors; sv += frame_surv;
      end
      $display("M=%0d  %0d dB: DL_o %0.1f  NC_r %0.2f  survivors %0.1f  BER %0.5f", M, snr,
               real'(o) / FRAMES, real'(x) / real'(d), real'(sv) / real'(d),
               real'(be) / (1024.0 * FRAMES));
    end
    run_frame(1024, 1.0, 0);
    run_frame(1024, 4.0, 0, 500);
    run_frame(1024, 4.0, 0, -1, 500);
    $display("totals: depths %0d transfers %0d overflows %0d underflows %0d truncations %0d corrections %0d blocks %0d",
             tot_depth, tot_xfer, tot_ovf, tot_udf, tot_trunc, tot_corr, tot_out);
    check(tot_xfer > 0, "re-distribution happened");
    check(tot_ovf > 0, "overflow happened");
    check(tot_udf > 0, "underflow retry happened");
    check(tot_corr > 0, "non-zero correction E applied");
    check(tot_trunc > 0, "overflow truncation happened");
    check(tot_out > 0, "decoded output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
