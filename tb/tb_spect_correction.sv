// Test of the correction module: random snapshots of 2M contenders. E must
// be the minimum distance over the valid entries, available v cycles after
// the snapshot and held until taken; the output block must carry the bits
// of the first entry attaining the minimum, v+1 cycles after the snapshot,
// and only when the snapshot asks for output.
module tb_spect_correction;
  import spect_pkg::*;

  localparam int N = 128, V = 4;

  logic clk = 0, rst_n = 0, init = 0, snap_load = 0, snap_emit = 0, e_take = 0;
  logic [N-1:0] snap_valid = '0;
  dist_t snap_d [N];
  logic [V-1:0] snap_bits [N];
  logic [15:0] snap_block = '0;
  logic e_ready, out_valid;
  dist_t e_value;
  logic [V-1:0] out_bits;
  logic [15:0] out_block;

  spect_correction #(.N(N), .V(V)) dut (.clk, .rst_n, .init, .snap_load, .snap_valid,
    .snap_d, .snap_bits, .snap_emit, .snap_block, .e_take, .e_ready, .e_value,
    .out_valid, .out_bits, .out_block);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin snap_d[i] = '0; snap_bits[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int mn, arg, gap;
      bit emit;
      // new snapshot
      for (int i = 0; i < N; i++) begin
        snap_valid[i] = ($urandom_range(0, 3) == 0);
        snap_d[i]     = dist_t'($urandom_range(0, 30));
        snap_bits[i]  = V'($urandom);
      end
      snap_valid[$urandom_range(0, N - 1)] = 1'b1;
      emit = ($urandom_range(0, 3) != 0);
      snap_emit = emit;
      snap_block = 16'(it);
      mn = 1 << 20; arg = -1;
      for (int i = 0; i < N; i++)
        if (snap_valid[i] && int'(snap_d[i]) < mn) begin mn = int'(snap_d[i]); arg = i; end
      e_take = (it > 0);      // the previous E is consumed with the new snapshot
      snap_load = 1;
      @(negedge clk);
      snap_load = 0; e_take = 0;
      check(!e_ready, "E not ready right after a snapshot");
      for (int c = 1; c < V; c++) begin
        check(!e_ready && !out_valid, "search still running");
        @(negedge clk);
      end
      // cycle t+V: E is forwarded
      check(e_ready && int'(e_value) == mn, "E on the last search cycle");
      @(negedge clk);
      check(out_valid == emit, "output pulse");
      if (emit) begin
        check(out_bits == snap_bits[arg] && out_block == 16'(it), "output bits of the first best entry");
        n_out++;
      end
      check(e_ready && int'(e_value) == mn, "E held");
      gap = $urandom_range(0, 3);
      repeat (gap) begin
        @(negedge clk);
        check(!out_valid && e_ready && int'(e_value) == mn, "E held while waiting");
      end
    end
    // E taken without a new snapshot: no longer ready; init forgets
    e_take = 1;
    @(negedge clk);
    e_take = 0;
    check(!e_ready, "E released after take");
    init = 1;
    @(negedge clk);
    init = 0;
    check(!e_ready && !out_valid, "idle after init");
    check(n_out > 0, "outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
