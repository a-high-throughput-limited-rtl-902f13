// Decoding module of the path-parallel SPEC-T decoder.
//
// M processing elements, each paired with a path-data register array, extend
// all survivors in parallel, one trellis depth per PE cycle. Instead of
// searching for the best path metric, the module keeps every metric as its
// distance D from a speculated best metric that advances by the best branch
// metric of each input (the branch matching the hard decision). Every v-th
// depth the correction E computed by the correction module (the minimum D of
// the snapshot taken v depths earlier) is subtracted, and a new snapshot of
// all contenders goes to the correction module. Paths with D > T are purged.
//
// After the purge the token bus moves the second child of every congested
// PD into an empty PD, one path per cycle. If the empty PDs run out (more
// than M survivors: overflow), the speculated best metric is raised by R:
// R is added to every D and the purge is applied again to the contenders
// still held, then the re-distribution continues. This gives the survivor
// set that repeating the depth with the shifted metric would give, in one
// cycle and without a copy of the previous depth. If no contender survives
// the purge (possible because the speculation is corrected only every v
// depths), the depth is repeated with the speculated best metric lowered by
// R (R subtracted from the parents' D, floor 0). If an overflow re-purge
// would leave no path at all (every contender within R of the threshold),
// the module instead drops the second path of every PD still congested,
// keeping at most M paths; this fallback is this design's own addition.
//
// Timing: one input pair (r0, r1) is taken per depth through a one-entry
// buffer (in_valid/in_ready). A depth costs 1 cycle for extension and purge
// plus one cycle per broadcast-receive, per overflow re-purge or
// truncation, per underflow retry and per cycle spent waiting for E. The
// re-distribution shares the PE clock here (the source allows it a faster
// clock); the event outputs pulse once per such cycle.
module spect_decoding_module
  import spect_pkg::*;
#(
  parameter int unsigned M     = 64,
  parameter int unsigned V     = 4,
  parameter int unsigned T     = 8,
  parameter int unsigned R     = 1,
  parameter int unsigned BLK_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,         // frame start: one zero-state path
  input  logic             in_valid,
  output logic             in_ready,
  input  soft_t            in_r0,
  input  soft_t            in_r1,
  // to / from the correction module
  input  logic             e_ready,
  input  dist_t            e_value,
  output logic             e_take,
  output logic             snap_load,
  output logic [2*M-1:0]   snap_valid,
  output dist_t            snap_d    [2*M],
  output logic [V-1:0]     snap_bits [2*M],
  output logic             snap_emit,
  output logic [BLK_W-1:0] snap_block,
  // status
  output logic             ev_depth,      // a depth was extended
  output logic             ev_xfer,       // broadcast-receive cycle
  output logic             ev_overflow,   // overflow re-purge cycle
  output logic             ev_trunc,      // overflow truncation cycle
  output logic             ev_underflow,  // underflow retry cycle
  output logic             ev_wait_e,     // waiting for the correction module
  output logic [$clog2(M+1)-1:0] survivors // survivors held (carefree PDs)
);

  localparam int unsigned LV = PATH_LEN / V;  // snapshots before output starts
  localparam int unsigned PW = (V > 1) ? $clog2(V) : 1;

  // One-entry input buffer.
  logic  sym_valid;
  soft_t sym_r0, sym_r1;

  // Depth bookkeeping.
  logic [PW-1:0]    phase;       // depths done mod v
  logic [BLK_W:0]   snaps;       // snapshots taken this frame
  logic             active;

  path_t        surv   [M];
  path_t        ch0    [M];
  path_t        ch1    [M];
  path_t        bsrc   [M];
  path_t        bus;
  logic [M-1:0] pd_empty, pd_cong, bt_hold, rt_hold;
  logic         tb_xfer, tb_done, tb_ovf;
  logic [M-1:0] pd_keeps;

  // Depth that is about to be extended is a correction depth.
  wire corr_depth = (phase == PW'(V - 1));
  wire need_e     = corr_depth && (snaps != '0);
  wire e_ok       = !need_e || e_ready;
  dist_t e_sub;
  assign e_sub = need_e ? e_value : '0;

  logic any_child;
  always_comb begin
    any_child = 1'b0;
    for (int i = 0; i < int'(M); i++)
      any_child |= ch0[i].valid | ch1[i].valid;
  end

  wire try_ext  = active && tb_done && sym_valid && e_ok;
  wire do_ext   = try_ext && any_child;
  wire do_udf   = try_ext && !any_child;
  wire do_xfer  = active && tb_xfer;
  wire do_ovf   = active && tb_ovf && (|pd_keeps);
  wire do_trunc = active && tb_ovf && !(|pd_keeps);

  for (genvar i = 0; i < int'(M); i++) begin : g_slice
    spect_pe #(.T(T)) u_pe (
      .parent (surv[i]),
      .r0     (sym_r0),
      .r1     (sym_r1),
      .e_sub  (e_sub),
      .child0 (ch0[i]),
      .child1 (ch1[i])
    );
    spect_pd #(.T(T), .R(R), .ROOT(i == 0)) u_pd (
      .clk       (clk),
      .rst_n     (rst_n),
      .init      (start),
      .extend    (do_ext),
      .child0    (ch0[i]),
      .child1    (ch1[i]),
      .bcast     (do_xfer && bt_hold[i]),
      .recv      (do_xfer && rt_hold[i]),
      .bus_in    (bus),
      .ovf       (do_ovf),
      .udf       (do_udf),
      .trunc     (do_trunc),
      .survivor  (surv[i]),
      .bus_out   (bsrc[i]),
      .empty     (pd_empty[i]),
      .congested (pd_cong[i]),
      .ovf_keeps (pd_keeps[i])
    );
    assign snap_valid[2*i]     = ch0[i].valid;
    assign snap_valid[2*i + 1] = ch1[i].valid;
    assign snap_d[2*i]         = ch0[i].d;
    assign snap_d[2*i + 1]     = ch1[i].d;
    for (genvar b = 0; b < int'(V); b++) begin : g_bit
      assign snap_bits[2*i][b]     = ch0[i].hist[PATH_LEN - 1 - b];
      assign snap_bits[2*i + 1][b] = ch1[i].hist[PATH_LEN - 1 - b];
    end
  end

  spect_token_bus #(.M(M)) u_bus (
    .empty     (pd_empty),
    .congested (pd_cong),
    .bus_src   (bsrc),
    .bt_hold   (bt_hold),
    .rt_hold   (rt_hold),
    .bus       (bus),
    .xfer      (tb_xfer),
    .done      (tb_done),
    .overflow  (tb_ovf)
  );

  assign in_ready   = !sym_valid || do_ext;
  assign e_take     = do_ext && need_e;
  assign snap_load  = do_ext && corr_depth;
  assign snap_emit  = (snaps >= (BLK_W+1)'(LV - 1));
  assign snap_block = BLK_W'(snaps - (BLK_W+1)'(LV - 1));

  assign ev_depth     = do_ext;
  assign ev_xfer      = do_xfer;
  assign ev_overflow  = do_ovf;
  assign ev_trunc     = do_trunc;
  assign ev_underflow = do_udf;
  assign ev_wait_e    = active && tb_done && sym_valid && !e_ok;

  always_comb begin
    survivors = '0;
    for (int i = 0; i < int'(M); i++)
      survivors += $bits(survivors)'(!pd_empty[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym_valid <= 1'b0;
      sym_r0    <= '0;
      sym_r1    <= '0;
      phase     <= '0;
      snaps     <= '0;
      active    <= 1'b0;
    end else if (start) begin
      sym_valid <= 1'b0;
      phase     <= '0;
      snaps     <= '0;
      active    <= 1'b1;
    end else begin
      if (in_valid && in_ready) begin
        sym_valid <= 1'b1;
        sym_r0    <= in_r0;
        sym_r1    <= in_r1;
      end else if (do_ext) begin
        sym_valid <= 1'b0;
      end
      if (do_ext) begin
        phase <= corr_depth ? '0 : phase + 1'b1;
        if (corr_depth) snaps <= snaps + 1'b1;
      end
    end
  end

endmodule
