// Path-parallel SPEC-T decoder for the rate-1/2 memory-19 systematic code.
//
// Top level: the decoding module (M PE/PD slices, speculated best metric,
// token-bus re-distribution, overflow handling) and the correction module
// (lagged best-metric search and output), connected as two recursions: the
// decoding module sends a snapshot of all contenders every v depths and
// receives the correction E of the previous snapshot at the same moment.
//
// Interface: pulse start before a frame; then stream one soft pair
// (r0 systematic, r1 parity) per trellis depth with in_valid/in_ready. The
// decoder emits v information bits per out_valid pulse, out_bits[0] the
// oldest, for depths out_block*v+1 .. out_block*v+v of the frame. Decoding
// delay is PATH_LEN depths plus v+1 cycles of search, so a frame of N bits
// needs N+PATH_LEN input pairs in all (the encoder's zero tail and beyond)
// before its last block leaves. Event outputs pulse once per cycle of that
// kind and survivors gives the number of paths held.
//
// The two-module structure follows the SPEC-T architecture; the stream
// interface, the frame start pulse and the event outputs are this design's.
//
// Defaults: M = 64 survivors, v = 4, T = 8, R = 1 (T and R in units of the
// received amplitude), as in the reference configuration.
module spect_decoder
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
  input  logic             start,
  input  logic             in_valid,
  output logic             in_ready,
  input  soft_t            in_r0,
  input  soft_t            in_r1,
  output logic             out_valid,
  output logic [V-1:0]     out_bits,
  output logic [BLK_W-1:0] out_block,
  output logic             ev_depth,
  output logic             ev_xfer,
  output logic             ev_overflow,
  output logic             ev_trunc,
  output logic             ev_underflow,
  output logic             ev_wait_e,
  output logic [$clog2(M+1)-1:0] survivors
);

  logic             e_ready, e_take, snap_load, snap_emit;
  dist_t            e_value;
  logic [2*M-1:0]   snap_valid;
  dist_t            snap_d    [2*M];
  logic [V-1:0]     snap_bits [2*M];
  logic [BLK_W-1:0] snap_block;

  spect_decoding_module #(.M(M), .V(V), .T(T), .R(R), .BLK_W(BLK_W)) u_dec (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .in_valid     (in_valid),
    .in_ready     (in_ready),
    .in_r0        (in_r0),
    .in_r1        (in_r1),
    .e_ready      (e_ready),
    .e_value      (e_value),
    .e_take       (e_take),
    .snap_load    (snap_load),
    .snap_valid   (snap_valid),
    .snap_d       (snap_d),
    .snap_bits    (snap_bits),
    .snap_emit    (snap_emit),
    .snap_block   (snap_block),
    .ev_depth     (ev_depth),
    .ev_xfer      (ev_xfer),
    .ev_overflow  (ev_overflow),
    .ev_trunc     (ev_trunc),
    .ev_underflow (ev_underflow),
    .ev_wait_e    (ev_wait_e),
    .survivors    (survivors)
  );

  spect_correction #(.N(2*M), .V(V), .BLK_W(BLK_W)) u_corr (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (start),
    .snap_load  (snap_load),
    .snap_valid (snap_valid),
    .snap_d     (snap_d),
    .snap_bits  (snap_bits),
    .snap_emit  (snap_emit),
    .snap_block (snap_block),
    .e_take     (e_take),
    .e_ready    (e_ready),
    .e_value    (e_value),
    .out_valid  (out_valid),
    .out_bits   (out_bits),
    .out_block  (out_block)
  );

endmodule
