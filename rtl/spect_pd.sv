// Path-data register array PD_i of the path-parallel SPEC-T decoder.
//
// Holds up to two paths. At the start of a depth it holds at most one
// survivor (in either slot); after extension and purge it holds the PE's two
// children, so it is empty (no survivor), carefree (one) or congested (two).
// During re-distribution a congested PD that holds the broadcasting token
// puts its second path on the data bus and drops it; an empty PD that holds
// the receiving token loads the bus into its first slot.
//
// Commands (one per cycle, priority from top): init, extend, overflow
// re-purge (add R to every D, drop paths beyond T), truncation (drop the
// second path), underflow relief (subtract R from every D), and otherwise
// receive / broadcast.
// The last two are this design's way of repeating a depth with a shifted
// speculated best metric; see the decoding module.
module spect_pd
  import spect_pkg::*;
#(
  parameter int unsigned T = 8,
  parameter int unsigned R = 1,
  parameter bit          ROOT = 1'b0   // holds the all-zero start path after init
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,        // frame start
  input  logic  extend,      // load the PE's children
  input  path_t child0,
  input  path_t child1,
  input  logic  bcast,       // holds BT: drive bus with slot 1, then drop it
  input  logic  recv,        // holds RT: load bus into slot 0
  input  path_t bus_in,
  input  logic  ovf,         // overflow: D += R, purge against T
  input  logic  udf,         // underflow: D -= R (floor 0)
  input  logic  trunc,       // overflow fallback: drop slot 1
  output path_t survivor,    // path to extend next depth
  output path_t bus_out,     // slot 1 (second path of a congested PD)
  output logic  empty,
  output logic  congested,
  output logic  ovf_keeps    // some path here would survive an overflow re-purge
);

  localparam dist_t T_LSB = dist_t'(T << Q_FRAC);
  localparam dist_t R_LSB = dist_t'(R << Q_FRAC);

  path_t slot0, slot1;

  function automatic path_t repurge(path_t p);
    path_t q;
    q       = p;
    q.d     = d_add(p.d, R_LSB);
    q.valid = p.valid && (q.d <= T_LSB);
    return q;
  endfunction

  function automatic path_t relieve(path_t p);
    path_t q;
    q   = p;
    q.d = d_sub(p.d, R_LSB);
    return q;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot0 <= '0;
      slot1 <= '0;
    end else if (init) begin
      slot0       <= '0;
      slot0.valid <= ROOT;
      slot1       <= '0;
    end else if (extend) begin
      slot0 <= child0;
      slot1 <= child1;
    end else if (ovf) begin
      slot0 <= repurge(slot0);
      slot1 <= repurge(slot1);
    end else if (trunc) begin
      slot1.valid <= 1'b0;
    end else if (udf) begin
      slot0 <= relieve(slot0);
      slot1 <= relieve(slot1);
    end else begin
      if (recv) slot0 <= bus_in;
      if (bcast) slot1.valid <= 1'b0;
    end
  end

  assign survivor  = slot0.valid ? slot0 : slot1;
  assign bus_out   = slot1;
  assign empty     = !slot0.valid && !slot1.valid;
  assign congested = slot0.valid && slot1.valid;
  assign ovf_keeps = repurge(slot0).valid || repurge(slot1).valid;

  // Only an empty PD may receive and only a congested one may broadcast.
  a_recv_empty: assert property (@(posedge clk) disable iff (!rst_n) recv |-> empty);
  a_bcast_cong: assert property (@(posedge clk) disable iff (!rst_n) bcast |-> congested);

endmodule
