// Token bus of the path-parallel SPEC-T decoder: re-distribution of paths.
//
// After the path purge every PD is empty, carefree or congested. Two tokens
// are launched at PD 0 and ripple towards PD M-1: the broadcasting token BT
// passes carefree and empty PDs and is intercepted by the first congested
// PD; the receiving token RT passes carefree and congested PDs and is
// intercepted by the first empty PD. The BT holder drives its second path
// onto the shared data bus and the RT holder loads it, after which both PDs
// are carefree and, on the next cycle, the tokens move on. One such
// broadcast-receive takes one cycle. Re-distribution is over when BT leaves
// the far end (no congested PD left); if RT leaves the far end while BT is
// still held, more than M paths survive: a decoding overflow.
//
// The token rules follow the SPEC-T architecture; resolving the ripple in
// one cycle and re-evaluating it from the PD categories every cycle is this
// design's choice.
//
// Interface: combinational. bt_hold/rt_hold are one-hot (or zero), xfer says
// a broadcast-receive happens this cycle, done that no PD is congested and
// overflow that a congested PD has no empty PD left to send to.
module spect_token_bus
  import spect_pkg::*;
#(
  parameter int unsigned M = 64
) (
  input  logic [M-1:0] empty,
  input  logic [M-1:0] congested,
  input  path_t        bus_src [M],   // second path of every PD
  output logic [M-1:0] bt_hold,
  output logic [M-1:0] rt_hold,
  output path_t        bus,
  output logic         xfer,
  output logic         done,
  output logic         overflow
);

  // Token ripple chains: bt_chain[i] / rt_chain[i] = token arrives at PD i.
  logic [M:0] bt_chain, rt_chain;

  assign bt_chain[0] = 1'b1;
  assign rt_chain[0] = 1'b1;
  for (genvar i = 0; i < int'(M); i++) begin : g_tok
    assign bt_hold[i]      = bt_chain[i] && congested[i];
    assign rt_hold[i]      = rt_chain[i] && empty[i];
    assign bt_chain[i + 1] = bt_chain[i] && !congested[i];
    assign rt_chain[i + 1] = rt_chain[i] && !empty[i];
  end

  // Data bus: the BT holder's second path (one driver at most).
  always_comb begin
    bus = '0;
    for (int i = 0; i < int'(M); i++)
      if (bt_hold[i]) bus = bus_src[i];
  end

  assign done     = bt_chain[M];
  assign overflow = !bt_chain[M] && rt_chain[M];
  assign xfer     = !bt_chain[M] && !rt_chain[M];

endmodule
