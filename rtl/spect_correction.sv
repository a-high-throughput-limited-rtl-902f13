// Correction module of the SPEC-T decoder: lagged best-metric search.
//
// Every v depths the decoding module hands over a snapshot of all its
// contender paths: valid flag, distance D from the speculated best metric,
// and the v oldest information bits of each. This module searches for
// E = min D and releases the v bits of the path that attains it (the first
// such path in index order) as decoded output. E is returned to the decoding
// module, which subtracts it from the speculated best metric at the next
// depth that is a multiple of v.
//
// The search runs v times slower than the decoding module: it covers N/v
// entries per cycle over v cycles, since at least v cycles pass before the
// decoding module needs E (one depth takes at least one cycle). On the last
// search cycle E is forwarded combinationally (e_ready goes high in that
// cycle), so a decoding module that needs E right then does not wait.
// e_take (asserted together with a new snapshot) consumes E.
//
// The function (minimum search, E, release of v symbols) follows the SPEC-T
// architecture; the chunked search, the first-index tie-break and the
// output block format are this design's choices.
//
// Timing: snap_load at cycle t; out_valid/out_bits at cycle t+v+1 (one
// registered pulse); e_ready from cycle t+v until e_take.
module spect_correction
  import spect_pkg::*;
#(
  parameter int unsigned N     = 128,   // snapshot entries (2M contenders)
  parameter int unsigned V     = 4,     // correction interval v
  parameter int unsigned BLK_W = 16     // width of the output block index
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,                // frame start: forget state
  input  logic             snap_load,
  input  logic [N-1:0]     snap_valid,
  input  dist_t            snap_d    [N],
  input  logic [V-1:0]     snap_bits [N],
  input  logic             snap_emit,           // bits of this snapshot are output
  input  logic [BLK_W-1:0] snap_block,          // block index of those bits
  input  logic             e_take,
  output logic             e_ready,
  output dist_t            e_value,
  output logic             out_valid,
  output logic [V-1:0]     out_bits,            // out_bits[0] is the oldest bit
  output logic [BLK_W-1:0] out_block
);

  localparam int unsigned CH = N / V;           // entries searched per cycle
  localparam int unsigned CW = (V > 1) ? $clog2(V) : 1;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]     s_valid;
  dist_t            s_d    [N];
  logic [V-1:0]     s_bits [N];
  logic             s_emit;
  logic [BLK_W-1:0] s_block;

  logic             busy;
  logic [CW-1:0]    step;
  logic             best_found;
  dist_t            best_d;
  logic [V-1:0]     best_bits;
  logic             e_held;
  dist_t            e_reg;

  // Best of the current chunk merged with the running best (strictly
  // smaller wins, so ties keep the lowest index).
  logic             nxt_found;
  dist_t            nxt_d;
  logic [V-1:0]     nxt_bits;

  always_comb begin
    nxt_found = best_found;
    nxt_d     = best_d;
    nxt_bits  = best_bits;
    for (int k = 0; k < int'(CH); k++) begin
      logic [IW-1:0] idx;
      idx = IW'(int'(step) * int'(CH) + k);
      if (s_valid[idx] && (!nxt_found || s_d[idx] < nxt_d)) begin
        nxt_found = 1'b1;
        nxt_d     = s_d[idx];
        nxt_bits  = s_bits[idx];
      end
    end
  end

  wire last_step = busy && (step == CW'(V - 1));

  assign e_ready = e_held || last_step;
  assign e_value = e_held ? e_reg : (nxt_found ? nxt_d : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid    <= '0;
      s_emit     <= 1'b0;
      s_block    <= '0;
      busy       <= 1'b0;
      step       <= '0;
      best_found <= 1'b0;
      best_d     <= '0;
      best_bits  <= '0;
      e_held     <= 1'b0;
      e_reg      <= '0;
      out_valid  <= 1'b0;
      out_bits   <= '0;
      out_block  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (init) begin
        busy   <= 1'b0;
        e_held <= 1'b0;
      end else begin
        if (busy) begin
          best_found <= nxt_found;
          best_d     <= nxt_d;
          best_bits  <= nxt_bits;
          step       <= step + 1'b1;
          if (last_step) begin
            busy      <= 1'b0;
            e_held    <= 1'b1;
            e_reg     <= nxt_found ? nxt_d : '0;
            out_valid <= s_emit;
            out_bits  <= nxt_bits;
            out_block <= s_block;
          end
        end
        if (e_take) e_held <= 1'b0;
        if (snap_load) begin
          s_valid    <= snap_valid;
          s_d        <= snap_d;
          s_bits     <= snap_bits;
          s_emit     <= snap_emit;
          s_block    <= snap_block;
          busy       <= 1'b1;
          step       <= '0;
          best_found <= 1'b0;
        end
      end
    end
  end

  // A new snapshot may only arrive once the previous search has finished
  // (or together with its last step).
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n || init)
                                 snap_load |-> (!busy || last_step));

endmodule
