// Behavioural reference of the SPEC-T algorithm for the testbenches.
//
// Works on the set of paths, without PEs, register arrays or token bus, so
// it is independent of where the hardware keeps each path. Per depth it
// extends every survivor by both bits, charges 2|r| per coded bit that
// disagrees with the hard decision, subtracts the correction E on every v-th
// depth (the minimum distance of the snapshot taken v depths earlier),
// purges distances above T, repeats the depth with every parent distance
// lowered by R while nothing survives, and raises all distances by R and
// purges again while more than M paths survive. It also supplies the
// channel helpers: encoder, Gaussian noise and soft quantisation.
package spect_ref_pkg;

  localparam int PLEN = 64;      // path length of the decoder
  localparam int DMAX = 1023;    // saturation of the 10-bit distance

  // Parity generator of the memory-19 code: low 20 bits of octal 7144761,
  // coefficient of D^j at bit 19-j.
  localparam bit [20:0] GOCT = 21'o7144761;

  function automatic bit enc_parity(bit [PLEN-1:0] h);
    bit p = 0;
    for (int j = 0; j < 20; j++)
      if (GOCT[19 - j]) p ^= h[j];
    return p;
  endfunction

  function automatic int pen(bit c, int r);
    bit hard = (r < 0);
    int a = (r < 0) ? -r : r;
    return (c != hard) ? 2 * a : 0;
  endfunction

  // Gaussian sample (Box-Muller) and quantisation to 5-bit, 4 LSB per unit.
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int quant(real x);
    int q = int'($floor(x * 4.0 + 0.5));
    if (q > 15) q = 15;
    if (q < -16) q = -16;
    return q;
  endfunction

  typedef struct {
    int          d;
    bit [PLEN-1:0] h;
  } rpath_t;

  class spect_ref;
    int M, V, T, R;          // T and R in LSB
    rpath_t paths[$];
    int n;                   // depths done
    int snaps;               // snapshots taken
    int prev_min;            // min of the last snapshot
    // results of the last step
    int under, over, cong, nsurv;
    bit desync;              // overflow truncation hit: set no longer exact
    bit took_snap;
    int snap_min;
    int e_used;
    bit [31:0] best_bits[$]; // v oldest bits of every path attaining the min

    function new(int m, int v, int t_lsb, int r_lsb);
      M = m; V = v; T = t_lsb; R = r_lsb;
      reset();
    endfunction

    function void reset();
      rpath_t p;
      p.d = 0; p.h = '0;
      paths = {};
      paths.push_back(p);
      n = 0; snaps = 0; prev_min = 0; desync = 0;
    endfunction

    function void step(int r0, int r1);
      rpath_t kids[$];
      int e;
      bit corr;
      under = 0; over = 0; took_snap = 0;
      corr = ((n + 1) % V == 0);
      e = (corr && snaps > 0) ? prev_min : 0;
      e_used = e;
      forever begin
        kids = {};
        cong = 0;
        foreach (paths[i]) begin
          int nv = 0;
          for (int b = 0; b < 2; b++) begin
            rpath_t c;
            int s;
            c.h = {paths[i].h[PLEN-2:0], b[0]};
            s = paths[i].d + pen(b[0], r0) + pen(enc_parity(c.h), r1);
            if (s > DMAX) s = DMAX;
            s = s - e;
            if (s < 0) s = 0;
            c.d = s;
            if (c.d <= T) begin
              kids.push_back(c);
              nv++;
            end
          end
          if (nv == 2) cong++;
        end
        if (kids.size() > 0) break;
        under++;
        foreach (paths[i]) paths[i].d = (paths[i].d > R) ? paths[i].d - R : 0;
      end
      n++;
      if (corr) begin
        took_snap = 1;
        snap_min = DMAX + 1;
        foreach (kids[i]) if (kids[i].d < snap_min) snap_min = kids[i].d;
        best_bits = {};
        foreach (kids[i])
          if (kids[i].d == snap_min) begin
            bit [31:0] w = '0;
            for (int b = 0; b < V; b++) w[b] = kids[i].h[PLEN - 1 - b];
            best_bits.push_back(w);
          end
        prev_min = snap_min;
        snaps++;
      end
      while (kids.size() > M) begin
        rpath_t k2[$];
        over++;
        foreach (kids[i]) begin
          int s = kids[i].d + R;
          if (s > DMAX) s = DMAX;
          if (s <= T) begin
            rpath_t c = kids[i];
            c.d = s;
            k2.push_back(c);
          end
        end
        if (k2.size() == 0) begin
          // the hardware truncates by position here: keep any M
          desync = 1;
          while (kids.size() > M) void'(kids.pop_back());
        end else begin
          kids = k2;
        end
      end
      paths = kids;
      nsurv = kids.size();
    endfunction
  endclass

endpackage
