// fhtf_ref_pkg: reference model and event generator for the track filter
// testbenches.
//
// The model is written independently of the RTL: the line rule is evaluated
// directly for every qA/pT bin with 64-bit integer arithmetic (no segment
// additions), the accumulators are counted per bin, the five-bin window rule
// is applied, and the recovered hits are gathered by a plain loop over the
// stored hits. Both ways of drawing lines are modelled (loop over qA/pT
// bins, or over phi0 bins with the division by r). expected() returns the exact sequence of output records the
// filter must produce for one event.
//
// Events are generated with straight tracks through all layers (phi = phi0 -
// r*q, rounded down), optionally one layer missing, plus random noise hits.
package fhtf_ref_pkg;
  import fhtf_pkg::*;

  // Binning constants, the RTL defaults written out again.
  localparam int RQ_MIN      = -2672;
  localparam int RQ_STEP     = 32;
  localparam int RPHI0_MIN   = 16384;

  // phi0 bin crossed by hit (phi, r) in qA/pT bin qbin, -1 when outside.
  function automatic int ref_col(int phi, int r, int qbin);
    longint p, rel, col;
    p   = longint'(phi) * 4096 + longint'(r) * longint'(RQ_MIN + qbin * RQ_STEP);
    rel = p - longint'(RPHI0_MIN) * 4096;
    col = rel >>> 18;
    if (col < 0 || col >= 48) return -1;
    return int'(col);
  endfunction

  // phi0-loop form: qA/pT bin crossed by hit (phi, r) in phi0 bin m, -1 when
  // outside or r = 0. Z is the first-segment value plus whole steps of 8 bins.
  function automatic int ref_row_phi0(int phi, int r, int m);
    longint z0, dz, z, rel, row;
    if (r == 0) return -1;
    z0  = (longint'(RPHI0_MIN + (m % 8) * 64 + 32 - phi) * (longint'(1) << 20)) / longint'(r);
    dz  = (longint'(8 * 64) * (longint'(1) << 20)) / longint'(r);
    z   = z0 + longint'(m / 8) * dz;
    rel = z - (longint'(RQ_MIN) * 256 - 16 * 256);
    row = rel >>> 13;
    if (row < 0 || row >= 168) return -1;
    return int'(row);
  endfunction

  // Does hit (phi, r) belong to bin (q, c) under the chosen drawing loop?
  function automatic bit ref_hit_in_bin(int phi, int r, int q, int c, bit loop_phi0);
    if (loop_phi0) return ref_row_phi0(phi, r, c) == q;
    return ref_col(phi, r, q) == c;
  endfunction

  class fhtf_event;
    int phi [NLAYERS][$];
    int r   [NLAYERS][$];
    int clu [NLAYERS][$];
    int unsigned clu_next;

    function new(int unsigned clu_base);
      clu_next = clu_base;
    endfunction

    function void add_hit(int l, int ph, int rr);
      phi[l].push_back(ph & 16'hffff);
      r[l].push_back(rr & 12'hfff);
      clu[l].push_back(int'(clu_next % 18'h3ffff));
      clu_next++;
    endfunction

    // A track through the centre of phi0 bin pcol and qA/pT bin qbin.
    function void add_track(int qbin, int pcol, int skip_layer);
      longint phi0s, num;
      int q, rr;
      q     = RQ_MIN + qbin * RQ_STEP;
      phi0s = longint'(RPHI0_MIN + pcol * 64 + 32) * 4096;
      for (int l = 0; l < int'(NLAYERS); l++) begin
        if (l == skip_layer) continue;
        rr  = 1000 + 400 * l + int'($urandom_range(0, 60));
        num = phi0s - longint'(rr) * q;
        add_hit(l, int'(num >>> 12), rr);
      end
    endfunction

    function void add_noise(int l);
      add_hit(l, RPHI0_MIN - 2500 + int'($urandom_range(0, 8000)),
              1000 + 400 * l + int'($urandom_range(0, 60)));
    endfunction

    function int n_words();
      int n = 1;
      for (int l = 0; l < int'(NLAYERS); l++) if (phi[l].size() > n) n = phi[l].size();
      return n;
    endfunction

    // Input word w of the event.
    function in_word_t word(int w);
      in_word_t iw;
      iw = '0;
      iw.sof = (w == 0);
      iw.eof = (w == n_words() - 1);
      for (int l = 0; l < int'(NLAYERS); l++) begin
        if (w < phi[l].size()) begin
          iw.hv[l]         = 1'b1;
          iw.hit[l].phi    = PHI_W'(phi[l][w]);
          iw.hit[l].r      = R_W'(r[l][w]);
          iw.hit[l].clu    = CLU_W'(clu[l][w]);
        end
      end
      return iw;
    endfunction

    // Exact record sequence for this event.
    function void expected(int depth, int thr, logic [EVID_W-1:0] evid,
                           ref out_rec_t recs[$], output int nroads, input bit loop_phi0 = 0);
      bit   lay [NQ][NPHI0][NLAYERS];
      int   cnt [NQ][NPHI0];
      int   nh  [NLAYERS];
      int   nrows;
      nroads = 0;
      foreach (lay[q, c, l]) lay[q][c][l] = 0;
      nrows = 0;
      for (int l = 0; l < int'(NLAYERS); l++) begin
        nh[l] = (phi[l].size() < depth) ? phi[l].size() : depth;
        if ((nh[l] + 3) / 4 > nrows) nrows = (nh[l] + 3) / 4;
        for (int i = 0; i < nh[l]; i++)
          if (loop_phi0) begin
            for (int c = 0; c < int'(NPHI0); c++) begin
              int q = ref_row_phi0(phi[l][i], r[l][i], c);
              if (q >= 0) lay[q][c][l] = 1;
            end
          end else begin
            for (int q = 0; q < int'(NQ); q++) begin
              int c = ref_col(phi[l][i], r[l][i], q);
              if (c >= 0) lay[q][c][l] = 1;
            end
          end
      end
      foreach (cnt[q, c]) begin
        cnt[q][c] = 0;
        for (int l = 0; l < int'(NLAYERS); l++) cnt[q][c] += int'(lay[q][c][l]);
      end
      for (int q = 0; q < int'(NQ); q++)
        for (int c = 0; c < int'(NPHI0); c++) begin
          int lm2, lm1, rp1, rp2;
          lm2 = (c >= 2) ? cnt[q][c-2] : 0;
          lm1 = (c >= 1) ? cnt[q][c-1] : 0;
          rp1 = (c <= 46) ? cnt[q][c+1] : 0;
          rp2 = (c <= 45) ? cnt[q][c+2] : 0;
          if (cnt[q][c] >= thr && cnt[q][c] > lm2 && cnt[q][c] > lm1 &&
              cnt[q][c] >= rp1 && cnt[q][c] >= rp2) begin
            nroads++;
            for (int row = 0; row < nrows; row++) begin
              out_rec_t rec;
              rec      = '0;
              rec.evid = evid;
              rec.qbin = QBIN_W'(q);
              rec.pbin = PHI0BIN_W'(c);
              rec.road_last = (row == nrows - 1);
              for (int l = 0; l < int'(NLAYERS); l++)
                for (int k = 0; k < 4; k++) begin
                  int i = row * 4 + k;
                  rec.clu[l*4+k] = CLU_NONE;
                  if (i < nh[l] && ref_hit_in_bin(phi[l][i], r[l][i], q, c, loop_phi0)) begin
                    rec.mask[l*4+k] = 1'b1;
                    rec.clu[l*4+k]  = CLU_W'(clu[l][i]);
                  end
                end
              if (rec.mask != '0 || rec.road_last) recs.push_back(rec);
            end
          end
        end
      begin
        out_rec_t e;
        e = '0;
        e.evid = evid;
        e.event_last = 1'b1;
        e.clu = {REC_LANES{CLU_NONE}};
        recs.push_back(e);
      end
    endfunction
  endclass

endpackage
