// tb_model_pkg: reference models shared by the region and top testbenches.
//
//   orbit()        absolute BC number to BCID
//   coinc_model()  the 3-of-4 station coincidence with up to two candidates
//   ro_model       hits per readout link and absolute BC, with the write
//                  window and the HPB limit, and the FELIX event expected for
//                  one L0-Accept and one link group
// The models are written from the behaviour given in the module headers,
// not from the RTL.
package tb_model_pkg;
  import sl_pkg::*;

  function automatic int orbit(int a);
    return ((a % int'(NBC_ORBIT)) + int'(NBC_ORBIT)) % int'(NBC_ORBIT);
  endfunction

  function automatic cand_word_t coinc_model(logic [RPC_MAP_W-1:0] mp, bcid_t b, int win = 1);
    cand_word_t r;
    int cnt [NSTRIP];
    int first;
    r = '0;
    r.bcid = b;
    for (int p = 0; p < NSTRIP; p++) begin
      cnt[p] = 0;
      for (int s = 0; s < NSTATION; s++) begin
        bit f = 0;
        for (int k = p - win; k <= p + win; k++)
          if (k >= 0 && k < NSTRIP && mp[s*NSTRIP + k]) f = 1;
        cnt[p] += f;
      end
    end
    first = -1;
    for (int p = 0; p < NSTRIP; p++) begin
      if (cnt[p] >= MIN_STATIONS) begin
        if (first < 0) begin
          first = p;
          r.cand[0] = '{valid: 1'b1, four: (cnt[p] == NSTATION), pos: STRIP_W'(p)};
        end else if (!r.cand[1].valid && p > first + 2 * win) begin
          r.cand[1] = '{valid: 1'b1, four: (cnt[p] == NSTATION), pos: STRIP_W'(p)};
        end
      end
    end
    return r;
  endfunction

  class ro_model;
    int hpb;
    typedef logic [HIT_IDX_W-1:0] hq_t [$];
    hq_t hits [int][int];   // [link][absolute BC]
    bit  ovf  [int][int];
    int  n_ovf;
    int  n_drop;

    function new(int hpb_ = 8);
      hpb = hpb_;
      n_ovf = 0;
      n_drop = 0;
    endfunction

    // a hit accepted by the write window
    function void add(int link, int abs_bc, logic [HIT_IDX_W-1:0] d);
      if (hits[link][abs_bc].size() < hpb) hits[link][abs_bc].push_back(d);
      else begin
        n_drop++;
        if (!ovf[link].exists(abs_bc)) n_ovf++;
        ovf[link][abs_bc] = 1;
      end
    endfunction

    function int n_ovf_hits();
      return n_drop;
    endfunction

    function int count(int link, int abs_bc);
      if (!hits.exists(link) || !hits[link].exists(abs_bc)) return 0;
      return hits[link][abs_bc].size();
    endfunction

    function bit is_ovf(int link, int abs_bc);
      return ovf.exists(link) && ovf[link].exists(abs_bc);
    endfunction

    // expected words of one event; length in clocks returned in len
    function void event_words(int grp, int base, int nl, int l0id, int abs_bc, bit stale,
                              ref logic [31:0] q [$], output int len);
      bcid_t b;
      b = bcid_t'(orbit(abs_bc));
      q.push_back({2'b11, 2'(grp), 16'(l0id), b});
      len = 1;
      for (int l = base; l < base + nl; l++) begin
        int n;
        n = stale ? 0 : count(l, abs_bc);
        q.push_back({2'b10, 6'(l), is_ovf(l, abs_bc) && !stale, stale, 6'b0, 4'(n), b});
        for (int k = 0; k < n; k++) q.push_back({2'b01, 6'(l), 16'b0, hits[l][abs_bc][k]});
        len += (n > 0) ? n + 2 : 1;
      end
      q.push_back({2'b00, 14'b0, 16'(q.size() + 1)});
    endfunction
  endclass
endpackage
