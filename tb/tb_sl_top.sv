// tb_sl_top: end-to-end test of the Sector Logic firmware at its default
// sizes (50 DCT links, 512-BC readout RAMs, 6 clocks per BC).
//
// A track generator puts 0-2 muon tracks per BC into one of the two half
// sectors (hits in three or four stations around one strip, the BI hit on a
// BI link, the others on that half's BM/BO links), plus noise, Tile flags and
// bursts that overflow a readout RAM slot. Hits leave each link one per
// clock with a random delay of up to a few BCs, so some arrive too late for
// the trigger. A model of MDT-TP answers every candidate word, mostly in
// time, sometimes too late, sometimes not at all. L0-Accepts come at the
// 1 MHz rate with the 10 us (400 BC) latency, plus accepts for BCs whose data
// are already overwritten and one burst that overflows the L0-Accept queue.
//
// The reference models (tb_model_pkg) are fed with each hit as it is driven.
// Checked: BCID counter, MDT-TP words (content and latency), MUCTPI words
// (content, confirmation and the fixed CONF_LAT latency against the 390 ns
// budget), Tile maps, every FELIX word of every event on the three links,
// the event lengths in clocks, and the drop counters. Each mechanism must
// occur at least once.
module tb_sl_top;
  import sl_pkg::*;
  import tb_model_pkg::*;

  localparam int LAT = 8, CONF_LAT = 14, WR_WIN = 32, MAX_AGE = 448, HPB = 8;
  localparam int L0_LATENCY = 400;            // 10 us at 25 ns per BC
  localparam int L0_PERIOD  = 40 * CLK_PER_BC; // 1 MHz
  localparam int NBC = 3800;   // crosses one orbit wrap (3564 BCs)

  logic clk = 0, rst_n = 0, bcr = 0;
  logic l0v = 0;  bcid_t l0b = '0;  bcid_t bcid;
  logic      bi_v [N_BI_LINKS];       rpc_hit_t bi_h [N_BI_LINKS];
  logic      bm_v [2][N_BMBO_LINKS];  rpc_hit_t bm_h [2][N_BMBO_LINKS];
  logic      ti_v [N_TILE_LINKS];     tile_hit_t ti_h [N_TILE_LINKS];
  logic      mdt_v [2];  cand_word_t mdt [2];
  logic      cf_v [2];   mdt_conf_t cf [2];
  logic      muc_v [2];  muctpi_word_t muc [2];
  logic      fx_v [N_FELIX];  logic [31:0] fx_d [N_FELIX];
  logic      tl_v [2];  bcid_t tl_b [2];  logic [TILE_MAP_W-1:0] tl_m [2];
  logic [N_BI_LINKS+N_TILE_LINKS-1:0] s0_late;
  logic [N_BMBO_LINKS-1:0] bm_late [2];
  logic [1:0] cf_drop;  logic [N_RO_LINKS-1:0] ro_drop;  logic [N_FELIX-1:0] l0_drop, ro_busy;

  sl_top dut (
    .clk, .rst_n, .bcr_i(bcr), .l0a_valid_i(l0v), .l0a_bcid_i(l0b), .bcid_o(bcid),
    .bi_valid_i(bi_v), .bi_hit_i(bi_h), .bmbo_valid_i(bm_v), .bmbo_hit_i(bm_h),
    .tile_valid_i(ti_v), .tile_hit_i(ti_h),
    .mdt_valid_o(mdt_v), .mdt_o(mdt), .conf_valid_i(cf_v), .conf_i(cf),
    .muc_valid_o(muc_v), .muc_o(muc), .felix_valid_o(fx_v), .felix_data_o(fx_d),
    .tile_valid_o(tl_v), .tile_bcid_o(tl_b), .tile_map_o(tl_m),
    .slr0_late_o(s0_late), .bmbo_late_o(bm_late), .conf_drop_o(cf_drop),
    .ro_drop_o(ro_drop), .l0a_drop_o(l0_drop), .ro_busy_o(ro_busy));

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, abs_bc = 0;
  // mechanism counters
  int n_late = 0, exp_late = 0, n_c3 = 0, n_c4 = 0, n_two = 0, n_conf = 0, n_unconf = 0;
  int n_cdrop = 0, exp_cdrop = 0, n_ev [N_FELIX], n_stale [N_FELIX], n_l0drop [N_FELIX];
  int n_ro_drop = 0, n_l0a = 0, n_tile = 0, n_hits_out = 0;

  // reference state
  logic [RPC_MAP_W-1:0] m_bi [int];
  logic [RPC_MAP_W-1:0] m_loc [2][int];
  logic [TILE_MAP_W-1:0] m_tile [int];
  logic [NCAND-1:0] m_conf [2][int];
  cand_word_t m_cand [2][int];
  ro_model ro;
  int l0_abs [int];
  bit l0_stale [int];
  logic [31:0] expq [N_FELIX][$];
  int ev_start [N_FELIX], ev_len [N_FELIX];

  // pending hits per link: absolute BC and payload, driven in order
  typedef struct { int due; int abs; logic [HIT_IDX_W-1:0] idx; } pend_t;
  pend_t q_rpc [N_RO_LINKS][$];
  pend_t q_tile [N_TILE_LINKS][$];
  typedef struct { int due; mdt_conf_t w; bit in_time; } cpend_t;
  cpend_t q_conf [2][int];   // keyed by the clock it is due

  initial begin
    repeat (NBC * CLK_PER_BC + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (cyc % CLK_PER_BC == CLK_PER_BC - 1) abs_bc <= abs_bc + 1;
    end
  end

  function automatic int ro_link(int half, int l);
    return N_BI_LINKS + half * N_BMBO_LINKS + l;
  endfunction

  // ---------------- generation, once per BC ----------------
  task automatic gen_bc();
    int b;
    b = abs_bc;
    repeat ($urandom_range(0, 2)) begin
      int h, p, skip;
      h = $urandom_range(0, 1);
      p = $urandom_range(1, NSTRIP - 2);
      skip = $urandom_range(0, 4);
      for (int s = 0; s < NSTATION; s++) if (s != skip) begin
        int k, l;
        pend_t e;
        k = p + $urandom_range(0, 2) - 1;
        e.abs = b; e.idx = {2'(s), STRIP_W'(k)};
        e.due = cyc + $urandom_range(0, (LAT - 3) * CLK_PER_BC);
        if ($urandom_range(0, 30) == 0) e.due = cyc + (LAT + 1) * CLK_PER_BC;  // too late
        l = (s == 0) ? $urandom_range(0, N_BI_LINKS - 1) : ro_link(h, $urandom_range(0, N_BMBO_LINKS - 1));
        q_rpc[l].push_back(e);
      end
    end
    // noise
    repeat ($urandom_range(0, 6)) begin
      int l;
      pend_t e;
      l = $urandom_range(0, N_RO_LINKS - 1);
      e.abs = b;
      e.idx = {(l < N_BI_LINKS) ? 2'd0 : 2'($urandom_range(1, 3)), STRIP_W'($urandom)};
      e.due = cyc + $urandom_range(0, (LAT + 3) * CLK_PER_BC);
      q_rpc[l].push_back(e);
    end
    // a burst that overflows one readout slot
    if ($urandom_range(0, 60) == 0) begin
      int l;
      l = $urandom_range(0, N_RO_LINKS - 1);
      repeat (HPB + 3) begin
        pend_t e;
        e.abs = b; e.idx = HIT_IDX_W'($urandom) & ~HIT_IDX_W'(0) ;
        if (l < N_BI_LINKS) e.idx[7:6] = 2'd0; else if (e.idx[7:6] == 2'd0) e.idx[7:6] = 2'd1;
        e.due = cyc;
        q_rpc[l].push_back(e);
      end
    end
    // Tile flags
    repeat ($urandom_range(0, 3)) begin
      int l;
      pend_t e;
      l = $urandom_range(0, N_TILE_LINKS - 1);
      e.abs = b; e.idx = HIT_IDX_W'($urandom_range(0, TILE_MAP_W - 1));
      e.due = cyc + $urandom_range(0, (LAT + 2) * CLK_PER_BC);
      q_tile[l].push_back(e);
    end
  endtask

  // ---------------- drive, every cycle ----------------
  task automatic drive();
    for (int l = 0; l < N_RO_LINKS; l++) begin
      logic v;  rpc_hit_t hh;
      v = 0; hh = '0;
      if (q_rpc[l].size() != 0 && q_rpc[l][0].due <= cyc) begin
        pend_t e;
        int age;
        e = q_rpc[l].pop_front();
        age = abs_bc - e.abs;
        v = 1;
        hh = '{bcid: bcid_t'(orbit(e.abs)), station: station_e'(e.idx[7:6]), strip: e.idx[5:0]};
        if (age < LAT) begin
          if (l < N_BI_LINKS) begin
            if (!m_bi.exists(e.abs)) m_bi[e.abs] = '0;
            m_bi[e.abs][e.idx] = 1'b1;
          end else begin
            int h;
            h = (l - N_BI_LINKS) / N_BMBO_LINKS;
            if (!m_loc[h].exists(e.abs)) m_loc[h][e.abs] = '0;
            m_loc[h][e.abs][e.idx] = 1'b1;
          end
        end else exp_late++;
        checks++;
        if (age > WR_WIN - 4) begin failures++; $display("stimulus: hit %0d BCs old", age); end
        ro.add(l, e.abs, e.idx);
      end
      if (l < N_BI_LINKS) begin bi_v[l] = v; bi_h[l] = hh; end
      else begin
        int h, k;
        h = (l - N_BI_LINKS) / N_BMBO_LINKS;
        k = (l - N_BI_LINKS) % N_BMBO_LINKS;
        bm_v[h][k] = v; bm_h[h][k] = hh;
      end
    end
    for (int l = 0; l < N_TILE_LINKS; l++) begin
      ti_v[l] = 0; ti_h[l] = '0;
      if (q_tile[l].size() != 0 && q_tile[l][0].due <= cyc) begin
        pend_t e;
        e = q_tile[l].pop_front();
        ti_v[l] = 1;
        ti_h[l] = '{bcid: bcid_t'(orbit(e.abs)), tower: TILE_IDX_W'(e.idx)};
        if (abs_bc - e.abs < LAT) begin
          if (!m_tile.exists(e.abs)) m_tile[e.abs] = '0;
          m_tile[e.abs][e.idx[TILE_IDX_W-1:0]] = 1'b1;
        end else exp_late++;
      end
    end
    for (int h = 0; h < 2; h++) begin
      cf_v[h] = 0; cf[h] = '0;
      if (q_conf[h].exists(cyc)) begin
        cpend_t c;
        int x;
        c = q_conf[h][cyc];
        q_conf[h].delete(cyc);
        cf_v[h] = 1; cf[h] = c.w;
        // absolute BC of the confirmed word: the newest one with this BCID
        x = abs_bc - int'(bc_age(bcid_t'(orbit(abs_bc)), c.w.bcid));
        if (abs_bc - x < CONF_LAT) begin
          m_conf[h][x] |= c.w.confirm & {m_cand[h][x].cand[1].valid, m_cand[h][x].cand[0].valid};
        end else exp_cdrop++;
      end
    end
  endtask

  task automatic quiet();
    l0v = 0;
    for (int l = 0; l < N_BI_LINKS; l++) bi_v[l] = 0;
    for (int h = 0; h < 2; h++) begin
      cf_v[h] = 0;
      for (int l = 0; l < N_BMBO_LINKS; l++) bm_v[h][l] = 0;
    end
    for (int l = 0; l < N_TILE_LINKS; l++) ti_v[l] = 0;
  endtask

  task automatic l0a(int age);
    l0v = 1;
    l0b = bcid_t'(orbit(abs_bc - age));
    l0_abs[n_l0a] = abs_bc - age;
    l0_stale[n_l0a] = (age > MAX_AGE - 30);
    n_l0a++;
  endtask

  // ---------------- output checks ----------------
  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (bcid !== bcid_t'(orbit(abs_bc))) begin failures++; $display("bcid %0d exp %0d", bcid, orbit(abs_bc)); end
    for (int h = 0; h < 2; h++) begin
      if (mdt_v[h]) begin
        int x;
        cand_word_t e;
        x = abs_bc - LAT - 1;
        e = coinc_model((m_bi.exists(x) ? m_bi[x] : '0) | (m_loc[h].exists(x) ? m_loc[h][x] : '0),
                        bcid_t'(orbit(x)));
        checks++;
        if (mdt[h] !== e) begin failures++; if (failures < 8) $display("half %0d BC %0d mdt %h exp %h", h, x, mdt[h], e); end
        m_cand[h][x] = e;
        m_conf[h][x] = '0;
        // MDT-TP answers: in time (9 or 14 clocks), too late (40), or never
        begin
          cpend_t c;
          int r;
          r = $urandom_range(0, 9);
          c.w = '{bcid: mdt[h].bcid, confirm: NCAND'($urandom)};
          // the three delays fall on different clock phases, so answers never collide
          if (r < 8) begin c.due = cyc + ((r < 4) ? 9 : 14); q_conf[h][c.due] = c; end
          else if (r == 8) begin c.due = cyc + 40; q_conf[h][c.due] = c; end
        end
        for (int c = 0; c < NCAND; c++) if (e.cand[c].valid) begin
          if (e.cand[c].four) n_c4++; else n_c3++;
        end
        if (e.cand[1].valid) n_two++;
      end
      if (muc_v[h]) begin
        int x;
        x = abs_bc - 1 - CONF_LAT;
        checks++;
        if (muc[h].bcid !== bcid_t'(orbit(x))) begin failures++; $display("muc bcid %0d exp %0d", muc[h].bcid, orbit(x)); end
        if (m_cand[h].exists(x)) begin
          checks++;
          if (muc[h].cand !== m_cand[h][x].cand || muc[h].confirmed !== m_conf[h][x]) begin
            failures++;
            if (failures < 8) $display("half %0d BC %0d muc %h/%b exp %h/%b", h, x, muc[h].cand, muc[h].confirmed,
                                        m_cand[h][x].cand, m_conf[h][x]);
          end
          for (int c = 0; c < NCAND; c++) if (m_cand[h][x].cand[c].valid) begin
            if (m_conf[h][x][c]) n_conf++; else n_unconf++;
          end
        end
      end
      if (tl_v[h]) begin
        int x;
        x = abs_bc - LAT - 1;
        checks++;
        if (tl_b[h] !== bcid_t'(orbit(x)) || tl_m[h] !== (m_tile.exists(x) ? m_tile[x] : '0)) begin
          failures++; $display("tile half %0d BC %0d", h, x);
        end
        if (tl_m[h] != 0) n_tile++;
      end
    end
    n_late    += $countones(s0_late) + $countones(bm_late[0]) + $countones(bm_late[1]);
    n_cdrop   += $countones(cf_drop);
    n_ro_drop += $countones(ro_drop);
    for (int g = 0; g < N_FELIX; g++) begin
      if (l0_drop[g]) n_l0drop[g]++;
      if (fx_v[g]) begin
        if (expq[g].size() == 0) begin
          int id;
          id = int'(fx_d[g][27:12]);
          checks++;
          if (fx_d[g][31:30] != FW_EVENT || !l0_abs.exists(id)) begin
            failures++; $display("FELIX %0d: unexpected word %h", g, fx_d[g]);
          end else begin
            int nl;
            nl = (g < N_FELIX - 1) ? 17 : N_RO_LINKS - 17 * (N_FELIX - 1);
            ro.event_words(g, 17 * g, nl, id, l0_abs[id], l0_stale[id], expq[g], ev_len[g]);
            ev_start[g] = cyc;
            n_ev[g]++;
            if (l0_stale[id]) n_stale[g]++;
          end
        end
        if (expq[g].size() != 0) begin
          logic [31:0] e;
          e = expq[g].pop_front();
          checks++;
          if (fx_d[g] !== e) begin failures++; if (failures < 8) $display("FELIX %0d word %h exp %h", g, fx_d[g], e); end
          if (fx_d[g][31:30] == FW_HIT) n_hits_out++;
          if (expq[g].size() == 0) begin
            checks++;
            if (cyc - ev_start[g] != ev_len[g]) begin failures++; $display("FELIX %0d event length %0d exp %0d", g, cyc - ev_start[g], ev_len[g]); end
          end
        end
      end
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    ro = new(HPB);
    for (int g = 0; g < N_FELIX; g++) begin n_ev[g] = 0; n_stale[g] = 0; n_l0drop[g] = 0; end
    for (int l = 0; l < N_BI_LINKS; l++) begin bi_v[l] = 0; bi_h[l] = '0; end
    for (int h = 0; h < 2; h++) begin
      cf_v[h] = 0; cf[h] = '0;
      for (int l = 0; l < N_BMBO_LINKS; l++) begin bm_v[h][l] = 0; bm_h[h][l] = '0; end
    end
    for (int l = 0; l < N_TILE_LINKS; l++) begin ti_v[l] = 0; ti_h[l] = '0; end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (abs_bc < NBC) begin
      @(negedge clk);
      l0v = 0;
      if (cyc % CLK_PER_BC == 0 && abs_bc < NBC - 40) gen_bc();
      drive();
      if (abs_bc > L0_LATENCY + 20 && !(abs_bc >= 990 && abs_bc < 1200) && cyc % L0_PERIOD == 7)
        l0a(L0_LATENCY);   // no regular accept while the burst drains the queues
      else if (abs_bc > 700 && cyc % L0_PERIOD == 100 && $urandom_range(0, 2) == 0) l0a(600);
      else if (abs_bc >= 1000 && abs_bc < 1040 && cyc % L0_PERIOD == 130) begin
        // burst: 20 L0-Accepts in consecutive clocks
        for (int k = 0; k < 20; k++) begin
          l0a(60 + k);
          @(negedge clk);
          drive();
        end
        l0v = 0;
      end
    end
    @(negedge clk); l0v = 0;
    repeat (3000) @(negedge clk) drive();
    // let the last outputs and counters settle with all inputs idle
    @(negedge clk) quiet();
    repeat (20) @(negedge clk);
    checks++; if (n_late != exp_late) begin failures++; $display("late %0d exp %0d", n_late, exp_late); end
    checks++; if (n_cdrop != exp_cdrop) begin failures++; $display("conf drops %0d exp %0d", n_cdrop, exp_cdrop); end
    checks++; if (n_ro_drop != ro.n_ovf_hits()) begin failures++; $display("ro drops %0d exp %0d", n_ro_drop, ro.n_ovf_hits()); end
    for (int g = 0; g < N_FELIX; g++) begin
      checks++;
      if (n_ev[g] + n_l0drop[g] != n_l0a || expq[g].size() != 0) begin
        failures++; $display("FELIX %0d: events %0d + dropped %0d != %0d", g, n_ev[g], n_l0drop[g], n_l0a);
      end
    end
    $display("late hits=%0d 3-station=%0d 4-station=%0d two-candidate BCs=%0d", n_late, n_c3, n_c4, n_two);
    $display("confirmed=%0d unconfirmed=%0d late confirmations=%0d tile BCs=%0d", n_conf, n_unconf, n_cdrop, n_tile);
    $display("L0A=%0d events=%0d/%0d/%0d stale=%0d queue drops=%0d slot overflow drops=%0d hits read out=%0d",
             n_l0a, n_ev[0], n_ev[1], n_ev[2], n_stale[0], n_l0drop[0] + n_l0drop[1] + n_l0drop[2],
             n_ro_drop, n_hits_out);
    // every mechanism must have happened
    checks++;
    if (n_late == 0 || n_c3 == 0 || n_c4 == 0 || n_two == 0 || n_conf == 0 || n_unconf == 0 ||
        n_cdrop == 0 || n_tile == 0 || n_stale[0] == 0 || n_l0drop[0] == 0 || n_ro_drop == 0 ||
        n_hits_out == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
