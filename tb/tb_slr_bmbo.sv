// tb_slr_bmbo: checks one half-sector region as SLR2 uses it (BI map 2 clocks
// late). Tracks put hits in three or four stations; the BM1/BM2/BO hits
// travel over the 20 links with random delays (some too late), the BI part
// is presented as the BI map of the BC, BI_DELAY clocks into the BC as the
// crossing pipeline delivers it. The MDT-TP words must equal the coincidence
// model of the merged map; a model of MDT-TP confirms in time, too late or
// not at all, and the MUCTPI words must carry the candidates and their
// confirmations exactly CONF_LAT BCs after their BC.
module tb_slr_bmbo;
  import sl_pkg::*;
  import tb_model_pkg::*;
  localparam int LAT = 8, CONF_LAT = 14, D = 2, NBC = 1500;
  logic clk = 0, rst_n = 0;
  logic tick;  bcid_t bcid;  seq_t seq;
  logic hv [N_BMBO_LINKS];  rpc_hit_t hh [N_BMBO_LINKS];
  logic bmv = 0;  bcid_t bmb = '0;  logic [RPC_MAP_W-1:0] bm = '0;
  logic mdt_v, muc_v, cf_v = 0, drop;  cand_word_t mdt;  mdt_conf_t cf = '0;  muctpi_word_t muc;
  logic [N_BMBO_LINKS-1:0] late;
  int checks = 0, failures = 0, abs_bc = 0, phase = 0, cyc = 0;
  int n_late = 0, exp_late = 0, n_cand = 0, n_conf = 0, n_unconf = 0, n_drop = 0, exp_drop = 0;
  logic [RPC_MAP_W-1:0] m_bi [int], m_loc [int];
  cand_word_t m_cand [int];
  logic [NCAND-1:0] m_conf [int];
  typedef struct { int due; int abs; logic [HIT_IDX_W-1:0] idx; } pend_t;
  pend_t q [N_BMBO_LINKS][$];
  mdt_conf_t q_conf [int];

  bc_timer u_t (.clk, .rst_n, .bcr_i(1'b0), .tick_o(tick), .bcid_o(bcid), .seq_o(seq));
  slr_bmbo #(.BI_DELAY(D)) dut (
    .clk, .rst_n, .tick_i(tick), .bcid_i(bcid), .seq_i(seq), .hit_valid_i(hv), .hit_i(hh),
    .bi_map_valid_i(bmv), .bi_map_bcid_i(bmb), .bi_map_i(bm),
    .mdt_valid_o(mdt_v), .mdt_o(mdt), .conf_valid_i(cf_v), .conf_i(cf),
    .muc_valid_o(muc_v), .muc_o(muc), .late_o(late), .drop_o(drop));

  always #5 clk = ~clk;

  initial begin
    repeat (NBC * CLK_PER_BC + 3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (tick) begin abs_bc <= abs_bc + 1; phase <= 0; end else phase <= phase + 1;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (mdt_v) begin
      int x;
      cand_word_t e;
      x = abs_bc - LAT - 1;
      e = coinc_model((m_bi.exists(x) ? m_bi[x] : '0) | (m_loc.exists(x) ? m_loc[x] : '0), bcid_t'(orbit(x)));
      checks++;
      // latency: BI_DELAY + 3 clocks after the tick
      if (phase != D + 2) begin failures++; $display("MDT word at phase %0d", phase); end
      checks++;
      if (mdt !== e) begin failures++; if (failures < 6) $display("BC %0d mdt %h exp %h", x, mdt, e); end
      m_cand[x] = e;
      m_conf[x] = '0;
      n_cand += int'(e.cand[0].valid) + int'(e.cand[1].valid);
      begin
        int r;
        r = $urandom_range(0, 9);
        if (r < 8) q_conf[cyc + ((r < 4) ? 9 : 14)] = '{bcid: mdt.bcid, confirm: NCAND'($urandom)};
        else if (r == 8) q_conf[cyc + 40] = '{bcid: mdt.bcid, confirm: NCAND'($urandom)};
      end
    end
    if (muc_v) begin
      int x;
      x = abs_bc - 1 - CONF_LAT;
      checks++;
      if (muc.bcid !== bcid_t'(orbit(x))) failures++;
      if (m_cand.exists(x)) begin
        checks++;
        if (muc.cand !== m_cand[x].cand || muc.confirmed !== m_conf[x]) begin
          failures++; if (failures < 6) $display("BC %0d muc wrong", x);
        end
        for (int c = 0; c < NCAND; c++) if (m_cand[x].cand[c].valid) begin
          if (m_conf[x][c]) n_conf++; else n_unconf++;
        end
      end
    end

    n_late += $countones(late);
    if (drop) n_drop++;
  end

  task automatic gen();
    repeat ($urandom_range(0, 2)) begin
      int p, skip;
      p = $urandom_range(1, NSTRIP - 2);
      skip = $urandom_range(0, 4);
      for (int s = 0; s < NSTATION; s++) if (s != skip) begin
        int k;
        k = p + $urandom_range(0, 2) - 1;
        if (s == 0) begin
          if (!m_bi.exists(abs_bc)) m_bi[abs_bc] = '0;
          m_bi[abs_bc][k] = 1'b1;
        end else begin
          pend_t e;
          e.abs = abs_bc; e.idx = {2'(s), STRIP_W'(k)};
          e.due = cyc + (($urandom_range(0, 20) == 0) ? (LAT + 1) * CLK_PER_BC : $urandom_range(0, (LAT - 3) * CLK_PER_BC));
          q[$urandom_range(0, N_BMBO_LINKS - 1)].push_back(e);
        end
      end
    end
  endtask

  task automatic drive();
    for (int l = 0; l < N_BMBO_LINKS; l++) begin
      hv[l] = 0; hh[l] = '0;
      if (q[l].size() != 0 && q[l][0].due <= cyc) begin
        pend_t e;
        e = q[l].pop_front();
        hv[l] = 1;
        hh[l] = '{bcid: bcid_t'(orbit(e.abs)), station: station_e'(e.idx[7:6]), strip: e.idx[5:0]};
        if (abs_bc - e.abs < LAT) begin
          if (!m_loc.exists(e.abs)) m_loc[e.abs] = '0;
          m_loc[e.abs][e.idx] = 1'b1;
        end else exp_late++;
      end
    end
    // BI map of the BC released at the last tick, D clocks into the BC
    bmv = (phase == D);
    bmb = bcid_t'(orbit(abs_bc - 1 - LAT));
    bm  = (bmv && m_bi.exists(abs_bc - 1 - LAT)) ? m_bi[abs_bc - 1 - LAT] : '0;
    cf_v = 0;
    if (q_conf.exists(cyc)) begin
      int x;
      cf_v = 1; cf = q_conf[cyc];
      q_conf.delete(cyc);
      x = abs_bc - int'(bc_age(bcid_t'(orbit(abs_bc)), cf.bcid));
      if (abs_bc - x < CONF_LAT) m_conf[x] |= cf.confirm & {m_cand[x].cand[1].valid, m_cand[x].cand[0].valid};
      else exp_drop++;
    end
  endtask

  initial begin
    for (int l = 0; l < N_BMBO_LINKS; l++) begin hv[l] = 0; hh[l] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (abs_bc < NBC) begin
      @(negedge clk);
      if (phase == 0 && abs_bc < NBC - 30) gen();
      drive();
    end
    repeat (20) @(negedge clk) drive();
    checks++; if (n_late != exp_late || n_drop != exp_drop) begin failures++; $display("late %0d/%0d drop %0d/%0d", n_late, exp_late, n_drop, exp_drop); end
    checks++; if (n_late == 0 || n_cand == 0 || n_conf == 0 || n_unconf == 0 || n_drop == 0) failures++;
    $display("late=%0d candidates=%0d confirmed=%0d unconfirmed=%0d late confirmations=%0d",
             n_late, n_cand, n_conf, n_unconf, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
