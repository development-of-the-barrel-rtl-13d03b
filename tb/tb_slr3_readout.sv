// tb_slr3_readout: checks the readout region at its default sizes. Hits of
// random BCs (up to a few BCs old) arrive on all 50 links, with bursts that
// overflow a slot. L0-Accepts for BCs 400 BCs old (the 10 us L0 latency) must
// give complete events on all three FELIX links, each carrying its own group
// of RAMs; accepts for BCs 600 BCs old must give stale events (data already
// overwritten); a burst of 20 accepts must overflow the queues. Every word
// and every event length is compared with the readout model.
module tb_slr3_readout;
  import sl_pkg::*;
  import tb_model_pkg::*;
  localparam int HPB = 8, NBC = 1400;
  logic clk = 0, rst_n = 0;
  logic tick;  bcid_t bcid;  seq_t seq;
  logic hv [N_RO_LINKS];  rpc_hit_t hh [N_RO_LINKS];
  logic l0v = 0;  bcid_t l0b = '0;
  logic fv [N_FELIX];  logic [31:0] fd [N_FELIX];
  logic [N_FELIX-1:0] l0drop, busy;  logic [N_RO_LINKS-1:0] drop;
  int checks = 0, failures = 0, abs_bc = 0, cyc = 0, n_l0a = 0, n_drop = 0, n_hits = 0;
  int n_ev [N_FELIX], n_stale [N_FELIX], n_l0drop [N_FELIX], ev_start [N_FELIX], ev_len [N_FELIX];
  ro_model ro;
  int l0_abs [int];
  bit l0_stale [int];
  logic [31:0] expq [N_FELIX][$];

  bc_timer u_t (.clk, .rst_n, .bcr_i(1'b0), .tick_o(tick), .bcid_o(bcid), .seq_o(seq));
  slr3_readout dut (.clk, .rst_n, .tick_i(tick), .bcid_i(bcid), .seq_i(seq),
                    .hit_valid_i(hv), .hit_i(hh), .l0a_valid_i(l0v), .l0a_bcid_i(l0b),
                    .felix_valid_o(fv), .felix_data_o(fd), .l0a_drop_o(l0drop),
                    .busy_o(busy), .drop_o(drop));

  always #5 clk = ~clk;

  initial begin
    repeat (NBC * CLK_PER_BC + 8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (tick) abs_bc <= abs_bc + 1;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    n_drop += $countones(drop);
    for (int g = 0; g < N_FELIX; g++) begin
      if (l0drop[g]) n_l0drop[g]++;
      if (fv[g]) begin
        if (expq[g].size() == 0) begin
          int id;
          id = int'(fd[g][27:12]);
          checks++;
          if (fd[g][31:30] != FW_EVENT || !l0_abs.exists(id)) begin
            failures++; $display("FELIX %0d: unexpected %h", g, fd[g]);
          end else begin
            ro.event_words(g, 17 * g, (g < 2) ? 17 : 16, id, l0_abs[id], l0_stale[id], expq[g], ev_len[g]);
            ev_start[g] = cyc;
            n_ev[g]++;
            if (l0_stale[id]) n_stale[g]++;
          end
        end
        if (expq[g].size() != 0) begin
          logic [31:0] e;
          e = expq[g].pop_front();
          checks++;
          if (fd[g] !== e) begin failures++; if (failures < 6) $display("FELIX %0d %h exp %h", g, fd[g], e); end
          if (fd[g][31:30] == FW_HIT) n_hits++;
          if (expq[g].size() == 0) begin
            checks++;
            if (cyc - ev_start[g] != ev_len[g]) failures++;
          end
        end
      end
    end
  end

  task automatic l0a(int age);
    l0v = 1;
    l0b = bcid_t'(orbit(abs_bc - age));
    l0_abs[n_l0a] = abs_bc - age;
    l0_stale[n_l0a] = (age > 500);
    n_l0a++;
  endtask

  task automatic drive_hits(bit on);
    int burst;
    burst = ($urandom_range(0, 3000) == 0) ? $urandom_range(0, N_RO_LINKS - 1) : -1;
    for (int l = 0; l < N_RO_LINKS; l++) begin
      hv[l] = on && (($urandom_range(0, 11) == 0) || l == burst);
      if (hv[l]) begin
        int b;
        b = (l == burst) ? abs_bc : abs_bc - $urandom_range(0, 4);
        hh[l] = '{bcid: bcid_t'(orbit(b)), station: station_e'($urandom), strip: STRIP_W'($urandom)};
        ro.add(l, b, {hh[l].station, hh[l].strip});
      end
    end
  endtask

  initial begin
    int burst_link = 0;
    ro = new(HPB);
    for (int g = 0; g < N_FELIX; g++) begin n_ev[g] = 0; n_stale[g] = 0; n_l0drop[g] = 0; end
    for (int l = 0; l < N_RO_LINKS; l++) begin hv[l] = 0; hh[l] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (abs_bc < NBC) begin
      @(negedge clk);
      l0v = 0;
      drive_hits(1);
      // a slot overflow: HPB+2 hits of one BC on one link, among the random ones
      if (cyc % 600 == 3) begin
        int bb;
        burst_link = $urandom_range(0, N_RO_LINKS - 1);
        bb = abs_bc;
        for (int k = 0; k < HPB + 2; k++) begin
          if (k > 0) begin @(negedge clk); l0v = 0; drive_hits(0); end
          hv[burst_link] = 1;
          hh[burst_link] = '{bcid: bcid_t'(orbit(bb)), station: ST_BM1, strip: STRIP_W'(k)};
          ro.add(burst_link, bb, {ST_BM1, STRIP_W'(k)});
        end
      end
      if (abs_bc > 420 && !(abs_bc >= 990 && abs_bc < 1200) && cyc % 240 == 7) l0a(400);
      else if (abs_bc > 700 && cyc % 240 == 100 && $urandom_range(0, 1) == 0) l0a(600);
      else if (abs_bc >= 1000 && abs_bc < 1040 && cyc % 240 == 130) begin
        for (int k = 0; k < 20; k++) begin l0a(60 + k); @(negedge clk); drive_hits(1); end
        l0v = 0;
      end
    end
    @(negedge clk); l0v = 0; drive_hits(0);
    repeat (3000) @(negedge clk);
    for (int g = 0; g < N_FELIX; g++) begin
      checks++; if (n_ev[g] + n_l0drop[g] != n_l0a || expq[g].size() != 0) failures++;
    end
    checks++; if (n_drop != ro.n_ovf_hits()) begin failures++; $display("drops %0d exp %0d", n_drop, ro.n_ovf_hits()); end
    checks++; if (n_drop == 0 || n_stale[0] == 0 || n_l0drop[0] == 0 || n_hits == 0) failures++;
    $display("L0A=%0d events=%0d/%0d/%0d stale=%0d queue drops=%0d/%0d/%0d slot drops=%0d hits=%0d",
             n_l0a, n_ev[0], n_ev[1], n_ev[2], n_stale[0], n_l0drop[0], n_l0drop[1], n_l0drop[2], n_drop, n_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
