// tb_slr0_bi: checks the SLR0 region. Hits of random BCs (up to LATENCY+2 BCs
// old) are driven on the 10 BI links and Tile flags on the 6 Tile links, one
// per link and clock. The merged BI map and Tile map of every BC must equal
// the model built from the hits that arrived in time, and leave exactly
// LATENCY BCs after their BC; late hits must be flagged on their own link.
module tb_slr0_bi;
  import sl_pkg::*;
  import tb_model_pkg::*;
  localparam int LAT = 8, NBC = 1200;
  logic clk = 0, rst_n = 0;
  logic tick;  bcid_t bcid;  seq_t seq;
  logic bi_v [N_BI_LINKS];  rpc_hit_t bi_h [N_BI_LINKS];
  logic ti_v [N_TILE_LINKS];  tile_hit_t ti_h [N_TILE_LINKS];
  logic bmv, tmv;  bcid_t bmb, tmb;  logic [RPC_MAP_W-1:0] bm;  logic [TILE_MAP_W-1:0] tm;
  logic [N_BI_LINKS+N_TILE_LINKS-1:0] late, exp_late;
  int checks = 0, failures = 0, abs_bc = 0, n_late = 0, n_bi = 0, n_tile = 0;
  logic [RPC_MAP_W-1:0] m_bi [int];
  logic [TILE_MAP_W-1:0] m_tile [int];

  bc_timer u_t (.clk, .rst_n, .bcr_i(1'b0), .tick_o(tick), .bcid_o(bcid), .seq_o(seq));
  slr0_bi dut (.clk, .rst_n, .tick_i(tick), .bcid_i(bcid), .seq_i(seq),
               .bi_valid_i(bi_v), .bi_hit_i(bi_h), .tile_valid_i(ti_v), .tile_hit_i(ti_h),
               .bi_map_valid_o(bmv), .bi_map_bcid_o(bmb), .bi_map_o(bm),
               .tile_map_valid_o(tmv), .tile_map_bcid_o(tmb), .tile_map_o(tm), .late_o(late));

  always #5 clk = ~clk;

  initial begin
    repeat (NBC * CLK_PER_BC + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && tick) abs_bc <= abs_bc + 1;

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++; if (bmv !== tmv) failures++;
    if (bmv) begin
      int x;
      x = abs_bc - 1 - LAT;
      checks++;
      if (bmb !== bcid_t'(orbit(x)) || bm !== (m_bi.exists(x) ? m_bi[x] : '0)) begin
        failures++; if (failures < 6) $display("BI map of BC %0d wrong", x);
      end
      checks++;
      if (tmb !== bcid_t'(orbit(x)) || tm !== (m_tile.exists(x) ? m_tile[x] : '0)) begin
        failures++; if (failures < 6) $display("Tile map of BC %0d wrong", x);
      end
      if (bm != 0) n_bi++;
      if (tm != 0) n_tile++;
    end
    checks++; if (late !== exp_late) failures++;
    n_late += $countones(late);
  end

  initial begin
    exp_late = '0;
    for (int l = 0; l < N_BI_LINKS; l++) begin bi_v[l] = 0; bi_h[l] = '0; end
    for (int l = 0; l < N_TILE_LINKS; l++) begin ti_v[l] = 0; ti_h[l] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (abs_bc < NBC) begin
      @(negedge clk);
      exp_late = '0;
      for (int l = 0; l < N_BI_LINKS + N_TILE_LINKS; l++) begin
        bit v;
        int age, b;
        v = ($urandom_range(0, 4) == 0);
        age = $urandom_range(0, LAT + 2);
        b = abs_bc - age;
        if (l < N_BI_LINKS) begin
          bi_v[l] = v;
          bi_h[l] = '{bcid: bcid_t'(orbit(b)), station: ST_BI, strip: STRIP_W'($urandom)};
          if (v && age < LAT) begin
            if (!m_bi.exists(b)) m_bi[b] = '0;
            m_bi[b][{2'd0, bi_h[l].strip}] = 1'b1;
          end
        end else begin
          ti_v[l - N_BI_LINKS] = v;
          ti_h[l - N_BI_LINKS] = '{bcid: bcid_t'(orbit(b)), tower: TILE_IDX_W'($urandom)};
          if (v && age < LAT) begin
            if (!m_tile.exists(b)) m_tile[b] = '0;
            m_tile[b][ti_h[l - N_BI_LINKS].tower] = 1'b1;
          end
        end
        exp_late[l] = v && (age >= LAT);
      end
    end
    @(negedge clk);
    for (int l = 0; l < N_BI_LINKS; l++) bi_v[l] = 0;
    for (int l = 0; l < N_TILE_LINKS; l++) ti_v[l] = 0;
    exp_late = '0;
    repeat (3) @(negedge clk);
    checks++; if (n_late == 0 || n_bi == 0 || n_tile == 0) failures++;
    $display("late=%0d BI maps=%0d Tile maps=%0d", n_late, n_bi, n_tile);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
