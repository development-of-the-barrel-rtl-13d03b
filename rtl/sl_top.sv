// sl_top: barrel Sector Logic FPGA firmware.
//
// The FPGA is four dies (SLRs) and the logic is laid out as the source design
// floorplans it:
//   SLR0  slr0_bi       10 BI RPC links and 6 Tile links, reordered by BC
//   SLR1  slr_bmbo [0]  20 BM/BO links of half sector A, trigger, MDT-TP, MUCTPI
//   SLR2  slr_bmbo [1]  20 BM/BO links of half sector B, trigger, MDT-TP, MUCTPI
//   SLR3  slr3_readout  50 readout RAMs, L0-Accept readout over 3 FELIX links
// Every signal that crosses from one SLR to another goes through slr_pipe
// with one register per boundary crossed: the BI map takes 1 clock to SLR1
// and 2 to SLR2, the Tile map 1 and 2, the hits reach SLR3 after 3 (BI),
// 2 (half A) and 1 (half B) clocks, and the L0-Accept, received with the TTC
// stream in SLR0, after 3. The two trigger instances only share the BI data.
//
// Interface: decoded, BCID-tagged hits per DCT link (the lpGBT/GTY link
// layer is outside this RTL), Tile energy flags, the TTC bunch counter reset
// and L0-Accept, candidate and confirmation words to and from MDT-TP, one
// MUCTPI word per BC per half sector, and three 32-bit FELIX word streams.
// Timing: a single logic clock with CLK_PER_BC (6) cycles per BC; bc_timer
// gives the BC strobe and counters to all regions. MUCTPI words of BC n
// leave at BC n + CONF_LAT (14 BCs = 350 ns), within the 390 ns budget of
// the L0 RPC trigger. The single clock and the fixed latencies are this
// implementation's choices.
module sl_top
  import sl_pkg::*;
#(
  parameter int unsigned REORDER_DEPTH   = 16,
  parameter int unsigned REORDER_LATENCY = 8,
  parameter int unsigned CONF_DEPTH      = 16,
  parameter int unsigned CONF_LAT        = 14,
  parameter int unsigned RO_DEPTH_BC     = 512,
  parameter int unsigned RO_HPB          = 8,
  parameter int unsigned RO_WR_WIN       = 32,
  parameter int unsigned RO_MAX_AGE      = 448
) (
  input  logic         clk,
  input  logic         rst_n,
  // TTC
  input  logic         bcr_i,
  input  logic         l0a_valid_i,
  input  bcid_t        l0a_bcid_i,
  output bcid_t        bcid_o,
  // DCT and Tile links, decoded
  input  logic         bi_valid_i   [N_BI_LINKS],
  input  rpc_hit_t     bi_hit_i     [N_BI_LINKS],
  input  logic         bmbo_valid_i [2][N_BMBO_LINKS],
  input  rpc_hit_t     bmbo_hit_i   [2][N_BMBO_LINKS],
  input  logic         tile_valid_i [N_TILE_LINKS],
  input  tile_hit_t    tile_hit_i   [N_TILE_LINKS],
  // MDT-TP, per half sector
  output logic         mdt_valid_o  [2],
  output cand_word_t   mdt_o        [2],
  input  logic         conf_valid_i [2],
  input  mdt_conf_t    conf_i       [2],
  // MUCTPI, per half sector
  output logic         muc_valid_o  [2],
  output muctpi_word_t muc_o        [2],
  // FELIX
  output logic         felix_valid_o [N_FELIX],
  output logic [31:0]  felix_data_o  [N_FELIX],
  // Tile flags as received by each half sector region
  output logic                  tile_valid_o [2],
  output bcid_t                 tile_bcid_o  [2],
  output logic [TILE_MAP_W-1:0] tile_map_o   [2],
  // monitoring
  output logic [N_BI_LINKS+N_TILE_LINKS-1:0] slr0_late_o,
  output logic [N_BMBO_LINKS-1:0]            bmbo_late_o [2],
  output logic [1:0]                         conf_drop_o,
  output logic [N_RO_LINKS-1:0]              ro_drop_o,
  output logic [N_FELIX-1:0]                 l0a_drop_o,
  output logic [N_FELIX-1:0]                 ro_busy_o
);
  logic tick;
  seq_t seq;

  bc_timer u_timer (.clk, .rst_n, .bcr_i, .tick_o(tick), .bcid_o, .seq_o(seq));

  // ---------------- SLR0 ----------------
  logic                  bi_mv, tile_mv;
  bcid_t                 bi_mb, tile_mb;
  logic [RPC_MAP_W-1:0]  bi_m;
  logic [TILE_MAP_W-1:0] tile_m;

  slr0_bi #(.DEPTH(REORDER_DEPTH), .LATENCY(REORDER_LATENCY)) u_slr0 (
    .clk, .rst_n, .tick_i(tick), .bcid_i(bcid_o), .seq_i(seq),
    .bi_valid_i, .bi_hit_i, .tile_valid_i, .tile_hit_i,
    .bi_map_valid_o   (bi_mv),
    .bi_map_bcid_o    (bi_mb),
    .bi_map_o         (bi_m),
    .tile_map_valid_o (tile_mv),
    .tile_map_bcid_o  (tile_mb),
    .tile_map_o       (tile_m),
    .late_o           (slr0_late_o)
  );

  typedef struct packed {
    logic                 valid;
    bcid_t                bcid;
    logic [RPC_MAP_W-1:0] map;
  } bi_word_t;

  typedef struct packed {
    logic                  valid;
    bcid_t                 bcid;
    logic [TILE_MAP_W-1:0] map;
  } tile_word_t;

  typedef struct packed {
    logic     valid;
    rpc_hit_t hit;
  } hit_word_t;

  bi_word_t   bi_w,   bi_x   [2];
  tile_word_t tile_w, tile_x [2];
  assign bi_w   = '{valid: bi_mv,   bcid: bi_mb,   map: bi_m};
  assign tile_w = '{valid: tile_mv, bcid: tile_mb, map: tile_m};

  // ---------------- SLR1 and SLR2 ----------------
  for (genvar h = 0; h < 2; h++) begin : g_half
    slr_pipe #(.WIDTH($bits(bi_word_t)), .STAGES(h + 1)) u_bi_cross (
      .clk, .rst_n, .d_i(bi_w), .q_o(bi_x[h])
    );
    slr_pipe #(.WIDTH($bits(tile_word_t)), .STAGES(h + 1)) u_tile_cross (
      .clk, .rst_n, .d_i(tile_w), .q_o(tile_x[h])
    );
    assign tile_valid_o[h] = tile_x[h].valid;
    assign tile_bcid_o[h]  = tile_x[h].bcid;
    assign tile_map_o[h]   = tile_x[h].map;

    slr_bmbo #(
      .DEPTH(REORDER_DEPTH), .LATENCY(REORDER_LATENCY), .BI_DELAY(h + 1),
      .CONF_DEPTH(CONF_DEPTH), .CONF_LAT(CONF_LAT)
    ) u_half (
      .clk, .rst_n, .tick_i(tick), .bcid_i(bcid_o), .seq_i(seq),
      .hit_valid_i    (bmbo_valid_i[h]),
      .hit_i          (bmbo_hit_i[h]),
      .bi_map_valid_i (bi_x[h].valid),
      .bi_map_bcid_i  (bi_x[h].bcid),
      .bi_map_i       (bi_x[h].map),
      .mdt_valid_o    (mdt_valid_o[h]),
      .mdt_o          (mdt_o[h]),
      .conf_valid_i   (conf_valid_i[h]),
      .conf_i         (conf_i[h]),
      .muc_valid_o    (muc_valid_o[h]),
      .muc_o          (muc_o[h]),
      .late_o         (bmbo_late_o[h]),
      .drop_o         (conf_drop_o[h])
    );
  end

  // ---------------- crossings to SLR3 ----------------
  logic     ro_valid [N_RO_LINKS];
  rpc_hit_t ro_hit   [N_RO_LINKS];

  for (genvar l = 0; l < N_RO_LINKS; l++) begin : g_ro_cross
    // BI from SLR0 crosses 3 boundaries, half A from SLR1 2, half B from SLR2 1
    localparam int unsigned ST = (l < N_BI_LINKS) ? 3 : (l < N_BI_LINKS + N_BMBO_LINKS) ? 2 : 1;
    hit_word_t d, q;
    if (l < N_BI_LINKS) begin : g_bi
      assign d = '{valid: bi_valid_i[l], hit: bi_hit_i[l]};
    end else if (l < N_BI_LINKS + N_BMBO_LINKS) begin : g_a
      assign d = '{valid: bmbo_valid_i[0][l - N_BI_LINKS], hit: bmbo_hit_i[0][l - N_BI_LINKS]};
    end else begin : g_b
      assign d = '{valid: bmbo_valid_i[1][l - N_BI_LINKS - N_BMBO_LINKS],
                   hit:   bmbo_hit_i[1][l - N_BI_LINKS - N_BMBO_LINKS]};
    end
    slr_pipe #(.WIDTH($bits(hit_word_t)), .STAGES(ST)) u_cross (.clk, .rst_n, .d_i(d), .q_o(q));
    assign ro_valid[l] = q.valid;
    assign ro_hit[l]   = q.hit;
  end

  typedef struct packed {
    logic  valid;
    bcid_t bcid;
  } l0a_word_t;

  l0a_word_t l0a_d, l0a_q;
  assign l0a_d = '{valid: l0a_valid_i, bcid: l0a_bcid_i};
  slr_pipe #(.WIDTH($bits(l0a_word_t)), .STAGES(3)) u_l0a_cross (
    .clk, .rst_n, .d_i(l0a_d), .q_o(l0a_q)
  );

  // ---------------- SLR3 ----------------
  slr3_readout #(
    .DEPTH_BC(RO_DEPTH_BC), .HPB(RO_HPB), .WR_WIN(RO_WR_WIN), .MAX_AGE(RO_MAX_AGE)
  ) u_slr3 (
    .clk, .rst_n, .tick_i(tick), .bcid_i(bcid_o), .seq_i(seq),
    .hit_valid_i (ro_valid),
    .hit_i       (ro_hit),
    .l0a_valid_i (l0a_q.valid),
    .l0a_bcid_i  (l0a_q.bcid),
    .felix_valid_o, .felix_data_o,
    .l0a_drop_o,
    .busy_o      (ro_busy_o),
    .drop_o      (ro_drop_o)
  );
endmodule
