// slr0_bi: logic of SLR0, the BI and Tile Calorimeter input region.
//
// Each of the N_BI_LINKS (10) BI RPC links and the N_TILE_LINKS (6) Tile
// Calorimeter links gets its own bc_reorder, which puts the hits, arriving
// with non-fixed latency, back in BC order at a fixed latency. The BI maps of
// all links are OR-ed into one per-BC map of the four stations (BI links only
// carry BI-station hits) and the Tile maps into one per-BC map of energy
// flags; both are sent on to the two half-sector regions, SLR1 and SLR2.
//
// Timing: the maps of a BC appear together, one clock after the tick that
// ends BC (their BCID + LATENCY). late_o flags, per link, a hit that came
// too late to be reordered.
// The link counts and the role of the region follow the source; the map
// representation and the OR-merging are this implementation's choices.
module slr0_bi
  import sl_pkg::*;
#(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned LATENCY = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  tick_i,
  input  bcid_t                 bcid_i,
  input  seq_t                  seq_i,
  input  logic                  bi_valid_i   [N_BI_LINKS],
  input  rpc_hit_t              bi_hit_i     [N_BI_LINKS],
  input  logic                  tile_valid_i [N_TILE_LINKS],
  input  tile_hit_t             tile_hit_i   [N_TILE_LINKS],
  output logic                  bi_map_valid_o,
  output bcid_t                 bi_map_bcid_o,
  output logic [RPC_MAP_W-1:0]  bi_map_o,
  output logic                  tile_map_valid_o,
  output bcid_t                 tile_map_bcid_o,
  output logic [TILE_MAP_W-1:0] tile_map_o,
  output logic [N_BI_LINKS+N_TILE_LINKS-1:0] late_o
);
  logic                  bi_mv   [N_BI_LINKS];
  bcid_t                 bi_mb   [N_BI_LINKS];
  logic [RPC_MAP_W-1:0]  bi_m    [N_BI_LINKS];
  logic                  tile_mv [N_TILE_LINKS];
  bcid_t                 tile_mb [N_TILE_LINKS];
  logic [TILE_MAP_W-1:0] tile_m  [N_TILE_LINKS];

  for (genvar l = 0; l < N_BI_LINKS; l++) begin : g_bi
    bc_reorder #(.IDX_W(HIT_IDX_W), .DEPTH(DEPTH), .LATENCY(LATENCY)) u_reorder (
      .clk, .rst_n, .tick_i, .bcid_i, .seq_i,
      .hit_valid_i (bi_valid_i[l]),
      .hit_bcid_i  (bi_hit_i[l].bcid),
      .hit_idx_i   ({bi_hit_i[l].station, bi_hit_i[l].strip}),
      .map_valid_o (bi_mv[l]),
      .map_bcid_o  (bi_mb[l]),
      .map_o       (bi_m[l]),
      .late_o      (late_o[l])
    );
  end

  for (genvar l = 0; l < N_TILE_LINKS; l++) begin : g_tile
    bc_reorder #(.IDX_W(TILE_IDX_W), .DEPTH(DEPTH), .LATENCY(LATENCY)) u_reorder (
      .clk, .rst_n, .tick_i, .bcid_i, .seq_i,
      .hit_valid_i (tile_valid_i[l]),
      .hit_bcid_i  (tile_hit_i[l].bcid),
      .hit_idx_i   (tile_hit_i[l].tower),
      .map_valid_o (tile_mv[l]),
      .map_bcid_o  (tile_mb[l]),
      .map_o       (tile_m[l]),
      .late_o      (late_o[N_BI_LINKS + l])
    );
  end

  // all reorder buffers run in lock step, so link 0 gives valid and BCID
  always_comb begin
    bi_map_valid_o   = bi_mv[0];
    bi_map_bcid_o    = bi_mb[0];
    bi_map_o         = '0;
    for (int l = 0; l < N_BI_LINKS; l++) bi_map_o |= bi_m[l];
    tile_map_valid_o = tile_mv[0];
    tile_map_bcid_o  = tile_mb[0];
    tile_map_o       = '0;
    for (int l = 0; l < N_TILE_LINKS; l++) tile_map_o |= tile_m[l];
  end
endmodule
