// slr_bmbo: logic of SLR1 or SLR2, one half sector of the barrel.
//
// The N_BMBO_LINKS (20) BM/BO links each get a bc_reorder; their per-BC maps
// (stations BM1, BM2, BO) are OR-ed into one local map. The BI map of the same
// BC arrives from SLR0 BI_DELAY clocks late, through the SLR-crossing
// pipeline, so the local map is delayed by the same number of clocks before
// the two are merged. rpc_trigger then finds up to two candidates with hits
// in at least three of the four stations, and cand_confirm sends them to the
// MDT-TP, collects the confirmations and passes the BC's candidates to
// MUCTPI at a fixed latency of CONF_LAT BCs.
//
// Timing: candidates leave for MDT-TP BI_DELAY + 3 clocks after the tick that
// ends BC (BCID + LATENCY); MUCTPI words leave one clock after the tick that
// ends BC (BCID + CONF_LAT). BI_DELAY must stay below one BC.
// The division of work follows the source; delay matching by registers is
// this implementation's choice. The alignment assertion samples rst_n
// synchronously while the registers use it as an asynchronous reset; the
// mixed use is confined to that simulation-only check.
module slr_bmbo
  import sl_pkg::*;
#(
  parameter int unsigned DEPTH      = 16,
  parameter int unsigned LATENCY    = 8,
  parameter int unsigned BI_DELAY   = 1,
  parameter int unsigned CONF_DEPTH = 16,
  parameter int unsigned CONF_LAT   = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick_i,
  input  bcid_t                bcid_i,
  input  seq_t                 seq_i,
  input  logic                 hit_valid_i [N_BMBO_LINKS],
  input  rpc_hit_t             hit_i       [N_BMBO_LINKS],
  // BI map from SLR0, already through the crossing pipeline
  input  logic                 bi_map_valid_i,
  input  bcid_t                bi_map_bcid_i,
  input  logic [RPC_MAP_W-1:0] bi_map_i,
  // MDT-TP
  output logic                 mdt_valid_o,
  output cand_word_t           mdt_o,
  input  logic                 conf_valid_i,
  input  mdt_conf_t            conf_i,
  // MUCTPI
  output logic                 muc_valid_o,
  output muctpi_word_t         muc_o,
  output logic [N_BMBO_LINKS-1:0] late_o,
  output logic                 drop_o
);
  logic                 mv [N_BMBO_LINKS];
  bcid_t                mb [N_BMBO_LINKS];
  logic [RPC_MAP_W-1:0] m  [N_BMBO_LINKS];

  for (genvar l = 0; l < N_BMBO_LINKS; l++) begin : g_link
    bc_reorder #(.IDX_W(HIT_IDX_W), .DEPTH(DEPTH), .LATENCY(LATENCY)) u_reorder (
      .clk, .rst_n, .tick_i, .bcid_i, .seq_i,
      .hit_valid_i (hit_valid_i[l]),
      .hit_bcid_i  (hit_i[l].bcid),
      .hit_idx_i   ({hit_i[l].station, hit_i[l].strip}),
      .map_valid_o (mv[l]),
      .map_bcid_o  (mb[l]),
      .map_o       (m[l]),
      .late_o      (late_o[l])
    );
  end

  logic [RPC_MAP_W-1:0] local_map;
  always_comb begin
    local_map = '0;
    for (int l = 0; l < N_BMBO_LINKS; l++) local_map |= m[l];
  end

  typedef struct packed {
    logic                 valid;
    bcid_t                bcid;
    logic [RPC_MAP_W-1:0] map;
  } map_word_t;

  map_word_t loc_d, loc_q;
  assign loc_d = '{valid: mv[0], bcid: mb[0], map: local_map};

  slr_pipe #(.WIDTH($bits(map_word_t)), .STAGES(BI_DELAY)) u_match (
    .clk, .rst_n, .d_i(loc_d), .q_o(loc_q)
  );

  logic                 trig_valid;
  cand_word_t           trig_cand;

  rpc_trigger u_trigger (
    .clk, .rst_n,
    .map_valid_i  (loc_q.valid),
    .map_bcid_i   (loc_q.bcid),
    .map_i        (loc_q.map | bi_map_i),
    .cand_valid_o (trig_valid),
    .cand_o       (trig_cand)
  );

  cand_confirm #(.DEPTH(CONF_DEPTH), .CONF_LAT(CONF_LAT)) u_confirm (
    .clk, .rst_n, .tick_i, .bcid_i, .seq_i,
    .cand_valid_i (trig_valid),
    .cand_i       (trig_cand),
    .mdt_valid_o, .mdt_o,
    .conf_valid_i, .conf_i,
    .muc_valid_o, .muc_o,
    .drop_o
  );

  // the BI and local maps of one BC meet in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n)
                   loc_q.valid |-> (bi_map_valid_i && bi_map_bcid_i == loc_q.bcid))
    else $error("slr_bmbo: BI map not aligned with the local map");
endmodule
