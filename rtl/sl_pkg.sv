// sl_pkg: types and constants shared by the barrel Sector Logic (SL) firmware.
//
// The SL receives RPC hits from 50 on-detector DCT links (10 BI links and
// 2 x 20 BM/BO links), reorders them by bunch crossing (BC), forms L0 muon
// candidates per half sector and keeps the hits for readout on L0-Accept.
// Link, station and fibre counts follow the source design. The hit format
// (12-bit BCID, 2-bit station, 6-bit strip), the 64 strips per station, the
// Tile flag format, the candidate words and the 240 MHz / 40 MHz = 6 clocks
// per BC single-clock scheme are choices of this implementation. The orbit
// length of 3564 BCs is the LHC value.
package sl_pkg;

  // LHC timing
  localparam int unsigned NBC_ORBIT  = 3564;   // BCs per LHC orbit
  localparam int unsigned BCID_W     = 12;
  localparam int unsigned SEQ_W      = 16;     // free-running BC sequence counter
  localparam int unsigned CLK_PER_BC = 6;      // 240 MHz logic clock / 40 MHz BC clock

  // Detector geometry seen by one half sector
  localparam int unsigned NSTATION  = 4;       // BI, BM1, BM2, BO
  localparam int unsigned STRIP_W   = 6;
  localparam int unsigned NSTRIP    = 1 << STRIP_W;
  localparam int unsigned HIT_IDX_W = 2 + STRIP_W;       // {station, strip}
  localparam int unsigned RPC_MAP_W = NSTATION * NSTRIP; // per-BC hit map

  localparam int unsigned TILE_IDX_W = 6;
  localparam int unsigned TILE_MAP_W = 1 << TILE_IDX_W;

  // Link counts
  localparam int unsigned N_BI_LINKS   = 10;
  localparam int unsigned N_BMBO_LINKS = 20;
  localparam int unsigned N_TILE_LINKS = 6;
  localparam int unsigned N_RO_LINKS   = N_BI_LINKS + 2 * N_BMBO_LINKS; // 50 readout RAMs
  localparam int unsigned N_FELIX      = 3;
  localparam int unsigned NCAND        = 2;    // candidates per BC per trigger instance
  localparam int unsigned MIN_STATIONS = 3;    // coincidence requirement

  typedef logic [BCID_W-1:0] bcid_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  typedef enum logic [1:0] {ST_BI = 2'd0, ST_BM1 = 2'd1, ST_BM2 = 2'd2, ST_BO = 2'd3} station_e;

  // Decoded RPC hit as delivered by one DCT link
  typedef struct packed {
    bcid_t              bcid;
    station_e           station;
    logic [STRIP_W-1:0] strip;
  } rpc_hit_t;

  // Decoded Tile Calorimeter energy flag
  typedef struct packed {
    bcid_t                 bcid;
    logic [TILE_IDX_W-1:0] tower;
  } tile_hit_t;

  // One trigger candidate
  typedef struct packed {
    logic               valid;
    logic               four;   // coincidence in all four stations
    logic [STRIP_W-1:0] pos;    // strip position of the coincidence centre
  } cand_t;

  // Candidates of one BC, sent to MDT-TP
  typedef struct packed {
    bcid_t                   bcid;
    cand_t [NCAND-1:0]       cand;
  } cand_word_t;

  // Confirmation returned by MDT-TP for the candidates of one BC
  typedef struct packed {
    bcid_t            bcid;
    logic [NCAND-1:0] confirm;
  } mdt_conf_t;

  // Word sent to MUCTPI once per BC
  typedef struct packed {
    bcid_t             bcid;
    cand_t [NCAND-1:0] cand;
    logic [NCAND-1:0]  confirmed;
  } muctpi_word_t;

  // FELIX event word types (bits 31:30)
  localparam logic [1:0] FW_TRAILER = 2'b00;
  localparam logic [1:0] FW_HIT     = 2'b01;
  localparam logic [1:0] FW_LINK    = 2'b10;
  localparam logic [1:0] FW_EVENT   = 2'b11;

  // Age of BC 'then' seen from BC 'now', modulo the orbit
  function automatic bcid_t bc_age(bcid_t now, bcid_t then);
    if (now >= then) return bcid_t'(now - then);
    else             return bcid_t'(now + bcid_t'(NBC_ORBIT) - then);
  endfunction

  // BC 'now' minus 'd', modulo the orbit
  function automatic bcid_t bc_sub(bcid_t now, bcid_t d);
    if (now >= d) return bcid_t'(now - d);
    else          return bcid_t'(now + bcid_t'(NBC_ORBIT) - d);
  endfunction

endpackage
