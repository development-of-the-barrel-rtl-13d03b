// bc_reorder: reorders the hits of one input link by bunch crossing.
//
// DCT hits reach the Sector Logic with a latency that is not fixed, tagged
// with the BCID they belong to. Each hit sets one bit (its index: station and
// strip for RPC, cell for Tile) in the hit map of its BC, held in a circular
// buffer of DEPTH maps addressed by the BC sequence number. At every BC
// boundary the map of the BC that is LATENCY BCs old is released and its
// entry cleared, so every BC comes out exactly LATENCY BCs after it happened,
// in order, whatever the arrival jitter. Hits older than LATENCY-1 BCs (and
// hits tagged with a future BCID) are dropped and flagged on late_o.
//
// Timing: map_valid_o pulses in the first cycle of BC (bcid_i), carrying the
// map of BC (bcid_i - LATENCY - 1) as seen in the tick cycle, i.e. the BC that
// has just reached an age of LATENCY. One hit per clock may enter.
// The reorder-by-BC function follows the source; the bitmap storage, the
// fixed latency and the late-hit rule are this implementation's choices.
module bc_reorder
  import sl_pkg::*;
#(
  parameter int unsigned IDX_W   = HIT_IDX_W,
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned LATENCY = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // BC timing
  input  logic                   tick_i,
  input  bcid_t                  bcid_i,
  input  seq_t                   seq_i,
  // hit input
  input  logic                   hit_valid_i,
  input  bcid_t                  hit_bcid_i,
  input  logic [IDX_W-1:0]       hit_idx_i,
  // per-BC map output
  output logic                   map_valid_o,
  output bcid_t                  map_bcid_o,
  output logic [(1<<IDX_W)-1:0]  map_o,
  output logic                   late_o
);
  localparam int unsigned MAP_W = 1 << IDX_W;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [MAP_W-1:0] buf_q [DEPTH];

  bcid_t         age;
  logic          accept;
  logic [AW-1:0] wr_idx, rd_idx;

  assign age    = bc_age(bcid_i, hit_bcid_i);
  assign accept = hit_valid_i && (age < bcid_t'(LATENCY));
  assign wr_idx = AW'(seq_i - seq_t'(age));
  assign rd_idx = AW'(seq_i - seq_t'(LATENCY));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
      map_valid_o <= 1'b0;
      map_bcid_o  <= '0;
      map_o       <= '0;
      late_o      <= 1'b0;
    end else begin
      map_valid_o <= tick_i;
      late_o      <= hit_valid_i && !accept;
      if (tick_i) begin
        map_o         <= buf_q[rd_idx];
        map_bcid_o    <= bc_sub(bcid_i, bcid_t'(LATENCY));
        buf_q[rd_idx] <= '0;
      end
      // age < LATENCY guarantees wr_idx != rd_idx
      if (accept) buf_q[wr_idx][hit_idx_i] <= 1'b1;
    end
  end

  initial begin
    assert (DEPTH == (1 << AW)) else $error("bc_reorder: DEPTH must be a power of two");
    assert (DEPTH > LATENCY)    else $error("bc_reorder: DEPTH must exceed LATENCY");
  end
endmodule
