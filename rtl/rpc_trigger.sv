// rpc_trigger: L0 RPC coincidence for one half sector.
//
// Input is the per-BC hit map of the four stations (BI, BM1, BM2, BO), NSTRIP
// strips each. A station is counted at strip position p if it has a hit
// within +/-WIN strips of p. A position where at least MIN_ST stations are
// counted is a coincidence; the trigger reports up to NCAND = 2 of them per
// BC: the lowest coincidence position, and the lowest one more than 2*WIN
// strips above the first, so that one track is not reported twice. Each
// candidate carries a flag telling whether all four stations took part.
//
// Timing: one BC map per cycle may enter; candidates follow one clock later.
// The 3-of-4 station requirement and the two candidates per BC follow the
// source. The strip window, the geometry (all stations on one common strip
// axis) and the selection order are this implementation's simplest choice;
// the source does not describe the algorithm inside.
module rpc_trigger
  import sl_pkg::*;
#(
  parameter int unsigned NS     = NSTRIP,
  parameter int unsigned WIN    = 1,
  parameter int unsigned MIN_ST = MIN_STATIONS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   map_valid_i,
  input  bcid_t                  map_bcid_i,
  input  logic [NSTATION*NS-1:0] map_i,        // station s strip k at bit s*NS+k
  output logic                   cand_valid_o,
  output cand_word_t             cand_o
);

  logic [NS-1:0] coinc, four;
  cand_t [NCAND-1:0] sel;

  always_comb begin
    for (int p = 0; p < NS; p++) begin
      int unsigned n;
      n = 0;
      for (int s = 0; s < NSTATION; s++) begin
        logic fired;
        fired = 1'b0;
        for (int d = -int'(WIN); d <= int'(WIN); d++) begin
          if (p + d >= 0 && p + d < int'(NS)) fired |= map_i[s*NS + p + d];
        end
        n += int'(fired);
      end
      coinc[p] = (n >= MIN_ST);
      four[p]  = (n == NSTATION);
    end
  end

  always_comb begin
    sel = '0;
    for (int p = NS - 1; p >= 0; p--) begin
      if (coinc[p]) begin
        sel[0].valid = 1'b1;
        sel[0].four  = four[p];
        sel[0].pos   = STRIP_W'(p);
      end
    end
    for (int p = NS - 1; p >= 0; p--) begin
      if (sel[0].valid && coinc[p] && (p > int'(sel[0].pos) + 2 * int'(WIN))) begin
        sel[1].valid = 1'b1;
        sel[1].four  = four[p];
        sel[1].pos   = STRIP_W'(p);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand_valid_o <= 1'b0;
      cand_o       <= '0;
    end else begin
      cand_valid_o <= map_valid_i;
      if (map_valid_i) begin
        cand_o.bcid <= map_bcid_i;
        cand_o.cand <= sel;
      end
    end
  end
endmodule
