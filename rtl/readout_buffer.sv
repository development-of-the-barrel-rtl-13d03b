// readout_buffer: one of the readout RAMs, holding the hits of one DCT link
// ordered by bunch crossing until an L0-Accept asks for them.
//
// The RAM is split into DEPTH_BC slots of HPB hit words each; slot i holds
// the BC whose sequence number is i modulo DEPTH_BC, and a per-slot counter
// gives how many hits it holds. A hit whose BC is less than WR_WIN BCs old is
// written to the next free word of its slot; a hit beyond HPB in one BC is
// dropped and the slot's overflow flag set. At every BC boundary the slot of
// the coming BC is emptied, so data nobody asked for are overwritten after
// DEPTH_BC BCs: old data are discarded without any explicit action.
//
// Read port: rd_bcid_i selects the BC (combinational rd_count_o and
// rd_ovf_o); rd_slot_i selects the hit, whose word appears on rd_data_o one
// clock later (synchronous RAM read).
// The 50 RAMs that store and reorder the readout data by BC, and the
// discarding of old data, follow the source; the slot organisation, DEPTH_BC
// (512 BCs, room for the 10 us L0 latency), HPB and WR_WIN are this
// implementation's choices.
module readout_buffer
  import sl_pkg::*;
#(
  parameter int unsigned DEPTH_BC = 512,
  parameter int unsigned HPB      = 8,
  parameter int unsigned WR_WIN   = 32,
  parameter int unsigned DATA_W   = HIT_IDX_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick_i,
  input  bcid_t                  bcid_i,
  input  seq_t                   seq_i,
  // hit input
  input  logic                   hit_valid_i,
  input  bcid_t                  hit_bcid_i,
  input  logic [DATA_W-1:0]      hit_data_i,
  // read port
  input  bcid_t                  rd_bcid_i,
  input  logic [$clog2(HPB)-1:0] rd_slot_i,
  output logic [$clog2(HPB):0]   rd_count_o,
  output logic                   rd_ovf_o,
  output logic [DATA_W-1:0]      rd_data_o,
  output logic                   drop_o
);
  localparam int unsigned AW = $clog2(DEPTH_BC);
  localparam int unsigned SW = $clog2(HPB);
  localparam int unsigned CW = SW + 1;

  logic [DATA_W-1:0] ram [DEPTH_BC * HPB];
  logic [CW-1:0]     cnt_q [DEPTH_BC];
  logic              ovf_q [DEPTH_BC];

  bcid_t         age;
  logic [AW-1:0] wr_idx, rd_idx, next_idx;
  logic          in_win, wr_en, full;

  assign age      = bc_age(bcid_i, hit_bcid_i);
  assign in_win   = hit_valid_i && (age < bcid_t'(WR_WIN));
  assign wr_idx   = AW'(seq_i - seq_t'(age));
  assign next_idx = AW'(seq_i + 1'b1);
  assign full     = (cnt_q[wr_idx] == CW'(HPB));
  assign wr_en    = in_win && !full;
  assign rd_idx   = AW'(seq_i - seq_t'(bc_age(bcid_i, rd_bcid_i)));

  assign rd_count_o = cnt_q[rd_idx];
  assign rd_ovf_o   = ovf_q[rd_idx];

  // hit RAM: one write and one read port, no reset
  always_ff @(posedge clk) begin
    if (wr_en) ram[{wr_idx, cnt_q[wr_idx][SW-1:0]}] <= hit_data_i;
    rd_data_o <= ram[{rd_idx, rd_slot_i}];
  end

  // slot counters; wr_idx is never next_idx because age >= 0
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH_BC; i++) begin
        cnt_q[i] <= '0;
        ovf_q[i] <= 1'b0;
      end
      drop_o <= 1'b0;
    end else begin
      drop_o <= hit_valid_i && !wr_en;
      if (wr_en)         cnt_q[wr_idx] <= cnt_q[wr_idx] + 1'b1;
      if (in_win && full) ovf_q[wr_idx] <= 1'b1;
      if (tick_i) begin
        cnt_q[next_idx] <= '0;
        ovf_q[next_idx] <= 1'b0;
      end
    end
  end

  initial begin
    assert (DEPTH_BC == (1 << AW)) else $error("readout_buffer: DEPTH_BC must be a power of two");
    assert (HPB == (1 << SW))      else $error("readout_buffer: HPB must be a power of two");
    assert (WR_WIN < DEPTH_BC)     else $error("readout_buffer: WR_WIN must be below DEPTH_BC");
  end
endmodule
