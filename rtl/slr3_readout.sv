// slr3_readout: logic of SLR3, the readout region.
//
// All RPC hits of the sector (N_RO_LINKS = 50 links: 10 BI, then 20 + 20
// BM/BO) arrive here, BCID-tagged, through the SLR-crossing pipelines. Each
// link has its own readout_buffer RAM, which stores the hits by BC and lets
// old BCs be overwritten. The RAMs are split in N_FELIX = 3 groups of
// consecutive links (17, 17 and 16); each group has a readout_engine that, on
// every L0-Accept, reads the accepted BC from its RAMs and sends the event on
// its own FELIX link, so the three links work in parallel on the same
// L0-Accepts.
//
// Timing: see readout_buffer (hit write window) and readout_engine (event
// format, one word per clock per link).
// The 50 RAMs and the 3 FELIX links follow the source; the grouping of the
// RAMs per link is this implementation's choice.
module slr3_readout
  import sl_pkg::*;
#(
  parameter int unsigned DEPTH_BC = 512,
  parameter int unsigned HPB      = 8,
  parameter int unsigned WR_WIN   = 32,
  parameter int unsigned MAX_AGE  = 448
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick_i,
  input  bcid_t       bcid_i,
  input  seq_t        seq_i,
  input  logic        hit_valid_i [N_RO_LINKS],
  input  rpc_hit_t    hit_i       [N_RO_LINKS],
  input  logic        l0a_valid_i,
  input  bcid_t       l0a_bcid_i,
  output logic        felix_valid_o [N_FELIX],
  output logic [31:0] felix_data_o  [N_FELIX],
  output logic [N_FELIX-1:0]    l0a_drop_o,
  output logic [N_FELIX-1:0]    busy_o,
  output logic [N_RO_LINKS-1:0] drop_o
);
  localparam int unsigned GSIZE = (N_RO_LINKS + N_FELIX - 1) / N_FELIX;
  localparam int unsigned SW    = $clog2(HPB);

  for (genvar g = 0; g < N_FELIX; g++) begin : g_grp
    localparam int unsigned BASE = g * GSIZE;
    localparam int unsigned NL   = (N_RO_LINKS - BASE < GSIZE) ? N_RO_LINKS - BASE : GSIZE;

    bcid_t              rd_bcid;
    logic [SW-1:0]      rd_slot;
    logic [SW:0]        rd_count [NL];
    logic               rd_ovf   [NL];
    logic [HIT_IDX_W-1:0] rd_data [NL];

    for (genvar l = 0; l < NL; l++) begin : g_ram
      readout_buffer #(.DEPTH_BC(DEPTH_BC), .HPB(HPB), .WR_WIN(WR_WIN)) u_buf (
        .clk, .rst_n, .tick_i, .bcid_i, .seq_i,
        .hit_valid_i (hit_valid_i[BASE + l]),
        .hit_bcid_i  (hit_i[BASE + l].bcid),
        .hit_data_i  ({hit_i[BASE + l].station, hit_i[BASE + l].strip}),
        .rd_bcid_i   (rd_bcid),
        .rd_slot_i   (rd_slot),
        .rd_count_o  (rd_count[l]),
        .rd_ovf_o    (rd_ovf[l]),
        .rd_data_o   (rd_data[l]),
        .drop_o      (drop_o[BASE + l])
      );
    end

    readout_engine #(
      .NLINK(NL), .LINK_BASE(BASE), .GROUP(g), .HPB(HPB), .MAX_AGE(MAX_AGE)
    ) u_engine (
      .clk, .rst_n, .bcid_i,
      .l0a_valid_i, .l0a_bcid_i,
      .l0a_drop_o    (l0a_drop_o[g]),
      .rd_bcid_o     (rd_bcid),
      .rd_slot_o     (rd_slot),
      .rd_count_i    (rd_count),
      .rd_ovf_i      (rd_ovf),
      .rd_data_i     (rd_data),
      .felix_valid_o (felix_valid_o[g]),
      .felix_data_o  (felix_data_o[g]),
      .busy_o        (busy_o[g])
    );
  end
endmodule
