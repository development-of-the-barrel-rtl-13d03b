// readout_engine: L0-Accept driven event building for one FELIX link.
//
// L0-Accepts (the BCID of an accepted bunch crossing) are numbered and queued
// in a FIFO of FIFO_DEPTH entries; an L0-Accept that finds the FIFO full is
// dropped and flagged on l0a_drop_o. For each queued L0-Accept the engine
// reads the accepted BC from the NLINK readout RAMs of its group and sends
// one event on its FELIX link, one 32-bit word per clock (32 bits at 240 MHz
// is the 7.68 Gb/s payload of a 9.6 Gb/s 8b/10b link):
//
//   event header  [31:30]=11 [29:28]=group [27:12]=L0 number [11:0]=BCID
//   link header   [31:30]=10 [29:24]=link  [23]=overflow [22]=stale
//                 [15:12]=hit count [11:0]=BCID            (one per RAM)
//   hit           [31:30]=01 [29:24]=link  [7:0]={station, strip}
//   trailer       [31:30]=00 [15:0]=words in the event, trailer included
//
// An L0-Accept whose BC is more than MAX_AGE BCs old when its event starts
// finds its data already discarded: every link header then has the stale bit
// set and a count of zero. A link with n hits takes n+2 clocks (header, n
// hits, one turn-around cycle), a link without hits one clock.
// Readout on L0-Accept over FELIX follows the source; the word format, the
// queue, the stale rule and the split of the RAMs in groups are this
// implementation's choices. The assertion at the end samples rst_n
// synchronously while the registers use it as an asynchronous reset; the
// mixed use is confined to that simulation-only check.
module readout_engine
  import sl_pkg::*;
#(
  parameter int unsigned NLINK      = 17,
  parameter int unsigned LINK_BASE  = 0,
  parameter int unsigned GROUP      = 0,
  parameter int unsigned HPB        = 8,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned MAX_AGE    = 448
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  bcid_t                  bcid_i,
  // L0-Accept
  input  logic                   l0a_valid_i,
  input  bcid_t                  l0a_bcid_i,
  output logic                   l0a_drop_o,
  // readout RAM read port, shared by the group
  output bcid_t                  rd_bcid_o,
  output logic [$clog2(HPB)-1:0] rd_slot_o,
  input  logic [$clog2(HPB):0]   rd_count_i [NLINK],
  input  logic                   rd_ovf_i   [NLINK],
  input  logic [HIT_IDX_W-1:0]   rd_data_i  [NLINK],
  // FELIX link
  output logic                   felix_valid_o,
  output logic [31:0]            felix_data_o,
  output logic                   busy_o
);
  localparam int unsigned SW = $clog2(HPB);
  localparam int unsigned CW = SW + 1;
  localparam int unsigned LW = (NLINK > 1) ? $clog2(NLINK) : 1;
  localparam int unsigned FW = $clog2(FIFO_DEPTH);

  typedef struct packed {
    logic [15:0] l0id;
    bcid_t       bcid;
  } l0a_t;

  typedef enum logic [2:0] {S_IDLE, S_EHDR, S_LHDR, S_HITS, S_GAP, S_TRL} state_e;

  // L0-Accept queue
  l0a_t          fifo_q [FIFO_DEPTH];
  logic [FW-1:0] wr_ptr_q, rd_ptr_q;
  logic [FW:0]   fill_q;
  logic [15:0]   l0id_q;
  logic          push, pop;

  state_e        state_q;
  l0a_t          cur_q;
  logic          stale_q;
  logic [LW-1:0] link_q, pend_link_q;
  logic [CW-1:0] cnt_q;
  logic [SW-1:0] slot_q;
  logic          pend_q;
  logic [15:0]   words_q;

  assign push      = l0a_valid_i && (fill_q != (FW+1)'(FIFO_DEPTH));
  assign pop       = (state_q == S_IDLE) && (fill_q != '0);
  assign rd_bcid_o = cur_q.bcid;
  assign rd_slot_o = slot_q;
  assign busy_o    = (state_q != S_IDLE) || (fill_q != '0);

  // hit count of the current link; a stale event reads nothing
  logic [CW-1:0] n;
  assign n = stale_q ? '0 : rd_count_i[link_q];

  function automatic logic [5:0] link_id(logic [LW-1:0] l);
    return 6'(LINK_BASE + l);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FIFO_DEPTH; i++) fifo_q[i] <= '0;
      wr_ptr_q      <= '0;
      rd_ptr_q      <= '0;
      fill_q        <= '0;
      l0id_q        <= '0;
      l0a_drop_o    <= 1'b0;
      state_q       <= S_IDLE;
      cur_q         <= '0;
      stale_q       <= 1'b0;
      link_q        <= '0;
      pend_link_q   <= '0;
      cnt_q         <= '0;
      slot_q        <= '0;
      pend_q        <= 1'b0;
      words_q       <= '0;
      felix_valid_o <= 1'b0;
      felix_data_o  <= '0;
    end else begin
      // queue
      l0a_drop_o <= l0a_valid_i && !push;
      if (l0a_valid_i) l0id_q <= l0id_q + 1'b1;
      if (push) begin
        fifo_q[wr_ptr_q] <= '{l0id: l0id_q, bcid: l0a_bcid_i};
        wr_ptr_q         <= wr_ptr_q + 1'b1;
      end
      if (pop) rd_ptr_q <= rd_ptr_q + 1'b1;
      fill_q <= fill_q + (FW+1)'(push) - (FW+1)'(pop);

      // hit words leave one clock after their RAM read
      felix_valid_o <= 1'b0;
      pend_q        <= 1'b0;
      if (pend_q) begin
        felix_valid_o <= 1'b1;
        felix_data_o  <= {FW_HIT, link_id(pend_link_q), 16'b0, rd_data_i[pend_link_q]};
        words_q       <= words_q + 1'b1;
      end

      unique case (state_q)
        S_IDLE: begin
          if (pop) begin
            cur_q   <= fifo_q[rd_ptr_q];
            state_q <= S_EHDR;
          end
        end
        S_EHDR: begin
          stale_q       <= bc_age(bcid_i, cur_q.bcid) > bcid_t'(MAX_AGE);
          felix_valid_o <= 1'b1;
          felix_data_o  <= {FW_EVENT, 2'(GROUP), cur_q.l0id, cur_q.bcid};
          words_q       <= 16'd1;
          link_q        <= '0;
          state_q       <= S_LHDR;
        end
        S_LHDR: begin
          felix_valid_o <= 1'b1;
          felix_data_o  <= {FW_LINK, link_id(link_q), rd_ovf_i[link_q] && !stale_q, stale_q,
                            6'b0, 4'(n), cur_q.bcid};
          words_q       <= words_q + 1'b1;
          cnt_q         <= n;
          slot_q        <= '0;
          if (n != '0)                         state_q <= S_HITS;
          else if (link_q == LW'(NLINK - 1))   state_q <= S_TRL;
          else                                 link_q  <= link_q + 1'b1;
        end
        S_HITS: begin
          pend_q      <= 1'b1;
          pend_link_q <= link_q;
          slot_q      <= slot_q + 1'b1;
          if (CW'(slot_q) == cnt_q - 1'b1) state_q <= S_GAP;
        end
        S_GAP: begin
          if (link_q == LW'(NLINK - 1)) state_q <= S_TRL;
          else begin
            link_q  <= link_q + 1'b1;
            state_q <= S_LHDR;
          end
        end
        S_TRL: begin
          felix_valid_o <= 1'b1;
          felix_data_o  <= {FW_TRAILER, 14'b0, words_q + 1'b1};
          state_q       <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the FELIX link carries one word per clock: a header or trailer never
  // coincides with a hit word
  assert property (@(posedge clk) disable iff (!rst_n)
                   pend_q |-> !(state_q inside {S_EHDR, S_LHDR, S_TRL}))
    else $error("readout_engine: word collision on the FELIX link");
endmodule
