// cand_confirm: MDT-TP confirmation and fixed-latency output to MUCTPI.
//
// The candidates of each BC are forwarded to the MDT Trigger Processor at
// once (mdt_valid_o / mdt_o) and also stored in a circular buffer of DEPTH
// entries addressed by the BC sequence number. When MDT-TP returns a
// confirmation word for a BC (conf_valid_i / conf_i) its confirm bits are
// set on the stored candidates that are valid. At every BC boundary the entry
// of the BC that is CONF_LAT BCs old is sent to MUCTPI (muc_valid_o / muc_o)
// and cleared, so the candidates leave at a fixed latency of CONF_LAT BCs
// after their bunch crossing, confirmed or not. Candidates or confirmations
// that reach the block CONF_LAT BCs or more after their BC are dropped and
// counted on drop_o.
//
// Timing: muc_valid_o pulses in the first cycle of each BC, for the BC that
// was CONF_LAT BCs old in the tick cycle. The MDT-TP round trip and the
// MUCTPI hand-off follow the source; the fixed-latency buffer, the word
// formats and the rule that unconfirmed candidates are still sent with their
// confirm bit clear are this implementation's choices.
module cand_confirm
  import sl_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned CONF_LAT = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick_i,
  input  bcid_t        bcid_i,
  input  seq_t         seq_i,
  // candidates from the trigger
  input  logic         cand_valid_i,
  input  cand_word_t   cand_i,
  // to and from MDT-TP
  output logic         mdt_valid_o,
  output cand_word_t   mdt_o,
  input  logic         conf_valid_i,
  input  mdt_conf_t    conf_i,
  // to MUCTPI
  output logic         muc_valid_o,
  output muctpi_word_t muc_o,
  output logic         drop_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    cand_t [NCAND-1:0] cand;
    logic [NCAND-1:0]  confirmed;
  } entry_t;

  entry_t buf_q [DEPTH];

  bcid_t         cand_age, conf_age;
  logic          cand_ok, conf_ok;
  logic [AW-1:0] cand_idx, conf_idx, rd_idx;
  logic [NCAND-1:0] cand_valid_bits, conf_mask;

  assign cand_age = bc_age(bcid_i, cand_i.bcid);
  assign conf_age = bc_age(bcid_i, conf_i.bcid);
  assign cand_ok  = cand_valid_i && (cand_age < bcid_t'(CONF_LAT));
  assign conf_ok  = conf_valid_i && (conf_age < bcid_t'(CONF_LAT));
  assign cand_idx = AW'(seq_i - seq_t'(cand_age));
  assign conf_idx = AW'(seq_i - seq_t'(conf_age));
  assign rd_idx   = AW'(seq_i - seq_t'(CONF_LAT));

  always_comb begin
    for (int c = 0; c < NCAND; c++) begin
      cand_valid_bits[c] = buf_q[conf_idx].cand[c].valid;
      // a candidate written in this same cycle is confirmed as well
      if (cand_ok && cand_idx == conf_idx) cand_valid_bits[c] = cand_i.cand[c].valid;
    end
    conf_mask = conf_i.confirm & cand_valid_bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
      mdt_valid_o <= 1'b0;
      mdt_o       <= '0;
      muc_valid_o <= 1'b0;
      muc_o       <= '0;
      drop_o      <= 1'b0;
    end else begin
      mdt_valid_o <= cand_valid_i;
      if (cand_valid_i) mdt_o <= cand_i;
      muc_valid_o <= tick_i;
      drop_o      <= (cand_valid_i && !cand_ok) || (conf_valid_i && !conf_ok);
      if (tick_i) begin
        muc_o.bcid      <= bc_sub(bcid_i, bcid_t'(CONF_LAT));
        muc_o.cand      <= buf_q[rd_idx].cand;
        muc_o.confirmed <= buf_q[rd_idx].confirmed;
        buf_q[rd_idx]   <= '0;
      end
      // ages below CONF_LAT never address the entry being read out
      if (cand_ok) begin
        buf_q[cand_idx].cand      <= cand_i.cand;
        buf_q[cand_idx].confirmed <= (conf_ok && conf_idx == cand_idx) ? conf_mask : '0;
      end
      if (conf_ok && !(cand_ok && conf_idx == cand_idx)) begin
        buf_q[conf_idx].confirmed <= buf_q[conf_idx].confirmed | conf_mask;
      end
    end
  end

  initial begin
    assert (DEPTH == (1 << AW)) else $error("cand_confirm: DEPTH must be a power of two");
    assert (DEPTH > CONF_LAT)   else $error("cand_confirm: DEPTH must exceed CONF_LAT");
  end
endmodule
