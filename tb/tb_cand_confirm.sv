// tb_cand_confirm: checks cand_confirm against a reference model. Each BC the
// testbench sends the candidates of the BC 9 BCs old (as the trigger path
// does), forwards them as MDT-TP would, and returns confirmations 9 to 15
// BCs after their BC, some in the same cycle as the candidates. The MUCTPI
// word of every BC must leave exactly CONF_LAT BCs after that BC, with the
// confirm bits of the confirmations that arrived in time and only on valid
// candidates; late candidates and confirmations must be flagged as dropped.
module tb_cand_confirm;
  import sl_pkg::*;
  localparam int CONF_LAT = 14, NBC = 1500, CAND_AGE = 9;
  logic clk = 0, rst_n = 0;
  logic tick;  bcid_t bcid;  seq_t seq;
  logic cv = 0;  cand_word_t ci = '0;
  logic fv = 0;  mdt_conf_t fi = '0;
  logic mdt_v, muc_v, drop;  cand_word_t mdt;  muctpi_word_t muc;
  int checks = 0, failures = 0;
  int abs_bc = 0, phase = 0;
  int n_conf = 0, n_unconf = 0, n_drop = 0, exp_drop = 0, n_same = 0;
  cand_t [NCAND-1:0] m_cand [int];
  logic [NCAND-1:0]  m_conf [int];
  logic exp_drop_q = 0;

  bc_timer u_t (.clk, .rst_n, .bcr_i(1'b0), .tick_o(tick), .bcid_o(bcid), .seq_o(seq));
  cand_confirm #(.DEPTH(16), .CONF_LAT(CONF_LAT)) dut (
    .clk, .rst_n, .tick_i(tick), .bcid_i(bcid), .seq_i(seq),
    .cand_valid_i(cv), .cand_i(ci), .mdt_valid_o(mdt_v), .mdt_o(mdt),
    .conf_valid_i(fv), .conf_i(fi), .muc_valid_o(muc_v), .muc_o(muc), .drop_o(drop));

  always #5 clk = ~clk;

  initial begin
    repeat (NBC * CLK_PER_BC + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int orbit(int a);
    return ((a % int'(NBC_ORBIT)) + int'(NBC_ORBIT)) % int'(NBC_ORBIT);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (tick) begin abs_bc <= abs_bc + 1; phase <= 0; end
    else phase <= phase + 1;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++; if (muc_v !== (phase == 0)) failures++;
    if (muc_v) begin
      int rel;
      rel = abs_bc - 1 - CONF_LAT;
      checks++;
      if (muc.bcid !== bcid_t'(orbit(rel))) begin failures++; $display("muc bcid %0d exp %0d", muc.bcid, orbit(rel)); end
      if (rel >= 0) begin
        checks++;
        if (muc.cand !== m_cand[rel] || muc.confirmed !== m_conf[rel]) begin
          failures++;
          if (failures < 6) $display("BC %0d: cand %h conf %b exp %h %b", rel, muc.cand, muc.confirmed, m_cand[rel], m_conf[rel]);
        end
        for (int c = 0; c < NCAND; c++) if (m_cand[rel][c].valid) begin
          if (m_conf[rel][c]) n_conf++; else n_unconf++;
        end
      end
    end
    checks++; if (mdt_v !== cv || (cv && mdt !== ci)) failures++;
    checks++; if (drop !== exp_drop_q) failures++;
    if (drop) n_drop++;
  end

  task automatic confirm(int b, int age);
    fv = 1;
    fi.bcid = bcid_t'(orbit(b));
    fi.confirm = NCAND'($urandom);
    if (age < CONF_LAT) begin
      if (m_conf.exists(b)) m_conf[b] |= fi.confirm & {m_cand[b][1].valid, m_cand[b][0].valid};
    end else begin
      exp_drop_q = 1;
      exp_drop++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (abs_bc < NBC) begin
      @(negedge clk);
      cv = 0; fv = 0; exp_drop_q = 0;
      if (phase == 1) begin
        int b;
        b = abs_bc - CAND_AGE;
        cv = 1;
        ci.bcid = bcid_t'(orbit(b));
        for (int c = 0; c < NCAND; c++)
          ci.cand[c] = '{valid: ($urandom_range(0, 2) != 0), four: 1'($urandom), pos: STRIP_W'($urandom)};
        m_cand[b] = ci.cand;
        m_conf[b] = '0;
        if ($urandom_range(0, 4) == 0) begin confirm(b, CAND_AGE); n_same++; end
      end else if (phase == 3 && abs_bc > 20) begin
        int age;
        age = $urandom_range(CAND_AGE, CONF_LAT + 1);
        confirm(abs_bc - age, age);
      end else if (phase == 4 && $urandom_range(0, 9) == 0 && abs_bc > 20) begin
        // a candidate word that arrives too late
        cv = 1;
        ci.bcid = bcid_t'(orbit(abs_bc - CONF_LAT));
        exp_drop_q = 1;
        exp_drop++;
      end
    end
    @(negedge clk);
    checks++; if (n_drop != exp_drop || n_conf == 0 || n_unconf == 0 || n_same == 0) failures++;
    $display("confirmed=%0d unconfirmed=%0d dropped=%0d same-cycle=%0d", n_conf, n_unconf, n_drop, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
