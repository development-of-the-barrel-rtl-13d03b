// tb_readout_buffer: checks readout_buffer against a reference model. Hits of
// random BCs up to WR_WIN+2 BCs old arrive on random cycles, with bursts into
// one BC to overflow its HPB words. Every cycle the testbench reads a random
// BC between WR_WIN and DEPTH_BC-2 BCs old: the hit count and overflow flag
// must match the model at once and the hit word one clock later. BCs whose
// slot is being reused must read as empty (old data discarded). Late hits and
// hits beyond HPB must be flagged as dropped.
module tb_readout_buffer;
  import sl_pkg::*;
  localparam int DEPTH = 32, HPB = 4, WIN = 8, NBC = 800;
  logic clk = 0, rst_n = 0;
  logic tick;  bcid_t bcid;  seq_t seq;
  logic hv = 0;  bcid_t hb = '0;  logic [HIT_IDX_W-1:0] hd = '0;
  bcid_t rb = '0;  logic [1:0] rs = '0;
  logic [2:0] rc;  logic ro, drop;  logic [HIT_IDX_W-1:0] rdat;
  int checks = 0, failures = 0;
  int abs_bc = 0, n_ovf = 0, n_drop = 0, exp_drop = 0, n_hits_read = 0, n_empty_reuse = 0;
  logic [HIT_IDX_W-1:0] m_hits [int][$];
  bit m_ovf [int];
  logic exp_drop_q = 0;
  logic pend = 0;  logic [HIT_IDX_W-1:0] pend_data;

  bc_timer u_t (.clk, .rst_n, .bcr_i(1'b0), .tick_o(tick), .bcid_o(bcid), .seq_o(seq));
  readout_buffer #(.DEPTH_BC(DEPTH), .HPB(HPB), .WR_WIN(WIN)) dut (
    .clk, .rst_n, .tick_i(tick), .bcid_i(bcid), .seq_i(seq),
    .hit_valid_i(hv), .hit_bcid_i(hb), .hit_data_i(hd),
    .rd_bcid_i(rb), .rd_slot_i(rs), .rd_count_o(rc), .rd_ovf_o(ro), .rd_data_o(rdat), .drop_o(drop));

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

  always @(posedge clk) if (rst_n && tick) abs_bc <= abs_bc + 1;

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++; if (drop !== exp_drop_q) failures++;
    if (drop) n_drop++;
    if (pend) begin
      checks++;
      if (rdat !== pend_data) begin failures++; if (failures < 6) $display("data %h exp %h", rdat, pend_data); end
    end
  end

  initial begin
    int burst_bc = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (abs_bc < NBC) begin
      @(negedge clk);
      // hit stimulus
      exp_drop_q = 0;
      hv = ($urandom_range(0, 2) != 0);
      if (hv) begin
        int age, b;
        age = $urandom_range(0, WIN + 2);
        b = abs_bc - age;
        if ($urandom_range(0, 30) == 0) burst_bc = abs_bc;
        if (burst_bc == abs_bc) b = abs_bc;    // burst into the current BC
        hb = bcid_t'(orbit(b));
        hd = HIT_IDX_W'($urandom);
        if (b < abs_bc - WIN + 1) begin
          exp_drop_q = 1; exp_drop++;
        end else if (m_hits[b].size() == HPB) begin
          exp_drop_q = 1; exp_drop++;
          if (!m_ovf.exists(b) || !m_ovf[b]) n_ovf++;
          m_ovf[b] = 1;
        end else begin
          m_hits[b].push_back(hd);
        end
      end
      // read stimulus
      begin
        int age, b, n;
        age = $urandom_range(WIN, DEPTH - 2);
        b = abs_bc - age;
        rb = bcid_t'(orbit(b));
        rs = 2'($urandom);
        #1;
        n = (b >= 0 && m_hits.exists(b)) ? m_hits[b].size() : 0;
        if (b >= 0) begin
          checks++;
          if (rc !== 3'(n) || ro !== (m_ovf.exists(b) ? m_ovf[b] : 1'b0)) begin
            failures++;
            if (failures < 6) $display("BC %0d: count %0d ovf %b exp %0d", b, rc, ro, n);
          end
          if (n == 0 && b >= DEPTH) n_empty_reuse++;
        end
        pend = (b >= 0) && (int'(rs) < n);
        if (pend) begin pend_data = m_hits[b][rs]; n_hits_read++; end
      end
    end
    @(negedge clk); hv = 0; exp_drop_q = 0;
    @(negedge clk);
    checks++; if (n_drop != exp_drop || n_ovf == 0 || n_hits_read == 0 || n_empty_reuse == 0) failures++;
    $display("hits read=%0d overflowed BCs=%0d dropped=%0d empty reused slots=%0d",
             n_hits_read, n_ovf, n_drop, n_empty_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
