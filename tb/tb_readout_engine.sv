// tb_readout_engine: checks readout_engine with a behavioural model of its
// three readout RAMs (combinational count and overflow, hit word one clock
// after the read address). L0-Accepts for BCs 10-20 BCs old must give full
// events, those for BCs more than MAX_AGE old stale events with empty links;
// a burst of L0-Accepts must overflow the queue and be flagged. Every event
// is compared word by word with one built by the testbench from the RAM
// contents, and its length in clocks with 1 + sum(n ? n+2 : 1) over the links.
module tb_readout_engine;
  import sl_pkg::*;
  localparam int NL = 3, HPB = 4, FD = 4, MAXAGE = 40, BASE = 5, GRP = 1;
  logic clk = 0, rst_n = 0;
  bcid_t bcid = '0;
  logic l0v = 0;  bcid_t l0b = '0;  logic l0drop, fv, busy;  logic [31:0] fd;
  bcid_t rd_bcid;  logic [1:0] rd_slot;
  logic [2:0] rd_count [NL];  logic rd_ovf [NL];  logic [HIT_IDX_W-1:0] rd_data [NL];
  // RAM model
  logic [HIT_IDX_W-1:0] mem [NL][4096][HPB];
  logic [2:0]           cnt [NL][4096];
  logic                 ovf [NL][4096];
  int checks = 0, failures = 0;
  int n_l0a = 0, n_drop = 0, n_events = 0, n_stale = 0, n_hits = 0, n_ovf_links = 0;
  bcid_t l0_bc [int];
  bit    l0_stale [int];
  logic [31:0] expq [$];
  int ev_start, ev_len;

  readout_engine #(.NLINK(NL), .LINK_BASE(BASE), .GROUP(GRP), .HPB(HPB), .FIFO_DEPTH(FD),
                   .MAX_AGE(MAXAGE)) dut (
    .clk, .rst_n, .bcid_i(bcid), .l0a_valid_i(l0v), .l0a_bcid_i(l0b), .l0a_drop_o(l0drop),
    .rd_bcid_o(rd_bcid), .rd_slot_o(rd_slot), .rd_count_i(rd_count), .rd_ovf_i(rd_ovf),
    .rd_data_i(rd_data), .felix_valid_o(fv), .felix_data_o(fd), .busy_o(busy));

  always #5 clk = ~clk;

  always_comb for (int l = 0; l < NL; l++) begin
    rd_count[l] = cnt[l][rd_bcid];
    rd_ovf[l]   = ovf[l][rd_bcid];
  end
  always @(posedge clk) for (int l = 0; l < NL; l++) rd_data[l] <= mem[l][rd_bcid][rd_slot];

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && (cyc % CLK_PER_BC == CLK_PER_BC - 1))
      bcid <= (bcid == bcid_t'(NBC_ORBIT - 1)) ? '0 : bcid + 1'b1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build the expected event of L0 number id
  task automatic build(int id);
    bcid_t b;
    bit st;
    b  = l0_bc[id];
    st = l0_stale[id];
    expq.push_back({2'b11, 2'(GRP), 16'(id), b});
    ev_len = 1;
    for (int l = 0; l < NL; l++) begin
      int n;
      n = st ? 0 : int'(cnt[l][b]);
      expq.push_back({2'b10, 6'(BASE + l), ovf[l][b] && !st, st, 6'b0, 4'(n), b});
      for (int k = 0; k < n; k++) expq.push_back({2'b01, 6'(BASE + l), 16'b0, mem[l][b][k]});
      ev_len += (n > 0) ? n + 2 : 1;
      n_hits += n;
      if (ovf[l][b] && !st) n_ovf_links++;
    end
    expq.push_back({2'b00, 14'b0, 16'(expq.size() + 1)});
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    if (l0drop) n_drop++;
    if (fv) begin
      if (expq.size() == 0) begin
        checks++;
        if (fd[31:30] != 2'b11 || !l0_bc.exists(int'(fd[27:12]))) begin
          failures++; $display("unexpected word %h", fd);
        end else begin
          build(int'(fd[27:12]));
          ev_start = cyc;
          n_events++;
          if (l0_stale[int'(fd[27:12])]) n_stale++;
        end
      end
      if (expq.size() != 0) begin
        logic [31:0] e;
        e = expq.pop_front();
        checks++;
        if (fd !== e) begin failures++; if (failures < 6) $display("word %h exp %h", fd, e); end
        if (expq.size() == 0) begin
          checks++;
          if (cyc - ev_start != ev_len) begin failures++; $display("event took %0d clocks, exp %0d", cyc - ev_start, ev_len); end
        end
      end
    end
  end

  task automatic l0a(int age);
    l0v = 1;
    l0b = bc_sub(bcid, bcid_t'(age));
    l0_bc[n_l0a] = l0b;
    l0_stale[n_l0a] = (age > MAXAGE);
    n_l0a++;
  endtask

  initial begin
    for (int l = 0; l < NL; l++)
      for (int b = 0; b < 4096; b++) begin
        cnt[l][b] = 3'($urandom_range(0, HPB));
        ovf[l][b] = (cnt[l][b] == 3'(HPB)) && ($urandom_range(0, 1) == 1);
        for (int k = 0; k < HPB; k++) mem[l][b][k] = HIT_IDX_W'($urandom);
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (400) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      l0a(($urandom_range(0, 3) == 0) ? $urandom_range(MAXAGE + 1, MAXAGE + 20) : $urandom_range(10, 20));
      @(negedge clk) l0v = 0;
      repeat ($urandom_range(0, 60)) @(negedge clk);
      if (i % 50 == 25) begin
        // burst: more L0-Accepts than the queue holds
        repeat (200) @(negedge clk);
        for (int k = 0; k < FD + 3; k++) begin l0a(15); @(negedge clk); end
        l0v = 0;
      end
    end
    l0v = 0;
    repeat (1000) @(negedge clk);
    checks++; if (n_events + n_drop != n_l0a) failures++;
    checks++; if (n_drop == 0 || n_stale == 0 || n_ovf_links == 0 || busy) failures++;
    $display("L0A=%0d events=%0d stale=%0d dropped=%0d hits=%0d", n_l0a, n_events, n_stale, n_drop, n_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
