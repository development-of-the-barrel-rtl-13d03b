// tb_rpc_trigger: checks rpc_trigger against a reference model of the 3-of-4
// station coincidence. Maps carry random noise hits plus 0, 1 or 2 injected
// tracks (three or four stations within +/-WIN strips); the model lists every
// coincidence position and picks the lowest one and the lowest one more than
// 2*WIN above it. Candidates must match the model one clock after the map.
// It also counts BCs with 0, 1 and 2 candidates and with a 4-station one.
module tb_rpc_trigger;
  import sl_pkg::*;
  localparam int NS = NSTRIP, WIN = 1;
  logic clk = 0, rst_n = 0;
  logic mv = 0;  bcid_t mb = '0;  logic [NSTATION*NS-1:0] map = '0;
  logic cv;  cand_word_t co;
  int checks = 0, failures = 0;
  int n_cand [3] = '{0, 0, 0};
  int n_four = 0;
  cand_word_t exp_q;
  logic exp_v = 0;

  rpc_trigger #(.NS(NS), .WIN(WIN)) dut (.clk, .rst_n, .map_valid_i(mv), .map_bcid_i(mb),
                                        .map_i(map), .cand_valid_o(cv), .cand_o(co));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cand_word_t model(logic [NSTATION*NS-1:0] mp, bcid_t b);
    cand_word_t r;
    int cnt [NS];
    int first;
    r = '0;
    r.bcid = b;
    for (int p = 0; p < NS; p++) begin
      cnt[p] = 0;
      for (int s = 0; s < NSTATION; s++) begin
        bit f = 0;
        for (int k = 0; k < NS; k++)
          if (mp[s*NS+k] && (k - p <= WIN) && (p - k <= WIN)) f = 1;
        cnt[p] += f;
      end
    end
    first = -1;
    for (int p = 0; p < NS; p++) begin
      if (cnt[p] >= 3) begin
        if (first < 0) begin
          first = p;
          r.cand[0] = '{valid: 1'b1, four: (cnt[p] == 4), pos: STRIP_W'(p)};
        end else if (!r.cand[1].valid && p > first + 2 * WIN) begin
          r.cand[1] = '{valid: 1'b1, four: (cnt[p] == 4), pos: STRIP_W'(p)};
        end
      end
    end
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (cv !== exp_v) failures++;
    if (exp_v) begin
      checks++;
      if (co !== exp_q) begin
        failures++;
        if (failures < 6) $display("bcid %0d: got %h exp %h", exp_q.bcid, co, exp_q);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      mv = ($urandom_range(0, 3) != 0);
      mb = bcid_t'(i);
      map = '0;
      for (int s = 0; s < NSTATION; s++)
        repeat ($urandom_range(0, 2)) map[s*NS + $urandom_range(0, NS - 1)] = 1'b1;
      repeat ($urandom_range(0, 2)) begin
        int p, skip;
        p = $urandom_range(0, NS - 1);
        skip = $urandom_range(0, 4);   // 4: keep all four stations
        for (int s = 0; s < NSTATION; s++) begin
          int k;
          k = p + $urandom_range(0, 2) - 1;
          if (s != skip && k >= 0 && k < NS) map[s*NS + k] = 1'b1;
        end
      end
      @(posedge clk);
      exp_v = mv;
      if (mv) begin
        exp_q = model(map, mb);
        n_cand[int'(exp_q.cand[0].valid) + int'(exp_q.cand[1].valid)]++;
        if ((exp_q.cand[0].valid && exp_q.cand[0].four) || (exp_q.cand[1].valid && exp_q.cand[1].four)) n_four++;
      end
    end
    @(negedge clk) mv = 0;
    @(posedge clk); exp_v = 0;
    repeat (2) @(posedge clk);
    // each case must have occurred
    checks++; if (n_cand[0] == 0 || n_cand[1] == 0 || n_cand[2] == 0 || n_four == 0) failures++;
    $display("BCs with 0/1/2 candidates: %0d/%0d/%0d, with a 4-station one: %0d",
             n_cand[0], n_cand[1], n_cand[2], n_four);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
