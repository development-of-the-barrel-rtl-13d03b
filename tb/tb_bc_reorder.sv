// tb_bc_reorder: checks bc_reorder (with the bc_timer that drives it) against
// a reference model. Hits of random BCs up to LATENCY+2 BCs old, and some
// with a future BCID, are sent on random cycles; the model ORs the accepted
// ones into the map of their absolute BC. Every released map must be the one
// of the BC exactly LATENCY BCs old at the tick, equal to the model, and every
// late hit must be flagged. The run crosses an orbit wrap (3564 BCs) and ends
// with a bunch counter reset.
module tb_bc_reorder;
  import sl_pkg::*;
  localparam int IDX = 4, DEPTH = 8, LAT = 5;
  localparam int NBC = 4000;

  logic clk = 0, rst_n = 0, bcr = 0;
  logic tick;  bcid_t bcid;  seq_t seq;
  logic hv = 0;  bcid_t hb = '0;  logic [IDX-1:0] hi = '0;
  logic mv, late;  bcid_t mb;  logic [(1<<IDX)-1:0] m;
  int checks = 0, failures = 0;
  int abs_bc = 0, nmaps = 0, nlate = 0, exp_late = 0, nonempty = 0;
  logic [(1<<IDX)-1:0] model [int];
  logic exp_late_q = 0;

  bc_timer u_t (.clk, .rst_n, .bcr_i(bcr), .tick_o(tick), .bcid_o(bcid), .seq_o(seq));
  bc_reorder #(.IDX_W(IDX), .DEPTH(DEPTH), .LATENCY(LAT)) dut (
    .clk, .rst_n, .tick_i(tick), .bcid_i(bcid), .seq_i(seq),
    .hit_valid_i(hv), .hit_bcid_i(hb), .hit_idx_i(hi),
    .map_valid_o(mv), .map_bcid_o(mb), .map_o(m), .late_o(late));

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

  // output checks, sampled just after each rising edge
  always @(posedge clk) if (rst_n) begin
    #1;
    if (mv) begin
      int rel;
      rel = abs_bc - 1 - LAT;
      nmaps++;
      checks++;
      if (mb !== bcid_t'(orbit(rel))) begin
        failures++; $display("map bcid %0d exp %0d", mb, orbit(rel));
      end
      checks++;
      if (m !== (model.exists(rel) ? model[rel] : '0)) begin
        failures++; $display("map of BC %0d = %h exp %h", rel, m, model.exists(rel) ? model[rel] : 0);
      end
      if (m != 0) nonempty++;
      model.delete(rel);
    end
    checks++;
    if (late !== exp_late_q) failures++;
    if (late) nlate++;
  end

  // BC counter of the model: one BC every CLK_PER_BC clocks
  always @(posedge clk) if (rst_n && tick) abs_bc <= abs_bc + 1;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (abs_bc < NBC) begin
      @(negedge clk);
      checks++;
      if (bcid !== bcid_t'(orbit(abs_bc))) begin
        failures++; $display("bcid %0d exp %0d", bcid, orbit(abs_bc));
      end
      exp_late_q = 0;
      hv = ($urandom_range(0, 1) == 1);
      if (hv) begin
        int d, b;
        d = $urandom_range(0, LAT + 2);
        if ($urandom_range(0, 15) == 0) d = -1;  // future BCID
        b = abs_bc - d;
        hb = bcid_t'(orbit(b));
        hi = IDX'($urandom);
        if (d >= 0 && d < LAT) begin
          if (!model.exists(b)) model[b] = '0;
          model[b][hi] = 1'b1;
        end else begin
          exp_late_q = 1;
          exp_late++;
        end
      end
    end
    @(negedge clk);
    hv = 0;
    exp_late_q = 0;
    // bunch counter reset: BCID restarts at 0 at the next BC boundary
    @(negedge clk) bcr = 1;
    @(negedge clk) bcr = 0;
    @(posedge tick);
    @(negedge clk);
    @(negedge clk);
    checks++; if (bcid !== '0) begin failures++; $display("BCR: bcid %0d", bcid); end
    checks++; if (nmaps < NBC - LAT - 2) failures++;
    checks++; if (nlate != exp_late || nlate == 0) failures++;
    checks++; if (nonempty < NBC / 2) failures++;
    $display("maps=%0d nonempty=%0d late=%0d", nmaps, nonempty, nlate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
