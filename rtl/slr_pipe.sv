// slr_pipe: pipeline registers for signals crossing Super Logic Region (SLR)
// boundaries of the multi-die FPGA.
//
// A chain of STAGES registers, one per SLR boundary crossed, as the source
// design does to close timing on the slow inter-die routes. STAGES = 0 is a
// plain wire. All stages reset to zero so that valid bits start low.
// Latency: STAGES clock cycles, one word per cycle.
module slr_pipe #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);
  if (STAGES == 0) begin : g_wire
    assign q_o = d_i;
  end else begin : g_regs
    logic [WIDTH-1:0] stage_q [STAGES];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < STAGES; i++) stage_q[i] <= '0;
      end else begin
        stage_q[0] <= d_i;
        for (int i = 1; i < STAGES; i++) stage_q[i] <= stage_q[i-1];
      end
    end
    assign q_o = stage_q[STAGES-1];
  end
endmodule
