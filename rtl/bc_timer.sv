// bc_timer: bunch-crossing timing for the single logic clock domain.
//
// Divides the logic clock into BCs of CLK_PER_BC cycles and counts the BCID
// (0 .. NBC_ORBIT-1) and a free-running BC sequence number used to index the
// circular buffers. tick_o is high in the last cycle of each BC; bcid_o and
// seq_o advance at the clock edge that ends that cycle. bcr_i (bunch counter
// reset, from the TTC stream) restarts the BCID at 0 at the next BC boundary.
// The source derives the 240 MHz logic clock from the 40 MHz TTC clock; the
// counters and the reset behaviour here are this implementation's own.
module bc_timer
  import sl_pkg::*;
#(
  parameter int unsigned CPB = CLK_PER_BC
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bcr_i,
  output logic  tick_o,
  output bcid_t bcid_o,
  output seq_t  seq_o
);
  logic [$clog2(CPB)-1:0] phase_q;
  logic                   bcr_pend_q;

  assign tick_o = (phase_q == ($clog2(CPB))'(CPB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= '0;
      bcid_o     <= '0;
      seq_o      <= '0;
      bcr_pend_q <= 1'b0;
    end else begin
      if (bcr_i) bcr_pend_q <= 1'b1;
      if (tick_o) begin
        phase_q <= '0;
        seq_o   <= seq_o + 1'b1;
        if (bcr_i || bcr_pend_q) begin
          bcid_o     <= '0;
          bcr_pend_q <= 1'b0;
        end else if (bcid_o == bcid_t'(NBC_ORBIT - 1)) begin
          bcid_o <= '0;
        end else begin
          bcid_o <= bcid_o + 1'b1;
        end
      end else begin
        phase_q <= phase_q + 1'b1;
      end
    end
  end
endmodule
