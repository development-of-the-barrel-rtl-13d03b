// tb_slr_pipe: checks that slr_pipe delays every word by exactly STAGES
// clocks (a 3-stage chain, and the 0-stage wire) against a reference list
// of the words driven, and that the chain resets to zero.
module tb_slr_pipe;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q3, q0;
  int checks = 0, failures = 0;
  logic [W-1:0] v [$];

  slr_pipe #(.WIDTH(W), .STAGES(3)) dut  (.clk, .rst_n, .d_i(d), .q_o(q3));
  slr_pipe #(.WIDTH(W), .STAGES(0)) dut0 (.clk, .rst_n, .d_i(d), .q_o(q0));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 16'hffff;
    repeat (3) @(posedge clk);
    #1 checks++; if (q3 !== '0) failures++;   // reset clears the chain
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      // the word driven three clocks ago is at the output now
      checks++;
      if (q3 !== ((n >= 3) ? v[n-3] : (n == 2) ? W'(16'hffff) : W'(0))) begin
        failures++;
        if (failures < 5) $display("n=%0d q3=%h", n, q3);
      end
      d = W'($urandom);
      v.push_back(d);
      #1 checks++; if (q0 !== d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
