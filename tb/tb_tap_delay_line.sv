// tb_tap_delay_line: self-checking test of the shared input delay line.
//
// Drives random samples with a random shift enable and a reset in the
// middle, and compares every tap against a software shift register after
// each clock edge. A watchdog ends the run with a failure if it hangs.
module tb_tap_delay_line;
  localparam int unsigned W = 16;
  localparam int unsigned DEPTH = 6;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] x_in = '0;
  logic signed [W-1:0] tap [DEPTH+1];
  int checks = 0, failures = 0;
  int model [DEPTH+1];

  always #5 clk = ~clk;

  tap_delay_line #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d <= DEPTH; d++) model[d] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n == 1000) begin
        rst_n = 1'b0;
        for (int d = 1; d <= DEPTH; d++) model[d] = 0;
        #1 rst_n = 1'b1;
      end
      en   = ($urandom_range(3) != 0);
      x_in = W'($urandom);
      #1;
      model[0] = int'(x_in);
      for (int d = 0; d <= DEPTH; d++) begin
        checks++;
        if (int'(tap[d]) != model[d]) begin
          failures++;
          if (failures < 10) $display("n=%0d tap[%0d]=%0d expected %0d", n, d, tap[d], model[d]);
        end
      end
      @(posedge clk);
      if (en) for (int d = DEPTH; d > 0; d--) model[d] = model[d-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
