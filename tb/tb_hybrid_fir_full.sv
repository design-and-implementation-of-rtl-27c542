// tb_hybrid_fir_full: the hybrid form FIR filter at its default build
// (order 8, three subsections of three taps, default low-pass
// coefficients), taken through one complete filtering run: reset, an
// impulse whose response must reproduce the coefficients, then a block of
// random and full-scale samples with stalls, each output compared with a
// direct convolution computed here.
module tb_hybrid_fir_full;
  import hybrid_fir_pkg::*;

  localparam int unsigned OUT_W = DEF_DATA_W + DEF_COEF_W + $clog2(DEF_NTAPS);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [DEF_DATA_W-1:0] x_in = '0;
  logic signed [OUT_W-1:0] y_out;

  hybrid_fir dut (.*);

  int checks = 0, failures = 0;
  longint hist [DEF_NTAPS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < DEF_NTAPS; j++) hist[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      longint exp;
      @(negedge clk);
      if (n < 20) begin
        in_valid = 1'b1;
        x_in = (n == 0) ? 16'sd1 : 16'sd0;
      end else begin
        in_valid = ($urandom_range(5) != 0);
        x_in = (n < 40) ? 16'sh8000 : DEF_DATA_W'($urandom);
      end
      #1;
      if (in_valid) begin
        exp = longint'(DEF_COEFS[0]) * longint'(x_in);
        for (int j = 1; j < DEF_NTAPS; j++) exp += longint'(DEF_COEFS[j]) * hist[j-1];
        if (n < DEF_NTAPS) begin
          // Impulse response, against the coefficient table directly.
          checks++;
          if (longint'(y_out) != longint'(DEF_COEFS[n])) failures++;
        end
        checks++;
        if (longint'(y_out) != exp || !out_valid) begin
          failures++;
          if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y_out, exp);
        end
      end
      @(posedge clk);
      if (in_valid) begin
        for (int j = DEF_NTAPS - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = longint'(x_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
