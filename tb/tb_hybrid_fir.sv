// tb_hybrid_fir: end-to-end test of the hybrid form FIR filter.
//
// The default build (order 8, three subsections of three taps, low-pass
// coefficients) gets an impulse, whose response must be the coefficient
// list, a step, whose response must settle at the coefficient sum, and a
// stretch of random samples with stalls, checked against a direct
// convolution. Beside it run builds with uneven subsection lengths and the
// two limiting partitions, one subsection of nine taps (direct form) and
// nine of one tap (transposed form). Each mechanism is counted: stalls,
// resets in mid-stream, uneven partitions, direct and transposed forms,
// and a partial sum crossing a subsection register; one that never
// happened counts as a failure.
module tb_hybrid_fir;
  import hybrid_fir_pkg::*;

  localparam int unsigned NC = 4;
  localparam int unsigned OUT_W = DEF_DATA_W + DEF_COEF_W + $clog2(DEF_NTAPS);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- default build ----
  logic rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [DEF_DATA_W-1:0] x_in = '0;
  logic signed [OUT_W-1:0] y_out;
  hybrid_fir dut (.*);

  // ---- other partitions ----
  logic done [NC];
  int c_checks [NC], c_fail [NC], c_stalls [NC], c_resets [NC], c_nsec [NC], c_uneven [NC];

  tb_fir_case #(.NTAPS(9),  .M(3), .VARIED(1'b1), .SEED(11)) c0 (
    .clk, .done(done[0]), .checks(c_checks[0]), .failures(c_fail[0]), .stalls(c_stalls[0]),
    .resets(c_resets[0]), .nsec_out(c_nsec[0]), .uneven(c_uneven[0]));
  tb_fir_case #(.NTAPS(9),  .M(9), .VARIED(1'b0), .SEED(12)) c1 (
    .clk, .done(done[1]), .checks(c_checks[1]), .failures(c_fail[1]), .stalls(c_stalls[1]),
    .resets(c_resets[1]), .nsec_out(c_nsec[1]), .uneven(c_uneven[1]));
  tb_fir_case #(.NTAPS(9),  .M(1), .VARIED(1'b0), .SEED(13)) c2 (
    .clk, .done(done[2]), .checks(c_checks[2]), .failures(c_fail[2]), .stalls(c_stalls[2]),
    .resets(c_resets[2]), .nsec_out(c_nsec[2]), .uneven(c_uneven[2]));
  tb_fir_case #(.NTAPS(14), .M(4), .VARIED(1'b1), .SEED(14)) c3 (
    .clk, .done(done[3]), .checks(c_checks[3]), .failures(c_fail[3]), .stalls(c_stalls[3]),
    .resets(c_resets[3]), .nsec_out(c_nsec[3]), .uneven(c_uneven[3]));

  int n_stall = 0, n_reset = 0, n_uneven = 0, n_direct = 0, n_transposed = 0, n_cross = 0;
  longint hist [DEF_NTAPS];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One sample into the default build, checked against the convolution.
  task automatic push(logic signed [DEF_DATA_W-1:0] x, bit valid);
    longint exp;
    @(negedge clk);
    x_in = x;
    in_valid = valid;
    #1;
    if (valid) begin
      exp = longint'(DEF_COEFS[0]) * longint'(x);
      for (int j = 1; j < DEF_NTAPS; j++) exp += longint'(DEF_COEFS[j]) * hist[j-1];
      check("default build", longint'(y_out), exp);
      check("out_valid", longint'(out_valid), 1);
      // Contribution of taps held behind a subsection register.
      for (int j = DEF_SEC_LEN[0]; j < DEF_NTAPS; j++)
        if (DEF_COEFS[j] != 0 && hist[j-1] != 0) begin n_cross++; break; end
    end else begin
      n_stall++;
    end
    @(posedge clk);
    if (valid) begin
      for (int j = DEF_NTAPS - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = longint'(x);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint csum;
    for (int j = 0; j < DEF_NTAPS; j++) hist[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Impulse: the output sequence is the coefficient list.
    for (int n = 0; n < DEF_NTAPS + 3; n++) begin
      @(negedge clk);
      x_in = (n == 0) ? 16'sd1 : 16'sd0;
      in_valid = 1'b1;
      #1 check("impulse response", longint'(y_out),
               (n < DEF_NTAPS) ? longint'(DEF_COEFS[n]) : 0);
      @(posedge clk);
      for (int j = DEF_NTAPS - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = longint'(x_in);
    end
    // Step with stalls in between: settles at 1000 * sum of coefficients.
    csum = 0;
    for (int j = 0; j < DEF_NTAPS; j++) csum += longint'(DEF_COEFS[j]);
    for (int n = 0; n < 3 * DEF_NTAPS; n++) push(16'sd1000, (n % 3) != 1);
    check("step settles", longint'(y_out), 1000 * csum);
    // Reset in mid-stream, then random traffic.
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    n_reset++;
    for (int j = 0; j < DEF_NTAPS; j++) hist[j] = 0;
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1500; n++)
      push((n < 10) ? -16'sd32768 : DEF_DATA_W'($urandom), $urandom_range(4) != 0);

    for (int c = 0; c < NC; c++) wait (done[c]);
    for (int c = 0; c < NC; c++) begin
      checks += c_checks[c];
      failures += c_fail[c];
      n_stall += c_stalls[c];
      n_reset += c_resets[c];
      n_uneven += c_uneven[c];
    end
    n_direct     = (c_nsec[1] == 1) ? 1 : 0;
    n_transposed = (c_nsec[2] == 9) ? 1 : 0;

    $display("mechanisms: stalls=%0d resets=%0d uneven_partitions=%0d direct_form=%0d transposed_form=%0d register_crossings=%0d",
             n_stall, n_reset, n_uneven, n_direct, n_transposed, n_cross);
    check("stall seen", longint'(n_stall > 0), 1);
    check("reset seen", longint'(n_reset > 0), 1);
    check("uneven partition seen", longint'(n_uneven > 0), 1);
    check("direct form seen", longint'(n_direct), 1);
    check("transposed form seen", longint'(n_transposed), 1);
    check("subsection register crossing seen", longint'(n_cross > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
