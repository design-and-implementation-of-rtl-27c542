// tb_hybrid_fir_orders: the filter orders 8, 16, 32, 64 and 128 (9 to 129
// taps), each built as a hybrid form filter with subsections of three taps
// (the last subsection takes what remains, so orders 16 and 64 end in a
// shorter subsection). Every build is checked against a direct convolution
// over random and full-scale samples, with stalls and a reset.
module tb_hybrid_fir_orders;
  localparam int unsigned NC = 5;
  localparam int unsigned TAPS [NC] = '{9, 17, 33, 65, 129};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic done [NC];
  int c_checks [NC], c_fail [NC], c_stalls [NC], c_resets [NC], c_nsec [NC], c_uneven [NC];

  for (genvar c = 0; c < NC; c++) begin : g_case
    tb_fir_case #(.NTAPS(TAPS[c]), .M(3), .VARIED(1'b0), .SEED(100 + c), .NSAMP(1500)) u (
      .clk, .done(done[c]), .checks(c_checks[c]), .failures(c_fail[c]), .stalls(c_stalls[c]),
      .resets(c_resets[c]), .nsec_out(c_nsec[c]), .uneven(c_uneven[c]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Let every case clear its done flag before waiting on it.
    repeat (2) @(posedge clk);
    for (int c = 0; c < NC; c++) wait (done[c]);
    for (int c = 0; c < NC; c++) begin
      $display("order %0d: %0d subsections, %0d checks, %0d failures, %0d stalls",
               TAPS[c] - 1, c_nsec[c], c_checks[c], c_fail[c], c_stalls[c]);
      checks += c_checks[c] + 1;
      failures += c_fail[c];
      if (c_nsec[c] != int'((TAPS[c] + 2) / 3) || c_stalls[c] == 0 || c_resets[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
