// tb_fir_case: one self-checking run of a hybrid_fir configuration, used by
// the filter-level testbenches.
//
// The filter has NTAPS taps. With VARIED = 0 the subsections are M taps
// long (the last one takes the remainder); with VARIED = 1 their lengths
// cycle through M-1, M+1, M (never below 1), so neighbouring subsections
// differ in length. Coefficients are pseudo-random 16-bit values from SEED,
// with full-scale values at both ends. The stimulus has random samples,
// full-scale samples, stalls (in_valid low) and resets in mid-stream; each
// output is compared with a direct convolution of the accepted samples.
// Outputs report the counts once done rises.
module tb_fir_case #(
  parameter int unsigned NTAPS  = 9,
  parameter int unsigned M      = 3,
  parameter bit          VARIED = 1'b0,
  parameter int unsigned SEED   = 1,
  parameter int unsigned NSAMP  = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   resets,
  output int   nsec_out,
  output int   uneven
);
  localparam int unsigned DATA_W = 16;
  localparam int unsigned COEF_W = 16;

  function automatic int unsigned len_at(int unsigned k);
    int unsigned l;
    if (!VARIED) return M;
    case (k % 3)
      0:       l = (M > 1) ? M - 1 : 1;
      1:       l = M + 1;
      default: l = M;
    endcase
    return l;
  endfunction

  function automatic int unsigned count_sec();
    int unsigned left = NTAPS, k = 0;
    while (left > 0) begin
      left -= (len_at(k) < left) ? len_at(k) : left;
      k++;
    end
    return k;
  endfunction

  localparam int unsigned NSEC = count_sec();
  typedef int unsigned len_t [NSEC];
  typedef logic signed [COEF_W-1:0] coef_t [NTAPS];

  function automatic len_t make_lens();
    len_t l;
    int unsigned left = NTAPS;
    for (int unsigned k = 0; k < NSEC; k++) begin
      l[k] = (len_at(k) < left) ? len_at(k) : left;
      left -= l[k];
    end
    return l;
  endfunction

  function automatic coef_t make_coefs();
    coef_t c;
    int unsigned s = SEED * 32'd2654435761 + 32'd12345;
    for (int unsigned j = 0; j < NTAPS; j++) begin
      s = s * 32'd1103515245 + 32'd12345;
      c[j] = COEF_W'(s >> 11);
    end
    c[0] = -16'sd32768;
    c[NTAPS-1] = 16'sd32767;
    return c;
  endfunction

  localparam len_t  LENS  = make_lens();
  localparam coef_t COEFS = make_coefs();
  localparam int unsigned OUT_W = DATA_W + COEF_W + $clog2(NTAPS);

  logic rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [OUT_W-1:0]  y_out;
  longint hist [NTAPS];

  hybrid_fir #(
    .NTAPS(NTAPS), .NSEC(NSEC), .SEC_LEN(LENS), .COEFS(COEFS)
  ) dut (.*);

  assign nsec_out = int'(NSEC);

  initial begin
    done = 1'b0; checks = 0; failures = 0; stalls = 0; resets = 0; uneven = 0;
    for (int k = 1; k < NSEC; k++) if (LENS[k] != LENS[0]) uneven = 1;
    for (int j = 0; j < NTAPS; j++) hist[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      longint exp;
      @(negedge clk);
      if (n == NSAMP / 2) begin
        rst_n = 1'b0;
        resets++;
        for (int j = 0; j < NTAPS; j++) hist[j] = 0;
        #1 rst_n = 1'b1;
      end
      in_valid = ($urandom_range(4) != 0);
      if (!in_valid) stalls++;
      if (n < 2 * NTAPS)      x_in = (n < NTAPS) ? -16'sd32768 : 16'sd32767;
      else if (n % 97 == 0)   x_in = 16'sd1;
      else                    x_in = DATA_W'($urandom);
      #1;
      if (in_valid) begin
        exp = longint'(COEFS[0]) * longint'(x_in);
        for (int j = 1; j < NTAPS; j++) exp += longint'(COEFS[j]) * hist[j-1];
        checks++;
        if (!out_valid || longint'(y_out) != exp) begin
          failures++;
          if (failures < 10)
            $display("NTAPS=%0d M=%0d n=%0d: y=%0d expected %0d", NTAPS, M, n, y_out, exp);
        end
      end
      @(posedge clk);
      if (in_valid) begin
        for (int j = NTAPS - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = longint'(x_in);
      end
    end
    done = 1'b1;
  end
endmodule
