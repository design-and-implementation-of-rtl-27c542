// hybrid_fir: hybrid form FIR filter with variable-size partitioning.
//
// y[n] = sum_{j=0}^{NTAPS-1} COEFS[j] * x[n-j], computed by a structure
// between the direct form and the transposed direct form. The taps are
// partitioned into NSEC subsections whose lengths SEC_LEN[k] may differ.
// Inside a subsection the products are summed in direct form; between
// subsections the partial sum passes through one register on the output
// branch, as in the transposed form. Because each later subsection gets
// one extra output-branch delay, its input-branch delays can be one fewer:
// coefficient j of subsection k multiplies x[n-(j-k)], and the last tap of
// a subsection and the first tap of the next share one delay-line node.
// The filter therefore has NTAPS-NSEC input registers (tap_delay_line),
// NSEC-1 wide output registers (filter_subsection), and one matrix MCM
// block (matrix_mcm) for all products. One subsection of NTAPS taps is the
// direct form; NTAPS subsections of one tap is the transposed form.
//
// The default is the eighth-order example structure: nine taps in three
// subsections of three. The partitioning is fixed when the filter is
// built. Word lengths, the default coefficients (a Q15 low-pass, see
// hybrid_fir_pkg), the sample strobe and the reset are this design's own
// choices.
//
// Interface and timing: one sample is accepted on each rising clock edge
// with in_valid high; with in_valid low every register holds (a stall).
// y_out is full precision (no rounding or overflow possible) and is valid
// in the same cycle as the sample that produced it (out_valid = in_valid):
// the path from x_in to y_out is combinational through the first
// subsection, exactly as in the structure's output branch. rst_n is an
// asynchronous active-low reset that empties the filter history.
module hybrid_fir
  import hybrid_fir_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter int unsigned NTAPS  = DEF_NTAPS,
  parameter int unsigned NSEC   = DEF_NSEC,
  parameter int unsigned SEC_LEN [NSEC] = DEF_SEC_LEN,
  parameter logic signed [COEF_W-1:0] COEFS [NTAPS] = DEF_COEFS,
  localparam int unsigned PROD_W = DATA_W + COEF_W,
  localparam int unsigned OUT_W  = PROD_W + $clog2(NTAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y_out
);

  localparam int unsigned DEPTH = NTAPS - NSEC;

  // First coefficient index of subsection k.
  function automatic int unsigned sec_start(int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < k; j++) s += SEC_LEN[j];
    return s;
  endfunction

  function automatic bit lens_valid();
    for (int unsigned k = 0; k < NSEC; k++)
      if (SEC_LEN[k] == 0) return 1'b0;
    return sec_start(NSEC) == NTAPS;
  endfunction

  if (NSEC == 0 || NSEC > NTAPS || !lens_valid()) begin : g_bad_partition
    $error("hybrid_fir: SEC_LEN must hold NSEC nonzero lengths summing to NTAPS");
  end

  // Shared input branch.
  logic signed [DATA_W-1:0] tap [DEPTH+1];

  tap_delay_line #(
    .W     (DATA_W),
    .DEPTH (DEPTH)
  ) u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (in_valid),
    .x_in  (x_in),
    .tap   (tap)
  );

  // All products of the coefficient matrix.
  logic signed [PROD_W-1:0] prod [NTAPS];

  matrix_mcm #(
    .DATA_W  (DATA_W),
    .COEF_W  (COEF_W),
    .NTAPS   (NTAPS),
    .NSEC    (NSEC),
    .SEC_LEN (SEC_LEN),
    .COEFS   (COEFS)
  ) u_mcm (
    .tap  (tap),
    .prod (prod)
  );

  // Output branch: subsection k adds its products to the (registered)
  // partial sum of subsection k+1.
  logic signed [OUT_W-1:0] sec_sum [NSEC];

  for (genvar k = 0; k < NSEC; k++) begin : g_sec
    localparam int unsigned START = sec_start(k);
    localparam int unsigned LEN   = SEC_LEN[k];

    logic signed [PROD_W-1:0] sec_prod [LEN];
    logic signed [OUT_W-1:0]  sum_in;

    for (genvar i = 0; i < LEN; i++) begin : g_p
      assign sec_prod[i] = prod[START+i];
    end

    if (k == NSEC - 1) begin : g_last
      assign sum_in = '0;
    end else begin : g_mid
      assign sum_in = sec_sum[k+1];
    end

    filter_subsection #(
      .PROD_W  (PROD_W),
      .ACC_W   (OUT_W),
      .LEN     (LEN),
      .REG_OUT (k != 0)
    ) u_sec (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (in_valid),
      .prod    (sec_prod),
      .sum_in  (sum_in),
      .sum_out (sec_sum[k])
    );
  end

  assign y_out     = sec_sum[0];
  assign out_valid = in_valid;

endmodule
