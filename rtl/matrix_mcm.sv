// matrix_mcm: the single multiple-constant-multiplication block of the
// hybrid form FIR filter.
//
// The filter's coefficients form a matrix: row k holds the SEC_LEN[k]
// coefficients of subsection k. Coefficient j, at position i of row k,
// multiplies delay-line tap j-k (the input sample delayed by j-k), because
// each earlier subsection shares one delay node with its neighbour. So
// one tap can feed two coefficients (the last of row k and the first of
// row k+1), and all products come from one block that sees the whole
// matrix, leaving synthesis free to share partial products between rows
// and columns. How the constant multiplications are decomposed into
// shifts and adds is left to synthesis here: each product is written as a
// multiplication by a constant, the simplest form that gives the function.
//
// Interface: purely combinational. tap[d] = x[n-d], d = 0..NTAPS-NSEC.
// prod[j] = COEFS[j] * tap[j - k(j)], full precision (DATA_W+COEF_W bits).
module matrix_mcm
  import hybrid_fir_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter int unsigned NTAPS  = DEF_NTAPS,
  parameter int unsigned NSEC   = DEF_NSEC,
  parameter int unsigned SEC_LEN [NSEC] = DEF_SEC_LEN,
  parameter logic signed [COEF_W-1:0] COEFS [NTAPS] = DEF_COEFS,
  localparam int unsigned NIN    = NTAPS - NSEC + 1,
  localparam int unsigned PROD_W = DATA_W + COEF_W
) (
  input  logic signed [DATA_W-1:0] tap  [NIN],
  output logic signed [PROD_W-1:0] prod [NTAPS]
);

  // Row (subsection) that coefficient j belongs to.
  function automatic int unsigned row_of(int unsigned j);
    int unsigned start = 0;
    for (int unsigned k = 0; k < NSEC; k++) begin
      if (j < start + SEC_LEN[k]) return k;
      start += SEC_LEN[k];
    end
    return NSEC - 1;
  endfunction

  for (genvar j = 0; j < NTAPS; j++) begin : g_coef
    localparam int unsigned TAP = j - row_of(j);
    localparam logic signed [COEF_W-1:0] C = COEFS[j];
    assign prod[j] = PROD_W'(tap[TAP]) * PROD_W'(C);
  end

endmodule
