// tb_matrix_mcm: self-checking test of the matrix MCM block.
//
// Two instances: the default nine-tap, three-by-three matrix, and one with
// an uneven partition (rows of 2, 4 and 3 coefficients) and test-chosen
// coefficients. The tap each coefficient must use is written out here by
// hand from the structure (row k shifts its taps down by k), and every
// product is compared with random and full-scale tap values.
module tb_matrix_mcm;
  import hybrid_fir_pkg::*;

  localparam int unsigned NIN = 7;
  localparam int unsigned SEC_B [3] = '{2, 4, 3};
  localparam logic signed [15:0] COEF_B [9] =
    '{16'sd3, -16'sd7, 16'sd32767, -16'sd32768, 16'sd1, 16'sd0, 16'sd1234, -16'sd999, 16'sd77};
  // Tap used by coefficient j.
  localparam int TAP_A [9] = '{0, 1, 2, 2, 3, 4, 4, 5, 6};
  localparam int TAP_B [9] = '{0, 1, 1, 2, 3, 4, 4, 5, 6};

  logic signed [15:0] tap [NIN];
  logic signed [31:0] prod_a [9];
  logic signed [31:0] prod_b [9];
  int checks = 0, failures = 0;

  matrix_mcm u_a (.tap(tap), .prod(prod_a));
  matrix_mcm #(.NSEC(3), .SEC_LEN(SEC_B), .COEFS(COEF_B)) u_b (.tap(tap), .prod(prod_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int d = 0; d < NIN; d++) begin
        case (n)
          0: tap[d] = -16'sd32768;
          1: tap[d] = 16'sd32767;
          default: tap[d] = 16'($urandom);
        endcase
      end
      #1;
      for (int j = 0; j < 9; j++) begin
        longint ea, eb;
        ea = longint'(DEF_COEFS[j]) * longint'(tap[TAP_A[j]]);
        eb = longint'(COEF_B[j]) * longint'(tap[TAP_B[j]]);
        checks += 2;
        if (longint'(prod_a[j]) != ea) begin
          failures++;
          if (failures < 10) $display("A n=%0d j=%0d got %0d expected %0d", n, j, prod_a[j], ea);
        end
        if (longint'(prod_b[j]) != eb) begin
          failures++;
          if (failures < 10) $display("B n=%0d j=%0d got %0d expected %0d", n, j, prod_b[j], eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
