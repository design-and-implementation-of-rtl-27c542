// tb_filter_subsection: self-checking test of one subsection's adder chain.
//
// A registered subsection (REG_OUT = 1) and a combinational one
// (REG_OUT = 0) get the same random products and incoming partial sum. The
// combinational sum is checked in the same cycle; the registered one one
// sample later, holding while en is low and clearing on reset.
module tb_filter_subsection;
  localparam int unsigned PROD_W = 32;
  localparam int unsigned ACC_W  = 36;
  localparam int unsigned LEN    = 3;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [PROD_W-1:0] prod [LEN];
  logic signed [ACC_W-1:0]  sum_in = '0;
  logic signed [ACC_W-1:0]  sum_reg, sum_comb;
  int checks = 0, failures = 0;
  longint held = 0;

  always #5 clk = ~clk;

  filter_subsection #(.PROD_W(PROD_W), .ACC_W(ACC_W), .LEN(LEN), .REG_OUT(1'b1)) u_reg (
    .clk, .rst_n, .en, .prod, .sum_in, .sum_out(sum_reg));
  filter_subsection #(.PROD_W(PROD_W), .ACC_W(ACC_W), .LEN(LEN), .REG_OUT(1'b0)) u_comb (
    .clk, .rst_n, .en, .prod, .sum_in, .sum_out(sum_comb));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < LEN; i++) prod[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 check("after reset", longint'(sum_reg), 0);
    for (int n = 0; n < 2000; n++) begin
      longint exp;
      @(negedge clk);
      if (n == 1000) begin
        rst_n = 1'b0;
        held = 0;
        #1 check("async reset", longint'(sum_reg), 0);
        rst_n = 1'b1;
      end
      check("registered sum", longint'(sum_reg), held);
      for (int i = 0; i < LEN; i++)
        prod[i] = (n < 4) ? ((n % 2) ? 32'sh7fffffff : 32'sh80000000) : PROD_W'($urandom);
      sum_in = (n < 4) ? ((n % 2) ? 36'sh7_ffff_ffff : 36'sh8_0000_0000) >>> 1 :
                         ACC_W'(signed'($urandom)) <<< 2;
      en = ($urandom_range(3) != 0);
      exp = longint'(sum_in);
      for (int i = 0; i < LEN; i++) exp += longint'(prod[i]);
      #1 check("combinational sum", longint'(sum_comb), exp);
      @(posedge clk);
      if (en) held = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
