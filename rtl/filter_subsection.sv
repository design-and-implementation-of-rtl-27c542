// filter_subsection: the output-branch part of one hybrid form subsection.
//
// A subsection of LEN taps adds its LEN products in a direct-form adder
// chain: the partial sum arriving from the next (later) subsection enters
// at the far end, picks up prod[LEN-1], then prod[LEN-2], and so on down to
// prod[0]. Every subsection except the first is followed on the output
// branch by one register (the "D" between subsections), which is what
// supplies the extra delay of the later taps; set REG_OUT for those. The
// first subsection (REG_OUT = 0) drives the filter output combinationally.
//
// Interface: prod are the subsection's products (from the MCM block),
// sum_in the partial sum of the later subsections (tie to zero for the
// last one). With REG_OUT = 1, sum_out is the registered sum, updated on a
// rising clock edge when en is high and cleared by the asynchronous,
// active-low rst_n; with REG_OUT = 0 it is the combinational sum and clk,
// en and rst_n are unused. Sums are sign-extended to ACC_W bits; ACC_W must
// hold the whole filter's sum so no stage can overflow.
module filter_subsection #(
  parameter int unsigned PROD_W  = 32,
  parameter int unsigned ACC_W   = 36,
  parameter int unsigned LEN     = 3,
  parameter bit          REG_OUT = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [PROD_W-1:0] prod [LEN],
  input  logic signed [ACC_W-1:0]  sum_in,
  output logic signed [ACC_W-1:0]  sum_out
);

  // chain[i] is the partial sum after the adder of tap i.
  logic signed [ACC_W-1:0] chain [LEN+1];

  assign chain[LEN] = sum_in;
  for (genvar i = LEN; i > 0; i--) begin : g_add
    assign chain[i-1] = chain[i] + ACC_W'(prod[i-1]);
  end

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  sum_out <= '0;
      else if (en) sum_out <= chain[0];
    end
  end else begin : g_comb
    assign sum_out = chain[0];
  end

endmodule
