// tap_delay_line: the shared input branch of the hybrid form FIR filter.
//
// A chain of DEPTH sample registers. tap[0] is the current input sample
// x[n] itself (no register), tap[d] is x[n-d]. In the hybrid structure
// neighbouring subsections share the node where one subsection's last tap
// and the next subsection's first tap meet, so a filter of NTAPS taps in
// NSEC subsections needs only NTAPS-NSEC registers here, not NTAPS-1.
//
// Interface: the chain shifts on a rising clock edge when en is high, so
// en is the sample strobe; with en low it holds. rst_n is an asynchronous,
// active-low reset that clears every register (design choice: a cleared
// history makes the filter start from rest). DEPTH = 0 is legal: tap[0]
// is then the only output and the module holds no state.
module tap_delay_line #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x_in,
  output logic signed [W-1:0] tap [DEPTH+1]
);

  // Sized at least 1 so that DEPTH = 0 (every subsection one tap long,
  // the transposed form) still elaborates; the spare entry is then unused.
  localparam int unsigned NREG = (DEPTH > 0) ? DEPTH : 1;
  logic signed [W-1:0] dly [NREG];

  assign tap[0] = x_in;

  for (genvar d = 0; d < DEPTH; d++) begin : g_stage
    logic signed [W-1:0] d_in;
    if (d == 0) begin : g_first
      assign d_in = x_in;
    end else begin : g_next
      assign d_in = dly[d-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  dly[d] <= '0;
      else if (en) dly[d] <= d_in;
    end
    assign tap[d+1] = dly[d];
  end

endmodule
