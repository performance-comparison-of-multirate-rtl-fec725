// cic_integrator -- one integrator section of a CIC filter.
//
// A single-pole recursive filter with unity feedback, H(z) = 1/(1 - z^-1),
// i.e. y[n] = y[n-1] + x[n]: the adder output is the stage output and a
// register feeds it back (one delay element and one adder, as in the
// document).  The register advances only when `en` is high, so the stage can
// run at any sample rate derived from `clk`.
//
// Timing: `dout` is combinational from `din` and the stored sum; on a clock
// edge with `en` high the register takes the new sum.  Arithmetic wraps
// modulo 2^W (two's complement), which is correct for CIC filters whose
// final output width covers the filter gain.  Reset (asynchronous, active
// low) clears the sum; the reset style is this design's choice.
module cic_integrator #(
  parameter int unsigned W = 25
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  logic signed [W-1:0] acc_q;

  assign dout = acc_q + din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= dout;
  end
endmodule
