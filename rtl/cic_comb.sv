// cic_comb -- one comb (differentiator) section of a CIC filter.
//
// y[n] = x[n] - x[n-D]: the input minus the input delayed by D samples, with
// D the differential delay (the document's M, 1 in its evaluated
// configuration).  The delay line is a D-deep shift register that advances
// only when `en` is high, so in a decimator it runs at the low output rate
// and needs only D registers instead of R*D.
//
// Timing: `dout` is combinational from `din` and the delay line; on a clock
// edge with `en` high `din` enters the delay line.  Arithmetic wraps modulo
// 2^W.  Reset (asynchronous, active low, this design's choice) clears the
// delay line, which equals an all-zero input history.
module cic_comb #(
  parameter int unsigned W = 25,
  parameter int unsigned D = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  logic signed [W-1:0] dly_q [D];

  assign dout = din - dly_q[D-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(D); i++) dly_q[i] <= '0;
    end else if (en) begin
      dly_q[0] <= din;
      for (int i = 1; i < int'(D); i++) dly_q[i] <= dly_q[i-1];
    end
  end

  initial assert (D >= 1) else $error("cic_comb: D must be at least 1");
endmodule
