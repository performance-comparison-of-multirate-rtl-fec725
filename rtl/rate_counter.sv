// rate_counter -- modulo-R sample counter that drives a rate change switch.
//
// Counts the samples presented with `en` from 0 to R-1 and wraps.  `count`
// is the phase of the current sample; `last` is high when the current
// sample is the last one of a group of R (en high and count == R-1).  A
// decimator keeps the sample at `last`; an interpolator takes a new input
// at count 0 and fills the other R-1 phases with zeros or other branches.
//
// Timing: `count` is registered and changes on the clock edge after an
// `en` cycle; `last` is combinational.  Reset (asynchronous, active low,
// this design's choice) sets the count to 0.
module rate_counter #(
  parameter int unsigned R  = 8,
  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [CW-1:0] count,
  output logic          last
);
  logic [CW-1:0] cnt_q;

  assign count = cnt_q;
  assign last  = en && (cnt_q == CW'(R - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt_q <= '0;
    else if (last) cnt_q <= '0;
    else if (en)   cnt_q <= cnt_q + 1'b1;
  end

  initial assert (R >= 2) else $error("rate_counter: R must be at least 2");
endmodule
