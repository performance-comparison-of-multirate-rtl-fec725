// shift_add_mult -- multiplication by a constant with shifts and adds only.
//
// Computes dout = din * COEF for a non-negative elaboration-time constant
// COEF, as the sum of `din` shifted left by the position of every set bit of
// COEF.  No multiplier is used, which keeps the polyphase sub-filters
// multiplier-less like the rest of the CIC family.  Purely combinational.
// The product is sign-extended to OUT_W bits before shifting and wraps
// modulo 2^OUT_W.
module shift_add_mult #(
  parameter int unsigned    IN_W  = 16,
  parameter int unsigned    OUT_W = 25,
  parameter longint unsigned COEF = 3
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam int unsigned NB = 64;

  logic signed [OUT_W-1:0] din_ext;
  logic signed [OUT_W-1:0] part [NB];

  assign din_ext = OUT_W'(din);

  for (genvar b = 0; b < NB; b++) begin : g_bit
    if (b < OUT_W && COEF[b]) begin : g_on
      assign part[b] = din_ext <<< b;
    end else begin : g_off
      assign part[b] = '0;
    end
  end

  always_comb begin
    dout = '0;
    for (int b = 0; b < int'(NB); b++) dout = dout + part[b];
  end
endmodule
