// polyphase_cic_decimator -- non-recursive polyphase CIC compressor.
//
// For differential delay 1 and R = 2^J the CIC response factors as
//   H(z) = prod_{i=0}^{J-1} (1 + z^-(2^i))^N,
// and by the noble identities each factor becomes a (1 + z^-1)^N filter
// followed by a decimate-by-2, running at its own, successively halved,
// rate.  The module is a cascade of J polyphase_dec2_stage blocks; there are
// no integrators, so the word grows by only N bits per stage and the
// output is IN_W + N*log2(R) bits, the same as the recursive structure.
//
// Interface: as cic_decimator.  One input sample per clock with `in_valid`
// high; output sample m is the CIC response at input index m*R + R - 1,
// bit-identical to cic_decimator with the same N and R.
// Timing: each stage registers its output, so `out_valid` pulses J-1 clocks
// later than in cic_decimator, i.e. J-1 clock edges after the edge that
// takes the R-th input sample of a block (2 for R = 8).
//
// The factorisation and the polyphase stages follow the document; the
// restriction to M = 1 and R a power of two is where the factorisation
// holds.  Handshake and reset are this design's choices.
module polyphase_cic_decimator
  import cic_pkg::*;
#(
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned N      = DEF_STAGES,
  parameter int unsigned R      = DEF_DEC_R,
  localparam int unsigned J     = $clog2(R),
  localparam int unsigned OUT_W = IN_W + N * J
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  logic                    v   [J+1];
  logic signed [OUT_W-1:0] d   [J+1];

  assign v[0] = in_valid;
  assign d[0] = OUT_W'(in_data);

  for (genvar s = 0; s < J; s++) begin : g_stage
    localparam int unsigned SW = IN_W + N * s;
    logic signed [SW+N-1:0] so;
    polyphase_dec2_stage #(.IN_W(SW), .N(N)) u_stage (
      .clk, .rst_n,
      .in_valid(v[s]), .in_data(d[s][SW-1:0]),
      .out_valid(v[s+1]), .out_data(so)
    );
    assign d[s+1] = OUT_W'(so);
  end

  assign out_valid = v[J];
  assign out_data  = d[J];

  initial assert ((1 << J) == R && R >= 2)
    else $error("polyphase_cic_decimator: R must be a power of two");
endmodule
