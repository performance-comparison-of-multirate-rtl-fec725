// multirate_cic_top -- multirate compressor and expander, each in two
// multiplier-less CIC structures.
//
// Compressor (decimate by DEC_R, default 8): the recursive Hogenauer CIC
// decimator and the non-recursive polyphase CIC decimator share one input
// stream.  Expander (interpolate by INT_R, default 3): the recursive CIC
// interpolator and the polyphase CIC interpolator share one input stream.
// Both structures of a pair compute the same transfer function,
// [(1 - z^-RM)/(1 - z^-1)]^N, bit for bit; they differ in how the work is
// spread over the two sample rates, which is what the pair is built to
// compare.  All four filters use N stages and differential delay M.
//
// Interface:
//   dec_in_valid/dec_in_data  one compressor input sample per valid clock.
//   cic_dec_out_*, pp_dec_out_*  one output per DEC_R inputs; the recursive
//       one is registered by the edge that takes the block's last input,
//       the polyphase one log2(DEC_R) - 1 edges later.
//   int_in_valid/int_in_ready/int_in_data  expander input, taken when both
//       valid and ready are high (ready is high once every INT_R output
//       clocks); no input when ready is high stalls both expanders.
//   cic_int_out_*, pp_int_out_*  one output per clock while running, each
//       registered by the edge that makes its step, so the two streams line
//       up cycle for cycle.
// Each expander has its own phase counter; both see the same valid, so
// their ready signals are equal and the top exports the recursive one (an
// assertion checks the other).
module multirate_cic_top
  import cic_pkg::*;
#(
  parameter int unsigned IN_W  = DEF_IN_W,
  parameter int unsigned N     = DEF_STAGES,
  parameter int unsigned DEC_R = DEF_DEC_R,
  parameter int unsigned INT_R = DEF_INT_R,
  parameter int unsigned M     = DEF_DIFF_M,
  localparam int unsigned DEC_W = cic_out_width(IN_W, N, DEC_R, M),
  localparam int unsigned INT_W = cic_out_width(IN_W, N, INT_R, M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // compressor
  input  logic                    dec_in_valid,
  input  logic signed [IN_W-1:0]  dec_in_data,
  output logic                    cic_dec_out_valid,
  output logic signed [DEC_W-1:0] cic_dec_out_data,
  output logic                    pp_dec_out_valid,
  output logic signed [DEC_W-1:0] pp_dec_out_data,
  // expander
  input  logic                    int_in_valid,
  output logic                    int_in_ready,
  input  logic signed [IN_W-1:0]  int_in_data,
  output logic                    cic_int_out_valid,
  output logic signed [INT_W-1:0] cic_int_out_data,
  output logic                    pp_int_out_valid,
  output logic signed [INT_W-1:0] pp_int_out_data
);
  logic pp_int_ready;

  cic_decimator #(.IN_W(IN_W), .N(N), .R(DEC_R), .M(M)) u_cic_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_data(dec_in_data),
    .out_valid(cic_dec_out_valid), .out_data(cic_dec_out_data)
  );

  polyphase_cic_decimator #(.IN_W(IN_W), .N(N), .R(DEC_R)) u_pp_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_data(dec_in_data),
    .out_valid(pp_dec_out_valid), .out_data(pp_dec_out_data)
  );

  cic_interpolator #(.IN_W(IN_W), .N(N), .R(INT_R), .M(M)) u_cic_int (
    .clk, .rst_n,
    .in_valid(int_in_valid), .in_ready(int_in_ready), .in_data(int_in_data),
    .out_valid(cic_int_out_valid), .out_data(cic_int_out_data)
  );

  polyphase_cic_interpolator #(.IN_W(IN_W), .N(N), .R(INT_R), .M(M)) u_pp_int (
    .clk, .rst_n,
    .in_valid(int_in_valid), .in_ready(pp_int_ready), .in_data(int_in_data),
    .out_valid(pp_int_out_valid), .out_data(pp_int_out_data)
  );

  // The two expanders step in lock-step.
  always_comb begin
    if (rst_n) a_ready_match: assert final (pp_int_ready == int_in_ready)
      else $error("multirate_cic_top: expander phase counters disagree");
  end

  initial assert (M == 1)
    else $error("multirate_cic_top: the polyphase decimator needs M = 1");
endmodule
