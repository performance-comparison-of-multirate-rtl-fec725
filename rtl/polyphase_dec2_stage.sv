// polyphase_dec2_stage -- one decimate-by-2 stage of the non-recursive CIC,
// in polyphase form.
//
// The stage filters with (1 + z^-1)^N (taps C(N,k), k = 0..N) and keeps every
// second sample.  The filter is split into its two polyphase branches:
// H0 holds the even taps and is fed with the odd-indexed input samples
// (the current sample), H1 holds the odd taps and is fed with the
// even-indexed samples (the z^-1 path).  Both branches run at the output
// rate and their sum is the stage output, so no product is ever computed
// that the downsampler would throw away.  Constant taps are realised with
// shifts and adds (shift_add_mult).
//
// Interface: one input sample per clock with `in_valid` high.  Samples
// alternate even, odd, even, ... starting with even after reset.  On each
// odd sample the stage computes
//   y[n] = sum_j h[2j] x[2n+1-2j] + sum_j h[2j+1] x[2n-2j]
// and registers it: `out_valid` pulses the clock after the odd sample.
// The output grows by N bits (gain 2^N).
//
// The polyphase split and the cascade of (1+z^-1)^N stages follow the
// document; the sample phase, register placement and reset are this
// design's choices.
module polyphase_dec2_stage
  import cic_pkg::*;
#(
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned N      = DEF_STAGES,
  localparam int unsigned OUT_W = IN_W + N,
  localparam int unsigned N0    = N / 2 + 1,     // taps of H0 (even taps)
  localparam int unsigned N1    = (N + 1) / 2,   // taps of H1 (odd taps)
  localparam int unsigned OD    = (N0 > 1) ? N0 - 1 : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  logic [0:0]              phase;
  logic                    odd_in, even_in;
  logic signed [IN_W-1:0]  ev_q [N1];   // even-sample history, [0] newest
  logic signed [IN_W-1:0]  od_q [OD];   // odd-sample history, [0] newest
  logic signed [IN_W-1:0]  tap0 [N0];   // inputs of H0
  logic signed [OUT_W-1:0] prod0 [N0];
  logic signed [OUT_W-1:0] prod1 [N1];
  logic signed [OUT_W-1:0] y;

  rate_counter #(.R(2)) u_phase (
    .clk, .rst_n, .en(in_valid), .count(phase), .last(odd_in)
  );
  assign even_in = in_valid && (phase == 1'b0);

  // H0: even taps on the current odd sample and older odd samples.
  assign tap0[0] = in_data;
  for (genvar j = 1; j < N0; j++) begin : g_tap0
    assign tap0[j] = od_q[j-1];
  end
  for (genvar j = 0; j < N0; j++) begin : g_h0
    shift_add_mult #(.IN_W(IN_W), .OUT_W(OUT_W), .COEF(binom(N, 2*j))) u_m (
      .din(tap0[j]), .dout(prod0[j])
    );
  end

  // H1: odd taps on the even samples (the z^-1 branch).
  for (genvar j = 0; j < N1; j++) begin : g_h1
    shift_add_mult #(.IN_W(IN_W), .OUT_W(OUT_W), .COEF(binom(N, 2*j+1))) u_m (
      .din(ev_q[j]), .dout(prod1[j])
    );
  end

  always_comb begin
    y = '0;
    for (int j = 0; j < int'(N0); j++) y = y + prod0[j];
    for (int j = 0; j < int'(N1); j++) y = y + prod1[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(N1); j++) ev_q[j] <= '0;
      for (int j = 0; j < int'(OD); j++) od_q[j] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= odd_in;
      if (even_in) begin
        ev_q[0] <= in_data;
        for (int j = 1; j < int'(N1); j++) ev_q[j] <= ev_q[j-1];
      end
      if (odd_in) begin
        od_q[0] <= in_data;
        for (int j = 1; j < int'(OD); j++) od_q[j] <= od_q[j-1];
        out_data <= y;
      end
    end
  end

  initial assert (N >= 1) else $error("polyphase_dec2_stage: N must be at least 1");
endmodule
