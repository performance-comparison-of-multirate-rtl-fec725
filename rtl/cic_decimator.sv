// cic_decimator -- N-stage recursive CIC compressor (Hogenauer structure).
//
// H(z) = [(1 - z^-RM) / (1 - z^-1)]^N followed by downsampling by R.  The N
// integrators run at the input rate, a rate-change switch keeps every R-th
// integrator output, and the N combs (differential delay M, i.e. M
// registers each) run at the output rate.  Every internal word is
// OUT_W = IN_W + N*ceil(log2(R*M)) bits wide; wrap-around in the integrators
// cancels in the combs, so the output is exact.
//
// Interface: one input sample is taken on every clock with `in_valid` high
// (gaps are allowed).  Output sample m is the filter response at input index
// m*R + R - 1, i.e. the block of R inputs ending with the sample that made
// the counter wrap: y[m] = sum_k h[k] x[mR + R-1 - k], h the CIC impulse
// response, with an all-zero input history after reset.
// Timing: the clock edge that takes the R-th input sample of a block also
// registers the output, so `out_valid` is high for one clock in the cycle
// right after that sample was presented; `out_data` holds until the next
// pulse.
// The integrator chain and the comb chain are combinational between the
// input and the output register.
//
// Structure, rates and the output width formula follow the document; the
// valid handshake, the output phase, the reset and the common internal width
// are this design's choices.
module cic_decimator
  import cic_pkg::*;
#(
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned N      = DEF_STAGES,
  parameter int unsigned R      = DEF_DEC_R,
  parameter int unsigned M      = DEF_DIFF_M,
  localparam int unsigned OUT_W = cic_out_width(IN_W, N, R, M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  logic signed [OUT_W-1:0] integ [N+1];
  logic signed [OUT_W-1:0] comb  [N+1];
  logic                    dec_strobe;

  assign integ[0] = OUT_W'(in_data);

  // Integrator section at the input rate.
  for (genvar s = 0; s < N; s++) begin : g_int
    cic_integrator #(.W(OUT_W)) u_int (
      .clk, .rst_n, .en(in_valid), .din(integ[s]), .dout(integ[s+1])
    );
  end

  // Rate change switch: keep one sample out of R.
  rate_counter #(.R(R)) u_rate (
    .clk, .rst_n, .en(in_valid), .count(), .last(dec_strobe)
  );

  // Comb section at the output rate.
  assign comb[0] = integ[N];
  for (genvar s = 0; s < N; s++) begin : g_comb
    cic_comb #(.W(OUT_W), .D(M)) u_comb (
      .clk, .rst_n, .en(dec_strobe), .din(comb[s]), .dout(comb[s+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= dec_strobe;
      if (dec_strobe) out_data <= comb[N];
    end
  end

  initial assert (N >= 1) else $error("cic_decimator: N must be at least 1");
endmodule
