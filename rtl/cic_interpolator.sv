// cic_interpolator -- N-stage recursive CIC expander (Hogenauer structure).
//
// N combs (differential delay M) run at the input rate, a rate-change
// switch inserts R-1 zero samples after each comb output, and N integrators
// run at the R times higher output rate.  Every internal word is
// OUT_W = IN_W + N*ceil(log2(R*M)) bits wide, which covers the gain
// (R*M)^N / R, so the wrap-around in the integrators never shows at the
// output.
//
// Interface: the filter makes one output step per clock while it has data.
// `in_ready` is high in phase 0 of the rate counter; an input sample is
// taken when `in_valid` and `in_ready` are both high, and that step and the
// R-1 following clocks produce the R output samples that belong to it.  If
// no input is offered in phase 0 the filter stalls: no step, no output.
// Output sample n is y[n] = sum_k h[k] u[n-k], with u the input upsampled by
// R (u[jR] = x[j], zero elsewhere) and h the CIC impulse response.
// Timing: the clock edge of a step registers its output, so `out_valid` is
// high in the following cycle; there is no output back-pressure.
//
// Structure and rates follow the document; the handshake, the reset and
// the common internal width are this design's choices.
module cic_interpolator
  import cic_pkg::*;
#(
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned N      = DEF_STAGES,
  parameter int unsigned R      = DEF_INT_R,
  parameter int unsigned M      = DEF_DIFF_M,
  localparam int unsigned OUT_W = cic_out_width(IN_W, N, R, M),
  localparam int unsigned CW    = $clog2(R)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  logic signed [OUT_W-1:0] comb  [N+1];
  logic signed [OUT_W-1:0] integ [N+1];
  logic [CW-1:0]           phase;
  logic                    take, step;

  assign in_ready = (phase == '0);
  assign take     = in_valid && in_ready;
  assign step     = take || (phase != '0);

  rate_counter #(.R(R)) u_rate (
    .clk, .rst_n, .en(step), .count(phase), .last()
  );

  // Comb section at the input rate.
  assign comb[0] = OUT_W'(in_data);
  for (genvar s = 0; s < N; s++) begin : g_comb
    cic_comb #(.W(OUT_W), .D(M)) u_comb (
      .clk, .rst_n, .en(take), .din(comb[s]), .dout(comb[s+1])
    );
  end

  // Rate change switch: the comb output in phase 0, zeros in the others.
  assign integ[0] = take ? comb[N] : '0;

  // Integrator section at the output rate.
  for (genvar s = 0; s < N; s++) begin : g_int
    cic_integrator #(.W(OUT_W)) u_int (
      .clk, .rst_n, .en(step), .din(integ[s]), .dout(integ[s+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= step;
      if (step) out_data <= integ[N];
    end
  end

  initial assert (N >= 1) else $error("cic_interpolator: N must be at least 1");
endmodule
