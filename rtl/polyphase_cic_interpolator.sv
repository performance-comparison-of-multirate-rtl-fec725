// polyphase_cic_interpolator -- polyphase CIC expander with a commutator.
//
// The CIC response h (taps of [(1 - z^-RM)/(1 - z^-1)]^N, length
// L = N(RM-1)+1) is split into R polyphase sub-filters
//   H_p(z) = sum_j h[jR + p] z^-j,  p = 0..R-1,
// so that H(z) = sum_p z^-p H_p(z^R).  By the noble identities the
// upsampler moves behind the sub-filters: all R sub-filters see the input
// at the low rate, and a commutator picks sub-filter p for output phase p
// instead of adding zero-stuffed branches.  Taps are constants realised
// with shifts and adds (shift_add_mult); the tap values are evaluated at
// elaboration time, so any N, R and M are supported.
//
// Interface: as cic_interpolator.  `in_ready` is high in phase 0; an input
// is taken when `in_valid` and `in_ready` are both high, and that step and
// the R-1 following clocks emit y[kR+p] = sum_j h[jR+p] x[k-j], p = 0..R-1.
// No input in phase 0 stalls the filter.  The output stream is
// bit-identical to cic_interpolator with the same parameters.
// Timing: the clock edge of a step registers its output, so `out_valid` is
// high in the following cycle; there is no output back-pressure.
//
// The polyphase decomposition and the commutator follow the document,
// which draws the case R = 2; the generalisation to any R, the handshake
// and the reset are this design's choices.
module polyphase_cic_interpolator
  import cic_pkg::*;
#(
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned N      = DEF_STAGES,
  parameter int unsigned R      = DEF_INT_R,
  parameter int unsigned M      = DEF_DIFF_M,
  localparam int unsigned OUT_W = cic_out_width(IN_W, N, R, M),
  localparam int unsigned L     = cic_num_taps(N, R, M),
  localparam int unsigned T     = (L + R - 1) / R,   // taps per sub-filter
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
  logic [CW-1:0]           phase;
  logic                    take, step;
  logic signed [IN_W-1:0]  xd_q [T];      // low-rate input history, [0] newest
  logic signed [IN_W-1:0]  taps [T];      // x[k], x[k-1], ... for this step
  logic signed [OUT_W-1:0] prod [R][T];
  logic signed [OUT_W-1:0] branch [R];
  logic signed [OUT_W-1:0] commutated;

  assign in_ready = (phase == '0);
  assign take     = in_valid && in_ready;
  assign step     = take || (phase != '0);

  rate_counter #(.R(R)) u_rate (
    .clk, .rst_n, .en(step), .count(phase), .last()
  );

  // In phase 0 the new sample is still at the input, later it is in xd_q[0].
  assign taps[0] = take ? in_data : xd_q[0];
  for (genvar j = 1; j < T; j++) begin : g_taps
    assign taps[j] = take ? xd_q[j-1] : xd_q[j];
  end

  // Sub-filters H_p.
  for (genvar p = 0; p < R; p++) begin : g_branch
    for (genvar j = 0; j < T; j++) begin : g_tap
      localparam longint unsigned C = cic_coef(N, R, M, j*R + p);
      if (C != 0) begin : g_nz
        shift_add_mult #(.IN_W(IN_W), .OUT_W(OUT_W), .COEF(C)) u_m (
          .din(taps[j]), .dout(prod[p][j])
        );
      end else begin : g_z
        assign prod[p][j] = '0;   // tap beyond the end of the response
      end
    end
    always_comb begin
      branch[p] = '0;
      for (int j = 0; j < int'(T); j++) branch[p] = branch[p] + prod[p][j];
    end
  end

  // Commutator: output phase p takes sub-filter p.
  always_comb begin
    commutated = branch[0];
    for (int p = 1; p < int'(R); p++)
      if (phase == CW'(p)) commutated = branch[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(T); j++) xd_q[j] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= step;
      if (step) out_data <= commutated;
      if (take) begin
        xd_q[0] <= in_data;
        for (int j = 1; j < int'(T); j++) xd_q[j] <= xd_q[j-1];
      end
    end
  end

  initial assert (N >= 1 && R >= 2)
    else $error("polyphase_cic_interpolator: need N >= 1 and R >= 2");
endmodule
