// tb_polyphase_cic_interpolator -- self-checking testbench for polyphase_cic_interpolator.
//
// Offers the same 120-sample input stream (random samples plus
// full-scale positive and negative runs) to 4 instances with different
// stage counts and differential delays.  in_valid is random, so the
// expander sometimes finds no input in phase 0 and must stall, and valid is
// sometimes high while ready is low (the sample must then not be taken).
// The expected output is computed independently of the filter structure:
// the input is upsampled by R with zeros and passed through N cascaded
// moving sums of length R*M.  Checks: every output value, the output count,
// ready agreeing across instances, and the timing (output k*R + p appears
// p clock edges after the edge that takes input k, i.e. output phase 0 is
// registered on that very edge).
module tb_polyphase_cic_interpolator;
  localparam int IN_W  = 16;
  localparam int R     = 3;
  localparam int NSAMP = 120;
  localparam int NCFG  = 4;
  localparam int NS [NCFG] = '{1, 2, 3, 2};
  localparam int MS [NCFG] = '{1, 1, 1, 2};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                   in_valid = 1'b0;
  logic signed [IN_W-1:0] in_data  = '0;
  logic                   ready0;
  longint xs     [NSAMP];
  int     in_cyc [NSAMP];
  int     checks = 0, failures = 0, stalls = 0;
  bit     done = 1'b0;

  // Zero-stuffed input passed through `stages` moving sums of length `len`.
  function automatic longint movu(int n, int stages, int len);
    longint s = 0;
    if (n < 0) return 0;
    if (stages == 0) return (n % R == 0 && n / R < NSAMP) ? xs[n / R] : 0;
    for (int i = 0; i < len; i++) s += movu(n - i, stages - 1, len);
    return s;
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N  = NS[c];
    localparam int M  = MS[c];
    localparam int OW = cic_pkg::cic_out_width(IN_W, N, R, M);
    logic                 ov, rdy;
    logic signed [OW-1:0] od;
    int nout = 0;

    polyphase_cic_interpolator #(.IN_W(IN_W), .N(N), .R(R), .M(M)) u_dut (
      .clk, .rst_n, .in_valid, .in_ready(rdy), .in_data,
      .out_valid(ov), .out_data(od)
    );

    always @(negedge clk) begin
      if (rst_n && rdy != ready0) begin
        failures++;
        $display("FAIL cfg %0d: in_ready differs from cfg 0", c);
      end
      if (rst_n && ov) begin
        longint exp_v;
        exp_v = movu(nout, N, R * M);
        checks++;
        if (longint'(od) != exp_v) begin
          failures++;
          $display("FAIL cfg %0d (N=%0d M=%0d) out %0d: got %0d expected %0d",
                   c, N, M, nout, longint'(od), exp_v);
        end
        checks++;
        if (cycle != in_cyc[nout / R] + nout % R) begin
          failures++;
          $display("FAIL cfg %0d out %0d: at cycle %0d, input taken at %0d",
                   c, nout, cycle, in_cyc[nout / R]);
        end
        nout++;
      end
    end

    initial begin
      wait (done);
      checks++;
      if (nout != NSAMP * R) begin
        failures++;
        $display("FAIL cfg %0d: %0d outputs, expected %0d", c, nout, NSAMP * R);
      end
    end
  end

  assign ready0 = g_cfg[0].rdy;

  initial begin
    for (int i = 0; i < NSAMP; i++) begin
      if (i >= NSAMP / 4 && i < NSAMP / 4 + 16)           xs[i] = 32767;
      else if (i >= NSAMP / 2 && i < NSAMP / 2 + 16)      xs[i] = -32768;
      else xs[i] = longint'($signed(16'($urandom)));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int idx = 0; idx < NSAMP; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = in_valid ? IN_W'(xs[idx]) : 16'($urandom);
      #1;
      if (ready0 && !in_valid) stalls++;
      if (ready0 && in_valid) begin
        in_cyc[idx] = cycle + 1;
        idx++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    done = 1'b1;
    #1;
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL no input stall was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
