// tb_polyphase_cic_decimator -- self-checking testbench for polyphase_cic_decimator.
//
// Feeds the same 512-sample input stream (random samples plus full-scale
// positive and negative runs that drive the largest bit growth) into
// 3 instances with different stage counts and differential delays, with
// random gaps in in_valid.  The expected output is computed independently
// of the filter structure: the input is passed through N cascaded moving
// sums of length R*M and every R-th value (index m*R + R - 1) is kept.
// Checks: every output value, the output count, and the latency
// (out_valid rises $clog2(R) - 1 clock edge(s) after the edge that takes the R-th
// input of each block).
module tb_polyphase_cic_decimator;
  localparam int IN_W  = 16;
  localparam int R     = 8;
  localparam int NSAMP = 512;
  localparam int NCFG  = 3;
  localparam int NS [NCFG] = '{1, 2, 3};
  localparam int MS [NCFG] = '{1, 1, 1};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                   in_valid = 1'b0;
  logic signed [IN_W-1:0] in_data  = '0;
  longint xs     [NSAMP];
  int     in_cyc [NSAMP];
  int     checks = 0, failures = 0;
  bit     done = 1'b0;

  // Cascade of `stages` moving sums of length `len`, evaluated at index n.
  function automatic longint mov(int n, int stages, int len);
    longint s = 0;
    if (n < 0) return 0;
    if (stages == 0) return xs[n];
    for (int i = 0; i < len; i++) s += mov(n - i, stages - 1, len);
    return s;
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N  = NS[c];
    localparam int M  = MS[c];
    localparam int OW = IN_W + N * $clog2(R);
    localparam int LAT = $clog2(R) - 1;
    logic                 ov;
    logic signed [OW-1:0] od;
    int nout = 0;

    polyphase_cic_decimator #(.IN_W(IN_W), .N(N), .R(R)) u_dut (
      .clk, .rst_n, .in_valid, .in_data, .out_valid(ov), .out_data(od)
    );

    always @(negedge clk) begin
      if (rst_n && ov) begin
        longint exp_v;
        int     idx;
        idx   = nout * R + R - 1;
        exp_v = mov(idx, N, R * M);
        checks++;
        if (longint'(od) != exp_v) begin
          failures++;
          $display("FAIL cfg %0d (N=%0d M=%0d) out %0d: got %0d expected %0d",
                   c, N, M, nout, longint'(od), exp_v);
        end
        checks++;
        if (cycle != in_cyc[idx] + LAT) begin
          failures++;
          $display("FAIL cfg %0d out %0d: at cycle %0d, last input at %0d, %0d edges expected",
                   c, nout, cycle, in_cyc[idx], LAT);
        end
        nout++;
      end
    end

    initial begin
      wait (done);
      checks++;
      if (nout != NSAMP / R) begin
        failures++;
        $display("FAIL cfg %0d: %0d outputs, expected %0d", c, nout, NSAMP / R);
      end
    end
  end

  initial begin
    for (int i = 0; i < NSAMP; i++) begin
      if (i >= NSAMP / 4 && i < NSAMP / 4 + 48)           xs[i] = 32767;
      else if (i >= NSAMP / 2 && i < NSAMP / 2 + 48)      xs[i] = -32768;
      else xs[i] = longint'($signed(16'($urandom)));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int idx = 0; idx < NSAMP; ) begin
      @(negedge clk);
      if (idx > 40 && $urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        in_data  = 16'($urandom);
      end else begin
        in_valid    = 1'b1;
        in_data     = IN_W'(xs[idx]);
        in_cyc[idx] = cycle + 1;
        idx++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    done = 1'b1;
    #1;
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
