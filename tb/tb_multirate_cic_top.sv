// tb_multirate_cic_top -- end-to-end testbench of the compressor/expander
// pair at its default configuration (16-bit input, N = 3 stages,
// compression by 8, expansion by 3, differential delay 1).
//
// The compressor half streams 1024 samples, with random gaps, into both
// decimators; the expander half offers 256 samples, with random valid, to
// both interpolators.  Expected values come from a model that does not
// share the filters' structure: N cascaded moving sums of length R*M, kept
// every R-th sample for compression and run on the zero-stuffed input for
// expansion.  Checks: every output of all four filters, that both
// structures of a pair agree, output counts, and timing (recursive
// decimator on the edge that takes a block's last input, polyphase one
// log2(8) - 1 = 2 edges later; both expanders emit output phase p p edges
// after the input is taken).  Each mechanism is counted and must occur at
// least once: compressor input gaps, output strobes of both decimators,
// expander stalls (ready without valid), offers refused while not ready,
// and bit growth beyond the input range at both outputs.
module tb_multirate_cic_top;
  import cic_pkg::*;
  localparam int IN_W  = DEF_IN_W;
  localparam int N     = DEF_STAGES;
  localparam int DEC_R = DEF_DEC_R;
  localparam int INT_R = DEF_INT_R;
  localparam int M     = DEF_DIFF_M;
  localparam int DEC_W = cic_out_width(IN_W, N, DEC_R, M);
  localparam int INT_W = cic_out_width(IN_W, N, INT_R, M);
  localparam int PP_LAT = $clog2(DEC_R) - 1;
  localparam int NDEC  = 1024;
  localparam int NINT  = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                    dec_in_valid = 1'b0;
  logic signed [IN_W-1:0]  dec_in_data = '0;
  logic                    cic_dec_out_valid, pp_dec_out_valid;
  logic signed [DEC_W-1:0] cic_dec_out_data, pp_dec_out_data;
  logic                    int_in_valid = 1'b0;
  logic                    int_in_ready;
  logic signed [IN_W-1:0]  int_in_data = '0;
  logic                    cic_int_out_valid, pp_int_out_valid;
  logic signed [INT_W-1:0] cic_int_out_data, pp_int_out_data;

  multirate_cic_top u_top (
    .clk, .rst_n,
    .dec_in_valid, .dec_in_data,
    .cic_dec_out_valid, .cic_dec_out_data,
    .pp_dec_out_valid, .pp_dec_out_data,
    .int_in_valid, .int_in_ready, .int_in_data,
    .cic_int_out_valid, .cic_int_out_data,
    .pp_int_out_valid, .pp_int_out_data
  );

  longint xd [NDEC];
  longint xi [NINT];
  int     dec_cyc [NDEC];
  int     int_cyc [NINT];
  int     checks = 0, failures = 0;
  int     n_cic_dec = 0, n_pp_dec = 0, n_int = 0;
  int     n_gaps = 0, n_stalls = 0, n_refused = 0, n_dec_growth = 0, n_int_growth = 0;
  bit     dec_done = 1'b0, int_done = 1'b0;

  function automatic longint mov_d(int n, int stages);
    longint s = 0;
    if (n < 0) return 0;
    if (stages == 0) return xd[n];
    for (int i = 0; i < DEC_R * M; i++) s += mov_d(n - i, stages - 1);
    return s;
  endfunction

  function automatic longint mov_i(int n, int stages);
    longint s = 0;
    if (n < 0) return 0;
    if (stages == 0) return (n % INT_R == 0 && n / INT_R < NINT) ? xi[n / INT_R] : 0;
    for (int i = 0; i < INT_R * M; i++) s += mov_i(n - i, stages - 1);
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Output monitors.
  always @(negedge clk) begin
    if (rst_n && cic_dec_out_valid) begin
      automatic int idx = n_cic_dec * DEC_R + DEC_R - 1;
      automatic longint e = mov_d(idx, N);
      check(longint'(cic_dec_out_data) == e, $sformatf("recursive decimator out %0d: %0d vs %0d",
            n_cic_dec, cic_dec_out_data, e));
      check(cycle == dec_cyc[idx], "recursive decimator timing");
      if (e > 32767 || e < -32768) n_dec_growth++;
      n_cic_dec++;
    end
    if (rst_n && pp_dec_out_valid) begin
      automatic int idx = n_pp_dec * DEC_R + DEC_R - 1;
      automatic longint e = mov_d(idx, N);
      check(longint'(pp_dec_out_data) == e, $sformatf("polyphase decimator out %0d: %0d vs %0d",
            n_pp_dec, pp_dec_out_data, e));
      check(cycle == dec_cyc[idx] + PP_LAT, "polyphase decimator timing");
      n_pp_dec++;
    end
    if (rst_n) check(cic_int_out_valid == pp_int_out_valid, "expanders out of step");
    if (rst_n && cic_int_out_valid) begin
      automatic longint e = mov_i(n_int, N);
      check(longint'(cic_int_out_data) == e, $sformatf("recursive interpolator out %0d: %0d vs %0d",
            n_int, cic_int_out_data, e));
      check(pp_int_out_data == cic_int_out_data, $sformatf("polyphase interpolator out %0d: %0d vs %0d",
            n_int, pp_int_out_data, cic_int_out_data));
      check(cycle == int_cyc[n_int / INT_R] + n_int % INT_R, "interpolator timing");
      if (e > 32767 || e < -32768) n_int_growth++;
      n_int++;
    end
  end

  // Compressor stimulus.
  initial begin
    for (int i = 0; i < NDEC; i++) begin
      if (i >= 200 && i < 264)      xd[i] = 32767;
      else if (i >= 520 && i < 584) xd[i] = -32768;
      else xd[i] = longint'($signed(16'($urandom)));
    end
    wait (rst_n);
    for (int idx = 0; idx < NDEC; ) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        dec_in_valid = 1'b0;
        n_gaps++;
      end else begin
        dec_in_valid = 1'b1;
        dec_in_data  = IN_W'(xd[idx]);
        dec_cyc[idx] = cycle + 1;
        idx++;
      end
    end
    @(negedge clk);
    dec_in_valid = 1'b0;
    repeat (10) @(negedge clk);
    dec_done = 1'b1;
  end

  // Expander stimulus.
  initial begin
    for (int i = 0; i < NINT; i++) begin
      if (i >= 60 && i < 80)         xi[i] = 32767;
      else if (i >= 120 && i < 140)  xi[i] = -32768;
      else xi[i] = longint'($signed(16'($urandom)));
    end
    wait (rst_n);
    for (int idx = 0; idx < NINT; ) begin
      @(negedge clk);
      int_in_valid = ($urandom_range(0, 3) != 0);
      int_in_data  = int_in_valid ? IN_W'(xi[idx]) : IN_W'($urandom);
      #1;
      if (int_in_ready && !int_in_valid) n_stalls++;
      if (!int_in_ready && int_in_valid) n_refused++;
      if (int_in_ready && int_in_valid) begin
        int_cyc[idx] = cycle + 1;
        idx++;
      end
    end
    @(negedge clk);
    int_in_valid = 1'b0;
    repeat (10) @(negedge clk);
    int_done = 1'b1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (dec_done && int_done);
    #1;
    check(n_cic_dec == NDEC / DEC_R, "recursive decimator output count");
    check(n_pp_dec == NDEC / DEC_R, "polyphase decimator output count");
    check(n_int == NINT * INT_R, "interpolator output count");
    check(n_gaps > 0, "no compressor input gap");
    check(n_stalls > 0, "no expander stall");
    check(n_refused > 0, "no refused expander offer");
    check(n_dec_growth > 0, "no decimator bit growth beyond input range");
    check(n_int_growth > 0, "no interpolator bit growth beyond input range");
    $display("mechanisms: decimator outputs %0d/%0d, input gaps %0d, expander stalls %0d, refused offers %0d, growth dec %0d int %0d",
             n_cic_dec, n_pp_dec, n_gaps, n_stalls, n_refused, n_dec_growth, n_int_growth);
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
