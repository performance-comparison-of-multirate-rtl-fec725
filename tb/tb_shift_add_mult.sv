// tb_shift_add_mult -- self-checking testbench for shift_add_mult.
//
// Instances with the constants the CIC sub-filters use (1, 3, 6, 7, 10) and
// one wide constant multiply random signed 16-bit inputs; each result is
// compared with an ordinary multiplication in 64-bit arithmetic, truncated
// to the output width.
module tb_shift_add_mult;
  localparam int IN_W  = 16;
  localparam int OUT_W = 26;
  localparam int NC    = 6;
  localparam longint unsigned CS [NC] = '{1, 3, 6, 7, 10, 341};

  logic signed [IN_W-1:0] din = '0;
  logic signed [OUT_W-1:0] dout [NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_c
    shift_add_mult #(.IN_W(IN_W), .OUT_W(OUT_W), .COEF(CS[c])) u_dut (
      .din, .dout(dout[c])
    );
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0:       din = 16'sh7fff;
        1:       din = 16'sh8000;
        2:       din = '0;
        default: din = 16'($urandom);
      endcase
      #1;
      for (int c = 0; c < NC; c++) begin
        longint e;
        e = longint'(din) * longint'(CS[c]);
        checks++;
        if (dout[c] !== OUT_W'(e)) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d expected %0d", din, CS[c], dout[c], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
