// tb_cic_comb -- self-checking testbench for cic_comb.
//
// Two instances, differential delay 1 and 2, see the same random enabled
// sample stream.  A software history of the enabled inputs gives the
// expected output x[n] - x[n-D] (modulo 2^W), checked before every edge.
module tb_cic_comb;
  localparam int W = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                en = 1'b0;
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] dout1, dout2;
  logic signed [W-1:0] hist [2] = '{default: '0};
  int checks = 0, failures = 0;

  cic_comb #(.W(W), .D(1)) u_d1 (.clk, .rst_n, .en, .din, .dout(dout1));
  cic_comb #(.W(W), .D(2)) u_d2 (.clk, .rst_n, .en, .din, .dout(dout2));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 2) != 0);
      din = W'($urandom);
      #1;
      checks += 2;
      if (dout1 !== W'(din - hist[0])) begin
        failures++;
        $display("FAIL D=1 step %0d: %0d expected %0d", i, dout1, W'(din - hist[0]));
      end
      if (dout2 !== W'(din - hist[1])) begin
        failures++;
        $display("FAIL D=2 step %0d: %0d expected %0d", i, dout2, W'(din - hist[1]));
      end
      if (en) begin
        hist[1] = hist[0];
        hist[0] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
