// tb_cic_integrator -- self-checking testbench for cic_integrator.
//
// Drives random samples with a random enable into a 12-bit integrator and
// keeps a software accumulator: before every clock edge the combinational
// output must equal stored sum + input (modulo 2^12), and the sum may only
// advance on enabled edges.  A run of maximum inputs forces wrap-around.
module tb_cic_integrator;
  localparam int W = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                en = 1'b0;
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] dout;
  logic signed [W-1:0] model = '0;
  int checks = 0, failures = 0, wraps = 0;

  cic_integrator #(.W(W)) u_dut (.clk, .rst_n, .en, .din, .dout);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = (i >= 500 && i < 540) ? W'(2047) : W'($urandom);
      #1;
      checks++;
      if (dout !== W'(model + din)) begin
        failures++;
        $display("FAIL step %0d: dout %0d expected %0d", i, dout, W'(model + din));
      end
      if (en) begin
        if ((model > 0) && (din > 0) && (W'(model + din) < 0)) wraps++;
        model = W'(model + din);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrap-around exercised");
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
