// tb_rate_counter -- self-checking testbench for rate_counter.
//
// Counters modulo 8, 3 and 2 see the same random enable.  A software count
// of enabled edges gives the expected phase; `last` must be high exactly
// when the enable is high in phase R-1.  Also checks that one `last` is
// seen per R enabled samples.
module tb_rate_counter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       en = 1'b0;
  logic [2:0] c8;
  logic [1:0] c3;
  logic [0:0] c2;
  logic       l8, l3, l2;
  int checks = 0, failures = 0, n_en = 0, n_l8 = 0, n_l3 = 0;

  rate_counter #(.R(8)) u8 (.clk, .rst_n, .en, .count(c8), .last(l8));
  rate_counter #(.R(3)) u3 (.clk, .rst_n, .en, .count(c3), .last(l3));
  rate_counter #(.R(2)) u2 (.clk, .rst_n, .en, .count(c2), .last(l2));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2400; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks += 6;
      if (int'(c8) != n_en % 8) begin failures++; $display("FAIL R=8 count %0d at %0d", c8, n_en); end
      if (int'(c3) != n_en % 3) begin failures++; $display("FAIL R=3 count %0d at %0d", c3, n_en); end
      if (int'(c2) != n_en % 2) begin failures++; $display("FAIL R=2 count %0d at %0d", c2, n_en); end
      if (l8 != (en && n_en % 8 == 7)) begin failures++; $display("FAIL R=8 last at %0d", n_en); end
      if (l3 != (en && n_en % 3 == 2)) begin failures++; $display("FAIL R=3 last at %0d", n_en); end
      if (l2 != (en && n_en % 2 == 1)) begin failures++; $display("FAIL R=2 last at %0d", n_en); end
      if (l8) n_l8++;
      if (l3) n_l3++;
      if (en) n_en++;
    end
    checks += 2;
    if (n_l8 != n_en / 8) begin failures++; $display("FAIL R=8: %0d wraps", n_l8); end
    if (n_l3 != n_en / 3) begin failures++; $display("FAIL R=3: %0d wraps", n_l3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
