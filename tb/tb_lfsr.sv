// tb_lfsr: checks the LFSR against a bit-serial model of the polynomial
// x^32 + x^22 + x^2 + x + 1, checks that step low holds the state and that
// the state never becomes zero.
module tb_lfsr;
  logic        clk = 0, rst_n = 0, step = 0;
  logic [31:0] value;
  logic [31:0] model;
  int          checks = 0, failures = 0;

  lfsr #(.SEED(32'h0000_0001)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Galois step written out from the polynomial's exponents
  function automatic logic [31:0] next(input logic [31:0] s);
    logic [31:0] n;
    logic        out;
    out = s[0];
    n   = s >> 1;
    if (out) begin
      n[32-1]  = ~n[32-1];   // x^32 term feeds the top bit
      n[22-1]  = ~n[22-1];   // x^22
      n[2-1]   = ~n[2-1];    // x^2
      n[1-1]   = ~n[1-1];    // x^1
    end
    return n;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = 32'h1;
    checks++;
    if (value != model) begin failures++; $display("FAIL: seed %h", value); end
    for (int n = 0; n < 20000; n++) begin
      step = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (step) model = next(model);
      checks++;
      if (value != model || value == 32'd0) begin
        failures++;
        if (failures < 10) $display("FAIL: step %0d value %h want %h", n, value, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
