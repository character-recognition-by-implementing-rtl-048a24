// tb_float_alu: checks add, subtract, multiply and compare of float_alu
// against double-precision arithmetic, on fixed corner cases and on random
// operands, and checks the one-cycle latency.
module tb_float_alu;
  import ann_pkg::*;
  import tb_float_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0;
  fop_e   op = FOP_ADD;
  float_t a = '0, b = '0;
  logic   out_valid;
  float_t result;
  logic   flag;
  int     checks = 0, failures = 0;

  float_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fop_e o, input float_t x, input float_t y);
    @(negedge clk);
    op = o; a = x; b = y; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL: out_valid not one cycle after in_valid");
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL: out_valid held longer than one cycle");
    end
  endtask

  task automatic check_arith(input fop_e o, input float_t x, input float_t y);
    real want, got;
    run(o, x, y);
    unique case (o)
      FOP_ADD: want = f2r(x) + f2r(y);
      FOP_SUB: want = f2r(x) - f2r(y);
      default: want = f2r(x) * f2r(y);
    endcase
    got = f2r(result);
    checks++;
    if (!close(got, want)) begin
      failures++;
      $display("FAIL: op %s %h %h -> %h (%g), want %g", o.name(), x, y, result, got, want);
    end
  endtask

  task automatic check_gt(input float_t x, input float_t y);
    bit want;
    run(FOP_GT, x, y);
    want = f2r(x) > f2r(y);
    checks++;
    if (flag !== want) begin
      failures++;
      $display("FAIL: %h > %h gave %b, want %b", x, y, flag, want);
    end
  endtask

  function automatic float_t rnd_float();
    return {1'($urandom), 8'(110 + $urandom_range(0, 30)), 23'($urandom)};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // exact corner cases
    run(FOP_ADD, F_ONE, F_ONE);
    checks++; if (result != 32'h4000_0000) begin failures++; $display("FAIL: 1+1 = %h", result); end
    run(FOP_SUB, F_ONE, F_ONE);
    checks++; if (result != F_ZERO) begin failures++; $display("FAIL: 1-1 = %h", result); end
    run(FOP_MUL, 32'h3F00_0000, F_MONE);
    checks++; if (result != 32'hBF00_0000) begin failures++; $display("FAIL: 0.5*-1 = %h", result); end
    run(FOP_MUL, F_ZERO, 32'h4120_0000);
    checks++; if (result[30:0] != 31'd0) begin failures++; $display("FAIL: 0*10 = %h", result); end
    run(FOP_ADD, 32'h4120_0000, F_ZERO);
    checks++; if (result != 32'h4120_0000) begin failures++; $display("FAIL: 10+0 = %h", result); end
    run(FOP_SUB, 32'h3E4C_CCCD, 32'h3F00_0000);   // 0.2 - 0.5
    checks++; if (!close(f2r(result), f2r(32'h3E4C_CCCD) - 0.5)) begin failures++; $display("FAIL: 0.2-0.5 = %h", result); end
    check_gt(F_ZERO, 32'h8000_0000);              // +0 > -0 is false
    check_gt(32'h3E4C_CCCD, 32'hBE4C_CCCD);
    check_gt(32'hBF80_0000, 32'hBF00_0000);       // -1 > -0.5 false
    check_gt(32'hBF00_0000, 32'hBF80_0000);       // -0.5 > -1 true

    // random operands
    for (int n = 0; n < 3000; n++) begin
      float_t x, y;
      x = rnd_float();
      y = ($urandom_range(0, 7) == 0) ? x ^ 32'h8000_0000 : rnd_float();  // some cancellations
      check_arith(FOP_ADD, x, y);
      check_arith(FOP_SUB, x, y);
      check_arith(FOP_MUL, x, y);
      check_gt(x, y);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
