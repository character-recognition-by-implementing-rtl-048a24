// tb_ann: runs the perceptron engine with the real ALU, SRAM driver, LFSR and
// an SRAM chip model. It checks the random initial weights, forward passes
// (net inputs, +1/0/-1 outputs, winner) against double-precision sums of the
// weights read from the chip, the cycle count of an evaluation, and training
// steps against the perceptron rule w += alpha * t * x applied in the
// testbench to a snapshot of the weights.
module tb_ann;
  import ann_pkg::*;
  import tb_float_pkg::*;

  localparam int unsigned NO     = N_OUT;
  localparam int unsigned ADDR_W = 17;
  localparam real         ALPHA  = 0.5;
  localparam real         THETA  = 0.2;

  logic clk = 0, rst_n = 0;

  logic              cmd_valid = 0;
  ann_cmd_e          cmd = ANN_EVAL;
  logic [N_IN-1:0]   x = '0;
  logic [CLS_W-1:0]  target = '0;
  logic              ready, done, updated;
  logic [CLS_W-1:0]  winner;
  float_t            winner_net;
  logic [NO-1:0]     y_pos, y_neg;
  logic [31:0]       rand_v;
  logic              rand_step;
  logic              alu_valid, alu_done, alu_flag;
  fop_e              alu_op;
  float_t            alu_a, alu_b, alu_result;
  logic              mem_req, mem_we, mem_ready, mem_done;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0]       mem_wdata, mem_rdata;
  logic [ADDR_W:0]   sram_addr;
  logic [15:0]       sram_dq_o, sram_dq_i;
  logic              sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  int                violations, writes, reads;
  int                checks = 0, failures = 0;

  ann #(.N_OUTPUTS(NO), .ADDR_W(ADDR_W)) dut (
    .clk, .rst_n, .cmd_valid, .cmd, .x, .target, .ready, .done, .winner, .winner_net,
    .updated, .y_pos, .y_neg, .rand_i(rand_v), .rand_step,
    .alu_valid, .alu_op, .alu_a, .alu_b, .alu_done, .alu_result, .alu_flag,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_done, .mem_rdata
  );
  lfsr u_lfsr (.clk, .rst_n, .step(rand_step), .value(rand_v));
  float_alu u_alu (.clk, .rst_n, .in_valid(alu_valid), .op(alu_op), .a(alu_a), .b(alu_b),
                   .out_valid(alu_done), .result(alu_result), .flag(alu_flag));
  sram_driver #(.ADDR_W(ADDR_W)) u_sram (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ready(mem_ready), .done(mem_done), .rdata(mem_rdata),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_ub_n, .sram_lb_n);
  sram_chip_model #(.ADDR_BITS(ADDR_W + 1)) chip (
    .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe), .dq_i(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n),
    .violations, .writes, .reads);

  always #10 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] weight(input int j, input int i);
    int a = j * N_W + i;
    return {chip.mem[2*a + 1], chip.mem[2*a]};
  endfunction

  function automatic real xval(input logic [N_IN-1:0] p, input int i);
    if (i == N_IN) return 1.0;
    return p[i] ? 1.0 : -1.0;
  endfunction

  function automatic real net_of(input int j, input logic [N_IN-1:0] p);
    real s = 0.0;
    for (int i = 0; i < N_W; i++) s += xval(p, i) * f2r(weight(j, i));
    return s;
  endfunction

  task automatic command(input ann_cmd_e c, input logic [N_IN-1:0] p,
                         input logic [CLS_W-1:0] t, output int cycles);
    @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL: not ready for a command"); end
    cmd_valid = 1; cmd = c; x = p; target = t;
    @(negedge clk);
    cmd_valid = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  real nets [NO];
  real old_w [NO][N_W];
  int  cyc;

  // checks outputs of a forward pass against nets[]; returns expected y
  task automatic check_forward(input logic [N_IN-1:0] p);
    int best = 0;
    for (int j = 0; j < NO; j++) begin
      if (nets[j] > nets[best]) best = j;
      // skip the check where rounding could flip the activation
      if (fabs(nets[j] - THETA) > 1e-4 && fabs(nets[j] + THETA) > 1e-4) begin
        checks++;
        if (y_pos[j] != (nets[j] > THETA) || y_neg[j] != (nets[j] < -THETA)) begin
          failures++;
          $display("FAIL: neuron %0d net %g gives y_pos %b y_neg %b", j, nets[j], y_pos[j], y_neg[j]);
        end
      end
    end
    checks++;
    if (winner != CLS_W'(best) || fabs(f2r(winner_net) - nets[best]) > 1e-4) begin
      failures++;
      $display("FAIL: winner %0d (%g), want %0d (%g)", winner, f2r(winner_net), best, nets[best]);
    end
  endtask

  initial begin
    int n_upd, v0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    v0 = violations;   // ignore power-up glitches

    // ---------------- initial weights ----------------
    command(ANN_INIT, '0, '0, cyc);
    begin
      automatic int distinct = 0;
      for (int j = 0; j < NO; j++)
        for (int i = 0; i < N_W; i++) begin
          automatic real m = fabs(f2r(weight(j, i)));
          checks++;
          if (m < 1.0 / 32.0 || m >= 0.5) begin
            failures++;
            $display("FAIL: initial weight %0d,%0d = %g out of range", j, i, f2r(weight(j, i)));
          end
          if (weight(j, i) != weight(0, 0)) distinct++;
        end
      checks++;
      if (distinct < NO * N_W - 5) begin failures++; $display("FAIL: initial weights repeat"); end
    end

    // ---------------- evaluations ----------------
    for (int n = 0; n < 6; n++) begin
      automatic logic [N_IN-1:0] p = N_IN'($urandom);
      for (int j = 0; j < NO; j++) nets[j] = net_of(j, p);
      command(ANN_EVAL, p, '0, cyc);
      check_forward(p);
      checks++;
      if (cyc != 2 + 176 + (NO - 1) * 178) begin
        failures++;
        $display("FAIL: evaluation took %0d cycles, want %0d", cyc, 2 + 176 + (NO - 1) * 178);
      end
    end

    // ---------------- training steps ----------------
    n_upd = 0;
    for (int n = 0; n < 40; n++) begin
      automatic logic [N_IN-1:0] p = N_IN'($urandom);
      automatic logic [CLS_W-1:0] t = CLS_W'($urandom_range(0, NO - 1));
      automatic bit any = 0;
      for (int j = 0; j < NO; j++) begin
        nets[j] = net_of(j, p);
        for (int i = 0; i < N_W; i++) old_w[j][i] = f2r(weight(j, i));
      end
      command(ANN_TRAIN, p, t, cyc);
      check_forward(p);
      for (int j = 0; j < NO; j++) begin
        automatic real tj = (j == int'(t)) ? 1.0 : -1.0;
        automatic bit  ok = (tj > 0.0) ? (nets[j] > THETA) : (nets[j] < -THETA);
        if (fabs(nets[j] - THETA) < 1e-4 || fabs(nets[j] + THETA) < 1e-4) continue;
        if (!ok) begin any = 1; n_upd++; end
        for (int i = 0; i < N_W; i++) begin
          automatic real want = ok ? old_w[j][i] : old_w[j][i] + ALPHA * tj * xval(p, i);
          checks++;
          if (fabs(f2r(weight(j, i)) - want) > 1e-5) begin
            failures++;
            $display("FAIL: step %0d neuron %0d weight %0d = %g, want %g",
                     n, j, i, f2r(weight(j, i)), want);
          end
        end
      end
      checks++;
      if (updated != any) begin failures++; $display("FAIL: updated %b, want %b", updated, any); end
    end
    checks++;
    if (n_upd == 0) begin failures++; $display("FAIL: no weight update happened"); end
    checks++;
    if (violations != v0) begin failures++; $display("FAIL: %0d SRAM protocol violations", violations); end

    $display("weight updates seen: %0d", n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
