// tb_train_supervisor: the supervisor driving the real perceptron engine,
// ALU, LFSR, SRAM driver and an SRAM chip model. It follows the system
// through initialisation and training, then checks from the weights in the
// chip that every trained pattern drives its own neuron above THETA and all
// others below -THETA, recognises every trained pattern, checks that a
// request during training is ignored, and switches the Arabic group to check
// that the network retrains and then recognises the new letters.
module tb_train_supervisor;
  import ann_pkg::*;
  import tb_float_pkg::*;

  localparam int unsigned ADDR_W = 17;
  localparam real         THETA  = 0.2;

  logic clk = 0, rst_n = 0;
  logic [1:0]        arabic_sel = 2'd0;
  logic [N_IN-1:0]   pattern_in = '0;
  logic              recog_req = 0;
  logic              cmd_valid, ann_ready, ann_done, ann_updated;
  ann_cmd_e          cmd;
  logic [N_IN-1:0]   ann_x;
  logic [CLS_W-1:0]  ann_target, ann_winner;
  sys_state_e        sys_state;
  logic [7:0]        epoch;
  logic              converged, result_valid;
  logic [1:0]        group;
  logic [CHAR_W-1:0] result_char;
  logic [N_IN-1:0]   result_pattern;
  logic [31:0]       rand_v;
  logic              rand_step;
  logic              alu_valid, alu_done, alu_flag;
  fop_e              alu_op;
  float_t            alu_a, alu_b, alu_result, winner_net;
  logic              mem_req, mem_we, mem_ready, mem_done;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0]       mem_wdata, mem_rdata;
  logic [N_OUT-1:0]  y_pos, y_neg;
  logic [ADDR_W:0]   sram_addr;
  logic [15:0]       sram_dq_o, sram_dq_i;
  logic              sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  int                violations, writes, reads;
  int                checks = 0, failures = 0;

  train_supervisor dut (
    .clk, .rst_n, .arabic_sel, .pattern_in, .recog_req,
    .ann_cmd_valid(cmd_valid), .ann_cmd(cmd), .ann_x, .ann_target,
    .ann_ready, .ann_done, .ann_winner, .ann_updated,
    .sys_state, .epoch, .converged, .group, .result_valid, .result_char, .result_pattern);
  ann u_ann (
    .clk, .rst_n, .cmd_valid, .cmd, .x(ann_x), .target(ann_target),
    .ready(ann_ready), .done(ann_done), .winner(ann_winner), .winner_net,
    .updated(ann_updated), .y_pos, .y_neg, .rand_i(rand_v), .rand_step,
    .alu_valid, .alu_op, .alu_a, .alu_b, .alu_done, .alu_result, .alu_flag,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_done, .mem_rdata);
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
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the training set as drawn in the character table, 4x4, row after row
  localparam logic [15:0] GLYPH [N_CHARS] = '{
    16'h69F9, 16'hEE9E, 16'h7887, 16'hE99E, 16'hFE8F, 16'hFE88, 16'h78B7, 16'h9F99,
    16'hE44E, 16'h3196, 16'h9AE9, 16'h888F, 16'h9FF9, 16'h9DB9, 16'h6996, 16'hE9E8,
    16'h69B7, 16'hE9E9, 16'h7C3E, 16'hF666,
    16'h4444, 16'h9F04, 16'h609F, 16'h4A9F, 16'hE247, 16'hE487, 16'h4E87, 16'h211E, 16'hA11E};

  function automatic int char_of(input int j, input int g);
    return (j < N_ENGLISH) ? j : N_ENGLISH + 3 * g + (j - N_ENGLISH);
  endfunction

  function automatic real net_of(input int j, input logic [15:0] p);
    real s = 0.0;
    for (int i = 0; i < N_W; i++) begin
      automatic int a = j * N_W + i;
      automatic real w = f2r({chip.mem[2*a + 1], chip.mem[2*a]});
      s += (i == N_IN) ? w : (p[i] ? w : -w);
    end
    return s;
  endfunction

  task automatic recognise(input logic [15:0] p);
    @(negedge clk);
    pattern_in = p; recog_req = 1;
    @(negedge clk);
    recog_req = 0;
    pattern_in = ~p;                 // the request must latch the pattern
    while (!ann_done) @(negedge clk);
    @(negedge clk);
  endtask

  int trainings = 0, recognitions = 0, ignored = 0;

  task automatic train_and_check(input int g);
    int t0 = 0;
    // initialisation, then training
    wait (sys_state == SYS_INIT);
    wait (sys_state == SYS_TRAIN);
    // a request during training must change nothing
    repeat (1000) @(negedge clk);
    recog_req = 1; pattern_in = GLYPH[0];
    @(negedge clk);
    recog_req = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (sys_state != SYS_TRAIN || result_valid) begin
      failures++; $display("FAIL: request during training was not ignored");
    end else ignored++;
    wait (sys_state == SYS_READY);
    trainings++;
    $display("group %0d trained in %0d epochs, converged %b", g, epoch, converged);
    checks++;
    if (!converged || group != 2'(g)) begin
      failures++; $display("FAIL: group %0d: converged %b, group %0d", g, converged, group);
    end
    checks++;
    if (epoch < 2) begin failures++; $display("FAIL: training took no weight update"); end
    // every neuron answers its own pattern only
    for (int p = 0; p < N_OUT; p++)
      for (int j = 0; j < N_OUT; j++) begin
        automatic real n = net_of(j, GLYPH[char_of(p, g)]);
        checks++;
        if ((j == p) ? !(n > THETA) : !(n < -THETA)) begin
          failures++;
          $display("FAIL: group %0d pattern %0d neuron %0d net %g", g, p, j, n);
        end
      end
    // recognition of every trained pattern
    for (int p = 0; p < N_OUT; p++) begin
      recognise(GLYPH[char_of(p, g)]);
      recognitions++;
      checks++;
      if (!result_valid || int'(result_char) != char_of(p, g)
          || result_pattern != GLYPH[char_of(p, g)]) begin
        failures++;
        $display("FAIL: group %0d pattern %0d recognised as %0d", g, char_of(p, g), result_char);
      end
    end
  endtask

  initial begin
    int v0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    v0 = violations;
    train_and_check(0);
    arabic_sel = 2'd2;
    train_and_check(2);
    arabic_sel = 2'd1;
    train_and_check(1);
    checks++;
    if (violations != v0) begin failures++; $display("FAIL: SRAM protocol violations"); end
    checks++;
    if (trainings != 3 || recognitions != 3 * N_OUT || ignored != 3) begin
      failures++; $display("FAIL: a mechanism did not happen");
    end
    $display("trainings %0d recognitions %0d ignored requests %0d", trainings, recognitions, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
