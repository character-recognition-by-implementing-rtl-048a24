// tb_train_limit: the training supervisor with its epoch limit set below the
// number of epochs the data set needs. Training must stop after exactly
// MAX_EPOCH epochs with converged low, the system must still become ready,
// and a recognition must still run and return a character of the active set.
module tb_train_limit;
  import ann_pkg::*;

  localparam int unsigned ADDR_W = 17;

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

  localparam int unsigned LIMIT = 3;

  train_supervisor #(.MAX_EPOCH(LIMIT)) dut (
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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int epochs_seen = 0;
  always @(posedge clk) if (ann_done && sys_state == SYS_TRAIN && ann_target == CLS_W'(N_OUT - 1)) epochs_seen++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sys_state == SYS_TRAIN);
    wait (sys_state == SYS_READY);
    checks++;
    if (converged || epoch != 8'(LIMIT) || epochs_seen != LIMIT) begin
      failures++;
      $display("FAIL: converged %b epoch %0d epochs run %0d, want 0 %0d %0d",
               converged, epoch, epochs_seen, LIMIT, LIMIT);
    end
    // a recognition still runs
    @(negedge clk);
    pattern_in = 16'h69F9; recog_req = 1;
    @(negedge clk);
    recog_req = 0;
    while (!ann_done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (!result_valid || result_char >= CHAR_W'(N_ENGLISH + N_ARABIC_ACTIVE)) begin
      failures++;
      $display("FAIL: no usable result after a stopped training (%b, %0d)", result_valid, result_char);
    end
    $display("training stopped after %0d epochs, converged %b", epochs_seen, converged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
