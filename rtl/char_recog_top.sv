// char_recog_top: character recognition with a perceptron on the DE2 board.
//
// A user draws a character on a 4x4 grid with the toggle switches SW17..SW2
// (SW17 the top-left cell, row after row) and presses KEY3; a single-layer
// perceptron with 16 bipolar inputs names the character on the LCD. The
// network first trains itself after reset on a data set of 20 English and,
// three at a time, 9 Arabic letters; SW1..SW0 choose which three Arabic
// letters (group 0, 1 or 2), and changing them retrains the network.
//
// Blocks, as in the document's top-level entity:
//   train_supervisor  sequencing: initialise, train, recognise
//   ann               the perceptron, one weight at a time
//   lfsr              random initial weights
//   float_alu         single-precision add, subtract, multiply, compare
//   sram_driver       the weights live in the 256K x 16 asynchronous SRAM
//   display_controller / lcd_driver   the 16x2 LCD
// plus key_edge, which turns KEY3 into a one-cycle request.
//
// Ports follow the DE2 pin names. KEY0 (rst_n) is the reset. The SRAM data
// bus is split into sram_dq_o / sram_dq_oe / sram_dq_i; a board wrapper joins
// them with a tristate buffer. LEDR mirrors the switches. LEDG0..LEDG4 show
// initialising, training, ready, converged and result valid; LEDG7..LEDG5
// show the Arabic group in use (one-hot).
//
// The block list, the user interface and the three system states follow the
// document; everything inside the blocks that the document does not give is
// described in each block's own header.
module char_recog_top
  import ann_pkg::*;
#(
  parameter int unsigned   MAX_EPOCH   = 100,
  parameter logic [31:0]   LFSR_SEED   = 32'hACE1_2468,
  parameter int unsigned   POWERUP_CYC = 1_000_000,
  parameter int unsigned   EN_CYC      = 16,
  parameter int unsigned   CMD_CYC     = 2_500,
  parameter int unsigned   CLEAR_CYC   = 100_000
) (
  input  logic        clk,          // CLOCK_50
  input  logic        rst_n,        // KEY0
  input  logic        key3_n,       // KEY3: recognise
  input  logic [17:0] sw,
  output logic [17:0] ledr,
  output logic [7:0]  ledg,
  // LCD
  output logic [7:0]  lcd_data,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic        lcd_en,
  output logic        lcd_on,
  output logic        lcd_blon,
  // SRAM
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic        sram_we_n,
  output logic        sram_ub_n,
  output logic        sram_lb_n
);

  localparam int unsigned ADDR_W = 17;

  // ---------------- KEY3 ----------------
  logic recog_req;
  key_edge u_key3 (.clk, .rst_n, .key_n(key3_n), .press(recog_req));

  // ---------------- training supervisor ----------------
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

  train_supervisor #(.N_OUTPUTS(N_OUT), .MAX_EPOCH(MAX_EPOCH)) pr0 (
    .clk, .rst_n,
    .arabic_sel(sw[1:0]), .pattern_in(sw[17:2]), .recog_req,
    .ann_cmd_valid(cmd_valid), .ann_cmd(cmd), .ann_x, .ann_target,
    .ann_ready, .ann_done, .ann_winner, .ann_updated,
    .sys_state, .epoch, .converged, .group,
    .result_valid, .result_char, .result_pattern
  );

  // ---------------- perceptron and its resources ----------------
  logic [31:0]       rand_v;
  logic              rand_step;
  logic              alu_valid, alu_done, alu_flag;
  fop_e              alu_op;
  float_t            alu_a, alu_b, alu_result, winner_net;
  logic              mem_req, mem_we, mem_ready, mem_done;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0]       mem_wdata, mem_rdata;
  logic [N_OUT-1:0]  y_pos, y_neg;

  ann #(.N_OUTPUTS(N_OUT), .ADDR_W(ADDR_W)) ann0 (
    .clk, .rst_n,
    .cmd_valid, .cmd, .x(ann_x), .target(ann_target),
    .ready(ann_ready), .done(ann_done), .winner(ann_winner), .winner_net,
    .updated(ann_updated), .y_pos, .y_neg,
    .rand_i(rand_v), .rand_step,
    .alu_valid, .alu_op, .alu_a, .alu_b, .alu_done, .alu_result, .alu_flag,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_done, .mem_rdata
  );

  lfsr #(.SEED(LFSR_SEED)) lfsr0 (.clk, .rst_n, .step(rand_step), .value(rand_v));

  float_alu float_alu0 (
    .clk, .rst_n, .in_valid(alu_valid), .op(alu_op), .a(alu_a), .b(alu_b),
    .out_valid(alu_done), .result(alu_result), .flag(alu_flag)
  );

  sram_driver #(.ADDR_W(ADDR_W)) sram0 (
    .clk, .rst_n,
    .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ready(mem_ready), .done(mem_done), .rdata(mem_rdata),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_ub_n, .sram_lb_n
  );

  // ---------------- LCD ----------------
  logic [4:0] char_addr;
  logic [7:0] char_data;
  logic       done_frame;

  display_controller display0 (
    .sys_state, .epoch, .converged, .pattern(sw[17:2]),
    .result_valid, .result_char, .char_addr, .char_data
  );

  lcd_driver #(
    .POWERUP_CYC(POWERUP_CYC), .EN_CYC(EN_CYC), .CMD_CYC(CMD_CYC), .CLEAR_CYC(CLEAR_CYC)
  ) lcd0 (
    .clk, .rst_n, .char_addr, .char_data, .done_frame,
    .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .lcd_on, .lcd_blon
  );

  // ---------------- LEDs ----------------
  assign ledr = sw;
  assign ledg = {group == 2'd2, group == 2'd1, group == 2'd0,
                 result_valid, converged,
                 sys_state == SYS_READY, sys_state == SYS_TRAIN, sys_state == SYS_INIT};

endmodule
