// ann: the perceptron itself, one sequential neuron engine over weights kept
// in external SRAM.
//
// The network has 16 bipolar inputs (a filled grid cell is +1, an empty one
// -1), a bias input fixed at +1 and N_OUTPUTS output neurons, one per trained
// character. Neuron j owns the 17 weights at word addresses j*17 .. j*17+16,
// bias last. All arithmetic goes through the shared floating-point processor
// and every weight through the SRAM driver, so the engine visits one weight
// at a time:
//
//   net_j = w_j,bias + sum_i (x_i ? +w_j,i : -w_j,i)       (16 add/sub)
//   y_j   = +1 if net_j > THETA, -1 if net_j < -THETA, else 0
//
// Commands (ann_pkg::ann_cmd_e):
//   ANN_INIT   writes every weight with a random value from the LFSR:
//              sign random, magnitude in [1/32, 1/2).
//   ANN_EVAL   computes every net_j and reports the neuron with the largest
//              net input as the winner, the most likely character.
//   ANN_TRAIN  does the same and then applies the perceptron learning rule
//              with target t_j = +1 for j == target and -1 otherwise: when
//              y_j != t_j every weight of neuron j moves by ALPHA*t_j*x_i
//              (x_bias = +1). updated reports whether any neuron changed.
//
// The document gives the network (a perceptron, 4x4 bipolar inputs, one
// output per character, floating-point arithmetic, weights in SRAM, random
// initial weights); the threshold activation with THETA, the learning rate,
// the winner-take-all readout, the memory layout and the initial weight
// range are this design's choices, after the classic perceptron rule.
//
// Interface and timing: give a command with cmd_valid while ready is high;
// done pulses for one cycle when it has finished and the result outputs hold
// until the next command. One weight costs ten cycles (an 8-cycle SRAM read
// and a 2-cycle ALU step) and the activation and winner tests eight more, so
// an evaluation takes 2 + 176 + 178*(N_OUTPUTS-1) cycles: 4,094 cycles, about
// 82 us at 50 MHz, for 23 neurons. A training step adds 308 cycles for every
// neuron whose weights change. rand_step asks the LFSR to advance (it is held
// high while an initial weight is being written).
module ann
  import ann_pkg::*;
#(
  parameter int unsigned N_OUTPUTS = N_OUT,          // output neurons
  parameter int unsigned ADDR_W    = 17,             // SRAM word address width
  parameter float_t      ALPHA     = 32'h3F00_0000,  // learning rate 0.5
  parameter float_t      THETA     = 32'h3E4C_CCCD   // activation threshold 0.2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command port (from the training supervisor)
  input  logic                 cmd_valid,
  input  ann_cmd_e             cmd,
  input  logic [N_IN-1:0]      x,
  input  logic [CLS_W-1:0]     target,
  output logic                 ready,
  output logic                 done,
  output logic [CLS_W-1:0]     winner,
  output float_t               winner_net,
  output logic                 updated,
  output logic [N_OUTPUTS-1:0] y_pos,      // neurons whose output is +1
  output logic [N_OUTPUTS-1:0] y_neg,      // neurons whose output is -1
  // pseudo-random source
  input  logic [31:0]          rand_i,
  output logic                 rand_step,
  // floating-point processor
  output logic                 alu_valid,
  output fop_e                 alu_op,
  output float_t               alu_a,
  output float_t               alu_b,
  input  logic                 alu_done,
  input  float_t               alu_result,
  input  logic                 alu_flag,
  // SRAM driver
  output logic                 mem_req,
  output logic                 mem_we,
  output logic [ADDR_W-1:0]    mem_addr,
  output logic [31:0]          mem_wdata,
  input  logic                 mem_ready,
  input  logic                 mem_done,
  input  logic [31:0]          mem_rdata
);

  localparam int unsigned N_WEIGHTS = N_OUTPUTS * N_W;

  typedef enum logic [4:0] {
    S_IDLE,
    S_INIT_WR, S_INIT_WAIT,
    S_RD, S_RD_WAIT, S_ACC, S_ACC_WAIT,
    S_POS, S_POS_WAIT, S_NEG, S_NEG_WAIT, S_MAX, S_MAX_WAIT,
    S_CHECK, S_DELTA, S_DELTA_WAIT,
    S_URD, S_URD_WAIT, S_UADD, S_UADD_WAIT, S_UWR, S_UWR_WAIT,
    S_NEXT, S_DONE
  } state_e;

  state_e         state;
  ann_cmd_e       cmd_q;
  logic [N_IN-1:0] x_q;
  logic [CLS_W-1:0] tgt_q;
  logic [CLS_W-1:0] j;          // neuron
  logic [4:0]       i;          // weight within neuron, 16 = bias
  logic [ADDR_W-1:0] k;         // flat weight address during init
  logic [ADDR_W-1:0] base;      // j * N_W
  float_t acc, best, delta, w;
  logic   pos, neg;

  // sign of input i: bias and filled cells add, empty cells subtract
  logic x_plus;
  assign x_plus = (i == 5'(N_IN)) || x_q[i[3:0]];

  // random initial weight: random sign and mantissa, exponent 122..125
  float_t rand_w;
  assign rand_w = {rand_i[31], 8'd122 + {6'd0, rand_i[30:29]}, rand_i[22:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmd_q      <= ANN_EVAL;
      x_q        <= '0;
      tgt_q      <= '0;
      j          <= '0;
      i          <= '0;
      k          <= '0;
      base       <= '0;
      acc        <= F_ZERO;
      best       <= F_ZERO;
      delta      <= F_ZERO;
      w          <= F_ZERO;
      pos        <= 1'b0;
      neg        <= 1'b0;
      winner     <= '0;
      winner_net <= F_ZERO;
      updated    <= 1'b0;
      y_pos      <= '0;
      y_neg      <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd_q   <= cmd;
          x_q     <= x;
          tgt_q   <= target;
          j       <= '0;
          i       <= '0;
          k       <= '0;
          base    <= '0;
          acc     <= F_ZERO;
          updated <= 1'b0;
          state   <= (cmd == ANN_INIT) ? S_INIT_WR : S_RD;
        end

        // ---------------- weight initialisation ----------------
        S_INIT_WR:   if (mem_ready) state <= S_INIT_WAIT;
        S_INIT_WAIT: if (mem_done) begin
          if (k == ADDR_W'(N_WEIGHTS - 1)) state <= S_DONE;
          else begin
            k     <= k + 1'b1;
            state <= S_INIT_WR;
          end
        end

        // ---------------- forward pass of neuron j ----------------
        S_RD:      if (mem_ready) state <= S_RD_WAIT;
        S_RD_WAIT: if (mem_done) state <= S_ACC;
        S_ACC:     state <= S_ACC_WAIT;
        S_ACC_WAIT: if (alu_done) begin
          acc <= alu_result;
          if (i == 5'(N_IN)) state <= S_POS;
          else begin
            i     <= i + 1'b1;
            state <= S_RD;
          end
        end
        S_POS:      state <= S_POS_WAIT;
        S_POS_WAIT: if (alu_done) begin pos <= alu_flag; state <= S_NEG; end
        S_NEG:      state <= S_NEG_WAIT;
        S_NEG_WAIT: if (alu_done) begin
          neg      <= alu_flag;
          y_pos[j] <= pos;
          y_neg[j] <= alu_flag;
          if (j == '0) begin
            best   <= acc;
            winner <= '0;
            state  <= S_CHECK;
          end else begin
            state <= S_MAX;
          end
        end
        S_MAX:      state <= S_MAX_WAIT;
        S_MAX_WAIT: if (alu_done) begin
          if (alu_flag) begin
            best   <= acc;
            winner <= j;
          end
          state <= S_CHECK;
        end

        // ---------------- learning rule ----------------
        S_CHECK: begin
          if (cmd_q == ANN_TRAIN &&
              ((j == tgt_q) ? !pos : !neg)) begin
            updated <= 1'b1;
            state   <= S_DELTA;
          end else begin
            state <= S_NEXT;
          end
        end
        S_DELTA:      state <= S_DELTA_WAIT;
        S_DELTA_WAIT: if (alu_done) begin
          delta <= alu_result;          // ALPHA * t_j
          i     <= '0;
          state <= S_URD;
        end
        S_URD:      if (mem_ready) state <= S_URD_WAIT;
        S_URD_WAIT: if (mem_done) state <= S_UADD;
        S_UADD:     state <= S_UADD_WAIT;
        S_UADD_WAIT: if (alu_done) begin
          w     <= alu_result;
          state <= S_UWR;
        end
        S_UWR:      if (mem_ready) state <= S_UWR_WAIT;
        S_UWR_WAIT: if (mem_done) begin
          if (i == 5'(N_IN)) state <= S_NEXT;
          else begin
            i     <= i + 1'b1;
            state <= S_URD;
          end
        end

        S_NEXT: begin
          if (j == CLS_W'(N_OUTPUTS - 1)) state <= S_DONE;
          else begin
            j     <= j + 1'b1;
            base  <= base + ADDR_W'(N_W);
            i     <= '0;
            acc   <= F_ZERO;
            state <= S_RD;
          end
        end

        S_DONE: begin
          winner_net <= best;
          done       <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- requests to the ALU and the SRAM driver ----------------
  always_comb begin
    alu_valid = 1'b0;
    alu_op    = FOP_ADD;
    alu_a     = acc;
    alu_b     = mem_rdata;
    unique case (state)
      S_ACC:   begin alu_valid = 1'b1; alu_op = x_plus ? FOP_ADD : FOP_SUB; end
      S_POS:   begin alu_valid = 1'b1; alu_op = FOP_GT; alu_b = THETA; end
      S_NEG:   begin alu_valid = 1'b1; alu_op = FOP_GT; alu_a = THETA ^ 32'h8000_0000; alu_b = acc; end
      S_MAX:   begin alu_valid = 1'b1; alu_op = FOP_GT; alu_b = best; end
      S_DELTA: begin alu_valid = 1'b1; alu_op = FOP_MUL; alu_a = ALPHA;
                     alu_b = (j == tgt_q) ? F_ONE : F_MONE; end
      S_UADD:  begin alu_valid = 1'b1; alu_op = x_plus ? FOP_ADD : FOP_SUB;
                     alu_a = mem_rdata; alu_b = delta; end
      default: ;
    endcase
  end

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = base + ADDR_W'(i);
    mem_wdata = w;
    unique case (state)
      S_INIT_WR: begin mem_req = mem_ready; mem_we = 1'b1; mem_addr = k; mem_wdata = rand_w; end
      S_RD, S_URD: mem_req = mem_ready;
      S_UWR:     begin mem_req = mem_ready; mem_we = 1'b1; end
      default: ;
    endcase
  end

  assign ready     = (state == S_IDLE);
  assign rand_step = (state == S_INIT_WAIT);

  a_cmd_when_ready: assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> ready)
    else $error("ann: command while busy");

endmodule
