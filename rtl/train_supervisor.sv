// train_supervisor: the ANN training supervisor and system sequencer.
//
// After reset the system goes through three states, as the document describes:
//   SYS_INIT   the network's weights are filled with random values;
//   SYS_TRAIN  the network learns the training data set, epoch after epoch:
//              each of the N_OUTPUTS patterns is presented once per epoch
//              with its own neuron as the target, and the perceptron rule
//              adjusts the weights. Training ends after the first epoch in
//              which no weight changed (converged = 1) or after MAX_EPOCH
//              epochs (converged = 0). No recognition is possible meanwhile.
//   SYS_READY  a pulse on recog_req (push-button KEY3) runs the network on
//              the pattern from the switches; the winning neuron, translated
//              to its data-set entry, becomes the result.
// The training set is the 20 English letters and three of the nine Arabic
// letters, the group chosen by arabic_sel (0, 1 or 2; 3 counts as 0): the
// document says only three Arabic patterns are recognised at a time. Neuron
// j < 20 stands for English letter j, neuron 20+m for Arabic letter 3*group+m.
// A change of arabic_sel while ready restarts from SYS_INIT and retrains.
// The group switch, the stopping rule and MAX_EPOCH are this design's choices.
//
// Interface: drives the ann command port and waits for its done pulse. The
// result outputs hold until the next recognition or the next training run.
module train_supervisor
  import ann_pkg::*;
#(
  parameter int unsigned N_OUTPUTS = N_OUT,
  parameter int unsigned MAX_EPOCH = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  // user side
  input  logic [1:0]        arabic_sel,
  input  logic [N_IN-1:0]   pattern_in,
  input  logic              recog_req,
  // network command port
  output logic              ann_cmd_valid,
  output ann_cmd_e          ann_cmd,
  output logic [N_IN-1:0]   ann_x,
  output logic [CLS_W-1:0]  ann_target,
  input  logic              ann_ready,
  input  logic              ann_done,
  input  logic [CLS_W-1:0]  ann_winner,
  input  logic              ann_updated,
  // status and result
  output sys_state_e        sys_state,
  output logic [7:0]        epoch,
  output logic              converged,
  output logic [1:0]        group,
  output logic              result_valid,
  output logic [CHAR_W-1:0] result_char,
  output logic [N_IN-1:0]   result_pattern
);

  typedef enum logic [2:0] {
    S_START, S_INIT, S_INIT_WAIT, S_TR, S_TR_WAIT, S_READY, S_EV, S_EV_WAIT
  } state_e;

  state_e           state;
  logic [CLS_W-1:0] p;          // pattern / neuron being trained
  logic             changed;    // a weight changed in this epoch
  logic [N_IN-1:0]  glyph;
  logic [31:0]      unused_name;

  function automatic logic [CHAR_W-1:0] char_of(input logic [CLS_W-1:0] n,
                                                 input logic [1:0] g);
    if (n < CLS_W'(N_ENGLISH)) return CHAR_W'(n);
    return CHAR_W'(N_ENGLISH) + CHAR_W'(g) * CHAR_W'(N_ARABIC_ACTIVE)
           + CHAR_W'(n - CLS_W'(N_ENGLISH));
  endfunction

  char_rom u_set (.idx(char_of(p, group)), .glyph(glyph), .name(unused_name));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_START;
      p              <= '0;
      changed        <= 1'b0;
      epoch          <= '0;
      converged      <= 1'b0;
      group          <= '0;
      result_valid   <= 1'b0;
      result_char    <= '0;
      result_pattern <= '0;
    end else begin
      unique case (state)
        S_START: begin
          group        <= (arabic_sel == 2'd3) ? 2'd0 : arabic_sel;
          converged    <= 1'b0;
          result_valid <= 1'b0;
          epoch        <= '0;
          state        <= S_INIT;
        end
        S_INIT:      if (ann_ready) state <= S_INIT_WAIT;
        S_INIT_WAIT: if (ann_done) begin
          epoch   <= 8'd1;
          p       <= '0;
          changed <= 1'b0;
          state   <= S_TR;
        end
        S_TR:      if (ann_ready) state <= S_TR_WAIT;
        S_TR_WAIT: if (ann_done) begin
          if (p == CLS_W'(N_OUTPUTS - 1)) begin
            p <= '0;
            if (!(changed || ann_updated)) begin
              converged <= 1'b1;
              state     <= S_READY;
            end else if (epoch == 8'(MAX_EPOCH)) begin
              state <= S_READY;
            end else begin
              epoch   <= epoch + 1'b1;
              changed <= 1'b0;
              state   <= S_TR;
            end
          end else begin
            changed <= changed || ann_updated;
            p       <= p + 1'b1;
            state   <= S_TR;
          end
        end
        S_READY: begin
          if (((arabic_sel == 2'd3) ? 2'd0 : arabic_sel) != group) state <= S_START;
          else if (recog_req) begin
            result_pattern <= pattern_in;
            state          <= S_EV;
          end
        end
        S_EV:      if (ann_ready) state <= S_EV_WAIT;
        S_EV_WAIT: if (ann_done) begin
          result_char  <= char_of(ann_winner, group);
          result_valid <= 1'b1;
          state        <= S_READY;
        end
        default: state <= S_START;
      endcase
    end
  end

  always_comb begin
    ann_cmd_valid = ann_ready && (state == S_INIT || state == S_TR || state == S_EV);
    ann_cmd       = (state == S_INIT) ? ANN_INIT : (state == S_TR) ? ANN_TRAIN : ANN_EVAL;
    ann_x         = (state == S_EV) ? result_pattern : glyph;
    ann_target    = p;
  end

  always_comb begin
    unique case (state)
      S_START, S_INIT, S_INIT_WAIT: sys_state = SYS_INIT;
      S_TR, S_TR_WAIT:              sys_state = SYS_TRAIN;
      default:                      sys_state = SYS_READY;
    endcase
  end

endmodule
