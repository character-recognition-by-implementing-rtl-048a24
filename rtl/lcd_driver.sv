// lcd_driver: bus driver for the DE2's 16x2 character LCD (HD44780-type
// controller, 8-bit interface, write only).
//
// After POWERUP_CYC cycles of power-on delay it sends the initialisation
// commands 0x38 (8-bit bus, two lines, 5x8 font), 0x0C (display on, no
// cursor), 0x01 (clear) and 0x06 (increment, no shift). It then refreshes
// the screen for ever: 0x80 (top line), the 16 characters of cells 0..15,
// 0xC0 (bottom line), the 16 characters of cells 16..31. The characters come
// from the display controller: char_addr names the cell, char_data is
// sampled when the byte is set up. done_frame pulses after each full refresh.
//
// Every byte is written in three phases: RS and data set up with E low for
// SETUP_CYC cycles, E high for EN_CYC cycles (data taken on E's falling
// edge), then E low while the controller executes, CMD_CYC cycles, or
// CLEAR_CYC after a clear. The defaults fit a 50 MHz clock: 20 ms power-up,
// 40 ns set-up, 320 ns enable pulse, 50 us per command and 2 ms per clear,
// all above the usual HD44780 minimums. RW is tied low (write), the LCD and
// its back-light are switched on.
//
// The document says the LCD's state machine was designed from its datasheet;
// the command sequence and the timing are this design's reading of the
// common HD44780 datasheet.
module lcd_driver #(
  parameter int unsigned POWERUP_CYC = 1_000_000,
  parameter int unsigned SETUP_CYC   = 2,
  parameter int unsigned EN_CYC      = 16,
  parameter int unsigned CMD_CYC     = 2_500,
  parameter int unsigned CLEAR_CYC   = 100_000
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [4:0] char_addr,
  input  logic [7:0] char_data,
  output logic       done_frame,
  output logic [7:0] lcd_data,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_en,
  output logic       lcd_on,
  output logic       lcd_blon
);

  localparam int unsigned N_INIT = 4;
  localparam int unsigned N_REFR = 34;   // 2 address commands + 32 characters

  typedef enum logic [1:0] {S_POWER, S_SETUP, S_EN, S_WAIT} state_e;

  state_e      state;
  logic [23:0] timer;
  logic        init_phase;
  logic [5:0]  step;
  logic [7:0]  byte_nx;    // byte of the current step
  logic        rs_nx;

  // what the current step sends
  always_comb begin
    char_addr = 5'd0;
    rs_nx     = 1'b0;
    byte_nx   = 8'h00;
    if (init_phase) begin
      unique case (step[1:0])
        2'd0: byte_nx = 8'h38;
        2'd1: byte_nx = 8'h0C;
        2'd2: byte_nx = 8'h01;
        default: byte_nx = 8'h06;
      endcase
    end else if (step == 6'd0) begin
      byte_nx = 8'h80;
    end else if (step == 6'd17) begin
      byte_nx = 8'hC0;
    end else begin
      rs_nx     = 1'b1;
      char_addr = (step < 6'd17) ? 5'(step - 6'd1) : 5'(step - 6'd2);
      byte_nx   = char_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_POWER;
      timer      <= 24'(POWERUP_CYC);
      init_phase <= 1'b1;
      step       <= '0;
      lcd_data   <= 8'h00;
      lcd_rs     <= 1'b0;
      lcd_en     <= 1'b0;
      done_frame <= 1'b0;
    end else begin
      done_frame <= 1'b0;
      unique case (state)
        S_POWER: begin
          if (timer == 24'd0) begin
            lcd_data <= byte_nx;
            lcd_rs   <= rs_nx;
            timer    <= 24'(SETUP_CYC);
            state    <= S_SETUP;
          end else timer <= timer - 1'b1;
        end
        S_SETUP: begin
          if (timer == 24'd0) begin
            lcd_en <= 1'b1;
            timer  <= 24'(EN_CYC);
            state  <= S_EN;
          end else timer <= timer - 1'b1;
        end
        S_EN: begin
          if (timer == 24'd0) begin
            lcd_en <= 1'b0;
            timer  <= (init_phase && step == 6'd2) ? 24'(CLEAR_CYC) : 24'(CMD_CYC);
            state  <= S_WAIT;
          end else timer <= timer - 1'b1;
        end
        S_WAIT: begin
          if (timer == 24'd0) begin
            // advance to the next step and set up its byte
            if (init_phase && step == 6'(N_INIT - 1)) begin
              init_phase <= 1'b0;
              step       <= '0;
            end else if (!init_phase && step == 6'(N_REFR - 1)) begin
              step       <= '0;
              done_frame <= 1'b1;
            end else begin
              step <= step + 1'b1;
            end
            state <= S_POWER;   // zero timer: sets up the next byte at once
          end else timer <= timer - 1'b1;
        end
        default: state <= S_POWER;
      endcase
    end
  end

  assign lcd_rw   = 1'b0;
  assign lcd_on   = 1'b1;
  assign lcd_blon = 1'b1;

endmodule
