// display_controller: decides what the 16x2 character LCD shows.
//
// The LCD driver scans the 32 character cells and asks for one at a time on
// char_addr (0..15 top line, 16..31 bottom line); char_data answers in the
// same cycle. The text depends on the supervisor's state:
//
//   SYS_INIT    "INITIALIZING    " / "PLEASE WAIT     "
//   SYS_TRAIN   "TRAINING EP nnn " / "PLEASE WAIT     "   (epoch in decimal)
//   SYS_READY   the switch pattern as 16 cells, '#' for a filled grid cell
//               and '.' for an empty one, row after row /
//               "RESULT: xxxx    " with the recognised character's name once
//               a recognition has run, "PRESS KEY3      " before that, or
//               "NOT CONVERGED   " if training stopped at its epoch limit.
//
// The document says that the input pattern and the recognition result are
// shown on the LCD; the layout and the status texts are this design's own.
// Purely combinational; the character name comes from a char_rom.
module display_controller
  import ann_pkg::*;
(
  input  sys_state_e        sys_state,
  input  logic [7:0]        epoch,
  input  logic              converged,
  input  logic [N_IN-1:0]   pattern,
  input  logic              result_valid,
  input  logic [CHAR_W-1:0] result_char,
  input  logic [4:0]        char_addr,
  output logic [7:0]        char_data
);

  localparam logic [127:0] TXT_INIT  = "INITIALIZING    ";
  localparam logic [127:0] TXT_TRAIN = "TRAINING EP     ";
  localparam logic [127:0] TXT_WAIT  = "PLEASE WAIT     ";
  localparam logic [127:0] TXT_PRESS = "PRESS KEY3      ";
  localparam logic [127:0] TXT_NOCNV = "NOT CONVERGED   ";
  localparam logic [127:0] TXT_RES   = "RESULT:         ";

  logic [31:0] name;
  logic [15:0] unused_glyph;
  char_rom u_names (.idx(result_char), .glyph(unused_glyph), .name(name));

  logic [3:0] col;
  logic [7:0] d2, d1, d0;   // decimal digits of epoch

  function automatic logic [7:0] pick(input logic [127:0] s, input logic [3:0] c);
    return s[8*(15 - c) +: 8];
  endfunction

  always_comb begin
    col = char_addr[3:0];
    d2  = 8'h30 + 8'(epoch / 8'd100);
    d1  = 8'h30 + 8'((epoch / 8'd10) % 8'd10);
    d0  = 8'h30 + 8'(epoch % 8'd10);
    char_data = 8'h20;
    if (!char_addr[4]) begin
      unique case (sys_state)
        SYS_INIT:  char_data = pick(TXT_INIT, col);
        SYS_TRAIN: begin
          char_data = pick(TXT_TRAIN, col);
          if (col == 4'd12) char_data = d2;
          if (col == 4'd13) char_data = d1;
          if (col == 4'd14) char_data = d0;
        end
        default:   char_data = pattern[4'd15 - col] ? "#" : ".";
      endcase
    end else begin
      if (sys_state != SYS_READY) char_data = pick(TXT_WAIT, col);
      else if (result_valid) begin
        char_data = pick(TXT_RES, col);
        if (col >= 4'd8 && col <= 4'd11) char_data = name[8*(11 - col) +: 8];
      end
      else if (converged) char_data = pick(TXT_PRESS, col);
      else                char_data = pick(TXT_NOCNV, col);
    end
  end

endmodule
