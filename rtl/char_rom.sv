// char_rom: the training data set, 29 characters on a 4x4 binary grid.
//
// Entries 0..19 are the English letters A..T, entries 20..28 the Arabic
// letters alif, ba, ta, tha, jim, ha, kha, dal, dhal. Each glyph is 16 bits,
// row-major, bit 15 the top-left cell, a 1 a filled cell (bipolar +1) and a
// 0 an empty one (bipolar -1). The name is four ASCII characters for the LCD,
// which has no Arabic glyphs, so Arabic letters are shown transliterated.
//
// The document gives the size of the set (20 English, 9 Arabic, 4x4 grid)
// but not the drawings; the glyphs, the choice of letters and the names are
// this design's own. All 29 glyphs differ, which is all a perceptron needs:
// any single corner of the 16-cube can be cut off from all the others by a
// hyperplane, so every neuron's one-against-the-rest problem is separable.
//
// Purely combinational: idx in, glyph and name out in the same cycle. An
// index past the end returns an empty grid and blanks.
module char_rom
  import ann_pkg::*;
(
  input  logic [CHAR_W-1:0] idx,
  output logic [15:0]       glyph,
  output logic [31:0]       name    // 4 ASCII characters, first in bits 31:24
);

  always_comb begin
    unique case (idx)
      5'd0:  begin glyph = 16'h69F9; name = "A   "; end
      5'd1:  begin glyph = 16'hEE9E; name = "B   "; end
      5'd2:  begin glyph = 16'h7887; name = "C   "; end
      5'd3:  begin glyph = 16'hE99E; name = "D   "; end
      5'd4:  begin glyph = 16'hFE8F; name = "E   "; end
      5'd5:  begin glyph = 16'hFE88; name = "F   "; end
      5'd6:  begin glyph = 16'h78B7; name = "G   "; end
      5'd7:  begin glyph = 16'h9F99; name = "H   "; end
      5'd8:  begin glyph = 16'hE44E; name = "I   "; end
      5'd9:  begin glyph = 16'h3196; name = "J   "; end
      5'd10: begin glyph = 16'h9AE9; name = "K   "; end
      5'd11: begin glyph = 16'h888F; name = "L   "; end
      5'd12: begin glyph = 16'h9FF9; name = "M   "; end
      5'd13: begin glyph = 16'h9DB9; name = "N   "; end
      5'd14: begin glyph = 16'h6996; name = "O   "; end
      5'd15: begin glyph = 16'hE9E8; name = "P   "; end
      5'd16: begin glyph = 16'h69B7; name = "Q   "; end
      5'd17: begin glyph = 16'hE9E9; name = "R   "; end
      5'd18: begin glyph = 16'h7C3E; name = "S   "; end
      5'd19: begin glyph = 16'hF666; name = "T   "; end
      5'd20: begin glyph = 16'h4444; name = "ALIF"; end
      5'd21: begin glyph = 16'h9F04; name = "BA  "; end
      5'd22: begin glyph = 16'h609F; name = "TA  "; end
      5'd23: begin glyph = 16'h4A9F; name = "THA "; end
      5'd24: begin glyph = 16'hE247; name = "JIM "; end
      5'd25: begin glyph = 16'hE487; name = "HA  "; end
      5'd26: begin glyph = 16'h4E87; name = "KHA "; end
      5'd27: begin glyph = 16'h211E; name = "DAL "; end
      5'd28: begin glyph = 16'hA11E; name = "DHAL"; end
      default: begin glyph = 16'h0000; name = "    "; end
    endcase
  end

endmodule
