// tb_char_rom: checks every entry of the training set against a drawing of
// the glyph written as text ('#' filled, '.' empty, four rows of four), checks
// the names, that all 29 glyphs differ, and that entries past the end are
// empty.
module tb_char_rom;
  import ann_pkg::*;

  logic [CHAR_W-1:0] idx;
  logic [15:0]       glyph;
  logic [31:0]       name;
  int                checks = 0, failures = 0;

  char_rom dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string pic [N_CHARS];
  string nm  [N_CHARS];

  function automatic logic [15:0] parse(input string s);
    logic [15:0] g = '0;
    for (int c = 0; c < 16; c++) g[15 - c] = (s[c] == "#");
    return g;
  endfunction

  logic [15:0] seen [N_CHARS];

  initial begin
    pic = '{
      ".##.#..######..#", // A
      "###.###.#..####.", // B
      ".####...#....###", // C
      "###.#..##..####.", // D
      "#######.#...####", // E
      "#######.#...#...", // F
      ".####...#.##.###", // G
      "#..######..##..#", // H
      "###..#...#..###.", // I
      "..##...##..#.##.", // J
      "#..##.#.###.#..#", // K
      "#...#...#...####", // L
      "#..##########..#", // M
      "#..###.##.###..#", // N
      ".##.#..##..#.##.", // O
      "###.#..####.#...", // P
      ".##.#..##.##.###", // Q
      "###.#..####.#..#", // R
      ".#####....#####.", // S
      "####.##..##..##.", // T
      ".#...#...#...#..", // ALIF
      "#..#####.....#..", // BA
      ".##.....#..#####", // TA
      ".#..#.#.#..#####", // THA
      "###...#..#...###", // JIM
      "###..#..#....###", // HA
      ".#..###.#....###", // KHA
      "..#....#...####.", // DAL
      "#.#....#...####."  // DHAL
    };
    nm = '{"A   ","B   ","C   ","D   ","E   ","F   ","G   ","H   ","I   ","J   ","K   ","L   ","M   ","N   ","O   ","P   ","Q   ","R   ","S   ","T   ","ALIF","BA  ","TA  ","THA ","JIM ","HA  ","KHA ","DAL ","DHAL"};

    for (int n = 0; n < N_CHARS; n++) begin
      idx = CHAR_W'(n);
      #10;
      seen[n] = glyph;
      checks++;
      if (glyph != parse(pic[n])) begin
        failures++;
        $display("FAIL: entry %0d glyph %h, want %s", n, glyph, pic[n]);
      end
      checks++;
      for (int c = 0; c < 4; c++)
        if (name[8*(3 - c) +: 8] != nm[n][c]) begin
          failures++;
          $display("FAIL: entry %0d name character %0d", n, c);
          break;
        end
    end
    for (int p = 0; p < N_CHARS; p++)
      for (int q = p + 1; q < N_CHARS; q++) begin
        checks++;
        if (seen[p] == seen[q]) begin
          failures++;
          $display("FAIL: entries %0d and %0d are the same glyph", p, q);
        end
      end
    for (int n = N_CHARS; n < 32; n++) begin
      idx = CHAR_W'(n);
      #10;
      checks++;
      if (glyph != 16'h0 || name != "    ") begin
        failures++;
        $display("FAIL: entry %0d past the end is not empty", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
