// tb_char_recog_top: end-to-end test of the whole recogniser at its default
// sizes and timing (50 MHz clock), with models of the board's SRAM chip and
// LCD. The switches, KEY3 and the LCD are the only ways in and out.
//
// It follows the power-up: LCD initialisation, the weight initialisation
// (on LEDG0; it lasts 63 us, less than one LCD refresh, so "INITIALIZING"
// rarely reaches the screen), "TRAINING EP" with a rising epoch count, then
// the ready screen. A KEY3 press during
// training must be ignored. For Arabic group 0 every trained letter is drawn
// on the switches and recognised; the LCD's top line must show the drawing
// and the bottom line the letter's name. Then the group switches go to 1 and
// to 2: each change must retrain the network, after which the group's three
// Arabic letters and a few English ones are recognised. All 29 characters are
// recognised once. The counts of each mechanism seen are printed, and a
// mechanism that never happened counts as a failure.
module tb_char_recog_top;

  logic        clk = 0, rst_n = 0, key3_n = 1;
  logic [17:0] sw = '0;
  logic [17:0] ledr;
  logic [7:0]  ledg;
  logic [7:0]  lcd_data;
  logic        lcd_rs, lcd_rw, lcd_en, lcd_on, lcd_blon;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic        sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  int          sram_violations, sram_writes, sram_reads;
  int          lcd_violations, lcd_inits, lcd_clears, lcd_frames;
  int          checks = 0, failures = 0;

  char_recog_top dut (.*);

  sram_chip_model chip (
    .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe), .dq_i(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n),
    .violations(sram_violations), .writes(sram_writes), .reads(sram_reads));

  lcd_model lcd (
    .data(lcd_data), .rs(lcd_rs), .rw(lcd_rw), .en(lcd_en),
    .violations(lcd_violations), .inits(lcd_inits), .clears(lcd_clears), .frames(lcd_frames));

  always #10 clk = ~clk;    // 50 MHz

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the characters as drawn, four rows of four, '#' a filled cell
  string pics [29] = '{
    ".##.#..######..#", "###.###.#..####.", ".####...#....###", "###.#..##..####.",
    "#######.#...####", "#######.#...#...", ".####...#.##.###", "#..######..##..#",
    "###..#...#..###.", "..##...##..#.##.", "#..##.#.###.#..#", "#...#...#...####",
    "#..##########..#", "#..###.##.###..#", ".##.#..##..#.##.", "###.#..####.#...",
    ".##.#..##.##.###", "###.#..####.#..#", ".#####....#####.", "####.##..##..##.",
    ".#...#...#...#..", "#..#####.....#..", ".##.....#..#####", ".#..#.#.#..#####",
    "###...#..#...###", "###..#..#....###", ".#..###.#....###", "..#....#...####.",
    "#.#....#...####."};
  string names [29] = '{
    "A", "B", "C", "D", "E", "F", "G", "H", "I", "J", "K", "L", "M", "N", "O", "P",
    "Q", "R", "S", "T", "ALIF", "BA", "TA", "THA", "JIM", "HA", "KHA", "DAL", "DHAL"};

  function automatic logic [15:0] bits_of(input string s);
    logic [15:0] g = '0;
    for (int c = 0; c < 16; c++) g[15 - c] = (s[c] == "#");
    return g;
  endfunction

  function automatic string padded(input string s);
    string r = s;
    while (r.len() < 16) r = {r, " "};
    return r;
  endfunction

  // mechanism counters
  int seen_init_screen = 0, seen_train_screen = 0, epochs_rising = 0;
  int trainings = 0, retrainings = 0, ignored_presses = 0, recognitions = 0;
  int last_epoch_seen = 0, init_phases = 0;

  // initialisation phases, seen on LEDG0 (too short to reach the LCD)
  always @(posedge ledg[0]) if (rst_n) init_phases++;

  // watch the LCD text while the network is busy
  always @(lcd_frames) begin
    string l0;
    l0 = lcd.line(0);
    if (l0 == "INITIALIZING    ") seen_init_screen++;
    if (l0.substr(0, 11) == "TRAINING EP ") begin
      int e;
      seen_train_screen++;
      e = l0.substr(12, 14).atoi();
      if (e > last_epoch_seen) epochs_rising++;
      last_epoch_seen = e;
    end
  end

  // stop with a failure when something expected does not come
  task automatic give_up(input string what);
    failures++;
    $display("FAIL: timed out waiting for %s", what);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic wait_frames(input int n);
    int f0 = lcd_frames, t = 0;
    while (lcd_frames < f0 + n) begin
      @(posedge clk);
      if (++t > 1_500_000) give_up("an LCD refresh");
    end
  endtask

  task automatic press_key3();
    key3_n = 0;
    repeat (20) @(posedge clk);
    key3_n = 1;
    repeat (20) @(posedge clk);
  endtask

  task automatic wait_trained(input string why);
    for (int t = 0; !ledg[1]; t++) begin    // training under way
      @(posedge clk);
      if (t > 2_000_000) give_up("training to start");
    end
    repeat (200_000) @(posedge clk);
    sw[17:2] = bits_of(pics[0]);
    press_key3();                           // must be ignored
    repeat (20_000) @(posedge clk);
    checks++;
    if (!ledg[1] || ledg[4]) begin
      failures++; $display("FAIL: KEY3 during training was not ignored (%s)", why);
    end else ignored_presses++;
    for (int t = 0; !ledg[2]; t++) begin    // ready
      @(posedge clk);
      if (t > 5_000_000) give_up("training to end");
    end
    trainings++;
    checks++;
    if (!ledg[3]) begin failures++; $display("FAIL: training did not converge (%s)", why); end
    wait_frames(2);
    checks++;
    if (lcd.line(1) != "PRESS KEY3      ") begin
      failures++; $display("FAIL: ready screen [%s] (%s)", lcd.line(1), why);
    end
    $display("%s: trained, last epoch on the LCD %0d, at %0t", why, last_epoch_seen, $time);
  endtask

  task automatic recognise(input int c);
    sw[17:2] = bits_of(pics[c]);
    press_key3();
    wait_frames(2);
    recognitions++;
    checks++;
    if (lcd.line(0) != pics[c] || lcd.line(1) != padded({"RESULT: ", names[c]})) begin
      failures++;
      $display("FAIL: character %s shows [%s][%s]", names[c], lcd.line(0), lcd.line(1));
    end
  endtask

  initial begin
    int v0, l0;
    repeat (5) @(posedge clk);
    v0 = sram_violations;    // ignore power-up glitches before reset
    l0 = lcd_violations;
    if (ledg[0]) init_phases++;   // reset starts the first initialisation
    rst_n = 1;

    // group 0: all English letters and ALIF, BA, TA
    wait_trained("group 0");
    for (int c = 0; c < 23; c++) recognise(c);

    // group 1: THA, JIM, HA
    sw[1:0] = 2'd1;
    wait_trained("group 1");
    retrainings++;
    for (int c = 23; c < 26; c++) recognise(c);
    recognise(0);
    recognise(19);

    // group 2: KHA, DAL, DHAL
    sw[1:0] = 2'd2;
    wait_trained("group 2");
    retrainings++;
    for (int c = 26; c < 29; c++) recognise(c);
    recognise(7);

    checks++;
    if (ledr != sw) begin failures++; $display("FAIL: LEDR does not mirror the switches"); end
    checks++;
    if (sram_violations != v0 || lcd_violations != l0) begin
      failures++;
      $display("FAIL: bus violations: SRAM %0d LCD %0d", sram_violations - v0, lcd_violations - l0);
    end
    checks++;
    if (lcd_inits == 0 || lcd_clears == 0) begin failures++; $display("FAIL: LCD never initialised"); end

    $display("mechanisms: init_phases %0d lcd_init %0d init_screen %0d train_screen %0d epochs_rising %0d",
             init_phases, lcd_inits, seen_init_screen, seen_train_screen, epochs_rising);
    $display("mechanisms: trainings %0d retrainings %0d ignored_presses %0d recognitions %0d",
             trainings, retrainings, ignored_presses, recognitions);
    checks++;
    if (init_phases != 3 || seen_train_screen == 0 || epochs_rising < 2 ||
        trainings != 3 || retrainings != 2 || ignored_presses != 3 || recognitions != 32) begin
      failures++;
      $display("FAIL: a mechanism was never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
