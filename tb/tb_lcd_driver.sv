// tb_lcd_driver: watches the LCD bus of lcd_driver (with short delays) and
// checks the power-up delay, the initialisation commands, two full screen
// refreshes with the right addresses, RS levels and characters, the enable
// pulse width, the data hold across the pulse and the command and clear
// execution gaps.
module tb_lcd_driver;
  localparam int unsigned POWERUP = 50, SETUP = 2, EN = 4, CMD = 20, CLEAR = 60;

  logic       clk = 0, rst_n = 0;
  logic [4:0] char_addr;
  logic [7:0] char_data;
  logic       done_frame;
  logic [7:0] lcd_data;
  logic       lcd_rs, lcd_rw, lcd_en, lcd_on, lcd_blon;
  int         checks = 0, failures = 0;

  lcd_driver #(.POWERUP_CYC(POWERUP), .SETUP_CYC(SETUP), .EN_CYC(EN),
               .CMD_CYC(CMD), .CLEAR_CYC(CLEAR)) dut (.*);

  // the screen: cell n shows the letter 'a' + n
  assign char_data = 8'h61 + 8'(char_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected bus writes: {rs, byte}
  logic [8:0] want [$];
  initial begin
    want = '{9'h038, 9'h00C, 9'h001, 9'h006};
    for (int f = 0; f < 2; f++) begin
      want.push_back(9'h080);
      for (int n = 0; n < 16; n++) want.push_back({1'b1, 8'h61 + 8'(n)});
      want.push_back(9'h0C0);
      for (int n = 16; n < 32; n++) want.push_back({1'b1, 8'h61 + 8'(n)});
    end
  end

  int   cyc = 0, rise_cyc = 0, fall_cyc = -1, writes = 0, frames = 0;
  logic [8:0] at_rise, prev;
  logic en_q = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (done_frame) frames++;
      if (lcd_en && !en_q) begin
        rise_cyc = cyc;
        at_rise  = {lcd_rs, lcd_data};
        if (writes == 0) begin
          checks++;
          if (cyc < POWERUP) begin failures++; $display("FAIL: first write after %0d cycles", cyc); end
        end else begin
          checks++;
          if (rise_cyc - fall_cyc < ((prev == 9'h001) ? CLEAR : CMD)) begin
            failures++;
            $display("FAIL: only %0d cycles after byte %h", rise_cyc - fall_cyc, prev);
          end
        end
      end
      if (!lcd_en && en_q) begin
        fall_cyc = cyc;
        checks++;
        if (cyc - rise_cyc < EN) begin failures++; $display("FAIL: enable high %0d cycles", cyc - rise_cyc); end
        checks++;
        if ({lcd_rs, lcd_data} != at_rise) begin failures++; $display("FAIL: data changed during enable"); end
        checks++;
        if (writes < want.size() && {lcd_rs, lcd_data} != want[writes]) begin
          failures++;
          $display("FAIL: write %0d is %h, want %h", writes, {lcd_rs, lcd_data}, want[writes]);
        end
        checks++;
        if (lcd_rw || !lcd_on || !lcd_blon) begin failures++; $display("FAIL: control lines"); end
        prev = {lcd_rs, lcd_data};
        writes++;
      end
      en_q <= lcd_en;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (writes == want.size());
    repeat (CMD + 10) @(posedge clk);
    checks++;
    if (frames != 2) begin failures++; $display("FAIL: %0d frames reported, want 2", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
