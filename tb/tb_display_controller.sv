// tb_display_controller: reads all 32 cells of the LCD text for each system
// state and compares both lines with the expected strings.
module tb_display_controller;
  import ann_pkg::*;

  sys_state_e        sys_state = SYS_INIT;
  logic [7:0]        epoch = '0;
  logic              converged = 0;
  logic [N_IN-1:0]   pattern = '0;
  logic              result_valid = 0;
  logic [CHAR_W-1:0] result_char = '0;
  logic [4:0]        char_addr = '0;
  logic [7:0]        char_data;
  int                checks = 0, failures = 0;

  display_controller dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_screen(input string top, input string bottom);
    string got0 = "", got1 = "";
    for (int n = 0; n < 32; n++) begin
      char_addr = 5'(n);
      #1;
      if (n < 16) got0 = {got0, string'(char_data)};
      else        got1 = {got1, string'(char_data)};
    end
    checks++;
    if (got0 != top || got1 != bottom) begin
      failures++;
      $display("FAIL: screen [%s][%s], want [%s][%s]", got0, got1, top, bottom);
    end
  endtask

  initial begin
    #1;
    expect_screen("INITIALIZING    ", "PLEASE WAIT     ");
    sys_state = SYS_TRAIN; epoch = 8'd7;
    expect_screen("TRAINING EP 007 ", "PLEASE WAIT     ");
    epoch = 8'd123;
    expect_screen("TRAINING EP 123 ", "PLEASE WAIT     ");
    epoch = 8'd250;
    expect_screen("TRAINING EP 250 ", "PLEASE WAIT     ");
    sys_state = SYS_READY; converged = 1; pattern = 16'h69F9;
    expect_screen(".##.#..######..#", "PRESS KEY3      ");
    converged = 0;
    expect_screen(".##.#..######..#", "NOT CONVERGED   ");
    converged = 1; result_valid = 1; result_char = 0; pattern = 16'hF666;
    expect_screen("####.##..##..##.", "RESULT: A       ");
    result_char = 5'd20;
    expect_screen("####.##..##..##.", "RESULT: ALIF    ");
    result_char = 5'd28; pattern = 16'hFFFF;
    expect_screen("################", "RESULT: DHAL    ");
    result_char = 5'd19; pattern = 16'h0000;
    expect_screen("................", "RESULT: T       ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
