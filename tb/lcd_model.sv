// lcd_model: behavioural model of a 16x2 HD44780-type character LCD on an
// 8-bit bus, write only, for testbenches. Simulation time is in ns.
//
// It executes function set, display on/off, entry mode, clear and set-DDRAM-
// address commands and character writes (taken on the falling edge of E),
// keeps the display memory, and counts timing violations against the usual
// datasheet minimums: 15 ms after power-up before the first command, E high
// for 230 ns, 37 us between bytes and 1.52 ms after a clear. Line 1 starts at
// DDRAM address 0x00, line 2 at 0x40.
module lcd_model (
  input  logic [7:0] data,
  input  logic       rs,
  input  logic       rw,
  input  logic       en,
  output int         violations,
  output int         inits,        // function-set commands seen
  output int         clears,
  output int         frames        // times the last cell of line 2 was written
);

  logic [7:0] ddram [128];
  logic [6:0] ac;
  realtime    t_rise, t_fall, busy_until;
  logic       enabled;

  initial begin
    violations = 0; inits = 0; clears = 0; frames = 0;
    ac = '0; t_rise = 0; t_fall = 0; busy_until = 15ms; enabled = 0;
    foreach (ddram[n]) ddram[n] = 8'h20;
  end

  always @(posedge en) begin
    t_rise = $realtime;
    if ($realtime < busy_until) begin violations++; $display("lcd_model: byte too early at %0t", $realtime); end
  end

  always @(negedge en) begin
    t_fall = $realtime;
    if (t_fall - t_rise < 230ns || rw) begin violations++; $display("lcd_model: short enable at %0t", $realtime); end
    busy_until = t_fall + 37us;
    if (!rs) begin
      if (data == 8'h01) begin
        foreach (ddram[n]) ddram[n] = 8'h20;
        ac = '0;
        clears++;
        busy_until = t_fall + 1.52ms;
      end else if (data[7]) begin
        ac = data[6:0];
      end else if (data[7:4] == 4'h3) begin
        inits++;
      end else if (data[7:3] == 5'b00001) begin
        enabled = data[2];
      end
    end else begin
      ddram[ac] = data;
      if (ac == 7'h4F) frames++;
      ac = ac + 1'b1;
    end
  end

  // one line of the display as text
  function automatic string line(input int n);
    string s = "";
    for (int c = 0; c < 16; c++) s = {s, string'(ddram[(n == 0 ? 0 : 8'h40) + c])};
    return enabled ? s : "";
  endfunction

endmodule
