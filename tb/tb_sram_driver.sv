// tb_sram_driver: writes random 32-bit words through sram_driver into the
// SRAM chip model, reads them back, checks each half in the chip itself,
// the absence of bus-protocol violations and the seven-cycle access time.
module tb_sram_driver;
  localparam int unsigned ADDR_W = 17;

  logic              clk = 0, rst_n = 0;
  logic              req = 0, we = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [31:0]       wdata = '0;
  logic              ready, done;
  logic [31:0]       rdata;
  logic [ADDR_W:0]   sram_addr;
  logic [15:0]       sram_dq_o, sram_dq_i;
  logic              sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  int                violations, writes, reads;
  int                checks = 0, failures = 0;

  sram_driver #(.ADDR_W(ADDR_W)) dut (.*);

  sram_chip_model #(.ADDR_BITS(ADDR_W + 1)) chip (
    .addr(sram_addr), .dq_o(sram_dq_o), .dq_oe(sram_dq_oe), .dq_i(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n),
    .violations, .writes, .reads
  );

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic w, input logic [ADDR_W-1:0] a, input logic [31:0] d);
    int cyc;
    @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL: not ready"); end
    req = 1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 0; wdata = 32'h0; addr = '0;
    cyc = 1;
    while (!done && cyc < 50) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 7) begin failures++; $display("FAIL: access took %0d cycles, want 7", cyc); end
  endtask

  logic [31:0]       shadow [int];
  logic [ADDR_W-1:0] used [$];

  initial begin
    int v0, w0, r0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    v0 = violations; w0 = writes; r0 = reads;   // ignore power-up glitches
    for (int n = 0; n < 300; n++) begin
      logic [ADDR_W-1:0] a;
      logic [31:0]       d;
      a = ADDR_W'($urandom);
      if (n == 0) a = '0;
      if (n == 1) a = '1;
      d = $urandom;
      access(1'b1, a, d);
      shadow[int'(a)] = d;
      used.push_back(a);
      checks++;
      if (chip.mem[{a, 1'b0}] != d[15:0] || chip.mem[{a, 1'b1}] != d[31:16]) begin
        failures++;
        $display("FAIL: chip holds %h_%h at word %h, want %h",
                 chip.mem[{a, 1'b1}], chip.mem[{a, 1'b0}], a, d);
      end
    end
    foreach (used[n]) begin
      access(1'b0, used[n], 32'h0);
      checks++;
      if (rdata != shadow[int'(used[n])]) begin
        failures++;
        $display("FAIL: read %h from word %h, want %h", rdata, used[n], shadow[int'(used[n])]);
      end
    end
    checks++;
    if (violations != v0 || writes - w0 != 600 || reads - r0 != 600) begin
      failures++;
      $display("FAIL: violations %0d writes %0d reads %0d", violations, writes, reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
