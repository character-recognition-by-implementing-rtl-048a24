// sram_chip_model: behavioural model of a 256K x 16 asynchronous SRAM
// (IS61LV25616-class part, as on the DE2 board), for testbenches only.
//
// Reads are combinational while CE_N and OE_N are low and WE_N is high; a
// write takes the data on the rising edge of WE_N with CE_N low, honouring
// the byte enables. The bidirectional bus appears as the controller's
// dq_o/dq_oe and the chip's dq_i. The model counts protocol violations: a
// write strobe without the controller driving the bus, an address change
// during a strobe, or OE_N and WE_N low together.
module sram_chip_model #(
  parameter int unsigned ADDR_BITS = 18
) (
  input  logic [ADDR_BITS-1:0] addr,
  input  logic [15:0]          dq_o,
  input  logic                 dq_oe,
  output logic [15:0]          dq_i,
  input  logic                 ce_n,
  input  logic                 oe_n,
  input  logic                 we_n,
  input  logic                 ub_n,
  input  logic                 lb_n,
  output int                   violations,
  output int                   writes,
  output int                   reads
);

  logic [15:0] mem [2**ADDR_BITS];
  logic [ADDR_BITS-1:0] strobe_addr;

  initial begin
    violations = 0;
    writes     = 0;
    reads      = 0;
  end

  assign dq_i = (!ce_n && !oe_n && we_n) ? mem[addr] : 16'hDEAD;

  always @(negedge we_n) begin
    strobe_addr = addr;
    if (!dq_oe || !oe_n) violations++;
  end

  always @(posedge we_n) begin
    if (!ce_n) begin
      if (addr != strobe_addr || !dq_oe) violations++;
      if (!lb_n) mem[addr][7:0]  = dq_o[7:0];
      if (!ub_n) mem[addr][15:8] = dq_o[15:8];
      writes++;
    end
  end

  always @(negedge oe_n) begin
    strobe_addr = addr;
    if (dq_oe) violations++;
  end

  always @(posedge oe_n) begin
    if (!ce_n) begin
      if (addr != strobe_addr) violations++;
      reads++;
    end
  end

endmodule
