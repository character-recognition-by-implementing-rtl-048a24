// sram_driver: state machine for the asynchronous 256K x 16 SRAM that holds
// the perceptron weights.
//
// The network side works in 32-bit words (one single-precision weight each);
// the chip is 16 bits wide, so every word takes two chip accesses, low half at
// chip address 2*addr and high half at 2*addr+1. Each chip access takes three
// clock cycles:
//   SETUP  address (and write data) driven, chip enabled, OE_N and WE_N high
//   STROBE OE_N (read) or WE_N (write) low; read data is sampled at its end
//   HOLD   strobe released, address and write data still held
// so at 50 MHz the strobe is 20 ns wide with 20 ns of address set-up and hold,
// inside the timing of a 10 ns part. The document says only that the SRAM
// state machine was designed from the chip's datasheet; the phase scheme is
// this design's own.
//
// Interface: pulse req (with we, addr, wdata) while ready is high. Exactly seven
// cycles later (six busy cycles, then done) done pulses for one cycle and ready
// is high again; on a read, rdata is valid from then
// until the next request. The bidirectional data bus is split into dq_o,
// dq_oe and dq_i; a board wrapper joins them with a tristate buffer.
module sram_driver #(
  parameter int unsigned ADDR_W = 17   // 32-bit word address: 2^17 words = the whole chip
) (
  input  logic              clk,
  input  logic              rst_n,
  // word port
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic              ready,
  output logic              done,
  output logic [31:0]       rdata,
  // chip pins
  output logic [ADDR_W:0]   sram_addr,
  output logic [15:0]       sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [15:0]       sram_dq_i,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  output logic              sram_ub_n,
  output logic              sram_lb_n
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_STROBE, S_HOLD} state_e;

  state_e            state;
  logic              half;       // 0: low 16 bits, 1: high 16 bits
  logic              we_q;
  logic [ADDR_W-1:0] addr_q;
  logic [31:0]       wdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      half    <= 1'b0;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          we_q    <= we;
          addr_q  <= addr;
          wdata_q <= wdata;
          half    <= 1'b0;
          state   <= S_SETUP;
        end
        S_SETUP:  state <= S_STROBE;
        S_STROBE: begin
          if (!we_q) begin
            if (half) rdata[31:16] <= sram_dq_i;
            else      rdata[15:0]  <= sram_dq_i;
          end
          state <= S_HOLD;
        end
        S_HOLD: begin
          if (half) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            half  <= 1'b1;
            state <= S_SETUP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready      = (state == S_IDLE);
  assign sram_addr  = {addr_q, half};
  assign sram_dq_o  = half ? wdata_q[31:16] : wdata_q[15:0];
  assign sram_dq_oe = we_q && (state != S_IDLE);
  assign sram_ce_n  = (state == S_IDLE);
  assign sram_oe_n  = !((state == S_STROBE) && !we_q);
  assign sram_we_n  = !((state == S_STROBE) && we_q);
  assign sram_ub_n  = 1'b0;
  assign sram_lb_n  = 1'b0;

  // a request is only accepted while idle
  a_req_when_ready: assert property (@(posedge clk) disable iff (!rst_n) req |-> ready)
    else $error("sram_driver: request while busy");

endmodule
