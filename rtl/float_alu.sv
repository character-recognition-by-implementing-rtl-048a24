// float_alu: the floating-point processor used by the perceptron.
//
// It works on IEEE-754 single-precision numbers and offers four operations:
// add, subtract, multiply and a greater-than compare (see ann_pkg::fop_e).
// The network needs nothing else: weighted sums with bipolar inputs are
// additions and subtractions, the learning step is a multiplication by the
// learning rate, and the activation and the winner search are comparisons.
//
// The document names this block only; format, operation set and rounding are
// this design's choices. Simplifications, all deliberate:
//   * results are truncated (round toward zero), not rounded to nearest;
//   * subnormal inputs count as zero and subnormal results flush to zero;
//   * an exponent overflow gives infinity; infinities and NaNs on the inputs
//     are treated as ordinary large numbers.
// The perceptron's weights stay far from all of these limits.
//
// Interface and timing: present op, a and b with in_valid for one cycle; the
// result (and for FOP_GT the flag) appears with out_valid exactly one cycle
// later. A new operation may be issued every cycle.
module float_alu
  import ann_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  fop_e   op,
  input  float_t a,
  input  float_t b,
  output logic   out_valid,
  output float_t result,
  output logic   flag
);

  // ---------------- operand unpacking ----------------
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        za, zb;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ (op == FOP_SUB);
    ea = a[30:23];
    eb = b[30:23];
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ma = za ? 24'd0 : {1'b1, a[22:0]};
    mb = zb ? 24'd0 : {1'b1, b[22:0]};
  end

  // ---------------- add / subtract ----------------
  float_t      add_res;
  logic        big_s;
  logic [7:0]  big_e, sml_e, d;
  logic [23:0] big_m, sml_m;
  logic [47:0] big_x, sml_x;
  logic [48:0] sum;
  logic [5:0]  lz;
  logic [47:0] norm;
  logic signed [9:0] res_e;

  always_comb begin
    if ({ea, ma} >= {eb, mb}) begin
      big_s = sa; big_e = ea; big_m = ma; sml_e = eb; sml_m = mb;
    end else begin
      big_s = sb; big_e = eb; big_m = mb; sml_e = ea; sml_m = ma;
    end
    d     = big_e - sml_e;
    big_x = {big_m, 24'd0};
    sml_x = (d >= 8'd48) ? 48'd0 : ({sml_m, 24'd0} >> d);
    if (sa == sb) sum = {1'b0, big_x} + {1'b0, sml_x};
    else          sum = {1'b0, big_x} - {1'b0, sml_x};

    // leading-zero count of sum[47:0]
    lz = 6'd48;
    for (int i = 0; i < 48; i++)
      if (sum[i]) lz = 6'(47 - i);
    norm = sum[47:0] << lz;

    add_res = F_ZERO;
    if (sum[48]) begin
      res_e = 10'(big_e) + 10'sd1;
      if (res_e >= 10'sd255) add_res = {big_s, 8'hFF, 23'd0};
      else                   add_res = {big_s, res_e[7:0], sum[47:25]};
    end else if (sum[47:0] != 48'd0) begin
      res_e = 10'(big_e) - 10'(lz);
      if (res_e <= 10'sd0) add_res = F_ZERO;
      else                 add_res = {big_s, res_e[7:0], norm[46:24]};
    end else begin
      res_e = 10'sd0;
      add_res = F_ZERO;
    end
  end

  // ---------------- multiply ----------------
  float_t      mul_res;
  logic [47:0] prod;
  logic signed [9:0] mul_e;

  always_comb begin
    prod    = ma * mb;
    mul_e   = 10'(ea) + 10'(eb) - 10'sd127 + (prod[47] ? 10'sd1 : 10'sd0);
    mul_res = F_ZERO;
    if (za || zb)              mul_res = F_ZERO;
    else if (mul_e <= 10'sd0)  mul_res = F_ZERO;
    else if (mul_e >= 10'sd255) mul_res = {a[31] ^ b[31], 8'hFF, 23'd0};
    else if (prod[47])         mul_res = {a[31] ^ b[31], mul_e[7:0], prod[46:24]};
    else                       mul_res = {a[31] ^ b[31], mul_e[7:0], prod[45:23]};
  end

  // ---------------- compare ----------------
  logic gt;
  always_comb begin
    if (za && zb)              gt = 1'b0;            // +0 == -0
    else if (a[31] != b[31])   gt = !a[31];
    else if (!a[31])           gt = (a[30:0] > b[30:0]);
    else                       gt = (a[30:0] < b[30:0]);
  end

  // ---------------- output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= F_ZERO;
      flag      <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        unique case (op)
          FOP_ADD, FOP_SUB: result <= add_res;
          FOP_MUL:          result <= mul_res;
          default:          result <= F_ZERO;
        endcase
        flag <= (op == FOP_GT) ? gt : 1'b0;
      end
    end
  end

endmodule
