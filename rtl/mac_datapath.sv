// mac_datapath: multiplier, adder and accumulator of the MAC unit.
//
// On each cycle with `en` high the product X*Y of two signed DATA_W-bit
// fixed-point words is added to the accumulator; with `clr` high as well the
// accumulator is first cleared, so the first product of a window starts a new
// sum. The accumulator keeps the full product width plus enough guard bits
// for KMAX*KMAX products, so no intermediate sum can overflow. `result` is
// the accumulator scaled back to the word format (arithmetic shift right by
// FRAC_BITS, i.e. rounding toward minus infinity) and saturated to the
// DATA_W-bit range. One multiply-accumulate per cycle, result valid the cycle
// after the last `en`. The structure (one multiplier, one adder, one
// accumulator) follows the design description; the word format, guard bits,
// rounding and saturation are this design's own choices.
module mac_datapath
  import conv2d_pkg::*;
#(
  parameter int unsigned KMAX_P = KMAX,
  localparam int unsigned ACC_W = 2 * DATA_W + $clog2(KMAX_P * KMAX_P + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  word_t            x,
  input  word_t            y,
  output word_t            result
);

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'(2 ** (DATA_W - 1) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(2 ** (DATA_W - 1));

  logic signed [2*DATA_W-1:0] prod;
  logic signed [ACC_W-1:0]    acc_q, scaled;

  assign prod = x * y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc_q <= '0;
    else if (en)  acc_q <= (clr ? '0 : acc_q) + ACC_W'(prod);
  end

  assign scaled = acc_q >>> FRAC_BITS;

  always_comb begin
    if (scaled > MAXV)      result = word_t'(MAXV);
    else if (scaled < MINV) result = word_t'(MINV);
    else                    result = word_t'(scaled);
  end

endmodule
