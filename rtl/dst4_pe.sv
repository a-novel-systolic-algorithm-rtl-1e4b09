// dst4_pe: one processing element of the linear systolic arrays.
//
// Each PE holds one fixed weight W (a sine value of the convolution kernel).
// Per clock it multiplies the input sample that is passing through it by W,
// rounds the product back to the sample's scale and adds it to, or subtracts it
// from, the partial result that is passing through it. A multiplexer chooses
// add or subtract under control of a sign tag that travels with the partial
// result: bit 0 of the tag belongs to this PE, and the tag leaves shifted right
// by one so that the next PE again finds its own bit at position 0. The PE is
// therefore identical for every position and for both arrays; only W differs.
// The multiplier, adder and sign multiplexers follow the processing element
// described for the algorithm; the shifting tag vector is this design's own
// encoding of the tag-control scheme.
//
// Timing: the input sample passes through two registers (u_in to u_out takes
// two cycles), the partial result through one (y_in to y_out takes one cycle).
// This speed ratio is what lets a partial result meet every input sample it
// needs without any broadcast signal. The multiply-add is combinational
// between the registers.
module dst4_pe #(
  parameter int UW   = 25,                                   // input sample width
  parameter int AW   = 28,                                   // partial result width
  parameter int L    = 5,                                    // PEs per array (tag width)
  parameter int IDXW = 3,                                    // output index tag width
  parameter dst4_pkg::coef_t W = dst4_pkg::coef_t'(1 <<< dst4_pkg::COEF_FRAC)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [UW-1:0]   u_in,
  output logic signed [UW-1:0]   u_out,
  input  logic                   y_valid_in,
  input  logic [L-1:0]           y_neg_in,    // sign tag, bit 0 for this PE
  input  logic [IDXW-1:0]        y_idx_in,
  input  logic signed [AW-1:0]   y_in,
  output logic                   y_valid_out,
  output logic [L-1:0]           y_neg_out,
  output logic [IDXW-1:0]        y_idx_out,
  output logic signed [AW-1:0]   y_out
);
  import dst4_pkg::*;

  localparam int PW = UW + COEF_W;

  logic signed [UW-1:0] u_r1;
  logic signed [PW-1:0] prod;
  logic signed [AW-1:0] term;

  always_comb begin
    prod = PW'(u_in) * PW'(W);
    // round to nearest, then drop the coefficient fraction bits
    term = AW'((prod + PW'(1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC);
  end

  always_ff @(posedge clk) begin
    u_r1  <= u_in;
    u_out <= u_r1;
    y_out     <= y_neg_in[0] ? (y_in - term) : (y_in + term);
    y_neg_out <= y_neg_in >> 1;
    y_idx_out <= y_idx_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid_out <= 1'b0;
    else        y_valid_out <= y_valid_in;
  end

endmodule
