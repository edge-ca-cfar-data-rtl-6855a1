// iq_power: instantaneous power of a complex sample, y = I^2 + Q^2.
//
// Two squarers and one adder in three register stages, shaped like a DSP
// slice: stage 1 registers the operands, stage 2 registers the two squares,
// stage 3 registers their sum. The squares are exact signed products and the
// sum is kept at 32 bits, so no sample saturates; the instantaneous-power
// metric and its width follow the detector's fixed-point description, the
// three-stage split is this design's choice.
//
// Interface: in_valid/in_i/in_q enter on any cycle (no back-pressure);
// out_valid/out_cell appear exactly 3 cycles later. out_cell carries the
// sample's own I and Q next to its power.
module iq_power
  import cfar_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  iq_t   in_i,
  input  iq_t   in_q,
  output logic  out_valid,
  output cell_t out_cell
);

  // stage 1: operand registers
  logic v1;
  iq_t  i1, q1;
  // stage 2: product registers
  logic v2;
  iq_t  i2, q2;
  pwr_t ii2, qq2;

 // operands widened to the product width so the squares are computed at
  // full precision; the square of a 16-bit value is below 2^31
  logic signed [P_W-1:0] i1w, q1w;
  always_comb begin
    i1w = P_W'(i1);
    q1w = P_W'(q1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
      i1 <= '0;  q1 <= '0;
      i2 <= '0;  q2 <= '0;
      ii2 <= '0; qq2 <= '0;
      out_cell <= '0;
    end else begin
      v1 <= in_valid;
      i1 <= in_i;
      q1 <= in_q;

      v2  <= v1;
      i2  <= i1;
      q2  <= q1;
      ii2 <= pwr_t'(i1w * i1w);
      qq2 <= pwr_t'(q1w * q1w);

      out_valid  <= v2;
      out_cell.i <= i2;
      out_cell.q <= q2;
      out_cell.p <= ii2 + qq2;
    end
  end

endmodule
