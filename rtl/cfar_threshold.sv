// cfar_threshold: CA-CFAR threshold and comparison.
//
// From the sum of the 2^M reference cells it forms the noise estimate
// Pn = sum >> M (division by a right shift, since the number of reference
// cells is a power of two), the threshold T = (Pn * K) >> K_FRAC with K an
// unsigned Q8 factor, and the detection flag CUT power > T. The flag is
// forced low while the window is not yet full. Shift-divide, Q8 multiply and
// comparison follow the detector's fixed-point description; the strict
// comparison, the run-time K input and the four-stage split are this design's.
// in_live (the CUT holds a real sample) is only carried along, for the
// output stage's bypass mode.
//
// Pipeline (4 cycles from in_valid to out_valid):
//   1  noise estimate Pn
//   2  product Pn * K (multiplier output register)
//   3  threshold T = product >> K_FRAC
//   4  detection flag register
// k_num is sampled together with the cell (stage 1) and may change between
// samples.
module cfar_threshold
  import cfar_pkg::*;
#(
  parameter int M = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  k_t               k_num,
  input  logic             in_valid,
  input  logic             in_full,
  input  logic             in_live,
  input  cell_t            in_cut,
  input  logic [P_W+M-1:0] in_sum,
  output logic             out_valid,
  output logic             out_detect,
  output logic             out_live,
  output cell_t            out_cut
);

  localparam int PROD_W = P_W + K_W;

  logic              v1, v2, v3;
  logic              f1, f2, f3;
  logic              l1, l2, l3;
  cell_t             c1, c2, c3;
  pwr_t              noise;
  k_t                k1;
  logic [PROD_W-1:0] prod;
  logic [PROD_W-1:0] thr;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      f1 <= 1'b0; f2 <= 1'b0; f3 <= 1'b0;
      l1 <= 1'b0; l2 <= 1'b0; l3 <= 1'b0;
      out_live   <= 1'b0;
      c1 <= '0;   c2 <= '0;   c3 <= '0;
      noise      <= '0;
      k1         <= '0;
      prod       <= '0;
      thr        <= '0;
      out_valid  <= 1'b0;
      out_detect <= 1'b0;
      out_cut    <= '0;
    end else begin
      // 1: Pn = sum / 2^M
      v1    <= in_valid;
      f1    <= in_full;
      l1    <= in_live;
      c1    <= in_cut;
      noise <= pwr_t'(in_sum >> M);
      k1    <= k_num;
      // 2: Pn * K
      v2   <= v1;
      f2   <= f1;
      l2   <= l1;
      c2   <= c1;
      prod <= PROD_W'(noise) * PROD_W'(k1);
      // 3: T = Pn * K / 2^K_FRAC
      v3  <= v2;
      f3  <= f2;
      l3  <= l2;
      c3  <= c2;
      thr <= prod >> K_FRAC;
      // 4: detection flag
      out_valid  <= v3;
      out_cut    <= c3;
      out_live   <= l3;
      out_detect <= f3 && (PROD_W'(c3.p) > thr);
    end
  end

endmodule
