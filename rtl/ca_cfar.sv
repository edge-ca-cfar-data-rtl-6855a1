// ca_cfar: time-domain cell-averaging CFAR detector with data reduction.
//
// A stream of complex samples enters; only the samples classified as signal
// leave. For every sample the detector computes the instantaneous power,
// pushes it into a sliding window, and compares the power of the cell under
// test (CUT) with T = K * Pn, where Pn is the mean power of 2^M reference
// cells, 2^(M-1) on each side of the CUT beyond G guard cells. The sum of the
// reference cells is updated recursively (one add and one subtract per
// reference run), the mean is a right shift by M, and K is an unsigned Q8
// factor, so the cost per sample does not grow with the window.
//
// Pipeline, 10 cycles in all:
//   1      input register
//   2..4   iq_power        I^2 + Q^2
//   5      cfar_window     shift chain and recursive sum
//   6..9   cfar_threshold  Pn, Pn*K, T, flag
//   10     cfar_output_gate drop noise-only cells
// The decision on a CUT leaves 10 cycles after the sample that completed its
// window entered, i.e. the sample 2^(M-1) + G places later. Every stage is
// qualified by in_valid and there is no back-pressure, so up to one sample
// per clock is accepted. The 10-cycle latency and the parameter values follow
// the detector's description; the stage split is this design's.
module ca_cfar
  import cfar_pkg::*;
#(
  parameter int M = 6,   // 2^M reference cells
  parameter int G = 12   // guard cells per side
) (
  input  logic clk,
  input  logic rst,
  input  logic detect_en,   // 0: forward every sample
  input  k_t   k_num,       // threshold factor, unsigned Q8
  input  logic in_valid,
  input  iq_t  in_i,
  input  iq_t  in_q,
  output logic out_valid,
  output iq_t  out_i,
  output iq_t  out_q
);

  logic in_v_r;
  iq_t  in_i_r, in_q_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_v_r <= 1'b0;
      in_i_r <= '0;
      in_q_r <= '0;
    end else begin
      in_v_r <= in_valid;
      in_i_r <= in_i;
      in_q_r <= in_q;
    end
  end

  logic  pw_valid;
  cell_t pw_cell;

  iq_power u_power (
    .clk      (clk),
    .rst      (rst),
    .in_valid (in_v_r),
    .in_i     (in_i_r),
    .in_q     (in_q_r),
    .out_valid(pw_valid),
    .out_cell (pw_cell)
  );

  logic             win_valid, win_full, win_live;
  cell_t            win_cut;
  logic [P_W+M-1:0] win_sum;

  cfar_window #(.M(M), .G(G)) u_window (
    .clk      (clk),
    .rst      (rst),
    .in_valid (pw_valid),
    .in_cell  (pw_cell),
    .out_valid(win_valid),
    .out_full (win_full),
    .out_live (win_live),
    .out_cut  (win_cut),
    .out_sum  (win_sum)
  );

  logic  th_valid, th_detect, th_live;
  cell_t th_cut;

  cfar_threshold #(.M(M)) u_threshold (
    .clk       (clk),
    .rst       (rst),
    .k_num     (k_num),
    .in_valid  (win_valid),
    .in_full   (win_full),
    .in_live   (win_live),
    .in_cut    (win_cut),
    .in_sum    (win_sum),
    .out_valid (th_valid),
    .out_detect(th_detect),
    .out_live  (th_live),
    .out_cut   (th_cut)
  );

  cfar_output_gate u_gate (
    .clk      (clk),
    .rst      (rst),
    .detect_en(detect_en),
    .in_valid (th_valid),
    .in_detect(th_detect),
    .in_live  (th_live),
    .in_cut   (th_cut),
    .out_valid(out_valid),
    .out_i    (out_i),
    .out_q    (out_q)
  );

endmodule
