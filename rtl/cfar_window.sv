// cfar_window: CA-CFAR sliding window with an in-place recursive reference sum.
//
// The window is a register shift chain of 2^M + 2G + 1 cells (89 with M = 6,
// G = 12): 2^(M-1) leading reference cells, G guard cells, the cell under test
// (CUT), G guard cells and 2^(M-1) lagging reference cells. Cell 0 is the
// newest. The chain is plain registers, with no block RAM, so it maps to
// LUT-based shift registers, and it shifts only when a new cell arrives.
//
// The reference sum is not recomputed over the window. It lives in one sum
// register that each shift updates with the cells that enter and leave the two
// reference runs:
//   s <= s + x_new - x[NH-1] + x[NH+2G] - x[WIN-1]      (NH = 2^(M-1))
// so the cost per sample is constant, whatever the window size. Cell
// positions, the recursive update and the register-only chain follow the
// detector's description; handling the guard gap with one add/subtract pair per
// reference run, and the fill flag, are this design's choices.
//
// Interface: in_valid/in_cell push a cell (any cycle, no back-pressure). One
// cycle later out_valid is high, out_cut is the cell that is now the CUT and
// out_sum the sum of the 2^M reference cells around it. out_full is high once
// WIN cells have entered since reset; before that the window still holds
// reset zeros and decisions on it are not meaningful. out_live is high once
// the CUT position holds a pushed sample (NH + G + 1 cells entered).
module cfar_window
  import cfar_pkg::*;
#(
  parameter int M = 6,   // 2^M reference cells in total
  parameter int G = 12   // guard cells on each side of the CUT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  cell_t            in_cell,
  output logic             out_valid,
  output logic             out_full,
  output logic             out_live,
  output cell_t            out_cut,
  output logic [P_W+M-1:0] out_sum
);

  localparam int NH    = 2 ** (M - 1);        // reference cells per side
  localparam int WIN   = 2 * NH + 2 * G + 1;  // whole window
  localparam int CUT   = NH + G;              // CUT position after a shift
  localparam int SUM_W = P_W + M;
  localparam int CNT_W = $clog2(WIN + 1);

  cell_t            win [WIN];
  logic [SUM_W-1:0] sum;
  logic [CNT_W-1:0] fill;

  // the four cells of the recursive update, taken before the shift
  logic [SUM_W-1:0] lead_in, lead_out, lag_in, lag_out;
  always_comb begin
    lead_in  = SUM_W'(in_cell.p);
    lead_out = SUM_W'(win[NH-1].p);
    lag_in   = SUM_W'(win[NH+2*G].p);
    lag_out  = SUM_W'(win[WIN-1].p);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < WIN; k++) win[k] <= '0;
      sum       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_full  <= 1'b0;
      out_live  <= 1'b0;
      out_cut   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win[0] <= in_cell;
        for (int k = 1; k < WIN; k++) win[k] <= win[k-1];
        sum     <= sum + lead_in - lead_out + lag_in - lag_out;
        out_cut <= win[CUT-1];
        if (fill != CNT_W'(WIN)) fill <= fill + 1'b1;
        out_full <= (fill >= CNT_W'(WIN - 1));
        out_live <= (fill >= CNT_W'(CUT));
      end
    end
  end

  assign out_sum = sum;

endmodule
