// cfar_output_gate: output stage of the CA-CFAR detector.
//
// Each classified cell arrives with its detection flag. With detection
// enabled, a cell whose flag is inactive is dropped here and never reaches the
// output; a cell whose flag is active is forwarded. With detection disabled
// (detect_en = 0) every cell that holds a real sample (in_live) is forwarded,
// which gives the full raw stream for comparison. Dropping noise samples at the node is the detector's data
// reduction; the bypass switch is this design's way of turning it off.
//
// Interface: one register stage. out_valid pulses one cycle after a forwarded
// in_valid; out_i/out_q hold the last forwarded sample otherwise.
module cfar_output_gate
  import cfar_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  detect_en,
  input  logic  in_valid,
  input  logic  in_detect,
  input  logic  in_live,
  input  cell_t in_cut,
  output logic  out_valid,
  output iq_t   out_i,
  output iq_t   out_q
);

  logic forward;
  always_comb forward = in_valid && (detect_en ? in_detect : in_live);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= forward;
      if (forward) begin
        out_i <= in_cut.i;
        out_q <= in_cut.q;
      end
    end
  end

endmodule
