// kmu_core: CA-CFAR data-reduction core for the receive path of one SDR node.
//
// The core sits between the transceiver interface and the path to the host.
// It takes the 12-bit I/Q words of the receiver, sign-extends them to 16-bit
// signed samples and runs them through the CA-CFAR detector (ca_cfar), which
// forwards only the samples whose power stands above the adaptive threshold;
// noise-only samples are dropped inside the node, so the data sent on scales
// with the duty cycle of the signals present. An AXI4-Lite slave (cfar_regs)
// lets the processor switch the reduction off and set the threshold factor K.
//
// Ports: re_in/im_in with valid_re/valid_im come from the transceiver
// interface; a sample is taken when both valids are high. re_out/im_out with
// valid_out carry the forwarded samples, 10 clock cycles after the input
// sample that completed the CUT's window (2^(M-1) + G samples after the CUT
// itself). One clock, clk (100 MHz in the reference system), runs the whole
// core, including the register slave; rst is synchronous, active high.
//
// Follows the source design: port names and widths, 2^6 = 64 reference
// cells, 12 guard cells, Q8 K = 2536 (9.9063), the 10-cycle latency.
// This design's own: one clock domain, the valid_out strobe, the AND of the
// two input valids, sign extension of the 12-bit inputs, the register map.
module kmu_core
  import cfar_pkg::*;
#(
  parameter int IN_W    = 12,    // transceiver sample width
  parameter int M       = 6,     // 2^M reference cells
  parameter int G       = 12,    // guard cells per side
  parameter k_t K_RESET = K_FP   // threshold factor after reset, Q8
) (
  input  logic                   clk,
  input  logic                   rst,
  // samples from the transceiver interface
  input  logic signed [IN_W-1:0] re_in,
  input  logic signed [IN_W-1:0] im_in,
  input  logic                   valid_re,
  input  logic                   valid_im,
  // AXI4-Lite configuration slave
  input  logic [3:0]             s_axi_awaddr,
  input  logic                   s_axi_awvalid,
  output logic                   s_axi_awready,
  input  logic [31:0]            s_axi_wdata,
  input  logic [3:0]             s_axi_wstrb,
  input  logic                   s_axi_wvalid,
  output logic                   s_axi_wready,
  output logic [1:0]             s_axi_bresp,
  output logic                   s_axi_bvalid,
  input  logic                   s_axi_bready,
  input  logic [3:0]             s_axi_araddr,
  input  logic                   s_axi_arvalid,
  output logic                   s_axi_arready,
  output logic [31:0]            s_axi_rdata,
  output logic [1:0]             s_axi_rresp,
  output logic                   s_axi_rvalid,
  input  logic                   s_axi_rready,
  // forwarded samples
  output iq_t                    re_out,
  output iq_t                    im_out,
  output logic                   valid_out
);

  logic detect_en;
  k_t   k_num;

  cfar_regs #(.K_RESET(K_RESET)) u_regs (
    .clk          (clk),
    .rst          (rst),
    .s_axi_awaddr (s_axi_awaddr),
    .s_axi_awvalid(s_axi_awvalid),
    .s_axi_awready(s_axi_awready),
    .s_axi_wdata  (s_axi_wdata),
    .s_axi_wstrb  (s_axi_wstrb),
    .s_axi_wvalid (s_axi_wvalid),
    .s_axi_wready (s_axi_wready),
    .s_axi_bresp  (s_axi_bresp),
    .s_axi_bvalid (s_axi_bvalid),
    .s_axi_bready (s_axi_bready),
    .s_axi_araddr (s_axi_araddr),
    .s_axi_arvalid(s_axi_arvalid),
    .s_axi_arready(s_axi_arready),
    .s_axi_rdata  (s_axi_rdata),
    .s_axi_rresp  (s_axi_rresp),
    .s_axi_rvalid (s_axi_rvalid),
    .s_axi_rready (s_axi_rready),
    .detect_en    (detect_en),
    .k_num        (k_num)
  );

  iq_t  smp_i, smp_q;
  logic smp_valid;

  always_comb begin
    smp_i     = iq_t'(re_in);   // sign extension to IQ_W
    smp_q     = iq_t'(im_in);
    smp_valid = valid_re && valid_im;
  end

  ca_cfar #(.M(M), .G(G)) u_cfar (
    .clk      (clk),
    .rst      (rst),
    .detect_en(detect_en),
    .k_num    (k_num),
    .in_valid (smp_valid),
    .in_i     (smp_i),
    .in_q     (smp_q),
    .out_valid(valid_out),
    .out_i    (re_out),
    .out_q    (im_out)
  );

endmodule
