// cfar_regs: AXI4-Lite configuration registers of the CA-CFAR core.
//
// Register map (byte addresses, 32-bit registers):
//   0x0  CTRL  bit 0 detect_en: 1 drops noise-only samples, 0 forwards all
//              (reset 1)
//   0x4  KNUM  bits 15:0 threshold factor K, unsigned Q8 (reset 2536, that is
//              9.9063; 2598 gives the calibrated 10.15)
// Other addresses read as zero and ignore writes. All responses are OKAY.
// The core has an AXI4-Lite slave port; the map, the reset values' location
// and the handshake details below are this design's.
//
// Handshake: a write is accepted when AWVALID and WVALID are both high and no
// write response is pending (AWREADY = WREADY, one cycle); BVALID follows on
// the next cycle and stays until BREADY. A read is accepted when no read data
// is pending; RVALID follows on the next cycle and stays until RREADY. WSTRB
// selects the bytes written.
module cfar_regs
  import cfar_pkg::*;
#(
  parameter k_t K_RESET = K_FP
) (
  input  logic        clk,
  input  logic        rst,
  // write address / data / response
  input  logic [3:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  // read address / data
  input  logic [3:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // register outputs
  output logic        detect_en,
  output k_t          k_num
);

  localparam logic [3:0] ADDR_CTRL = 4'h0;
  localparam logic [3:0] ADDR_KNUM = 4'h4;

  logic [31:0] ctrl_q, knum_q;
  logic        wr_go, rd_go;

  always_comb begin
    wr_go         = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
    s_axi_awready = wr_go;
    s_axi_wready  = wr_go;
    s_axi_arready = !s_axi_rvalid;
    rd_go         = s_axi_arvalid && s_axi_arready;
    s_axi_bresp   = 2'b00;
    s_axi_rresp   = 2'b00;
  end

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] data,
                                        logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      r[8*b +: 8] = strb[b] ? data[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_q       <= 32'h1;
      knum_q       <= 32'(K_RESET);
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (wr_go) begin
        unique case (s_axi_awaddr & 4'hC)
          ADDR_CTRL: ctrl_q <= merge(ctrl_q, s_axi_wdata, s_axi_wstrb) & 32'h1;
          ADDR_KNUM: knum_q <= merge(knum_q, s_axi_wdata, s_axi_wstrb) & 32'(k_t'('1));
          default: ;
        endcase
        s_axi_bvalid <= 1'b1;
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end

      if (rd_go) begin
        unique case (s_axi_araddr & 4'hC)
          ADDR_CTRL: s_axi_rdata <= ctrl_q;
          ADDR_KNUM: s_axi_rdata <= knum_q;
          default:   s_axi_rdata <= '0;
        endcase
        s_axi_rvalid <= 1'b1;
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  assign detect_en = ctrl_q[0];
  assign k_num     = k_t'(knum_q);

  // AXI rule: a response, once valid, stays valid and stable until taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
