// tb_cfar_regs: self-checking test of the AXI4-Lite register slave.
// Checks the reset values, writes with full and partial byte strobes, masking
// of unused bits, reads of unmapped addresses, and that write responses and
// read data wait for BREADY/RREADY when the master holds them low.
module tb_cfar_regs;
  import cfar_pkg::*;

  logic        clk = 0, rst = 1;
  logic [3:0]  s_axi_awaddr = '0, s_axi_araddr = '0, s_axi_wstrb = '0;
  logic        s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0;
  logic        s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0;
  logic        s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  logic        detect_en;
  k_t          k_num;

  int checks = 0, failures = 0;

  cfar_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic axi_write(logic [3:0] addr, logic [31:0] data, logic [3:0] strb,
                           int bready_delay);
    s_axi_awaddr  <= addr;
    s_axi_wdata   <= data;
    s_axi_wstrb   <= strb;
    s_axi_awvalid <= 1;
    s_axi_wvalid  <= 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 0;
    s_axi_wvalid  <= 0;
    repeat (bready_delay) begin
      @(posedge clk);
      check("bvalid held", s_axi_bvalid, 1);
    end
    s_axi_bready <= 1;
    do @(posedge clk); while (!s_axi_bvalid);
    check("bresp", s_axi_bresp, 0);
    s_axi_bready <= 0;
  endtask

  task automatic axi_read(logic [3:0] addr, int rready_delay, output logic [31:0] data);
    s_axi_araddr  <= addr;
    s_axi_arvalid <= 1;
    do @(posedge clk); while (!s_axi_arready);
    s_axi_arvalid <= 0;
    repeat (rready_delay) begin
      @(posedge clk);
      check("rvalid held", s_axi_rvalid, 1);
    end
    s_axi_rready <= 1;
    do @(posedge clk); while (!s_axi_rvalid);
    data = s_axi_rdata;
    check("rresp", s_axi_rresp, 0);
    s_axi_rready <= 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check("reset detect_en", detect_en, 1);
    check("reset k_num", k_num, 2536);
    axi_read(4'h0, 0, d);  check("read CTRL", d, 1);
    axi_read(4'h4, 3, d);  check("read KNUM", d, 2536);
    axi_write(4'h4, 32'hABCD_0A26, 4'hF, 2);          // 0x0A26 = 2598
    @(posedge clk);
    check("k_num after write", k_num, 2598);
    axi_read(4'h4, 1, d);  check("KNUM masked to 16 bits", d, 2598);
    axi_write(4'h0, 32'h0000_00FE, 4'h1, 0);
    @(posedge clk);
    check("detect_en cleared", detect_en, 0);
    axi_write(4'h4, 32'h0000_7700, 4'h2, 1);          // only byte 1
    @(posedge clk);
    check("byte strobe", k_num, 16'h7726);
    axi_write(4'h8, 32'hFFFF_FFFF, 4'hF, 0);          // unmapped
    axi_read(4'h8, 0, d);  check("unmapped reads 0", d, 0);
    axi_read(4'h0, 0, d);  check("CTRL unchanged", d, 0);
    axi_write(4'h0, 32'h1, 4'hF, 0);
    @(posedge clk);
    check("detect_en set", detect_en, 1);
    for (int n = 0; n < 50; n++) begin
      logic [15:0] v;
      v = 16'($urandom);
      axi_write(4'h4, {16'($urandom), v}, 4'hF, $urandom_range(0, 2));
      axi_read(4'h4, $urandom_range(0, 2), d);
      check("random KNUM", d, {16'h0, v});
      check("k_num port", k_num, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
