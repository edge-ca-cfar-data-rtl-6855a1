// tb_cfar_output_gate: self-checking test of the output stage.
// With detection enabled only flagged cells may leave; with it disabled every
// live cell leaves. Checks each output sample, its one-cycle timing, and that
// nothing else leaves.
module tb_cfar_output_gate;
  import cfar_pkg::*;

  logic  clk = 0, rst = 1;
  logic  detect_en = 1, in_valid = 0, in_detect = 0, in_live = 0;
  cell_t in_cut = '0;
  logic  out_valid;
  iq_t   out_i, out_q;

  int checks = 0, failures = 0, fwd = 0, drop = 0;
  logic  exp_v = 0;
  iq_t   exp_i = '0, exp_q = '0;

  cfar_output_gate dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    checks++;
    if (out_valid != exp_v || (exp_v && (out_i != exp_i || out_q != exp_q))) begin
      failures++;
      $display("FAIL out_valid %0b exp %0b i %0d/%0d q %0d/%0d", out_valid, exp_v,
               out_i, exp_i, out_q, exp_q);
    end
    exp_v <= in_valid && (detect_en ? in_detect : in_live);
    exp_i <= in_cut.i;
    exp_q <= in_cut.q;
    if (in_valid && (detect_en ? in_detect : in_live)) fwd++;
    else if (in_valid) drop++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      detect_en <= ((n / 500) % 2 == 0);
      in_valid  <= ($urandom_range(0, 3) != 0);
      in_detect <= ($urandom_range(0, 3) == 0);
      in_live   <= ($urandom_range(0, 7) != 0);
      in_cut    <= cell_t'({$urandom, $urandom});
    end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (fwd == 0 || drop == 0) failures++;
    $display("forwarded %0d dropped %0d", fwd, drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
