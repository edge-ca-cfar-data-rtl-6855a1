// tb_iq_power: self-checking test of the power stage.
// Drives random and extreme 16-bit I/Q samples with random gaps and checks
// that each output equals I^2 + Q^2 (computed here with 64-bit integers),
// carries the same I/Q, and appears exactly 3 cycles after its input.
module tb_iq_power;
  import cfar_pkg::*;

  logic  clk = 0, rst = 1;
  logic  in_valid = 0;
  iq_t   in_i = '0, in_q = '0;
  logic  out_valid;
  cell_t out_cell;

  int checks = 0, failures = 0;
  longint cycle = 0;

  iq_power dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint t; int i; int q; longint p; } exp_t;
  exp_t q_exp[$];

  // record expected results when an input is sampled
  always @(posedge clk) if (!rst && in_valid) begin
    exp_t e;
    e.t = cycle + 3;
    e.i = int'(in_i);
    e.q = int'(in_q);
    e.p = longint'(e.i) * e.i + longint'(e.q) * e.q;
    q_exp.push_back(e);
  end

  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    checks++;
    if (q_exp.size() == 0) begin
      failures++;
      $display("FAIL unexpected output at cycle %0d", cycle);
    end else begin
      e = q_exp.pop_front();
      if (e.t != cycle || longint'(out_cell.p) != e.p ||
          int'(out_cell.i) != e.i || int'(out_cell.q) != e.q) begin
        failures++;
        $display("FAIL cycle %0d (exp %0d): p=%0d exp %0d i=%0d/%0d q=%0d/%0d",
                 cycle, e.t, out_cell.p, e.p, out_cell.i, e.i, out_cell.q, e.q);
      end
    end
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
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      case (n % 50)
        0: begin in_i <= -16'sd32768; in_q <= -16'sd32768; end
        1: begin in_i <= 16'sd32767;  in_q <= -16'sd32768; end
        2: begin in_i <= '0;          in_q <= '0; end
        default: begin in_i <= iq_t'($urandom); in_q <= iq_t'($urandom); end
      endcase
    end
    @(posedge clk) in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q_exp.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", q_exp.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
