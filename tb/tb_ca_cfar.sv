// tb_ca_cfar: self-checking test of the whole CA-CFAR datapath.
// Feeds noise with short pulses of random width and power, with random input
// gaps, and compares every forwarded sample, and its arrival exactly 10 cycles
// after the input that completed its window, with the reference model. K and
// the enable bit are changed between bursts (with the input idle); the test
// counts detections, dropped noise samples, bypass forwarding and warm-up.
module tb_ca_cfar;
  import cfar_pkg::*;
  import cfar_ref_pkg::*;

  localparam int M = 6, G = 12, LAT = 10;

  logic clk = 0, rst = 1;
  logic detect_en = 1;
  k_t   k_num = K_FP;
  logic in_valid = 0;
  iq_t  in_i = '0, in_q = '0;
  logic out_valid;
  iq_t  out_i, out_q;

  int checks = 0, failures = 0;
  int n_hit = 0, n_drop = 0, n_bypass = 0, n_warm = 0;
  longint cycle = 0;

  ca_cfar #(.M(M), .G(G)) dut (.*);

  cfar_ref ref_m = new(M, G);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint t; int i; int q; } exp_t;
  exp_t q_exp[$];

  always @(posedge clk) if (!rst && in_valid) begin
    int oi, oq;
    bit dec, hit, fwd;
    fwd = ref_m.push(int'(in_i), int'(in_q), longint'(k_num), detect_en, oi, oq, dec, hit);
    if (!dec) n_warm++;
    if (fwd) begin
      exp_t e;
      e.t = cycle + LAT; e.i = oi; e.q = oq;
      q_exp.push_back(e);
      if (!detect_en) n_bypass++;
      else n_hit++;
    end else if (dec) n_drop++;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    checks++;
    if (q_exp.size() == 0) begin
      failures++;
      $display("FAIL unexpected output at %0d", cycle);
    end else begin
      e = q_exp.pop_front();
      if (e.t != cycle || int'(out_i) != e.i || int'(out_q) != e.q) begin
        failures++;
        $display("FAIL cycle %0d (exp %0d) i %0d/%0d q %0d/%0d", cycle, e.t,
                 out_i, e.i, out_q, e.q);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst(int len, int sigma, int amp, int gap_pct);
    int pulse_left = 0;
    for (int n = 0; n < len; n++) begin
      int ni, nq;
      @(posedge clk);
      if ($urandom_range(0, 99) < gap_pct) begin
        in_valid <= 0;
        continue;
      end
      if (pulse_left == 0 && $urandom_range(0, 99) == 0) pulse_left = $urandom_range(1, 2 * G);
      ni = gauss(sigma);
      nq = gauss(sigma);
      if (pulse_left > 0) begin
        pulse_left--;
        ni += amp;
      end
      in_valid <= 1;
      in_i <= iq_t'(ni);
      in_q <= iq_t'(nq);
    end
    @(posedge clk) in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    burst(6000, 300, 3000, 20);
    k_num <= K_EMP;
    burst(6000, 1000, 6000, 0);
    detect_en <= 0;
    burst(1000, 300, 3000, 30);
    detect_en <= 1;
    k_num <= 16'd256;          // K = 1: many detections on noise
    burst(2000, 300, 3000, 10);
    k_num <= K_FP;
    burst(3000, 5000, 30000, 10);  // large values stress the widths
    repeat (5) @(posedge clk);
    checks++;
    if (q_exp.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q_exp.size()); end
    checks++;
    if (n_hit == 0 || n_drop == 0 || n_bypass == 0 || n_warm == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("detections %0d, noise dropped %0d, bypass %0d, warm-up %0d",
             n_hit, n_drop, n_bypass, n_warm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
