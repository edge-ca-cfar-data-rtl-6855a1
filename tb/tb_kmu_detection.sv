// tb_kmu_detection: detection statistics of the CA-CFAR core at its defaults.
//
// Drives the core with complex Gaussian noise (12-bit I/Q, sigma = 100 per
// component) and measures, with every forwarded sample also compared with the
// reference model:
//   1  the false-alarm rate on noise only, with K = 9.9063 (KNUM 2536) and
//      with the calibrated K = 10.15 (KNUM 2598); about 1e-4 is expected,
//      slightly above it for 2536 because the threshold is truncated
//   2  the detection probability of constant-envelope pulse samples at
//      7, 9, 11 and 13 dB per-sample SNR with K = 9.9063. Pulses are 10
//      samples every 100, shorter than the guard span, so the reference cells
//      hold noise only (a non-fluctuating target in Gaussian noise).
// Samples are fed on every clock cycle to keep the run short.
module tb_kmu_detection;
  import cfar_pkg::*;
  import cfar_ref_pkg::*;

  localparam int   M = 6, G = 12, LAT = 10;
  localparam real  SIGMA = 100.0;
  localparam int   NOISE_SAMPLES = 2_000_000;
  localparam int   PULSE_SAMPLES = 100_000;

  logic        clk = 0, rst = 1;
  logic signed [11:0] re_in = '0, im_in = '0;
  logic        valid_re = 0, valid_im = 0;
  logic [3:0]  s_axi_awaddr = '0, s_axi_araddr = '0, s_axi_wstrb = 4'hF;
  logic        s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 1;
  logic        s_axi_arvalid = 0, s_axi_rready = 1;
  logic [31:0] s_axi_wdata = '0;
  logic        s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  iq_t         re_out, im_out;
  logic        valid_out;

  kmu_core dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  cfar_ref ref_m = new(M, G);
  longint m_k = 2536;

  // statistics of the running phase
  longint st_noise_dec, st_noise_hit, st_pulse_dec, st_pulse_hit;
  bit     is_pulse[$];
  bit     cur_pulse = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint t; int i; int q; } exp_t;
  exp_t q_exp[$];

  always @(posedge clk) if (!rst && valid_re && valid_im) begin
    int oi, oq;
    bit dec, hit, fwd, pc;
    is_pulse.push_back(cur_pulse);
    if (is_pulse.size() > 2 * ref_m.WIN) void'(is_pulse.pop_front());
    fwd = ref_m.push(int'(re_in), int'(im_in), m_k, 1'b1, oi, oq, dec, hit);
    if (dec) begin
      pc = is_pulse[is_pulse.size() - 1 - ref_m.CUT];
      if (pc) begin st_pulse_dec++; if (hit) st_pulse_hit++; end
      else    begin st_noise_dec++; if (hit) st_noise_hit++; end
    end
    if (fwd) begin
      exp_t e;
      e.t = cycle + LAT; e.i = oi; e.q = oq;
      q_exp.push_back(e);
    end
  end

  always @(posedge clk) if (!rst && valid_out) begin
    exp_t e;
    checks++;
    if (q_exp.size() == 0) begin
      failures++;
      $display("FAIL unexpected output at %0d", cycle);
    end else begin
      e = q_exp.pop_front();
      if (e.t != cycle || int'(re_out) != e.i || int'(im_out) != e.q) begin
        failures++;
        $display("FAIL cycle %0d (exp %0d)", cycle, e.t);
      end
    end
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_range(string what, real v, real lo, real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s = %g outside [%g, %g]", what, v, lo, hi);
    end
  endtask

  task automatic write_k(int k);
    s_axi_awaddr  <= 4'h4;
    s_axi_wdata   <= 32'(k);
    s_axi_awvalid <= 1;
    s_axi_wvalid  <= 1;
    do @(posedge clk); while (!s_axi_awready);
    s_axi_awvalid <= 0;
    s_axi_wvalid  <= 0;
    m_k = k;
    @(posedge clk);
  endtask

  // nsamp samples; with amp > 0, 10-sample pulses every 100 samples
  task automatic run(int nsamp, real amp);
    st_noise_dec = 0; st_noise_hit = 0; st_pulse_dec = 0; st_pulse_hit = 0;
    for (int n = 0; n < nsamp; n++) begin
      int ni, nq;
      bit p;
      @(posedge clk);
      p  = (amp > 0.0) && (n % 100 >= 50) && (n % 100 < 60);
      ni = gauss_bm(SIGMA);
      nq = gauss_bm(SIGMA);
      if (p) begin
        real ph;
        ph = 6.283185307179586 * real'($urandom) / 4294967296.0;
        ni += int'(amp * $cos(ph));
        nq += int'(amp * $sin(ph));
      end
      cur_pulse <= p;
      re_in     <= 12'(ni);
      im_in     <= 12'(nq);
      valid_re  <= 1;
      valid_im  <= 1;
    end
    @(posedge clk);
    valid_re <= 0;
    valid_im <= 0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  initial begin
    real pfa_fp, pfa_emp;
    real pd[4];
    int  snr_db[4] = '{7, 9, 11, 13};
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);

    run(NOISE_SAMPLES, 0.0);
    pfa_fp = real'(st_noise_hit) / real'(st_noise_dec);
    $display("noise only, KNUM 2536: %0d false alarms in %0d decisions, Pfa = %g",
             st_noise_hit, st_noise_dec, pfa_fp);

    write_k(2598);
    run(NOISE_SAMPLES, 0.0);
    pfa_emp = real'(st_noise_hit) / real'(st_noise_dec);
    $display("noise only, KNUM 2598: %0d false alarms in %0d decisions, Pfa = %g",
             st_noise_hit, st_noise_dec, pfa_emp);
    check_range("Pfa K=9.9063", pfa_fp, 0.8e-4, 1.8e-4);
    check_range("Pfa K=10.15", pfa_emp, 0.5e-4, 1.5e-4);

    write_k(2536);
    foreach (snr_db[j]) begin
      real amp;
      // per-sample SNR = amp^2 / (2 sigma^2)
      amp = SIGMA * $sqrt(2.0 * (10.0 ** (real'(snr_db[j]) / 10.0)));
      run(PULSE_SAMPLES, amp);
      pd[j] = real'(st_pulse_hit) / real'(st_pulse_dec);
      $display("SNR %0d dB: Pd = %5.3f (%0d of %0d pulse samples)", snr_db[j], pd[j],
               st_pulse_hit, st_pulse_dec);
    end
    check_range("Pd at 13 dB", pd[3], 0.94, 0.995);
    check_range("Pd at 11 dB", pd[2], 0.65, 0.85);
    checks++;
    if (!(pd[0] < pd[1] && pd[1] < pd[2] && pd[2] < pd[3])) begin
      failures++;
      $display("FAIL Pd does not rise with SNR");
    end
    repeat (5) @(posedge clk);
    checks++;
    if (q_exp.size() != 0) begin failures++; $display("FAIL outputs outstanding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
