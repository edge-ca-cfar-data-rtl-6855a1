// tb_kmu_core: end-to-end test of the CA-CFAR core at its default parameters.
//
// The core receives 12-bit I/Q at 61.44 MS/s, i.e. on 61.44 % of the cycles of
// its 100 MHz clock (a phase accumulator sets valid_re/valid_im), and is
// configured through its AXI4-Lite port. Every forwarded sample and its
// timing (10 cycles after the input that completed its window) are compared
// with the reference model. Phases:
//   A  pulse train at 10 % duty cycle (10-sample pulses every 100 samples,
//      13 dB per-sample SNR, K = 9.9063): the data-reduction workload
//   B  detection disabled through CTRL: every sample forwarded
//   C  calibrated K = 10.15 written to KNUM, pulse train again
//   D  10 us pulses every 100 us at 61.44 MS/s (614-sample pulses), which
//      reports how much of a pulse longer than the window is forwarded
// Cycles where only one of valid_re/valid_im is high are mixed in; the core
// must ignore them. Each mechanism is counted and must happen at least once.
module tb_kmu_core;
  import cfar_pkg::*;
  import cfar_ref_pkg::*;

  localparam int M = 6, G = 12, LAT = 10;
  localparam int SIGMA = 64;                 // noise std. dev. per component
  localparam int AMP13 = 405;                // 405^2 / (2 * 64^2) = 20 = 13 dB

  logic        clk = 0, rst = 1;
  logic signed [11:0] re_in = '0, im_in = '0;
  logic        valid_re = 0, valid_im = 0;
  logic [3:0]  s_axi_awaddr = '0, s_axi_araddr = '0, s_axi_wstrb = '0;
  logic        s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0;
  logic        s_axi_arvalid = 0, s_axi_rready = 0;
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

  // model state mirrored from the register writes
  bit     m_en = 1;
  longint m_k  = 2536;

  // per-phase statistics
  int ph_in, ph_out, ph_pulse, ph_pulse_fwd;
  bit is_pulse[$];
  bit cur_pulse = 0;

  // mechanism counters
  int n_warm = 0, n_hit = 0, n_drop = 0, n_bypass = 0, n_kwrite = 0, n_gap = 0, n_unpaired = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint t; int i; int q; } exp_t;
  exp_t q_exp[$];

  always @(posedge clk) if (!rst) begin
    if (valid_re && valid_im) begin
      int oi, oq, c;
      bit dec, hit, fwd;
      is_pulse.push_back(cur_pulse);
      fwd = ref_m.push(int'(re_in), int'(im_in), m_k, m_en, oi, oq, dec, hit);
      c = int'(ref_m.total) - 1 - ref_m.CUT;
      ph_in++;
      if (!dec) n_warm++;
      if (c >= 0 && is_pulse[c]) ph_pulse++;
      if (fwd) begin
        exp_t e;
        e.t = cycle + LAT; e.i = oi; e.q = oq;
        q_exp.push_back(e);
        ph_out++;
        if (c >= 0 && is_pulse[c]) ph_pulse_fwd++;
        if (m_en) n_hit++; else n_bypass++;
      end else if (dec) n_drop++;
    end else if (valid_re || valid_im) n_unpaired++;
    else n_gap++;
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
        $display("FAIL cycle %0d (exp %0d) i %0d/%0d q %0d/%0d", cycle, e.t,
                 re_out, e.i, im_out, e.q);
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic axi_write(logic [3:0] addr, logic [31:0] data);
    s_axi_awaddr  <= addr;
    s_axi_wdata   <= data;
    s_axi_wstrb   <= 4'hF;
    s_axi_awvalid <= 1;
    s_axi_wvalid  <= 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 0;
    s_axi_wvalid  <= 0;
    s_axi_bready  <= 1;
    do @(posedge clk); while (!s_axi_bvalid);
    s_axi_bready  <= 0;
  endtask

  task automatic axi_read(logic [3:0] addr, output logic [31:0] data);
    s_axi_araddr  <= addr;
    s_axi_arvalid <= 1;
    do @(posedge clk); while (!s_axi_arready);
    s_axi_arvalid <= 0;
    s_axi_rready  <= 1;
    do @(posedge clk); while (!s_axi_rvalid);
    data = s_axi_rdata;
    s_axi_rready  <= 0;
  endtask

  // Streams nsamp samples at 61.44 MS/s on the 100 MHz clock. Pulses of
  // width pw start every pri samples; amp is the pulse amplitude.
  task automatic stream(int nsamp, int pri, int pw, int amp);
    int acc = 0, sent = 0;
    ph_in = 0; ph_out = 0; ph_pulse = 0; ph_pulse_fwd = 0;
    while (sent < nsamp) begin
      @(posedge clk);
      acc += 6144;
      if (acc >= 10000) begin
        int ni, nq, ph;
        acc -= 10000;
        ph = sent % pri;
        ni = gauss(SIGMA);
        nq = gauss(SIGMA);
        cur_pulse <= (ph >= pri / 2 && ph < pri / 2 + pw);
        if (ph >= pri / 2 && ph < pri / 2 + pw) begin
          // constant envelope, phase advancing with the sample index
          ni += int'(amp * $cos(0.3 * ph));
          nq += int'(amp * $sin(0.3 * ph));
        end
        re_in    <= 12'(ni);
        im_in    <= 12'(nq);
        valid_re <= 1;
        valid_im <= 1;
        sent++;
      end else begin
        // idle cycle; now and then one valid alone, which must be ignored
        valid_re <= ($urandom_range(0, 15) == 0);
        valid_im <= 0;
        re_in    <= 12'($urandom);
      end
    end
    @(posedge clk);
    valid_re <= 0;
    valid_im <= 0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    real red_a, red_c, rec_a;
    repeat (3) @(posedge clk);
    rst <= 0;
    axi_read(4'h0, d);  check("CTRL after reset", d, 1);
    axi_read(4'h4, d);  check("KNUM after reset", d, 2536);

    // A: 10 % duty-cycle pulse train, default K
    stream(20000, 100, 10, AMP13);
    red_a = 1.0 - real'(ph_out) / real'(ph_in);
    rec_a = real'(ph_pulse_fwd) / real'(ph_pulse);
    $display("A: in %0d out %0d reduction %5.1f %%, pulse samples forwarded %0d/%0d",
             ph_in, ph_out, 100.0 * red_a, ph_pulse_fwd, ph_pulse);
    checks++;
    if (red_a < 0.85 || rec_a < 0.9) begin
      failures++;
      $display("FAIL workload A: reduction or pulse recovery too low");
    end

    // B: detection disabled
    axi_write(4'h0, 32'h0);
    m_en = 0;
    stream(3000, 100, 10, AMP13);
    $display("B: in %0d out %0d", ph_in, ph_out);
    check("bypass forwards every sample", ph_out, ph_in);

    // C: detection enabled again with the calibrated K
    axi_write(4'h0, 32'h1);
    axi_write(4'h4, 32'(K_EMP));
    m_en = 1;
    m_k  = 2598;
    n_kwrite++;
    axi_read(4'h4, d);  check("KNUM readback", d, 2598);
    stream(10000, 100, 10, AMP13);
    red_c = 1.0 - real'(ph_out) / real'(ph_in);
    $display("C: in %0d out %0d reduction %5.1f %%, pulse samples forwarded %0d/%0d",
             ph_in, ph_out, 100.0 * red_c, ph_pulse_fwd, ph_pulse);

    // D: 10 us pulses every 100 us at 61.44 MS/s, back to K = 9.9063
    axi_write(4'h4, 32'(K_FP));
    m_k = 2536;
    n_kwrite++;
    stream(3 * 6144, 6144, 614, AMP13);
    $display("D: in %0d out %0d, pulse samples forwarded %0d/%0d",
             ph_in, ph_out, ph_pulse_fwd, ph_pulse);

    repeat (5) @(posedge clk);
    check("outputs outstanding", q_exp.size(), 0);
    $display("mechanisms: warm-up %0d, detections %0d, noise dropped %0d, bypass %0d,",
             n_warm, n_hit, n_drop, n_bypass);
    $display("            K writes %0d, idle cycles %0d, unpaired valids %0d",
             n_kwrite, n_gap, n_unpaired);
    checks++;
    if (n_warm == 0 || n_hit == 0 || n_drop == 0 || n_bypass == 0 || n_kwrite == 0 ||
        n_gap == 0 || n_unpaired == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
