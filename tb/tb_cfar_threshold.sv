// tb_cfar_threshold: self-checking test of the threshold and comparator.
// Drives random reference sums, CUT powers and K values, plus CUT powers set
// exactly at and one above the threshold, and checks the detection flag
// against T = ((sum >> 6) * K) >> 8 computed here with 64-bit integers, the
// forcing of the flag while the window is not full, the CUT and live flag
// carried along, and the 4-cycle latency.
module tb_cfar_threshold;
  import cfar_pkg::*;

  localparam int M = 6;

  logic  clk = 0, rst = 1;
  k_t    k_num = K_FP;
  logic  in_valid = 0, in_full = 0, in_live = 0;
  cell_t in_cut = '0;
  logic [P_W+M-1:0] in_sum = '0;
  logic  out_valid, out_detect, out_live;
  cell_t out_cut;

  int checks = 0, failures = 0, hits = 0, equal_cases = 0;
  longint cycle = 0;

  cfar_threshold #(.M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint t; logic det; logic live; cell_t c; } exp_t;
  exp_t q_exp[$];

  always @(posedge clk) if (!rst && in_valid) begin
    exp_t e;
    longint thr;
    thr = ((longint'(in_sum) >> M) * longint'(k_num)) >> 8;
    e.t    = cycle + 4;
    e.det  = in_full && (longint'(in_cut.p) > thr);
    e.live = in_live;
    e.c    = in_cut;
    q_exp.push_back(e);
  end

  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    checks++;
    if (q_exp.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e = q_exp.pop_front();
      if (e.det) hits++;
      if (e.t != cycle || out_detect != e.det || out_live != e.live || out_cut != e.c) begin
        failures++;
        $display("FAIL cycle %0d exp %0d: detect %0b exp %0b", cycle, e.t, out_detect, e.det);
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
    longint s, thr;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      in_full  <= ($urandom_range(0, 9) != 0);
      in_live  <= ($urandom_range(0, 1) != 0);
      k_num    <= (n % 3 == 0) ? K_FP : (n % 3 == 1) ? K_EMP : k_t'($urandom);
      // noise-like sums: 64 cells of up to 2^26 each, sometimes the maximum
      s = (n % 97 == 0) ? (longint'(1) << 37) : longint'($urandom_range(0, 32'h7FFF_FFFF));
      in_sum     <= (P_W+M)'(s);
      in_cut.i   <= iq_t'($urandom);
      in_cut.q   <= iq_t'($urandom);
      thr = ((s >> M) * ((n % 3 == 0) ? 2536 : (n % 3 == 1) ? 2598 : 0)) >> 8;
      case (n % 5)
        0: in_cut.p <= pwr_t'(thr);          // equal: not a detection
        1: in_cut.p <= pwr_t'(thr + 1);      // just above
        default: in_cut.p <= pwr_t'($urandom_range(0, 32'h7FFF_FFFF) >> $urandom_range(0, 8));
      endcase
    end
    @(posedge clk) in_valid <= 0;
    repeat (8) @(posedge clk);
    checks++;
    if (q_exp.size() != 0 || hits == 0) begin
      failures++;
      $display("FAIL pending=%0d hits=%0d", q_exp.size(), hits);
    end
    $display("detections seen: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
