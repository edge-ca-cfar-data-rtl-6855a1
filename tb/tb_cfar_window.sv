// tb_cfar_window: self-checking test of the sliding window and recursive sum.
// Pushes random powers (including the maximum) with random gaps, keeps the
// whole history here, and after every push checks the CUT cell, the
// reference sum recomputed from scratch over both reference runs, the full
// and live flags, and the one-cycle latency. Runs at the default M and G.
module tb_cfar_window;
  import cfar_pkg::*;

  localparam int M = 6, G = 12;
  localparam int NH = 2 ** (M - 1);
  localparam int WIN = 2 * NH + 2 * G + 1;
  localparam int CUT = NH + G;

  logic  clk = 0, rst = 1;
  logic  in_valid = 0;
  cell_t in_cell = '0;
  logic  out_valid, out_full, out_live;
  cell_t out_cut;
  logic [P_W+M-1:0] out_sum;

  int checks = 0, failures = 0;
  cell_t hist[$];
  logic  pushed = 0;

  cfar_window #(.M(M), .G(G)) dut (.*);

  always #5 clk = ~clk;

  function automatic cell_t at(int idx);
    if (idx < 0) return '0;
    return hist[idx];
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      // check the outputs belonging to the previous push
      if (out_valid !== pushed) begin
        failures++;
        $display("FAIL out_valid=%0b expected %0b", out_valid, pushed);
      end
      if (pushed) begin
        int n;
        longint s;
        cell_t c;
        n = hist.size();          // pushes so far; newest is hist[n-1]
        s = 0;
        for (int k = 0; k < NH; k++) s += longint'(at(n - 1 - k).p);
        for (int k = NH + 2 * G + 1; k < WIN; k++) s += longint'(at(n - 1 - k).p);
        c = at(n - 1 - CUT);
        checks++;
        if (longint'(out_sum) != s || out_cut != c ||
            out_full != (n >= WIN) || out_live != (n >= CUT + 1)) begin
          failures++;
          $display("FAIL push %0d: sum %0d exp %0d cut %h exp %h full %0b live %0b",
                   n, out_sum, s, out_cut, c, out_full, out_live);
        end
      end
      pushed <= in_valid;
      if (in_valid) hist.push_back(in_cell);
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
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      in_valid  <= ($urandom_range(0, 4) != 0);
      in_cell.i <= iq_t'($urandom);
      in_cell.q <= iq_t'($urandom);
      // bursts of maximum power exercise the full sum width
      in_cell.p <= ((n / 200) % 3 == 1) ? pwr_t'(32'h8000_0000) : pwr_t'($urandom);
    end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
