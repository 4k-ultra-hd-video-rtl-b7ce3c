// tb_fir_channel: self-checking test of one FIR channel datapath.
//
// Drives windows at the maximum rate (a start every second cycle) and with
// random gaps, first with the mean taps (1/9) and then with random taps.
// Each result must appear exactly 6 cycles after its start and equal
// round(sum(P_i*C_i) / 2^16), saturated to 255; with the mean taps it must
// also be within half a step of the true average sum/9 computed in floating
// point.
module tb_fir_channel;
  import nr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  chan_t [TAPS-1:0] p;
  logic [TAPS-1:0][COEF_W-1:0] c;
  chan_t y;
  logic y_valid;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  fir_channel dut (.clk, .rst_n, .start, .p, .c, .y, .y_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint due; int value; real avg; bit mean; } exp_t;
  exp_t expq[$];

  function automatic int model(chan_t [TAPS-1:0] pp, logic [TAPS-1:0][COEF_W-1:0] cc);
    longint s = 0;
    for (int i = 0; i < TAPS; i++) s += longint'(pp[i]) * longint'(cc[i]);
    s = (s + 32768) / 65536;
    return (s > 255) ? 255 : int'(s);
  endfunction

  // Result checker: every result at its due cycle, no result otherwise.
  always @(posedge clk) begin
    if (rst_n) begin
      if (expq.size() > 0 && expq[0].due == cycle) begin
        automatic exp_t e = expq.pop_front();
        checks++;
        if (!y_valid || int'(y) != e.value) begin
          failures++;
          $display("FAIL cycle %0d: y_valid=%0b y=%0d expected %0d", cycle, y_valid, y, e.value);
        end
        if (e.mean) begin
          checks++;
          if (real'(y) - e.avg > 0.51 || e.avg - real'(y) > 0.51) begin
            failures++;
            $display("FAIL: y=%0d far from average %f", y, e.avg);
          end
        end
      end else if (y_valid) begin
        checks++;
        failures++;
        $display("FAIL cycle %0d: unexpected result", cycle);
      end
    end
  end

  task automatic drive(bit mean_taps, int gap);
    int s = 0;
    for (int i = 0; i < TAPS; i++) begin
      p[i] = chan_t'($urandom);
      c[i] = mean_taps ? COEF_W'(FIR_TAP_MEAN) : COEF_W'($urandom_range(0, 16000));
      s += p[i];
    end
    start = 1'b1;
    // The start is sampled at the next edge (cycle N); result due in cycle N+6.
    expq.push_back('{due: cycle + 6, value: model(p, c), avg: real'(s) / 9.0, mean: mean_taps});
    @(posedge clk); #1;
    start = 1'b0;
    repeat (gap) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // extreme values
    for (int i = 0; i < TAPS; i++) begin p[i] = 8'hFF; c[i] = COEF_W'(FIR_TAP_MEAN); end
    start = 1'b1;
    expq.push_back('{due: cycle + 6, value: 255, avg: 255.0, mean: 1});
    @(posedge clk); #1 start = 1'b0;
    @(posedge clk); #1;
    for (int n = 0; n < 300; n++) drive(1, 1);                         // full rate
    for (int n = 0; n < 200; n++) drive(1, $urandom_range(1, 7));      // gaps
    for (int n = 0; n < 300; n++) drive(0, 1);                         // random taps
    repeat (10) @(posedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
