// tb_fir_filter: self-checking test of the three-channel 3x3 FIR filter.
//
// Random RGB windows are offered back to back (the filter must take one every
// second cycle) and with random gaps, with the mean taps and, in a second
// phase, with random taps. Each filtered pixel must appear exactly 6 cycles
// after its window was accepted, with that window's tag, and each channel
// must equal round(sum(P_i*C_i) / 2^16) computed here from the window; with
// the mean taps each channel is also compared against the floating-point
// average of its nine values.
module tb_fir_filter;
  import nr_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_valid = 1'b0;
  window_t in_win;
  tag_t    in_tag;
  coef_t [TAPS-1:0] coef;
  logic    busy, out_valid;
  rgb_t    out_pix;
  tag_t    out_tag;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  int accepts = 0;
  bit stop = 1'b0;
  bit mean_taps = 1'b1;

  fir_filter dut (.clk, .rst_n, .in_valid, .in_win, .in_tag, .coef, .busy,
                  .out_valid, .out_pix, .out_tag);

  always #5 clk = ~clk;

  typedef struct { longint due; int v [3]; real avg [3]; bit mean; tag_t tag; } exp_t;
  exp_t expq[$];

  function automatic int chan(window_t w, int ch, int row, int col);
    case (ch)
      0: return int'(w[row][col].r);
      1: return int'(w[row][col].g);
      default: return int'(w[row][col].b);
    endcase
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && !busy) begin
        automatic exp_t e;
        e.due = cycle + 6;
        e.mean = mean_taps;
        e.tag = in_tag;
        for (int ch = 0; ch < 3; ch++) begin
          automatic longint s = 0;
          automatic int plain = 0;
          for (int i = 0; i < 9; i++) begin
            s += longint'(chan(in_win, ch, i / 3, i % 3)) * longint'(coef[i]);
            plain += chan(in_win, ch, i / 3, i % 3);
          end
          s = (s + 32768) / 65536;
          e.v[ch] = (s > 255) ? 255 : int'(s);
          e.avg[ch] = real'(plain) / 9.0;
        end
        expq.push_back(e);
        accepts++;
      end
      if (expq.size() > 0 && expq[0].due == cycle) begin
        automatic exp_t e = expq.pop_front();
        automatic int got [3] = '{int'(out_pix.r), int'(out_pix.g), int'(out_pix.b)};
        checks++;
        if (!out_valid || out_tag != e.tag) begin
          failures++;
          $display("FAIL cycle %0d: valid=%0b tag=%b expected tag %b", cycle, out_valid, out_tag, e.tag);
        end
        for (int ch = 0; ch < 3; ch++) begin
          checks++;
          if (got[ch] != e.v[ch]) begin
            failures++;
            $display("FAIL cycle %0d ch %0d: %0d expected %0d", cycle, ch, got[ch], e.v[ch]);
          end
          if (e.mean && (real'(got[ch]) - e.avg[ch] > 0.51 || e.avg[ch] - real'(got[ch]) > 0.51)) begin
            failures++;
            $display("FAIL: ch %0d %0d far from average %f", ch, got[ch], e.avg[ch]);
          end
        end
      end else if (out_valid) begin
        checks++;
        failures++;
        $display("FAIL cycle %0d: unexpected result", cycle);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && !stop && (!in_valid || !busy)) begin
      #1;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          in_win[r][c] = (accepts < 2) ? rgb_t'({3{8'hFF}}) : rgb_t'($urandom);
      in_tag   = tag_t'($urandom);
      in_valid = (accepts < 400) ? 1'b1 : ($urandom_range(0, 2) == 0);
    end
  end

  initial begin
    for (int i = 0; i < TAPS; i++) coef[i] = FIR_TAP_MEAN;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (accepts >= 800);
    // random taps, changed while the filter is idle
    stop = 1'b1;
    #1 in_valid = 1'b0;
    repeat (10) @(posedge clk);
    mean_taps = 1'b0;
    for (int i = 0; i < TAPS; i++) coef[i] = coef_t'($urandom_range(0, 16000));
    #1 stop = 1'b0;
    wait (accepts >= 1200);
    stop = 1'b1;
    #1 in_valid = 1'b0;
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
