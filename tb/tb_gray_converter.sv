// tb_gray_converter: self-checking test of the RGB to gray-scale converter.
//
// in_valid is held high for long stretches (the converter must then take a
// pixel every second cycle, busy in between) and also driven with random
// gaps. Each result must appear exactly 4 cycles after its pixel was
// accepted, carry that pixel's tag, equal the fixed-point weighted sum
// round((19661 R + 38666 G + 7209 B) / 2^16) and lie within half a step of
// 0.3 R + 0.59 G + 0.11 B computed in floating point.
module tb_gray_converter;
  import nr_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  rgb_t  in_pix;
  tag_t  in_tag;
  logic  busy, out_valid;
  chan_t out_gray;
  tag_t  out_tag;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  int accepts = 0;
  longint last_accept = -10;
  bit stop = 1'b0;

  gray_converter dut (.clk, .rst_n, .in_valid, .in_pix, .in_tag, .busy,
                      .out_valid, .out_gray, .out_tag);

  always #5 clk = ~clk;

  typedef struct { longint due; int value; real exact; tag_t tag; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // accept side
      if (in_valid && !busy) begin
        automatic longint s = 19661 * longint'(in_pix.r) + 38666 * longint'(in_pix.g)
                            + 7209 * longint'(in_pix.b);
        s = (s + 32768) / 65536;
        expq.push_back('{due: cycle + 4, value: (s > 255) ? 255 : int'(s),
                         exact: 0.3 * in_pix.r + 0.59 * in_pix.g + 0.11 * in_pix.b,
                         tag: in_tag});
        checks++;
        if (cycle - last_accept < 2) begin
          failures++;
          $display("FAIL cycle %0d: two pixels accepted within 2 cycles", cycle);
        end
        last_accept = cycle;
        accepts++;
      end
      // result side
      if (expq.size() > 0 && expq[0].due == cycle) begin
        automatic exp_t e = expq.pop_front();
        checks += 2;
        if (!out_valid || int'(out_gray) != e.value || out_tag != e.tag) begin
          failures++;
          $display("FAIL cycle %0d: valid=%0b gray=%0d tag=%b expected %0d tag=%b",
                   cycle, out_valid, out_gray, out_tag, e.value, e.tag);
        end
        if (real'(out_gray) - e.exact > 0.52 || e.exact - real'(out_gray) > 0.52) begin
          failures++;
          $display("FAIL: gray %0d far from %f", out_gray, e.exact);
        end
      end else if (out_valid) begin
        checks++;
        failures++;
        $display("FAIL cycle %0d: unexpected result", cycle);
      end
    end
  end

  // Stimulus changes after each edge; a new pixel once the old one is taken.
  always @(posedge clk) begin
    if (rst_n && !stop) begin
      if (!in_valid || !busy) begin
        #1;
        in_pix   = (accepts < 3) ? rgb_t'({3{8'hFF}}) : rgb_t'($urandom);
        in_tag   = tag_t'($urandom);
        in_valid = (accepts < 600) ? 1'b1 : ($urandom_range(0, 2) == 0);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (accepts >= 1500);
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
