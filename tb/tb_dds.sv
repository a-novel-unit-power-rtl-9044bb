// Self-checking testbench for dds: with the 32.768 centre word the phase must
// wrap 50 times in 100000 ce-cycles (50 Hz at 100 kHz); with a word 10 % higher
// 55 times. Every cycle the phase step must equal the word, and sin/cos must
// match the real sine and cosine of the previous cycle's phase to within the
// 12-bit phase quantisation. A second instance with SHIFT = 13 must turn the
// offset 4.096 into the same 50 Hz increment.
module tb_dds;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1, we = 1;
  fx_t f = 0, sin_theta, cos_theta;
  logic [31:0] phase;
  int checks = 0, failures = 0;

  dds dut (.*);

  // a second instance with the 13-bit shift, whose 50 Hz offset is 4.096
  fx_t sin13, cos13, f13 = 0;
  logic [31:0] phase13;
  dds #(.SHIFT(13)) dut13 (.clk, .rst_n, .ce, .we, .f(f13), .phase(phase13),
                           .sin_theta(sin13), .cos_theta(cos13));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real fword, input int exp_wraps);
    logic [31:0] p_prev;
    int wraps, bad_step, bad_val;
    real es, ec;
    @(negedge clk);
    f = to_fx(fword);
    repeat (3) @(negedge clk);
    wraps = 0; bad_step = 0; bad_val = 0;
    p_prev = phase;
    for (int n = 0; n < 100000; n++) begin
      @(negedge clk);
      if (phase - p_prev != 32'(f)) bad_step++;
      if (phase < p_prev) wraps++;
      es = 65536.0 * $sin(6.283185307 * real'(p_prev) / 4294967296.0);
      ec = 65536.0 * $cos(6.283185307 * real'(p_prev) / 4294967296.0);
      if ((real'(sin_theta) - es) > 60.0 || (es - real'(sin_theta)) > 60.0 ||
          (real'(cos_theta) - ec) > 60.0 || (ec - real'(cos_theta)) > 60.0) begin
        bad_val++;
        if (bad_val < 5)
          $display("phase %h: sin %0d (%f) cos %0d (%f)", p_prev, sin_theta, es, cos_theta, ec);
      end
      p_prev = phase;
    end
    checks += 3;
    if (wraps != exp_wraps) begin
      failures++;
      $display("word %f: %0d periods in 1 s, expected %0d", fword, wraps, exp_wraps);
    end
    if (bad_step != 0) begin
      failures++;
      $display("%0d wrong phase steps", bad_step);
    end
    if (bad_val != 0) begin
      failures++;
      $display("%0d wrong sine/cosine values", bad_val);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(32.768, 50);
    run(32.768 * 1.1, 55);
    // Table of shifts: word 4.096 with SHIFT = 13 must give the same increment
    @(negedge clk);
    f13 = to_fx(4.096);
    repeat (3) @(negedge clk);
    begin
      logic [31:0] p0;
      p0 = phase13;
      @(negedge clk);
      checks++;
      if (phase13 - p0 != 32'(to_fx(4.096)) <<< 3) begin
        failures++;
        $display("SHIFT=13: phase step %0d", phase13 - p0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
