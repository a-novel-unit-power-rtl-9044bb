// Self-checking testbench for loop_filter: random errors are applied, with and
// without the sampling pulse, and the output is compared with a real-valued
// model f = 0.1*(0.2*e + acc) + 32.768 where acc integrates 0.05*e only on
// pulses. With e = 0 and acc = 0 the output must be the 32.768 offset.
module tb_loop_filter;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1, en = 0;
  fx_t e = 0, acc, f;
  int checks = 0, failures = 0;

  loop_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(input fx_t x);
    return real'(x) / 65536.0;
  endfunction

  initial begin
    real racc, ev, fexp;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    checks++;
    if (f != fx_t'(2147484)) begin
      failures++;
      $display("offset word %0d, expected 2147484", f);
    end
    racc = 0.0;
    for (int n = 0; n < 400; n++) begin
      ev = (($urandom % 20001) - 10000.0) / 100.0;   // +/-100 V
      e  = fx_t'($rtoi(ev * 65536.0));
      ev = r(e);
      en = ($urandom % 3 == 0);
      ce = ($urandom % 4 != 0);
      #1;
      fexp = 0.1 * (0.2 * ev + racc) + 32.768;
      checks++;
      if ((r(f) - fexp) > 0.002 || (fexp - r(f)) > 0.002) begin
        failures++;
        if (failures < 10) $display("f %f expected %f", r(f), fexp);
      end
      if (en && ce) racc += 0.05 * ev;
      @(negedge clk);
      checks++;
      if ((r(acc) - racc) > 0.01 || (racc - r(acc)) > 0.01) begin
        failures++;
        if (failures < 10) $display("acc %f expected %f", r(acc), racc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
