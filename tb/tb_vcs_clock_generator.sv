// tb_vcs_clock_generator: checks the bit-time enable and the four clock
// phases. For each of the nine host periods in a bit time the phase is
// worked out from the period's start time (k * 1000/9 ns) against the phase
// boundaries 0, 222, 444, 666 and 1000 ns, and the five combined phase
// outputs are compared with it; bit_en must come exactly once every nine
// host periods. While power-on is applied every output must be false.
module tb_vcs_clock_generator;
  logic clk = 0, pwron = 1;
  logic bit_en, phi12, phi23, phi34, phi4, phi41;
  int checks = 0, failures = 0;

  vcs_clock_generator dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int last_en, k;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      check({bit_en, phi12, phi23, phi34, phi4, phi41} == '0, "outputs false during power-on");
    end
    pwron = 0;
    // align: the period after the first bit_en starts a bit time
    do @(negedge clk); while (!bit_en);
    k = 0;
    last_en = -1;
    for (int cyc = 0; cyc < 9 * 5; cyc++) begin
      int t_ns, ph;
      @(negedge clk);
      t_ns = (k * 1000) / 9;
      ph = (t_ns < 222) ? 1 : (t_ns < 444) ? 2 : (t_ns < 666) ? 3 : 4;
      check(phi12 == (ph == 1 || ph == 2), $sformatf("phi1+2 at period %0d", k));
      check(phi23 == (ph == 2 || ph == 3), $sformatf("phi2+3 at period %0d", k));
      check(phi34 == (ph == 3 || ph == 4), $sformatf("phi3+4 at period %0d", k));
      check(phi4  == (ph == 4),            $sformatf("phi4 at period %0d", k));
      check(phi41 == (ph == 4 || ph == 1), $sformatf("phi4+1 at period %0d", k));
      if (bit_en) begin
        check(cyc - last_en == 9, $sformatf("bit time of %0d periods", cyc - last_en));
        check(k == 8, "bit_en in the last period of the bit time");
        last_en = cyc;
      end
      k = (k + 1) % 9;
    end
    check(last_en > 0, "bit_en seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
