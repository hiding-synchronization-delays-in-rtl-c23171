// tb_dvfs_ctrl: checks the voltage/frequency sequencer with a 100 MHz
// reference.  Expected trajectories are computed here from the rates:
// after n reference edges of movement a quantity has taken
// floor(n * 10 ns / rate) steps.
//   Down 1000 -> 500 MHz: frequency starts at once and follows that
//   formula; the voltage never drops below what the frequency needs and
//   ends at the level 500 MHz needs.
//   Up 500 -> 1000 MHz: the voltage starts at once and follows the formula;
//   the frequency never exceeds what the present voltage supports.
//   Targets outside 250..1000 MHz are clamped.
module tb_dvfs_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0, busy;
  logic [10:0] target = 11'd1000, freq, volt;
  int checks = 0, failures = 0;

  dvfs_ctrl dut (.clk_ref(clk), .rst_n(rst_n), .target_mhz(target), .freq_mhz(freq), .volt_mv(volt), .busy(busy));

  always #5 clk = ~clk;

  function automatic int v_need(int f);
    return 650 + int'($ceil(real'(f - 250) * 550.0 / 750.0));
  endfunction
  function automatic int f_allow(int v);
    return 250 + int'($floor(real'(v - 650) * 750.0 / 550.0));
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s (f=%0d v=%0d)", $realtime, what, freq, volt); end
  endtask

  initial begin : watchdog
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int n, prev_v, prev_f;
    #22 rst_n = 1;
    @(negedge clk);
    check(freq == 1000 && volt == 1200 && !busy, "reset at 1.0 GHz / 1.20 V");

    // ---------------- down ----------------
    target = 11'd500; #1;
    n = 0; prev_v = 1200;
    while (busy) begin
      @(posedge clk); #1; n++;
      if (1000 - (n * 10000) / 49100 >= 500)
        check(int'(freq) == 1000 - (n * 10000) / 49100, "frequency falls at 49.1 ns/MHz");
      check(int'(volt) >= v_need(int'(freq)), "voltage covers frequency while lowering");
      check(int'(volt) <= prev_v, "voltage only falls");
      prev_v = int'(volt);
      if (n > 10000) break;
    end
    check(freq == 500 && int'(volt) == v_need(500), "settled at 500 MHz and its voltage");
    $display("down transition: %0d ns", n * 10);

    // ---------------- up ----------------
    target = 11'd1000; #1;
    n = 0; prev_f = 500;
    begin
      int v0;
      v0 = int'(volt);
      while (busy) begin
        @(posedge clk); #1; n++;
        if (v0 + (n * 10000) / 66900 <= 1200)
          check(int'(volt) == v0 + (n * 10000) / 66900, "voltage rises at 66.9 ns/mV");
        check(int'(freq) <= f_allow(int'(volt)), "frequency never ahead of voltage");
        check(int'(freq) >= prev_f, "frequency only rises");
        prev_f = int'(freq);
        if (n > 10000) break;
      end
    end
    check(freq == 1000 && volt == 1200, "settled at 1.0 GHz / 1.20 V");
    $display("up transition: %0d ns", n * 10);

    // ---------------- clamping ----------------
    target = 11'd100; #1;
    while (busy) @(posedge clk);
    #1 check(freq == 250 && volt == 650, "target below range clamps to 250 MHz / 0.65 V");
    target = 11'd2000; #1;
    while (busy) @(posedge clk);
    #1 check(freq == 1000 && volt == 1200, "target above range clamps to 1.0 GHz / 1.20 V");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
