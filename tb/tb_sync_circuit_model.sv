// tb_sync_circuit_model: checks the synchronizer timing model.  DataIn is
// changed a chosen time before a sampling edge of clock_n (1 ns period):
// at or beyond the 300 ps window the new value must appear TCQ after that
// edge; inside the window it must appear only after the next edge.  The
// output may change at most once per edge (no glitches).
module tb_sync_circuit_model;
  timeunit 1ns;
  timeprecision 1ps;

  logic data_in = 0, clock_n = 0, data_out;
  int checks = 0, failures = 0, transitions = 0;

  sync_circuit_model #(.TS_PS(300), .TCQ_PS(50)) dut (.data_in(data_in), .clock_n(clock_n), .data_out(data_out));

  always #0.5 clock_n = ~clock_n;   // sampling (rising) edges at 0.5, 1.5, 2.5 ...
  always @(data_out) transitions++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $realtime, what); end
  endtask

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // change data_in 'lead_ps' before the next sampling edge and check the result
  task automatic trial(input int lead_ps);
    logic newv;
    int tr0;
    @(posedge clock_n); #0.1;                 // settle; now 0.9 ns before next edge
    newv = !data_out;
    #(0.9 - real'(lead_ps) / 1000.0);
    data_in = newv;
    tr0 = transitions;
    @(posedge clock_n); #0.1;
    if (lead_ps >= 300) begin
      check(data_out == newv, $sformatf("captured at first edge (lead %0d ps)", lead_ps));
    end else begin
      check(data_out != newv, $sformatf("not captured inside window (lead %0d ps)", lead_ps));
      @(posedge clock_n); #0.1;
      check(data_out == newv, $sformatf("captured one edge later (lead %0d ps)", lead_ps));
    end
    check(transitions - tr0 == 1, "exactly one output transition");
  endtask

  initial begin : main
    #3;
    check(data_out == 1'b0, "initial output");
    trial(800); trial(450); trial(300); trial(299); trial(150); trial(20);
    trial(600); trial(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
