// tb_mcd_sync: checks the falling-edge synchronizer bank.  The input vector
// changes at random times away from the clock edges; at every rising edge the
// output must equal the input as it was at the preceding falling edge, and
// reset must clear it.
module tb_mcd_sync;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  logic [7:0] d = 8'h5a, q, at_fall;
  int checks = 0, failures = 0;

  mcd_sync #(.WIDTH(8)) dut (.clk(clk), .rst_n(rst_n), .d_async(d), .q(q));

  always #0.5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $realtime, what); end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the value d had at the last falling edge (sampled just before the edge)
  always @(negedge clk) at_fall = d;

  // d changes 0.1..0.4 ns after either clock edge: never on an edge itself
  initial begin
    forever begin
      @(clk);
      #(0.1 + real'($urandom_range(300)) / 1000.0);
      d = 8'($urandom);
    end
  end

  initial begin : main
    #2.2;
    check(q == 8'h00, "reset clears the output");
    rst_n = 1;
    @(posedge clk);
    repeat (500) begin
      @(posedge clk); #0.01;
      check(q == at_fall, "output is the input at the last falling edge");
      #0.45;
      check(q == at_fall, "output held until the next falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
