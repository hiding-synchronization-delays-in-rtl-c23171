// tb_squash_bcast: checks squash distribution to three destination domains
// running at unrelated clocks (1.13, 0.87 and 2.9 ns).  For each squash
// request the testbench predicts, per domain, the rising edge on which the
// squash pulse starts: the first rising edge after the first falling edge
// that follows the front-end edge where the request was taken.  The pulse
// must be low prev_cnt, high for exactly one cycle from that edge, then low.
module tb_squash_bcast;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_fe = 0, rst_n = 0, squash_req = 0, squash_fe;
  logic [2:0] clk_dst = '0, squash_o;
  int checks = 0, failures = 0;
  int pulses [3] = '{0, 0, 0};

  squash_bcast #(.N_DST(3)) dut (
    .clk_fe(clk_fe), .rst_fe_n(rst_n), .squash_req(squash_req), .squash_fe(squash_fe),
    .clk_dst(clk_dst), .rst_dst_n({3{rst_n}}), .squash_o(squash_o));

  always #0.5 clk_fe = ~clk_fe;
  initial begin #0.031; forever #0.565 clk_dst[0] = ~clk_dst[0]; end
  initial begin #0.277; forever #0.435 clk_dst[1] = ~clk_dst[1]; end
  initial begin #0.119; forever #1.45  clk_dst[2] = ~clk_dst[2]; end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $realtime, what); end
  endtask

  initial begin : watchdog
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_req;

  for (genvar d = 0; d < 3; d++) begin : g_mon
    always @(posedge squash_o[d]) pulses[d]++;
    initial begin
      wait (rst_n);
      forever begin
        @(posedge squash_req);
        @(posedge clk_fe);          // request taken here
        fork
          begin
            realtime tf;
            @(negedge clk_dst[d]);
            tf = $realtime;
            if (tf != t_req) begin
              @(posedge clk_dst[d]); #0.01;
              check(squash_o[d], $sformatf("domain %0d squash on predicted edge", d));
              @(posedge clk_dst[d]); #0.01;
              check(!squash_o[d], $sformatf("domain %0d squash lasts one cycle", d));
            end
          end
        join_none
      end
    end
  end

  initial begin : main
    int prev_cnt [3];
    #3 rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      prev_cnt = pulses;
      @(negedge clk_fe);
      squash_req = 1'b1;
      #0.001;
      check(squash_fe, "front-end squash is immediate");
      @(posedge clk_fe); t_req = $realtime; #0.001;
      squash_req = 1'b0;
      repeat (12 + k % 4) @(posedge clk_fe);
      for (int d = 0; d < 3; d++)
        check(pulses[d] == prev_cnt[d] + 1, $sformatf("exactly one pulse in domain %0d", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
