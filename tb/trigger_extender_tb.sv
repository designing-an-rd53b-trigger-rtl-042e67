// trigger_extender_tb: self-checking testbench of the trigger extender.
//
// Runs segments with extension intervals 0 (pass-through), 7, 11, 15 and random
// values, each fed with pulses of random length and spacing. A reference model
// keeps the cycle of the last high input and the interval in force then, and says
// the output must be high on that cycle and the N cycles after it. The output is
// compared on every cycle, in the middle of the cycle; the width of each output
// pulse is also compared with input width plus N.
module trigger_extender_tb;
  logic clk = 1'b0, rst = 1'b1, trig = 1'b0, out;
  logic [31:0] interval = '0;

  trigger_extender dut (.clk_i(clk), .rst_i(rst), .interval_i(interval), .trig_i(trig), .trig_o(out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int last_hi = -1000000;
  int last_n = 0;
  int out_len = 0, in_len = 0, in_len_run = 0, rises = 0;
  logic trig_q = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // compare what the next stage samples: the values just before each rising edge
  always @(posedge clk) begin
    if (!rst) begin
      automatic bit exp;
      if (trig) begin
        last_hi = cyc;
        last_n  = int'(interval);
      end
      exp = trig || (cyc - last_hi <= last_n);
      check(out == exp, $sformatf("out=%0b expected %0b (N=%0d)", out, exp, last_n));
      // pulse widths: an output pulse is as long as the input pulse plus N
      if (trig && !trig_q) rises++;
      trig_q = trig;
      if (trig) in_len_run++;
      else if (in_len_run != 0) begin
        in_len = in_len_run;
        in_len_run = 0;
      end
      if (out) out_len++;
      else if (out_len != 0) begin
        // only single pulses: a retrigger merges several into one
        if (rises == 1)
          check(out_len == in_len + last_n, $sformatf("pulse of %0d, expected %0d + %0d", out_len, in_len, last_n));
        out_len = 0;
        rises = 0;
      end
      cyc++;
    end
  end

  task automatic run_segment(input int n, input int npulses);
    @(negedge clk) interval = n;
    repeat (npulses) begin
      automatic int len = $urandom_range(1, 5);
      automatic int gap = n + $urandom_range(2, 8);   // leave the extension time to end
      @(negedge clk) trig = 1'b1;
      repeat (len - 1) @(negedge clk);
      @(negedge clk) trig = 1'b0;
      repeat (gap) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_segment(0, 20);
    run_segment(7, 20);
    run_segment(11, 20);
    run_segment(15, 20);
    repeat (5) run_segment($urandom_range(1, 40), 10);
    // retrigger inside the extension time: the count restarts
    @(negedge clk) interval = 10;
    repeat (10) begin
      @(negedge clk) trig = 1'b1;
      @(negedge clk) trig = 1'b0;
      repeat ($urandom_range(1, 9)) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
