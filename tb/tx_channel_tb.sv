// tx_channel_tb: self-checking testbench of the TX channel.
//
// Offers a new trigger code word (ready or not, at random) on the cycle before each
// 32-cycle load, as the trigger code generator does, and keeps a queue of
// lower-priority command words that is popped on cmd_read. The serial output is
// collected 32 bits at a time and compared with the word the priority rule picks:
// trigger code if ready, else the head of the queue, else idle. Also checked:
// sel_o, one cmd_read pulse per queued word sent, and the 32-cycle frame period.
module tx_channel_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] tcode = 32'hAAAAAAAA, cword;
  logic tready = 1'b0, cvalid, cread, ser;
  logic [1:0] sel;

  tx_channel dut (.clk_i(clk), .rst_i(rst), .trig_code_i(tcode), .trig_ready_i(tready),
                  .cmd_word_i(cword), .cmd_valid_i(cvalid), .cmd_read_o(cread),
                  .cmd_o(ser), .sel_o(sel));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] q [$];
  logic [31:0] exp_word [$];
  logic [1:0]  exp_sel [$];
  logic [31:0] shift;
  int nbits = 0, nframes = 0, nreads = 0, nfrom_q = 0;
  int nsel [3] = '{0, 0, 0};

  assign cvalid = q.size() != 0;
  assign cword  = cvalid ? q[0] : 32'h0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      // load edges are cyc % 32 == 0: work out what must be sent
      if (cyc % 32 == 0) begin
        if (tready) begin
          exp_word.push_back(tcode); exp_sel.push_back(2'd2);
        end else if (cvalid) begin
          exp_word.push_back(q[0]); exp_sel.push_back(2'd1);
          nfrom_q++;
        end else begin
          exp_word.push_back(32'hAAAAAAAA); exp_sel.push_back(2'd0);
        end
      end
      if (cread) begin
        nreads++;
        void'(q.pop_front());
      end
      // serial bits appear after load edge cyc, seen from edge cyc+1 on
      if (cyc >= 1) begin
        shift = {shift[30:0], ser};
        nbits++;
        if (nbits == 32) begin
          nbits = 0;
          check(shift == exp_word[0], $sformatf("frame %0d: %h expected %h", nframes, shift, exp_word[0]));
          check(sel == exp_sel[0], "sel");
          nsel[sel]++;
          void'(exp_word.pop_front());
          void'(exp_sel.pop_front());
          nframes++;
        end
      end
      cyc++;
    end
  end

  // new trigger code offered on the cycle before each load, random queue pushes
  always @(negedge clk) begin
    if (!rst && cyc % 32 == 0) begin
      tready <= ($urandom_range(0, 2) == 0);
      tcode  <= $urandom;
    end
    if (!rst && $urandom_range(0, 60) == 0) q.push_back($urandom);
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (nframes == 200);
    @(posedge clk);
    #1;
    check(nreads == nfrom_q, $sformatf("%0d reads for %0d queued words sent", nreads, nfrom_q));
    check(nsel[0] > 0 && nsel[1] > 0 && nsel[2] > 0, "all three sources used");
    $display("frames: idle %0d, command %0d, trigger %0d", nsel[0], nsel[1], nsel[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200 * 32 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
