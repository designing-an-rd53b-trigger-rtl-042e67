// rd53b_tx_core_tb: end-to-end testbench of the TX core at its default parameters.
//
// Configures the core over Wishbone and drives trigger pulses, lined up with the
// generator's 16-cycle code intervals by counting cycles from reset, and words on
// the lower-priority command input. The serial output is collected into 32-bit
// frames and compared with a reference model of the whole chain (extender,
// pattern encoder, tag counter, priority encoder). The run covers:
//   1. patterns 1000, 0001, 0000, 1001 with no extension;
//   2. a single 1000 pulse extended by 7, 11 and 15 cycles;
//   3. triggers while the generator is disabled (they must not be sent);
//   4. random pulses, extensions and command words long enough to wrap the tag.
// The trigger symbols of parts 1 and 2 are also checked against values written
// out by hand. Each mechanism (pass-through, extension, idle frame, trigger
// command, disabled generator, trigger pre-empting a queued command, command word,
// tag wrap, register read-back) is counted, and one that never happens fails.
module rd53b_tx_core_tb;
  localparam int NCYC = 4200;
  localparam logic [7:0] TRIG_TAB [16] = '{8'h00, 8'h2B, 8'h2D, 8'h2E, 8'h33, 8'h35, 8'h36, 8'h39,
                                           8'h3A, 8'h3C, 8'h4B, 8'h4D, 8'h4E, 8'h53, 8'h55, 8'h56};
  localparam logic [7:0] TAG_TAB [50] = '{
    8'h6A, 8'h6C, 8'h71, 8'h72, 8'h74, 8'h8B, 8'h8D, 8'h8E, 8'h93, 8'h95,
    8'h96, 8'h99, 8'h9A, 8'h9C, 8'hA3, 8'hA5, 8'hA6, 8'hA9, 8'h59, 8'hAC,
    8'hB1, 8'hB2, 8'hB4, 8'hC3, 8'hC5, 8'hC6, 8'hC9, 8'hCA, 8'hCC, 8'hD1,
    8'hD2, 8'hD4, 8'h63, 8'h5A, 8'h5C, 8'hAA, 8'h65, 8'h69, 8'h2B, 8'h2D,
    8'h2E, 8'h33, 8'h35, 8'h36, 8'h39, 8'h3A, 8'h3C, 8'h4B, 8'h4D, 8'h4E};

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0]  adr = '0;
  logic [31:0] dat_w = '0, dat_r;
  logic wcyc = 1'b0, stb = 1'b0, we = 1'b0, ack;
  logic trig = 1'b0;
  logic [31:0] cword;
  logic cvalid, cread, ser;
  logic [1:0] sel;

  rd53b_tx_core dut (
    .clk_i(clk), .rst_i(rst),
    .wb_adr_i(adr), .wb_dat_i(dat_w), .wb_dat_o(dat_r), .wb_cyc_i(wcyc), .wb_stb_i(stb),
    .wb_we_i(we), .wb_ack_o(ack),
    .trig_i(trig),
    .cmd_word_i(cword), .cmd_valid_i(cvalid), .cmd_read_o(cread),
    .cmd_o(ser), .sel_o(sel));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;                       // index of the next rising edge after reset
  logic stim [NCYC + 64];
  logic [31:0] q [$];                // lower-priority command words
  assign cvalid = q.size() != 0;
  assign cword  = cvalid ? q[0] : 32'h0;

  // configuration as last written, for the model
  int m_interval = 0;
  bit m_en = 1'b0;

  // mechanism counters
  int n_pass = 0, n_ext = 0, n_idle = 0, n_trigcmd = 0, n_disabled = 0,
      n_preempt = 0, n_cmd = 0, n_wrap = 0, n_readback = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // ---------------- reference model, stepped once per rising edge ----------------
  int rem = 0;
  logic [3:0] win_bits;
  int win_cnt = 0;
  logic [15:0] words [$];            // every 16-bit word the generator must produce
  logic [31:0] exp_frames [$];       // frames in the order they must leave
  logic [1:0] exp_sel [$];
  int wcount = 0;
  logic [15:0] first;
  logic [31:0] pair = 32'hAAAAAAAA;
  logic had_trig_while_off = 1'b0;

  task automatic model_edge(input int n);
    logic x;
    // extender
    x = stim[n] || (rem != 0);
    if (stim[n]) begin
      rem = m_interval;
      if (m_interval == 0) n_pass++; else n_ext++;
    end else if (rem != 0) rem--;
    // frame load by the channel at edges 32p (pair from the previous interval)
    if (n % 32 == 0) begin
      if (m_en && pair != 32'hAAAAAAAA) begin
        exp_frames.push_back(pair); exp_sel.push_back(2'd2);
        n_trigcmd++;
        if (cvalid) n_preempt++;
      end else if (cvalid) begin
        exp_frames.push_back(q[0]); exp_sel.push_back(2'd1);
        n_cmd++;
      end else begin
        exp_frames.push_back(32'hAAAAAAAA); exp_sel.push_back(2'd0);
        n_idle++;
      end
      if (!m_en && pair != 32'hAAAAAAAA) n_disabled++;
    end
    // windows of 4 cycles, words of 4 windows
    win_cnt = (n % 4 == 0) ? int'(x) : win_cnt | int'(x);
    if (n % 4 == 3) begin
      win_bits = {win_bits[2:0], win_cnt[0]};
      if (n % 16 == 15) begin
        logic [15:0] w;
        int tag = wcount % 50;
        w = (win_bits == 0) ? 16'hAAAA : {TRIG_TAB[win_bits], TAG_TAB[tag]};
        if (win_bits != 0 && tag == 0 && wcount > 0) n_wrap++;
        words.push_back(w);
        wcount++;
        if (n % 32 == 15) first = w;
        else pair = {first, w};
      end
    end
  endtask

  // ---------------- serial receiver ----------------
  logic [31:0] shift;
  int nbits = 0, nframes = 0;
  logic [31:0] got_frames [$];

  always @(posedge clk) begin
    if (!rst) begin
      model_edge(cyc);
      if (cread) void'(q.pop_front());
      if (cyc >= 1) begin
        shift = {shift[30:0], ser};
        nbits++;
        if (nbits == 32) begin
          nbits = 0;
          check(shift == exp_frames[nframes],
                $sformatf("frame %0d: %h expected %h", nframes, shift, exp_frames[nframes]));
          check(sel == exp_sel[nframes], "sel");
          got_frames.push_back(shift);
          nframes++;
        end
      end
      cyc++;
    end
  end

  always @(negedge clk) trig <= (rst || cyc >= NCYC) ? 1'b0 : stim[cyc];

  // ---------------- stimulus ----------------
  task automatic wb(input logic [7:0] a, input bit w, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    adr = a; we = w; dat_w = d; wcyc = 1'b1; stb = 1'b1;
    do @(posedge clk); while (!ack);
    #1 r = dat_r;
    @(negedge clk);
    wcyc = 1'b0; stb = 1'b0; we = 1'b0;
  endtask

  task automatic configure(input int interval, input bit en);
    logic [31:0] r;
    wb(8'h20, 1, interval, r);
    wb(8'h21, 1, {31'b0, en}, r);
    m_interval = interval;
    m_en = en;
    wb(8'h20, 0, 0, r); check(r == interval, "read back 0x20"); n_readback++;
    wb(8'h21, 0, 0, r); check(r == {31'b0, en}, "read back 0x21"); n_readback++;
  endtask

  task automatic wait_cycle(input int c);
    while (cyc < c) @(negedge clk);
  endtask

  // a trigger pulse of len cycles from window w of word k
  task automatic put_pulse(input int k, input int w, input int len);
    for (int i = 0; i < len; i++) stim[16*k + 4*w + i] = 1'b1;
  endtask

  // word index -> trigger symbol actually sent
  function automatic logic [7:0] sent_trig_symbol(input int k);
    logic [31:0] f = got_frames[k / 2 + 1];
    return (k % 2 == 0) ? f[31:24] : f[15:8];
  endfunction

  initial begin
    logic [3:0] pats [4] = '{4'b1000, 4'b0001, 4'b0000, 4'b1001};
    for (int i = 0; i < NCYC + 64; i++) stim[i] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // part 1: words 8..11 carry patterns 1000, 0001, 0000, 1001
    configure(0, 1);
    for (int k = 0; k < 4; k++)
      for (int w = 0; w < 4; w++)
        if (pats[k][3-w]) put_pulse(8 + k, w, 4);
    q.push_back(32'h1234_5678);       // waits behind the trigger commands
    // part 2: one 4-cycle pulse at the start of words 16, 24, 32 with N = 7, 11, 15
    wait_cycle(16*16 - 60); configure(7, 1);  put_pulse(16, 0, 4);
    wait_cycle(24*16 - 60); configure(11, 1); put_pulse(24, 0, 4);
    wait_cycle(32*16 - 60); configure(15, 1); put_pulse(32, 0, 4);
    // part 3: disabled generator, triggers ignored, command words go out
    wait_cycle(40*16 - 60); configure(0, 0);
    put_pulse(40, 1, 4); put_pulse(43, 0, 8);
    q.push_back(32'hCAFE_0001); q.push_back(32'hCAFE_0002);
    // part 4: random traffic
    wait_cycle(48*16 - 60); configure(3, 1);
    for (int k = 48; k < NCYC / 16 - 4; k++) begin
      // reconfigure every 40 words, with no pulse in the 4 words before it
      if (k % 40 == 0) begin
        wait_cycle(16*k - 60);
        configure($urandom_range(0, 20), 1);
      end
      if (k % 40 < 36 && $urandom_range(0, 2) != 0) put_pulse(k, $urandom_range(0, 3), $urandom_range(1, 6));
      if ($urandom_range(0, 9) == 0) q.push_back($urandom);
    end
    wait_cycle(NCYC);
    repeat (70) @(negedge clk);

    // hand-written expectations for parts 1 and 2
    check(sent_trig_symbol(8)  == 8'h3A, "pattern 1000");
    check(sent_trig_symbol(9)  == 8'h2B, "pattern 0001");
    check(got_frames[10/2 + 1][31:16] == 16'hAAAA,
          "pattern 0000 sent as idle");
    check(sent_trig_symbol(11) == 8'h3C, "pattern 1001");
    check(sent_trig_symbol(16) == 8'h55, "1000 extended by 7 gives 1110");
    check(sent_trig_symbol(24) == 8'h56, "1000 extended by 11 gives 1111");
    check(sent_trig_symbol(32) == 8'h56 && sent_trig_symbol(33) == 8'h3A,
          "1000 extended by 15 gives 1111 then 1000");

    check(nframes == NCYC / 32 + 2, $sformatf("%0d frames received", nframes));
    $display("pass-through %0d, extended %0d, idle %0d, trigger cmd %0d, disabled %0d, pre-empt %0d, command %0d, tag wrap %0d, read-back %0d",
             n_pass, n_ext, n_idle, n_trigcmd, n_disabled, n_preempt, n_cmd, n_wrap, n_readback);
    check(n_pass > 0, "pass-through never happened");
    check(n_ext > 0, "extension never happened");
    check(n_idle > 0, "idle frame never sent");
    check(n_trigcmd > 0, "trigger command never sent");
    check(n_disabled > 0, "disabled generator never tested");
    check(n_preempt > 0, "trigger never pre-empted a command word");
    check(n_cmd > 0, "command word never sent");
    check(n_wrap > 0, "tag counter never wrapped");
    check(n_readback > 0, "register read-back never done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
