// trig_code_gen_tb: self-checking testbench of the trigger pattern encoder.
//
// Drives a trigger pulse stream that starts with the four patterns 1000, 0001,
// 0000 and 1001 (one 4-cycle pulse per triggered bunch crossing), then pulses of
// random length and position, for enough intervals to wrap the tag counter. A
// reference model written from the protocol tables (not from the RTL) works out
// each expected 32-bit output and the cycle it must appear on. Checks: the value
// and timing of every output update (one every 32 cycles), the code_ready output
// on every cycle, with the enable switched on and off, and the total number of
// updates.
module trig_code_gen_tb;
  localparam int NPAIR = 60;            // 120 words: tag counter wraps twice
  localparam int NCYC  = NPAIR * 32;

  // protocol tables, written out independently of the design's package
  localparam logic [7:0] TRIG_TAB [16] = '{8'h00, 8'h2B, 8'h2D, 8'h2E, 8'h33, 8'h35, 8'h36, 8'h39,
                                           8'h3A, 8'h3C, 8'h4B, 8'h4D, 8'h4E, 8'h53, 8'h55, 8'h56};
  localparam logic [7:0] TAG_TAB [50] = '{
    8'h6A, 8'h6C, 8'h71, 8'h72, 8'h74, 8'h8B, 8'h8D, 8'h8E, 8'h93, 8'h95,
    8'h96, 8'h99, 8'h9A, 8'h9C, 8'hA3, 8'hA5, 8'hA6, 8'hA9, 8'h59, 8'hAC,
    8'hB1, 8'hB2, 8'hB4, 8'hC3, 8'hC5, 8'hC6, 8'hC9, 8'hCA, 8'hCC, 8'hD1,
    8'hD2, 8'hD4, 8'h63, 8'h5A, 8'h5C, 8'hAA, 8'h65, 8'h69, 8'h2B, 8'h2D,
    8'h2E, 8'h33, 8'h35, 8'h36, 8'h39, 8'h3A, 8'h3C, 8'h4B, 8'h4D, 8'h4E};

  logic clk = 1'b0, rst = 1'b1, en = 1'b0, trig = 1'b0;
  logic [31:0] code;
  logic ready, update;

  trig_code_gen dut (.clk_i(clk), .rst_i(rst), .enable_i(en), .trig_i(trig),
                     .code_o(code), .code_ready_o(ready), .code_update_o(update));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic stim [NCYC + 64];
  logic [31:0] exp_pair [NPAIR];
  int cyc = 0, nupd = 0, last_upd = -1;
  logic [31:0] cur_exp = 32'hAAAAAAAA;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // reference model
  function automatic logic [15:0] model_word(int k);
    logic [3:0] pat;
    for (int w = 0; w < 4; w++) begin
      logic b = 1'b0;
      for (int c = 0; c < 4; c++) b |= stim[16*k + 4*w + c];
      pat[3-w] = b;
    end
    return (pat == 0) ? 16'hAAAA : {TRIG_TAB[pat], TAG_TAB[k % 50]};
  endfunction

  initial begin
    // first four words: patterns 1000, 0001, 0000, 1001 as 4-cycle pulses
    logic [3:0] first_pats [4] = '{4'b1000, 4'b0001, 4'b0000, 4'b1001};
    for (int i = 0; i < NCYC + 64; i++) stim[i] = 1'b0;
    for (int k = 0; k < 4; k++)
      for (int w = 0; w < 4; w++)
        for (int c = 0; c < 4; c++) stim[16*k + 4*w + c] = first_pats[k][3-w];
    // then random pulses of 1..6 cycles at random offsets, some empty intervals
    for (int i = 64; i < NCYC; ) begin
      automatic int gap = $urandom_range(0, 40);
      automatic int len = $urandom_range(1, 6);
      i += gap;
      for (int j = 0; j < len && i < NCYC; j++) stim[i++] = 1'b1;
    end
    for (int p = 0; p < NPAIR; p++) exp_pair[p] = {model_word(2*p), model_word(2*p+1)};
  end

  // stimulus changes away from the active edge
  always @(negedge clk) begin
    trig <= (rst) ? 1'b0 : stim[cyc];
    if (!rst) en <= ((cyc / 100) % 3) != 2;     // enable off for one third of the time
  end

  always @(posedge clk) begin
    if (!rst) begin
      // outputs seen here result from edge cyc-1
      if (update) begin
        automatic int e = cyc - 1;
        automatic int p = (e - 31) / 32;
        check(e % 32 == 31, $sformatf("update at edge %0d not at 32p+31", e));
        check(last_upd < 0 || e - last_upd == 32, "updates not 32 cycles apart");
        last_upd = e;
        if (p >= 0 && p < NPAIR) begin
          check(code == exp_pair[p], $sformatf("pair %0d: got %h expected %h", p, code, exp_pair[p]));
          cur_exp = exp_pair[p];
        end
        nupd++;
      end
      if (cyc > 0 && cyc < NCYC) begin
        check(code == cur_exp, $sformatf("output held wrong: %h vs %h", code, cur_exp));
        check(ready == (en && cur_exp != 32'hAAAAAAAA), "code_ready");
      end
      cyc++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (cyc == NCYC + 2);
    // the patterns 1000, 0001, 0000, 1001 written out by hand
    check(exp_pair[0] == 32'h3A6A_2B6C && exp_pair[1] == 32'hAAAA_3C72, "reference model");
    check(nupd == NPAIR, $sformatf("%0d updates, expected %0d", nupd, NPAIR));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NCYC + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
