// tx_core_regs_tb: self-checking testbench of the TX core configuration registers.
//
// Acts as a Wishbone master: checks the reset values, writes and reads back the
// trigger extension interval (0x20) and the generator enable (0x21) with random
// data, checks that an unused address reads zero and leaves both registers
// untouched, and that every access is acknowledged after exactly one cycle.
module tx_core_regs_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0]  adr = '0;
  logic [31:0] dat_w = '0, dat_r;
  logic cyc = 1'b0, stb = 1'b0, we = 1'b0, ack;
  logic [31:0] ext;
  logic en;

  tx_core_regs dut (.clk_i(clk), .rst_i(rst), .wb_adr_i(adr), .wb_dat_i(dat_w), .wb_dat_o(dat_r),
                    .wb_cyc_i(cyc), .wb_stb_i(stb), .wb_we_i(we), .wb_ack_o(ack),
                    .trig_ext_interval_o(ext), .trig_code_en_o(en));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic wb(input logic [7:0] a, input bit w, input logic [31:0] d, output logic [31:0] q);
    int n = 0;
    @(negedge clk);
    adr = a; we = w; dat_w = d; cyc = 1'b1; stb = 1'b1;
    do begin
      @(posedge clk);
      n++;
    end while (!ack && n < 10);
    #1 q = dat_r;
    check(n == 2, $sformatf("ack after %0d edges", n));
    @(negedge clk);
    cyc = 1'b0; stb = 1'b0; we = 1'b0;
  endtask

  initial begin
    logic [31:0] q, v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(ext == 0 && en == 0, "reset values");
    wb(8'h20, 0, 0, q); check(q == 0, "read 0x20 after reset");
    wb(8'h21, 0, 0, q); check(q == 0, "read 0x21 after reset");
    for (int i = 0; i < 40; i++) begin
      v = (i < 3) ? (i == 0 ? 7 : i == 1 ? 11 : 15) : $urandom;
      wb(8'h20, 1, v, q);
      check(ext == v, "interval output after write");
      wb(8'h20, 0, 0, q);
      check(q == v, $sformatf("read back 0x20: %h vs %h", q, v));
      wb(8'h21, 1, {$urandom_range(0, 255), 7'b0, i[0]}, q);
      check(en == i[0], "enable output after write");
      wb(8'h21, 0, 0, q);
      check(q == {31'b0, i[0]}, "read back 0x21");
      wb(8'h22, 1, 32'hFFFF_FFFF, q);
      check(ext == v && en == i[0], "write elsewhere leaves registers");
      wb(8'h1F, 0, 0, q);
      check(q == 0, "unused address reads zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
