// Testbench of the test pattern generator: fills the pattern RAM through the
// slow-control port, reads part of it back, then checks that test mode
// replays the words in address order, one per 320 MHz cycle, wrapping after
// PATTERN_LEN words, and that leaving test mode parks the address at 0.
module tb_test_pattern_gen;
  localparam int LEN = 200;
  logic clk_ipb = 0, clk = 0, rst = 1, test_mode = 0;
  always #5000 clk_ipb = ~clk_ipb;
  always #1562 clk = ~clk;
  int checks = 0, failures = 0;
  logic [14:0] addr; logic write = 0, read = 0; logic [15:0] wdata, rdata, pw; logic rv, sof;

  test_pattern_gen #(.PATTERN_LEN(LEN)) dut (
    .clk_ipb, .addr, .write, .read, .wdata, .rdata, .rdata_valid(rv),
    .clk, .rst, .test_mode, .pattern_word(pw), .pattern_sof(sof));

  function automatic logic [15:0] val(int a); return 16'(a * 40503 + 7); endfunction

  initial begin
    for (int a = 0; a < LEN + 8; a++) begin
      @(negedge clk_ipb); addr = 15'(a); wdata = val(a); write = 1;
    end
    @(negedge clk_ipb); write = 0;
    for (int a = 0; a < 20; a++) begin
      @(negedge clk_ipb); addr = 15'(a * 7); read = 1;
      @(negedge clk_ipb); read = 0;
      checks++; if (!rv || rdata !== val(a * 7)) begin failures++; $display("readback %0d", a); end
    end
    repeat (4) @(posedge clk); rst = 0;
    repeat (4) @(posedge clk);
    checks++; if (pw !== val(0)) failures++;
    @(negedge clk); test_mode = 1;
    // the word at address 0 appears one cycle after test mode is set
    for (int i = 0; i < 3 * LEN; i++) begin
      @(posedge clk); #1;
      checks++;
      if (pw !== val(i % LEN) || sof !== (i % LEN == 0)) begin
        failures++;
        if (failures < 5) $display("replay %0d got %h exp %h", i, pw, val(i % LEN));
      end
    end
    @(negedge clk); test_mode = 0;
    repeat (3) @(posedge clk); #1;
    checks++; if (pw !== val(0)) begin failures++; $display("address not parked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk_ipb);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
