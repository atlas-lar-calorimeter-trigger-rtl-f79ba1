// Testbench of the reset synchroniser. Each source (push button, MMC reset,
// PLL lock loss) is asserted at a random time between clock edges: the
// reset output must rise immediately, without a clock edge, and fall exactly
// STAGES clock edges after the last source is released.
module tb_reset_sync;
  localparam int STAGES = 4;
  logic clk = 0, pb = 1, mmc = 1, lk = 1, rst;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;
  reset_sync #(.STAGES(STAGES)) dut (.clk, .pb_rst_n(pb), .mmc_rst_n(mmc), .pll_locked(lk), .rst);

  initial begin
    int n;
    pb = 0; #1; pb = 1;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      int src; src = i % 3;
      @(posedge clk); #(2 + $urandom % 14);
      case (src) 0: pb = 0; 1: mmc = 0; default: lk = 0; endcase
      #1;
      checks++; if (rst !== 1) begin failures++; $display("reset not asserted at once (source %0d)", src); end
      repeat (1 + $urandom % 3) @(posedge clk);
      #1; pb = 1; mmc = 1; lk = 1;
      n = 0;
      while (rst === 1 && n < 20) begin @(posedge clk); #1; n++; end
      checks++; if (n != STAGES) begin failures++; $display("release after %0d edges", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
