// Testbench of the fibre-to-fibre synchroniser: four decoded fibre streams
// with different delays (0 to 3 bunch crossings) must come out carrying the
// same bunch crossing on every fibre, starting at BCID 0, with the output
// BCID counting. A fibre that drops its stream forces a restart, after which
// alignment must be regained.
module tb_fibre_sync;
  import lar_pkg::*;
  import tb_pkg::*;
  localparam int N = 4, ORBIT = 20;
  localparam int DELAY [N] = '{0, 5, 17, 26};
  logic clk = 0, rst = 1;
  always #1562 clk = ~clk;
  int checks = 0, failures = 0;
  int t = 0;
  logic drop = 0;

  sc_word_t in_w [N], out_w [N];
  logic [11:0] in_b [N], ob;
  logic in_bv [N];
  logic aligned; logic [15:0] rcnt;

  always_comb begin
    for (int f = 0; f < N; f++) begin
      int tp, fr;
      tp = t - DELAY[f] - 40;
      fr = (tp >= 0) ? tp / 8 : 0;
      in_w[f].valid = (tp >= 0) && !(drop && f == 2);
      in_w[f].sop   = (tp >= 0) && (tp % 8 == 0);
      in_w[f].data  = adc_pattern(f, (fr + 3) % ORBIT, (tp >= 0) ? tp % 8 : 0);
      in_w[f].error = 2'b00;
      in_b[f]  = 12'((fr + 3) % ORBIT);
      in_bv[f] = (fr > 2);
    end
  end
  always @(posedge clk) if (!rst) t <= t + 1;

  fibre_sync #(.N(N), .DEPTH(32), .ORBIT(ORBIT)) dut (
    .clk, .rst, .fibre_select(4'hF), .in_word(in_w), .in_bcid(in_b), .in_bcid_valid(in_bv),
    .out_word(out_w), .out_bcid(ob), .aligned, .resync_cnt(rcnt));

  int k = 0, good = 0;
  logic [11:0] fb;
  always @(posedge clk) if (!rst) begin
    if (out_w[0].valid) begin
      if (out_w[0].sop) begin k = 0; fb = ob; end
      for (int f = 0; f < N; f++) begin
        checks++;
        if (!out_w[f].valid || out_w[f].sop !== (k == 0) || out_w[f].data !== adc_pattern(f, int'(fb), k)) begin
          failures++;
          if (failures < 6) $display("t=%0d f=%0d k=%0d bcid=%0d got %h exp %h", t, f, k, fb, out_w[f].data, adc_pattern(f, int'(fb), k));
        end
      end
      k++; good++;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    wait (aligned);
    checks++; if (ob !== 0) begin failures++; $display("first BCID %0d", ob); end
    repeat (800) @(posedge clk);
    drop = 1; repeat (20) @(posedge clk); drop = 0;
    checks++; if (aligned || rcnt != 1) begin failures++; $display("no restart on a lost fibre: aligned=%0d resyncs=%0d", aligned, rcnt); end
    wait (aligned);
    repeat (400) @(posedge clk);
    checks++; if (good < 1000) begin failures++; $display("only %0d aligned cycles", good); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
