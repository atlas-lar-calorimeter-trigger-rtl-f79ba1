// Testbench of the input stage (12 fibres in two transceiver groups, short
// 20-BC orbit, 1k-word pattern RAMs). Twelve LTDB link models start with
// different bit offsets, word offsets and BCIDs (0-2 bunch crossings of skew,
// within the 4-BC alignment FIFOs). The bench checks that every
// fibre locks (lock register), that the aligned output carries
// adc_pattern(fibre, BCID, sample) on every fibre, that an injected CRC error
// reaches the error flag and the fibre's CRC counter, that the registers read
// back, and then that test mode replays the frames written into each group's
// pattern RAM on all fibres of the group. The first frame after each pattern
// wrap is not compared: the scrambler state stored with the first frame of
// the pattern cannot match the one left by its last frame.
module tb_input_stage;
  import lar_pkg::*;
  import tb_pkg::*;
  localparam int N = 12, ORBIT = 20, BC = 336;
  logic clk_ipb = 0, clk = 0, rst = 1;
  always #17 clk_ipb = ~clk_ipb;
  always #21 clk = ~clk;
  int checks = 0, failures = 0;

  mm_req_t req = '0; mm_rsp_t rsp;
  ltdb_word_t rx [N];
  logic [N-1:0] slip;
  sc_word_t out_w [N];
  logic [11:0] ob; logic aligned;
  logic inj = 0;
  int nslip [N];

  input_stage #(.N(N), .GROUP(6), .RAM_DEPTH(1024), .ORBIT(ORBIT), .SYNC_DEPTH(32)) dut (
    .clk_ipb, .rst_ipb(rst), .mm_req(req), .mm_rsp(rsp), .clk, .rst, .rx, .rx_bitslip(slip),
    .out_word(out_w), .out_bcid(ob), .aligned);

  for (genvar f = 0; f < N; f++) begin : g_link
    ltdb_link_model #(.FID(f), .ORBIT(ORBIT), .START_BCID(f % 3), .INIT_SLIP((f * 5) % 16),
      .INIT_WORD(f % 8)) u_link (.clk, .rst, .bitslip(slip[f]), .inject_crc(inj && f == 3),
      .inject_bcid(1'b0), .rx(rx[f]), .bitslips(nslip[f]));
  end

  // output checker: expected fibre id per fibre (changes in test mode)
  int exp_fid [N]; bit chk = 0; logic [N-1:0] fmask = '1; bit skip0 = 0;
  int k = 0, good = 0, n_crc_flag = 0;
  logic [11:0] fb;
  always @(posedge clk) if (!rst && chk && aligned) begin
    if (out_w[0].valid) begin
      if (out_w[0].sop) begin k = 0; fb = ob; end
      if (!(skip0 && fb == 0))
        for (int f = 0; f < N; f++) if (fmask[f]) begin
          checks++;
          if (out_w[f].error[0]) n_crc_flag++;
          if (!out_w[f].valid || out_w[f].data !== adc_pattern(exp_fid[f], int'(fb), k)) begin
            failures++;
            if (failures < 6) $display("f=%0d k=%0d bcid=%0d got %h exp %h", f, k, fb, out_w[f].data, adc_pattern(exp_fid[f], int'(fb), k));
          end
        end
      k++; good++;
    end
  end

  task automatic mm_write(int a, int d);
    @(negedge clk_ipb); req.address = 24'(a); req.writedata = 32'(d); req.write = 1;
    @(negedge clk_ipb); req.write = 0;
  endtask
  task automatic mm_read(int a, output logic [31:0] d);
    @(negedge clk_ipb); req.address = 24'(a); req.read = 1;
    @(negedge clk_ipb); req.read = 0;
    if (!rsp.readdatavalid) @(negedge clk_ipb);
    d = rsp.readdata;
    checks++; if (!rsp.readdatavalid) begin failures++; $display("no readdatavalid at %h", a); end
  endtask

  // LOCic frames of a pattern with fibre id fid, written to group g's RAM
  task automatic write_pattern(int g, int fid);
    logic [11:0] prev [8];
    for (int c = 0; c < 8; c++) prev[c] = 12'h0;
    for (int b = 0; b < ORBIT; b++) begin
      logic [95:0] bits; logic [7:0] crc; logic [3:0] bf; logic [11:0] s;
      for (int c = 0; c < 8; c++) bits[95 - 12*c -: 12] = adc_pattern(fid, b, c);
      crc = crc8(bits); bf = 4'(b);
      for (int c = 0; c < 8; c++) begin
        s = scramble12(adc_pattern(fid, b, c), prev[c]); prev[c] = s;
        mm_write((g << 15) + b * 8 + c, int'({crc[7-c], (c < 4) ? LOCIC_BORDER[3-c] : bf[7-c], s, 2'b00}));
      end
    end
  endtask

  initial begin
    logic [31:0] d;
    for (int f = 0; f < N; f++) exp_fid[f] = f;
    repeat (5) @(posedge clk_ipb); rst = 0;
    wait (aligned);
    chk = 1;
    mm_read('h40003, d); checks++; if (d[N-1:0] !== '1) begin failures++; $display("lock bits %h", d); end
    mm_read('h40005, d); checks++; if (d[0] !== 1) begin failures++; $display("aligned bit %h", d); end
    repeat (20 * 8) @(posedge clk);
    @(posedge clk); inj = 1; repeat (8) @(posedge clk); inj = 0;
    repeat (20 * 8) @(posedge clk);
    mm_read('h40103, d); checks++; if (d[31:16] == 0) begin failures++; $display("CRC counter of fibre 3: %h", d); end
    checks++; if (n_crc_flag == 0) begin failures++; $display("CRC error flag never seen"); end
    fmask = 'h7FF; mm_write('h40001, 'h7FF); mm_read('h40001, d); checks++; if (d != 'h7FF) begin failures++; $display("fibre select %h", d); end
    mm_write('h40001, 'hFFF); repeat (4) @(posedge clk_ipb); fmask = '1;
    // test mode: group 0 replays fibre id 100, group 1 fibre id 101
    write_pattern(0, 100); write_pattern(1, 101);
    mm_read((1 << 15) + 5, d); checks++; if (d[15:0] == 0) begin failures++; $display("pattern RAM readback %h", d); end
    chk = 0;
    mm_write('h40000, 1);
    for (int f = 0; f < N; f++) exp_fid[f] = 100 + f / 6;
    skip0 = 1;
    repeat (8 * 8) @(posedge clk);
    wait (aligned);
    good = 0; chk = 1;
    repeat (60 * 8) @(posedge clk);
    checks++; if (good < 400) begin failures++; $display("test mode: only %0d aligned cycles", good); end
    mm_read('h40000, d); checks++; if (d != 1) begin failures++; $display("test mode readback %h", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(BC * 1500);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
