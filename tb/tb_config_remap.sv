// Testbench of the configurable remapping at full size (48 fibres in, 32
// trigger-tower streams out). The 320, 240 and 100 MHz clocks are generated
// with exact ratios (eight 320 MHz and six 240 MHz cycles per bunch
// crossing). Part of the map is rewritten over the register port (a
// reversed stream, a disabled entry, a cross-fibre entry) and read back;
// every output word is compared with the map applied to the reference
// samples of the bunch crossing last completed, and the latency from the
// first input sample to the first output word must stay within 1.5 BC.
module tb_config_remap;
  import lar_pkg::*;
  import tb_pkg::*;
  localparam int NI = 48, NO = 32, BC = 336;
  logic clk_ipb = 0, clk_320 = 0, clk_240 = 0, rst = 1;
  always #17 clk_ipb = ~clk_ipb;
  always #21 clk_320 = ~clk_320;
  always #28 clk_240 = ~clk_240;
  int checks = 0, failures = 0;

  mm_req_t req = '0; mm_rsp_t rsp;
  sc_word_t in_w [NI];
  remap_word_t out_w [NO];
  logic [9:0] mapm [NO*12];

  config_remap dut (.clk_ipb, .rst_ipb(rst), .mm_req(req), .mm_rsp(rsp), .clk_320, .rst_320(rst),
    .in_word(in_w), .clk_240, .rst_240(rst), .out_word(out_w));

  function automatic logic [1:0] err_of(int f, int b); return 2'((f == 7 && b % 3 == 0) ? 2'b01 : (f == 9 && b % 4 == 1) ? 2'b10 : 2'b00); endfunction

  // input generator
  int b_in = 0, k_in = 0; bit run = 0;
  int last_done = -1; longint t_sop [int];
  always @(posedge clk_320) begin
    if (run) begin
      for (int f = 0; f < NI; f++) begin
        in_w[f].valid <= 1; in_w[f].sop <= (k_in == 0);
        in_w[f].data <= adc_pattern(f, b_in, k_in); in_w[f].error <= err_of(f, b_in);
      end
      if (k_in == 0) t_sop[b_in] = $time + 42;  // sampled by the block one cycle later
      if (k_in == 7) begin k_in = 0; b_in++; end else k_in++;
    end else for (int f = 0; f < NI; f++) in_w[f] <= '0;
  end
  // last bunch crossing whose samples have all been presented
  always @(posedge clk_320) if (in_w[0].valid && !in_w[0].sop && k_in == 0) last_done = b_in - 1;

  int slot [NO]; int bo [NO]; int nbc = 0; longint maxlat = 0;
  always @(posedge clk_240) if (!rst) begin
    for (int o = 0; o < NO; o++) if (out_w[o].valid) begin
      if (out_w[o].sop) begin
        slot[o] = 0; bo[o] = last_done;
        if (o == 0) begin
          nbc++;
          if ($time - t_sop[bo[o]] > maxlat) maxlat = $time - t_sop[bo[o]];
        end
      end
      for (int h = 0; h < 2; h++) begin
        logic [9:0] m; logic [11:0] ed; logic [1:0] ee;
        m = mapm[o*12 + slot[o]*2 + h];
        ed = m[9] ? adc_pattern(int'(m[8:3]), bo[o], int'(m[2:0])) : 12'h0;
        ee = m[9] ? err_of(int'(m[8:3]), bo[o]) : 2'b0;
        checks++;
        if (out_w[o].data[h*12 +: 12] !== ed || out_w[o].error[h*2 +: 2] !== ee) begin
          failures++;
          if (failures < 6) $display("o=%0d slot=%0d h=%0d bc=%0d got %h exp %h", o, slot[o], h, bo[o], out_w[o].data[h*12 +: 12], ed);
        end
      end
      slot[o]++;
    end
  end

  task automatic mm_write(int a, int d);
    @(negedge clk_ipb); req.address = 24'(a); req.writedata = 32'(d); req.write = 1;
    @(negedge clk_ipb); req.write = 0;
  endtask

  initial begin
    for (int e = 0; e < NO*12; e++) mapm[e] = {1'b1, 6'(e / 8), 3'(e % 8)};
    repeat (5) @(posedge clk_ipb); rst = 0;
    // stream 5 reversed, entry 30 disabled, entry 100 from fibre 47 sample 3
    for (int i = 0; i < 12; i++) begin
      mapm[5*12 + i] = {1'b1, 6'((5*12 + 11 - i) / 8), 3'((5*12 + 11 - i) % 8)};
      mm_write(5*12 + i, int'(mapm[5*12 + i]));
    end
    mapm[30] = 10'h0;  mm_write(30, 0);
    mapm[100] = {1'b1, 6'd47, 3'd3}; mm_write(100, int'(mapm[100]));
    @(negedge clk_ipb); req.address = 100; req.read = 1;
    @(negedge clk_ipb); req.read = 0;
    checks++; if (!rsp.readdatavalid || rsp.readdata[9:0] !== mapm[100]) begin failures++; $display("readback"); end
    @(posedge clk_320); run = 1;
    repeat (60 * 8) @(posedge clk_320);
    checks++; if (nbc < 55) begin failures++; $display("only %0d bunch crossings out", nbc); end
    checks++; if (maxlat > BC * 3 / 2 || maxlat < BC) begin failures++; $display("latency %0d", maxlat); end
    $display("remap latency %0d time units (BC = %0d)", maxlat, BC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(BC * 200);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
