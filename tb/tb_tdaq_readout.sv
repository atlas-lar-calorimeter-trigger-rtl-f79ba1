// Testbench of the TDAQ readout buffering (4 streams, default 512-deep
// circular buffers). The user code monitoring stream is driven at 240 MHz
// with known raw samples and energies (the energies two bunch crossings late,
// as the user code gives them). The readout registers are programmed and read
// back, then single and bursts of consecutive L1As are sent; every 84-bit
// word read at 40 MHz (with random read pauses, and a long pause during the burst) is compared with the header,
// the data words of the expected bunch-crossing window and the trailer. It
// counts buffered L1As (L1A FIFO holding more than one entry) and output
// FIFO full stalls and fails if either never happened.
module tb_tdaq_readout;
  import lar_pkg::*;
  localparam int N = 4, BC = 336;
  logic clk_ipb = 0, clk_240 = 0, clk_40 = 0, rst = 1;
  always #17  clk_ipb = ~clk_ipb;
  always #28  clk_240 = ~clk_240;
  always #168 clk_40  = ~clk_40;
  int checks = 0, failures = 0;

  mm_req_t req = '0; mm_rsp_t rsp;
  user_mon_t mon [N];
  logic l1a = 0, rd = 0, empty;
  logic [83:0] data;

  tdaq_readout #(.N(N)) dut (.clk_ipb, .rst_ipb(rst), .mm_req(req), .mm_rsp(rsp), .clk(clk_240), .rst,
    .mon, .l1a, .clk_rd(clk_40), .rst_rd(rst), .rd, .rd_data(data), .rd_empty(empty));

  function automatic logic [23:0] rawv(int s, int b, int k); return {4'(s), 12'(b), 3'(k), 5'h15}; endfunction
  function automatic logic [35:0] etv(int s, int b, int k); return {8'(b*3 + k + s), 4'(s), 12'(b), 3'(k), 9'h1A5}; endfunction

  int lat = 100, pre = 0, nsmp = 1;
  logic [83:0] expq [$];
  int n_l1a = 0, n_multi = 0, n_stall = 0;

  // monitoring stream and L1A generator
  int b = 0, k = 0; bit run = 0; int l1a_req = 0;
  always @(posedge clk_240) begin
    if (run) begin
      for (int s = 0; s < N; s++) begin
        logic [35:0] e;
        e = etv(s, b - 2, k);
        mon[s] <= '0;
        mon[s].valid <= 1; mon[s].sop <= (k == 0);
        mon[s].raw_adc <= rawv(s, b, k);
        mon[s].transverse_e_id <= e[27:0]; mon[s].quality <= e[35:28];
      end
      l1a <= 0;
      if (k == 3 && l1a_req > 0) begin
        l1a <= 1; l1a_req--;
        expq.push_back({4'hA, 24'(n_l1a), 9'(b + 1 - lat), 4'(nsmp), 43'b0});
        for (int m = 0; m < nsmp; m++)
          for (int s = 0; s < N; s++)
            for (int kk = 0; kk < 6; kk++) begin
              logic [35:0] e;
              e = etv(s, b - lat - pre + m, kk);
              expq.push_back({4'h1, 5'(s), 3'(kk), 4'(m), 8'b0, e[35:28], e[27:0], rawv(s, b - lat - pre + m, kk)});
            end
        expq.push_back({4'hF, 16'(nsmp * N * 6), 64'b0});
        n_l1a++;
      end
      if (k == 5) begin k = 0; b++; end else k++;
    end else for (int s = 0; s < N; s++) mon[s] <= '0;
  end
  always @(posedge clk_240) begin
    if (dut.u_l1a.level > 1) n_multi++;
    if (dut.wfull && dut.st != 0) n_stall++;
  end

  // GBT side reader
  int nread = 0; bit hold = 0;
  always @(posedge clk_40) if (!rst) begin
    if (rd && !empty) begin
      logic [83:0] e;
      checks++; nread++;
      if (expq.size() == 0) begin failures++; $display("unexpected word %h", data); end
      else begin
        e = expq.pop_front();
        if (data !== e) begin failures++; if (failures < 6) $display("word %0d got %h exp %h", nread, data, e); end
      end
    end
    rd <= !hold && ($urandom % 8) != 0;
  end

  task automatic mm_write(int a, int d);
    @(negedge clk_ipb); req.address = 24'(a); req.writedata = 32'(d); req.write = 1;
    @(negedge clk_ipb); req.write = 0;
  endtask
  task automatic mm_read(int a, output logic [31:0] d);
    @(negedge clk_ipb); req.address = 24'(a); req.read = 1;
    @(negedge clk_ipb); req.read = 0; d = rsp.readdata;
    checks++; if (!rsp.readdatavalid) begin failures++; $display("no readdatavalid"); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (5) @(posedge clk_40); rst = 0;   // a few cycles of the slowest clock
    mm_read(0, d); checks++; if (d != 100) begin failures++; $display("default latency %0d", d); end
    mm_read(1, d); checks++; if (d != 1) begin failures++; $display("default n_samples %0d", d); end
    @(posedge clk_240); run = 1;
    repeat (130 * 6) @(posedge clk_240);
    // one L1A at the default settings
    l1a_req = 1;
    repeat (40 * 6) @(posedge clk_240);
    // new settings, then a burst of consecutive L1As that fills the output FIFO
    wait (expq.size() == 0);
    lat = 20; pre = 1; nsmp = 3;
    mm_write(0, lat); mm_write(1, nsmp); mm_write(2, pre);
    mm_read(2, d); checks++; if (d != 1) begin failures++; $display("n_pre readback %0d", d); end
    repeat (12) @(posedge clk_240);
    hold = 1; l1a_req = 9;
    wait (l1a_req == 0);
    repeat (150 * 6) @(posedge clk_240);
    hold = 0;
    wait (expq.size() == 0);
    repeat (20) @(posedge clk_240);
    mm_read(3, d); checks++; if (d != n_l1a) begin failures++; $display("L1A count %0d vs %0d", d, n_l1a); end
    mm_read(4, d); checks++; if (d != 0) begin failures++; $display("L1A FIFO overflow"); end
    checks++; if (nread != 2 + 1*N*6 + 9 * (2 + 3*N*6)) begin failures++; $display("read %0d words", nread); end
    checks++; if (n_multi == 0) begin failures++; $display("no buffered L1A"); end
    checks++; if (n_stall == 0) begin failures++; $display("no output FIFO stall"); end
    $display("words %0d, L1As %0d, buffered-L1A cycles %0d, stall cycles %0d", nread, n_l1a, n_multi, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(BC * 3000);
    failures++;
    $display("watchdog: expq %0d", expq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
