// End-to-end testbench of the AMC-A10 firmware core at reduced size: six LTDB
// fibres (the 48 super cells of four trigger towers under the default map),
// four user code streams, the full 48 FEX outputs, a 60-BC orbit and 1k-word
// pattern RAMs. All five clocks run with exact ratios (8 x 320, 6 x 240,
// 7 x 280 MHz cycles and one 40 MHz cycle per bunch crossing; 100 MHz IPbus
// clock asynchronous). Slow control goes through the IPbus ports.
//
// Sequence: reset from the push button, link alignment with receiver bit
// slips, fibre-to-fibre alignment; register read back through every IPbus
// port; switch to test mode (alignment must drop) and back (it must return);
// then single L1As and a burst of eight three-sample L1As with the GBT reader paused (the
// burst is sized so that the last event is read out before the 512-BC
// circular buffers wrap over its window).
// Checks:
//   - every FEX output carries header / five payload words / trailer frames
//     with a correct payload XOR, and no FIFO error is flagged;
//   - every TDAQ data word carries the raw ADC pair of the two super cells
//     the default map puts in that stream and slot, i.e. adc_pattern() of the
//     right fibre and sample, all samples of an event from consecutive
//     bunch crossings; headers and trailers frame each event;
//   - the latency from an aligned BCID on the input stage to the same
//     samples on the TDAQ path is not checked here (block benches do that).
// Mechanisms counted, each must occur: bit slip, fibre resynchronisation,
// test-mode switch, alignment loss and recovery, buffered L1A, TDAQ output
// FIFO stall, FEX frames, L1A events read out.
module tb_amc_a10_fw;
  import lar_pkg::*;
  import tb_pkg::*;
  localparam int NF = 6, NT = 4, NX = 48, ORBIT = 60, BC = 336;
  logic clk_ipb = 0, clk_320 = 0, clk_240 = 0, clk_280 = 0, clk_40 = 0;
  always #17  clk_ipb = ~clk_ipb;
  always #21  clk_320 = ~clk_320;
  always #28  clk_240 = ~clk_240;
  always #24  clk_280 = ~clk_280;
  always #168 clk_40  = ~clk_40;
  logic pb_rst_n = 0, mmc_rst_n = 1, pll_locked = 1;
  int checks = 0, failures = 0;

  ipb_wbus_t ipb_in [5]; ipb_rbus_t ipb_out [5];
  ltdb_word_t rx [NF]; logic [NF-1:0] slip;
  fex_word_t fex [NX]; osum_mon_t omon; user_mon_t umon [NT];
  logic [11:0] abcid; logic aligned, ferr;
  logic l1a = 0, gbt_rd = 0, gbt_empty; logic [83:0] gbt_data;
  int nslip [NF];
  logic lrst;
  assign lrst = !pb_rst_n;

  amc_a10_fw #(.N_FIB(NF), .N_TOWER(NT), .N_FEX(NX), .ORBIT(ORBIT), .RAM_DEPTH(1024)) dut (
    .ipctrl_100_clk(clk_ipb), .ttc_320_clk(clk_320), .ttc_240_clk(clk_240), .xcvr_tx_280_clk(clk_280),
    .ttc_40_clk(clk_40), .pb_rst_n, .mmc_rst_n, .pll_locked, .ipb_in, .ipb_out,
    .ltdb_rx(rx), .ltdb_rx_bitslip(slip), .fex_tx(fex), .osum_mon(omon), .user_mon(umon),
    .aligned_bcid(abcid), .aligned, .osum_fifo_error(ferr),
    .l1a, .gbt_rd, .gbt_data, .gbt_empty);

  for (genvar f = 0; f < NF; f++) begin : g_link
    ltdb_link_model #(.FID(f), .ORBIT(ORBIT), .START_BCID(f % 2), .INIT_SLIP((f * 3) % 16),
      .INIT_WORD((f * 5) % 8)) u_link (.clk(clk_320), .rst(lrst), .bitslip(slip[f]),
      .inject_crc(1'b0), .inject_bcid(1'b0), .rx(rx[f]), .bitslips(nslip[f]));
  end

  // ---------------------------------------------------------------- IPbus master
  task automatic ipb(int p, bit wr, int a, logic [31:0] d, output logic [31:0] q);
    int n;
    @(negedge clk_ipb);
    ipb_in[p].addr = 32'(a); ipb_in[p].wdata = d; ipb_in[p].write = wr; ipb_in[p].strobe = 1;
    n = 0;
    do begin @(posedge clk_ipb); #1; n++; end while (!ipb_out[p].ack && !ipb_out[p].err && n < 100);
    q = ipb_out[p].rdata;
    checks++; if (!ipb_out[p].ack) begin failures++; $display("IPbus port %0d addr %h: no ack", p, a); end
    @(negedge clk_ipb); ipb_in[p].strobe = 0;
    @(negedge clk_ipb);
  endtask

  // ---------------------------------------------------------------- FEX frame checker
  int fex_pos [NX]; logic [15:0] fex_x [NX]; int n_frames = 0, n_ferr = 0;
  always @(posedge clk_280) if (dut.rst_280 == 0) begin
    if (ferr) n_ferr++;
    for (int o = 0; o < NX; o++) if (fex[o].valid) begin
      if (fex[o].data[31:24] == 8'hBC && fex_pos[o] < 0) begin fex_pos[o] = 0; fex_x[o] = 0; end
      else if (fex_pos[o] >= 0 && fex_pos[o] < 5) begin
        fex_x[o] ^= fex[o].data[31:16] ^ fex[o].data[15:0]; fex_pos[o]++;
      end else if (fex_pos[o] == 5) begin
        checks++;
        if (fex[o].data !== {8'hDC, 8'h00, fex_x[o]}) begin failures++; if (failures < 8) $display("FEX %0d trailer %h exp xor %h", o, fex[o].data, fex_x[o]); end
        if (o == 0) n_frames++;
        fex_pos[o] = -1;
      end else begin
        checks++; failures++; if (failures < 8) $display("FEX %0d word %h outside a frame", o, fex[o].data);
      end
    end
  end

  // ---------------------------------------------------------------- TDAQ reader and checker
  bit rd_hold = 0; int n_events = 0, n_words = 0, ev_words = 0, ev_bc [16];
  bit check_data = 0;
  function automatic int find_bc(int s, int k, logic [23:0] raw);
    int e0; e0 = s * 12 + 2 * k;
    for (int b = 0; b < ORBIT; b++)
      if (adc_pattern(e0 / 8, b, e0 % 8) == raw[11:0] && adc_pattern((e0 + 1) / 8, b, (e0 + 1) % 8) == raw[23:12]) return b;
    return -1;
  endfunction
  always @(posedge clk_40) if (dut.rst_40 == 0) begin
    if (gbt_rd && !gbt_empty) begin
      n_words++;
      case (gbt_data[83:80])
        4'hA: begin ev_words = 0; for (int m = 0; m < 16; m++) ev_bc[m] = -1; end
        4'h1: begin
          int s, k, m, b;
          s = int'(gbt_data[79:75]); k = int'(gbt_data[74:72]); m = int'(gbt_data[71:68]);
          b = find_bc(s, k, gbt_data[23:0]); ev_words++;
          if (check_data) begin
            checks++;
            if (b < 0) begin failures++; if (failures < 8) $display("TDAQ word s=%0d k=%0d m=%0d raw %h matches no BC", s, k, m, gbt_data[23:0]); end
            else if (ev_bc[m] < 0) ev_bc[m] = b;
            else if (ev_bc[m] != b) begin failures++; if (failures < 8) $display("TDAQ ev %0d sample %0d s=%0d k=%0d mixes BC %0d and %0d", n_events, m, s, k, ev_bc[m], b); end
            if (m > 0 && ev_bc[m-1] >= 0 && ev_bc[m] >= 0) begin
              checks++; if (ev_bc[m] != (ev_bc[m-1] + 1) % ORBIT) begin failures++; $display("TDAQ samples not consecutive: m=%0d %0d -> %0d", m, ev_bc[m-1], ev_bc[m]); end
            end
          end
        end
        4'hF: begin
          n_events++;
          checks++; if (int'(gbt_data[79:64]) != ev_words) begin failures++; $display("trailer count %0d vs %0d", gbt_data[79:64], ev_words); end
        end
        default: begin checks++; failures++; $display("TDAQ word type %h", gbt_data[83:80]); end
      endcase
    end
    gbt_rd <= !rd_hold && ($urandom % 4 != 0);
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_align_rise = 0, n_align_fall = 0, n_multi_l1a = 0, n_stall = 0, n_mode = 0;
  logic al_d = 0;
  always @(posedge clk_320) begin
    al_d <= aligned;
    if (aligned && !al_d) n_align_rise++;
    if (!aligned && al_d) n_align_fall++;
  end
  always @(posedge clk_240) begin
    if (dut.u_tdaq.u_l1a.level > 1) n_multi_l1a++;
    if (dut.u_tdaq.wfull && dut.u_tdaq.st != 0) n_stall++;
  end

  task automatic send_l1a(int n, int gap_bc);
    for (int i = 0; i < n; i++) begin
      @(posedge clk_240); l1a <= 1; @(posedge clk_240); l1a <= 0;
      repeat (gap_bc * 6) @(posedge clk_240);
    end
  endtask

  initial begin
    logic [31:0] q; int bits;
    for (int p = 0; p < 5; p++) ipb_in[p] = '0;
    for (int o = 0; o < NX; o++) fex_pos[o] = -1;
    #1000; pb_rst_n = 1;
    wait (aligned);
    $display("aligned at %0t", $time);
    // register access on every port
    ipb(0, 0, 'h40003, 0, q); checks++; if (q[NF-1:0] !== '1) begin failures++; $display("lock bits %h", q); end
    ipb(1, 1, 3, 32'h3FF, q);  ipb(1, 0, 3, 0, q); checks++; if (q[9:0] != 10'h3FF) begin failures++; $display("remap readback %h", q); end
    ipb(1, 1, 3, {22'b0, 1'b1, 6'd0, 3'd3}, q);   // restore the default entry 3
    ipb(2, 0, 'h010, 0, q);                        // user code stream 0, sc 1, pedestal
    ipb(3, 0, 'h100, 0, q); checks++; if (q[9:0] != 10'h3FF) begin failures++; $display("osum mask %h", q); end
    ipb(4, 0, 1, 0, q); checks++; if (q != 1) begin failures++; $display("tdaq n_samples %0d", q); end
    // mode switch: test mode (empty pattern RAMs) loses alignment, normal mode regains it
    ipb(0, 1, 'h40000, 1, q); n_mode++;
    repeat (30 * 8) @(posedge clk_320);
    checks++; if (aligned) begin failures++; $display("still aligned in test mode"); end
    ipb(0, 1, 'h40000, 0, q); n_mode++;
    wait (aligned);
    $display("realigned at %0t", $time);
    // TDAQ: wait until the 100-BC window lies after realignment, then L1As
    repeat (130 * 6) @(posedge clk_240);
    check_data = 1;
    send_l1a(3, 40);
    wait (n_events == 3);
    ipb(4, 1, 1, 3, q);                           // three samples per event
    rd_hold = 1;
    send_l1a(8, 1);
    wait (dut.u_tdaq.wfull);
    repeat (10 * 6) @(posedge clk_240);
    rd_hold = 0;
    wait (n_events == 11);
    repeat (20) @(posedge clk_40);
    ipb(4, 0, 3, 0, q); checks++; if (q != 11) begin failures++; $display("L1A count %0d", q); end
    ipb(0, 0, 'h40005, 0, q);
    bits = 0; for (int f = 0; f < NF; f++) bits += nslip[f];
    $display("bitslips %0d, resyncs %0d, align rises %0d falls %0d, mode switches %0d", bits, q[31:16], n_align_rise, n_align_fall, n_mode);
    $display("FEX frames %0d, L1A events %0d, TDAQ words %0d, buffered-L1A cycles %0d, stall cycles %0d", n_frames, n_events, n_words, n_multi_l1a, n_stall);
    checks++; if (bits == 0) begin failures++; $display("no bit slip"); end
    checks++; if (q[31:16] == 0) begin failures++; $display("no resynchronisation"); end
    checks++; if (n_align_rise < 2 || n_align_fall < 1) begin failures++; $display("no alignment loss/recovery"); end
    checks++; if (n_mode < 2) begin failures++; $display("no mode switch"); end
    checks++; if (n_multi_l1a == 0) begin failures++; $display("no buffered L1A"); end
    checks++; if (n_stall == 0) begin failures++; $display("no TDAQ stall"); end
    checks++; if (n_frames < 100) begin failures++; $display("only %0d FEX frames", n_frames); end
    checks++; if (n_ferr != 0) begin failures++; $display("FIFO error flagged %0d cycles", n_ferr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(BC * 4000);
    failures++;
    $display("watchdog: events %0d aligned %0d", n_events, aligned);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
