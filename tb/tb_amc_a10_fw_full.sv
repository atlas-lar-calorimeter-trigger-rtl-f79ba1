// Full-size run of the AMC-A10 firmware core with its default parameters:
// 48 LTDB fibres, 32 trigger-tower streams, 48 FEX outputs, 3564-BC orbit,
// 32k-word pattern RAMs. The link models start a few bunch crossings before
// the orbit wrap so that BCID synchronisation happens early. The bench waits
// for alignment, checks the FEX frames (header, five payload words, trailer
// XOR) on every output, sends two L1As and checks every TDAQ data word
// against the raw ADC pair the default map puts in that stream and slot,
// with the samples of an event on consecutive bunch crossings.
module tb_amc_a10_fw_full;
  import lar_pkg::*;
  import tb_pkg::*;
  localparam int NF = N_FIBRES, NT = N_TT, NX = N_FEX_OUT, ORBIT = ORBIT_BCS, BC = 336;
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

  amc_a10_fw dut (
    .ipctrl_100_clk(clk_ipb), .ttc_320_clk(clk_320), .ttc_240_clk(clk_240), .xcvr_tx_280_clk(clk_280),
    .ttc_40_clk(clk_40), .pb_rst_n, .mmc_rst_n, .pll_locked, .ipb_in, .ipb_out,
    .ltdb_rx(rx), .ltdb_rx_bitslip(slip), .fex_tx(fex), .osum_mon(omon), .user_mon(umon),
    .aligned_bcid(abcid), .aligned, .osum_fifo_error(ferr),
    .l1a, .gbt_rd, .gbt_data, .gbt_empty);

  for (genvar f = 0; f < NF; f++) begin : g_link
    ltdb_link_model #(.FID(f), .ORBIT(ORBIT), .START_BCID(ORBIT - 400 + f % 2), .INIT_SLIP((f * 3) % 16),
      .INIT_WORD((f * 5) % 8)) u_link (.clk(clk_320), .rst(lrst), .bitslip(slip[f]),
      .inject_crc(1'b0), .inject_bcid(1'b0), .rx(rx[f]), .bitslips(nslip[f]));
  end

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

  int n_events = 0, ev_words = 0, ev_bc [16]; bit check_data = 0;
  function automatic int find_bc(int s, int k, logic [23:0] raw, int hint);
    int e0; e0 = s * 12 + 2 * k;
    for (int i = 0; i < ORBIT; i++) begin
      int b; b = (hint + i) % ORBIT;
      if (adc_pattern(e0 / 8, b, e0 % 8) == raw[11:0] && adc_pattern((e0 + 1) / 8, b, (e0 + 1) % 8) == raw[23:12]) return b;
    end
    return -1;
  endfunction
  always @(posedge clk_40) if (dut.rst_40 == 0) begin
    if (gbt_rd && !gbt_empty) begin
      case (gbt_data[83:80])
        4'hA: begin ev_words = 0; for (int m = 0; m < 16; m++) ev_bc[m] = -1; end
        4'h1: begin
          int s, k, m, b;
          s = int'(gbt_data[79:75]); k = int'(gbt_data[74:72]); m = int'(gbt_data[71:68]);
          b = find_bc(s, k, gbt_data[23:0], (ev_bc[0] < 0) ? 0 : ev_bc[0]); ev_words++;
          if (check_data) begin
            checks++;
            if (b < 0) begin failures++; if (failures < 8) $display("TDAQ word s=%0d k=%0d m=%0d raw %h matches no BC", s, k, m, gbt_data[23:0]); end
            else if (ev_bc[m] < 0) ev_bc[m] = b;
            else if (ev_bc[m] != b) begin failures++; if (failures < 8) $display("TDAQ sample %0d mixes BC %0d and %0d", m, ev_bc[m], b); end
            if (m > 0 && ev_bc[m-1] >= 0 && ev_bc[m] >= 0) begin
              checks++; if (ev_bc[m] != (ev_bc[m-1] + 1) % ORBIT) begin failures++; if (failures < 8) $display("TDAQ samples not consecutive"); end
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
    gbt_rd <= 1'b1;
  end

  initial begin
    for (int p = 0; p < 5; p++) ipb_in[p] = '0;
    for (int o = 0; o < NX; o++) fex_pos[o] = -1;
    #1000; pb_rst_n = 1;
    wait (aligned);
    $display("aligned at %0t, BCID %0d", $time, abcid);
    repeat (130 * 6) @(posedge clk_240);
    check_data = 1;
    for (int i = 0; i < 2; i++) begin
      @(posedge clk_240); l1a <= 1; @(posedge clk_240); l1a <= 0;
      repeat (40 * 6) @(posedge clk_240);
    end
    wait (n_events == 2);
    $display("FEX frames %0d, L1A events %0d", n_frames, n_events);
    checks++; if (n_frames < 100) begin failures++; $display("only %0d FEX frames", n_frames); end
    checks++; if (n_ferr != 0) begin failures++; $display("FIFO error flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(BC * 6000);
    failures++;
    $display("watchdog: aligned %0d events %0d", aligned, n_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
