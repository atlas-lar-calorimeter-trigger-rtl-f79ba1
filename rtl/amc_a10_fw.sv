// AMC-A10 trigger firmware core: the main data path from the LTDB fibres to
// the FEX fibres, with its slow-control register access.
//
//   LTDB words (48 x 16 bit, 320 MHz)
//     -> input_stage     frame alignment, descrambling, CRC/BCID checks,
//                        test pattern injection, fibre-to-fibre alignment
//     -> config_remap    regroup per trigger tower, 320 -> 240 MHz
//     -> user_code       32 x (pedestal, FIR, BCid, saturation, combine)
//     -> output_summing  adapter, tower/region sums, packagers (-> 280 MHz),
//                        selective duplication
//     -> FEX words (48 x 32 bit, 280 MHz)
//   user code monitoring streams -> tdaq_readout (L1A readout, 84-bit words)
//
// Slow control: the IPbus controller and its address fabric are external;
// each of the five slave ports (0 input stage, 1 remapping, 2 user code,
// 3 output summing, 4 TDAQ readout) enters through a wb2amm adapter. Each
// clock domain has its own reset_sync fed by the push-button and MMC resets
// and the PLL lock. Transceivers, PLLs and the IPbus/Ethernet cores are
// outside this module; their parallel-side signals are its ports. The LTDB
// words are expected on the common 320 MHz clock (receivers with rate-match
// FIFOs). Latency LTDB word -> FEX word is fixed once aligned.
module amc_a10_fw
  import lar_pkg::*;
#(
  parameter int unsigned N_FIB   = N_FIBRES,
  parameter int unsigned N_TOWER = N_TT,
  parameter int unsigned N_FEX   = N_FEX_OUT,
  parameter int unsigned ORBIT   = ORBIT_BCS,
  parameter int unsigned RAM_DEPTH = 32768
) (
  input  logic        ipctrl_100_clk,
  input  logic        ttc_320_clk,
  input  logic        ttc_240_clk,
  input  logic        xcvr_tx_280_clk,
  input  logic        ttc_40_clk,         // readout (GBT) side clock
  input  logic        pb_rst_n,
  input  logic        mmc_rst_n,
  input  logic        pll_locked,
  // IPbus slave ports from the IPbus address fabric
  input  ipb_wbus_t   ipb_in  [5],
  output ipb_rbus_t   ipb_out [5],
  // LTDB receivers
  input  ltdb_word_t  ltdb_rx     [N_FIB],
  output logic [N_FIB-1:0] ltdb_rx_bitslip,
  // FEX transmitters
  output fex_word_t   fex_tx      [N_FEX],
  // monitoring and status
  output osum_mon_t   osum_mon,
  output user_mon_t   user_mon    [N_TOWER],
  output logic [11:0] aligned_bcid,
  output logic        aligned,
  output logic        osum_fifo_error,
  // TDAQ readout
  input  logic        l1a,                // ttc_240_clk domain, one cycle per L1A
  input  logic        gbt_rd,
  output logic [83:0] gbt_data,
  output logic        gbt_empty
);
  logic rst_ipb, rst_320, rst_240, rst_280, rst_40;
  reset_sync u_rst_ipb (.clk(ipctrl_100_clk),  .pb_rst_n, .mmc_rst_n, .pll_locked, .rst(rst_ipb));
  reset_sync u_rst_320 (.clk(ttc_320_clk),     .pb_rst_n, .mmc_rst_n, .pll_locked, .rst(rst_320));
  reset_sync u_rst_240 (.clk(ttc_240_clk),     .pb_rst_n, .mmc_rst_n, .pll_locked, .rst(rst_240));
  reset_sync u_rst_280 (.clk(xcvr_tx_280_clk), .pb_rst_n, .mmc_rst_n, .pll_locked, .rst(rst_280));
  reset_sync u_rst_40  (.clk(ttc_40_clk),      .pb_rst_n, .mmc_rst_n, .pll_locked, .rst(rst_40));

  mm_req_t mm_req [5];
  mm_rsp_t mm_rsp [5];
  for (genvar i = 0; i < 5; i++) begin : g_ipb
    wb2amm u_wb2amm (.clk(ipctrl_100_clk), .rst(rst_ipb), .ipb_in(ipb_in[i]), .ipb_out(ipb_out[i]),
                     .mm_req(mm_req[i]), .mm_rsp(mm_rsp[i]));
  end

  sc_word_t    istage_remap [N_FIB];
  remap_word_t remap_user   [N_TOWER];
  user_word_t  user_osum    [N_TOWER];

  input_stage #(.N(N_FIB), .RAM_DEPTH(RAM_DEPTH), .ORBIT(ORBIT)) u_istage (
    .clk_ipb(ipctrl_100_clk), .rst_ipb, .mm_req(mm_req[0]), .mm_rsp(mm_rsp[0]),
    .clk(ttc_320_clk), .rst(rst_320), .rx(ltdb_rx), .rx_bitslip(ltdb_rx_bitslip),
    .out_word(istage_remap), .out_bcid(aligned_bcid), .aligned);

  config_remap #(.N_IN(N_FIB), .N_OUT(N_TOWER)) u_remap (
    .clk_ipb(ipctrl_100_clk), .rst_ipb, .mm_req(mm_req[1]), .mm_rsp(mm_rsp[1]),
    .clk_320(ttc_320_clk), .rst_320, .in_word(istage_remap),
    .clk_240(ttc_240_clk), .rst_240, .out_word(remap_user));

  user_code #(.N(N_TOWER)) u_user (
    .clk_ipb(ipctrl_100_clk), .rst_ipb, .mm_req(mm_req[2]), .mm_rsp(mm_rsp[2]),
    .clk(ttc_240_clk), .rst(rst_240), .in_word(remap_user), .out_word(user_osum), .mon(user_mon));

  output_summing #(.N(N_TOWER), .N_OUT(N_FEX)) u_osum (
    .clk_ipb(ipctrl_100_clk), .rst_ipb, .mm_req(mm_req[3]), .mm_rsp(mm_rsp[3]),
    .clk_240(ttc_240_clk), .rst_240, .in_word(user_osum),
    .clk_280(xcvr_tx_280_clk), .rst_280, .out_word(fex_tx), .mon(osum_mon), .overflow(osum_fifo_error));

  tdaq_readout #(.N(N_TOWER)) u_tdaq (
    .clk_ipb(ipctrl_100_clk), .rst_ipb, .mm_req(mm_req[4]), .mm_rsp(mm_rsp[4]),
    .clk(ttc_240_clk), .rst(rst_240), .mon(user_mon), .l1a,
    .clk_rd(ttc_40_clk), .rst_rd(rst_40), .rd(gbt_rd), .rd_data(gbt_data), .rd_empty(gbt_empty));
endmodule
