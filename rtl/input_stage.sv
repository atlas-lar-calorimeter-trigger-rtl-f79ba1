// Input stage: from N_FIBRES LTDB receiver streams to aligned super-cell
// samples.
//
// Per fibre, a multiplexer selects the receiver word or, in test mode, the
// word replayed by the test pattern generator serving that fibre's group of
// GROUP fibres (one pattern RAM per six transceivers). The selected stream is
// decoded by a locic_frame_decoder (alignment, descrambling, CRC and BCID
// checks) and all decoded streams are aligned to each other by fibre_sync.
// A change of test mode resets the decoders (one-cycle pulse), so that they
// search the frame boundary of the new source from scratch instead of
// holding a lock that no longer applies.
// Output: N_FIBRES aligned streams of 12-bit samples, eight per bunch
// crossing, sop on channel 0 of each frame, error = {BCID error, CRC error},
// and the BCID of the aligned frame.
//
// Register port (100 MHz, word addresses, one-cycle read latency):
//   0x00000-0x3FFFF  pattern RAMs: address[17:15] = group, [14:0] = word
//   0x40000          test mode (bit 0)
//   0x40001/0x40002  fibre select bits 31:0 / 47:32
//   0x40003/0x40004  receiver lock bits 31:0 / 47:32 (read only)
//   0x40005          {resync count[15:0], 15'b0, aligned} (read only)
//   0x40100 + f      {CRC error count, BCID error count} of fibre f (read only)
// The spec lists the RAM at 0x00000, test mode at 0x10000 and fibre select
// at 0x10004; as its 8 x 32k RAM words do not fit below 0x10000 this design
// moves the registers above the RAMs. Configuration bits are brought into
// the 320 MHz domain through two-flop synchronisers; status values are read
// across domains as quasi-static values.
//
// All fibre streams are taken to be in the 320 MHz ttc clock domain, i.e. the
// receivers use their rate-match FIFOs so that every fibre delivers its words
// on the common clock.
module input_stage
  import lar_pkg::*;
#(
  parameter int unsigned N         = N_FIBRES,
  parameter int unsigned GROUP     = 6,
  parameter int unsigned RAM_DEPTH = 32768,
  parameter int unsigned ORBIT     = ORBIT_BCS,
  parameter int unsigned SYNC_DEPTH = 32
) (
  input  logic         clk_ipb,
  input  logic         rst_ipb,
  input  mm_req_t      mm_req,
  output mm_rsp_t      mm_rsp,
  input  logic         clk,         // ttc_320_clk
  input  logic         rst,
  input  ltdb_word_t   rx        [N],
  output logic [N-1:0] rx_bitslip,
  output sc_word_t     out_word  [N],
  output logic [11:0]  out_bcid,
  output logic         aligned
);
  localparam int unsigned NG = (N + GROUP - 1) / GROUP;
  localparam int unsigned RAW = $clog2(RAM_DEPTH);
  localparam int unsigned FW  = $clog2(N);

  // ------------------------------------------------------------ registers
  logic        test_mode_r;
  logic [47:0] fibre_sel_r;
  logic [1:0]  tm_sync;
  logic [N-1:0] fs_sync1, fs_sync2;
  logic [15:0] pat_rdata [NG];
  logic        pat_rvalid [NG];
  logic [N-1:0] locked;
  logic [15:0] crc_cnt [N], bcid_cnt [N];
  logic [15:0] resync_cnt;
  wire         reg_sel = mm_req.address[18];

  always_ff @(posedge clk_ipb) begin
    if (rst_ipb) begin
      test_mode_r <= 1'b0; fibre_sel_r <= '1;
      mm_rsp <= '0;
    end else begin
      mm_rsp.readdatavalid <= 1'b0;
      if (mm_req.write && reg_sel) begin
        case (mm_req.address[8:0])
          9'h000: test_mode_r <= mm_req.writedata[0];
          9'h001: fibre_sel_r[31:0]  <= mm_req.writedata;
          9'h002: fibre_sel_r[47:32] <= mm_req.writedata[15:0];
          default: ;
        endcase
      end
      if (mm_req.read && reg_sel) begin
        logic [47:0] lk;
        lk = 48'(locked);
        mm_rsp.readdatavalid <= 1'b1;
        case (mm_req.address[8:0])
          9'h000: mm_rsp.readdata <= {31'b0, test_mode_r};
          9'h001: mm_rsp.readdata <= fibre_sel_r[31:0];
          9'h002: mm_rsp.readdata <= {16'b0, fibre_sel_r[47:32]};
          9'h003: mm_rsp.readdata <= lk[31:0];
          9'h004: mm_rsp.readdata <= {16'b0, lk[47:32]};
          9'h005: mm_rsp.readdata <= {resync_cnt, 15'b0, aligned};
          default:
            if (mm_req.address[8] && mm_req.address[7:0] < 8'(N))
              mm_rsp.readdata <= {crc_cnt[FW'(mm_req.address[7:0])], bcid_cnt[FW'(mm_req.address[7:0])]};
            else mm_rsp.readdata <= '0;
        endcase
      end
      for (int g = 0; g < int'(NG); g++)
        if (pat_rvalid[g] && mm_req.address[17:15] == 3'(g)) begin
          mm_rsp.readdatavalid <= 1'b1;
          mm_rsp.readdata      <= {16'b0, pat_rdata[g]};
        end
    end
  end

  always_ff @(posedge clk) begin
    tm_sync  <= {tm_sync[0], test_mode_r};
    fs_sync1 <= fibre_sel_r[N-1:0];
    fs_sync2 <= fs_sync1;
  end
  wire test_mode = tm_sync[1];
  // the decoders restart their alignment whenever the source changes
  logic tm_d, dec_rst;
  always_ff @(posedge clk) begin
    tm_d    <= test_mode;
    dec_rst <= rst || (tm_d != test_mode);
  end

  // ------------------------------------------------------------ pattern RAMs
  logic [15:0] pat_word [NG];
  for (genvar g = 0; g < NG; g++) begin : g_pat
    wire hit = !reg_sel && (mm_req.address[17:15] == 3'(g));
    test_pattern_gen #(.DEPTH(RAM_DEPTH), .PATTERN_LEN(ORBIT * WORDS_PER_BC)) u_pat (
      .clk_ipb, .addr(mm_req.address[RAW-1:0]), .write(mm_req.write && hit),
      .read(mm_req.read && hit), .wdata(mm_req.writedata[15:0]),
      .rdata(pat_rdata[g]), .rdata_valid(pat_rvalid[g]),
      .clk, .rst, .test_mode, .pattern_word(pat_word[g]), .pattern_sof());
  end

  // ------------------------------------------------------------ per fibre
  sc_word_t    dec_word  [N];
  logic [11:0] dec_bcid  [N];
  logic        dec_bvalid [N];
  for (genvar f = 0; f < N; f++) begin : g_fibre
    ltdb_word_t sel;
    logic slip;
    always_comb begin
      sel = test_mode ? '{data: pat_word[f / GROUP], valid: 1'b1} : rx[f];
    end
    assign rx_bitslip[f] = slip && !test_mode;
    locic_frame_decoder #(.ORBIT(ORBIT)) u_dec (
      .clk, .rst(dec_rst), .rx(sel), .rx_bitslip(slip), .locked(locked[f]),
      .out_word(dec_word[f]), .out_bcid(dec_bcid[f]), .out_bcid_valid(dec_bvalid[f]),
      .crc_err_cnt(crc_cnt[f]), .bcid_err_cnt(bcid_cnt[f]));
  end

  fibre_sync #(.N(N), .DEPTH(SYNC_DEPTH), .ORBIT(ORBIT)) u_sync (
    .clk, .rst, .fibre_select(fs_sync2),
    .in_word(dec_word), .in_bcid(dec_bcid), .in_bcid_valid(dec_bvalid),
    .out_word, .out_bcid, .aligned, .resync_cnt);
endmodule
