// LOCic frame decoder for one LTDB fibre.
//
// Each bunch crossing the LTDB sends a 128-bit frame as eight 16-bit words at
// 320 MHz. Word k (k = 0..7) carries {T[k], T[k+8], D0..D11, D12, D13} of ADC
// channel k, MSB first: bit 15 = T[k], bit 14 = T[k+8], bits 13:2 = the
// scrambled 12-bit ADC sample, bits 1:0 unused. T0..T7 hold the CRC-8 of the
// unscrambled samples (T0 = CRC bit 7), T8..T11 the border pattern 0101 and
// T12..T15 the four low bits of the BCID (T12 = bit 3).
//
// Alignment: the decoder keeps a word counter and, once per assumed frame,
// compares T8..T11 with the border pattern. LOCK_FRAMES good frames in a row
// declare lock; UNLOCK_FRAMES bad frames in a row drop it. While unlocked a
// failed frame shifts the assumed frame start by one word; after eight word
// shifts a one-cycle rx_bitslip pulse asks the receiver to move its word
// boundary by one bit, so all 128 bit positions are tried.
// LOCK_FRAMES is 8: a frame assumed two words late sees T10, T11, BCID[3],
// BCID[2] in the border position, which reads 0101 for four BCIDs in a row
// (4-7 of every 16), so a lock threshold of 4 or less can lock falsely.
//
// Decoding: the ADC stream of each channel is descrambled with the
// self-synchronising descrambler of polynomial x^7 + x^6 + 1 (bit stream in
// sample order, MSB first); the CRC-8 (x^8+x^2+x+1, init 0, channel 0 first)
// of the eight descrambled samples is compared with T0..T7. The 12-bit BCID is
// rebuilt from the 4-bit field: the only place where the field steps from
// (ORBIT_BCS-1) mod 16 to 0 is the orbit wrap, which sets the BCID to 0; from
// then on the BCID counts and every frame's field must match its low bits.
//
// Timing: a frame is evaluated when its last word arrives and is replayed on
// out_word during the following eight cycles (one-frame latency), with
// out_word.sop on word 0 and error = {bcid_err, crc_err} on all eight words.
// The frame format, scrambler polynomial and CRC polynomial are this design's
// choices; the frame contents and the decoder's tasks follow the spec.
module locic_frame_decoder
  import lar_pkg::*;
#(
  parameter int unsigned ORBIT       = ORBIT_BCS,
  parameter int unsigned LOCK_FRAMES = 8,
  parameter int unsigned UNLOCK_FRAMES = 4,
  parameter int unsigned SLIP_WAIT   = 2
) (
  input  logic        clk,          // 320 MHz word clock
  input  logic        rst,
  input  ltdb_word_t  rx,
  output logic        rx_bitslip,
  output logic        locked,
  output sc_word_t    out_word,
  output logic [11:0] out_bcid,     // BCID of the frame on out_word
  output logic        out_bcid_valid,
  output logic [15:0] crc_err_cnt,
  output logic [15:0] bcid_err_cnt
);
  localparam logic [3:0] WRAP_LSB = 4'((ORBIT - 1) % 16);

  logic [15:0] words [8];
  logic [2:0]  wcnt;
  logic [2:0]  wslip;
  logic [3:0]  skip;
  logic [$clog2(LOCK_FRAMES+1)-1:0]   good;
  logic [$clog2(UNLOCK_FRAMES+1)-1:0] bad;
  logic [11:0] prev_s [8];
  logic [11:0] bcid;
  logic        bc_sync;
  logic [3:0]  prev_f;

  logic [11:0] out_adc [8];
  logic [1:0]  out_err;
  logic [2:0]  ocnt;
  logic        oactive;

  // ------------------------------------------------------------ frame view
  logic [15:0] fw [8];
  always_comb begin
    for (int k = 0; k < 7; k++) fw[k] = words[k];
    fw[7] = rx.data;
  end

  logic        border_ok;
  logic [3:0]  bc_field;
  logic [7:0]  crc_rx, crc_calc;
  logic [11:0] descr [8];
  always_comb begin
    border_ok = ({fw[0][14], fw[1][14], fw[2][14], fw[3][14]} == LOCIC_BORDER);
    bc_field  = {fw[4][14], fw[5][14], fw[6][14], fw[7][14]};
    crc_rx    = {fw[0][15], fw[1][15], fw[2][15], fw[3][15],
                 fw[4][15], fw[5][15], fw[6][15], fw[7][15]};
    crc_calc  = 8'h00;
    for (int k = 0; k < 8; k++) begin
      logic [23:0] v;
      v = {prev_s[k], fw[k][13:2]};
      for (int p = 0; p < 12; p++) descr[k][p] = v[p] ^ v[p+6] ^ v[p+7];
      for (int p = 11; p >= 0; p--) crc_calc = crc8_bit(crc_calc, descr[k][p]);
    end
  end

  wire frame_end = rx.valid && (skip == 0) && (wcnt == 3'd7);

  // ------------------------------------------------------------ alignment
  always_ff @(posedge clk) begin
    if (rst || !rx.valid) begin
      wcnt <= '0; wslip <= '0; skip <= '0; good <= '0; bad <= '0;
      locked <= 1'b0; rx_bitslip <= 1'b0;
    end else begin
      rx_bitslip <= 1'b0;
      if (skip != 0) begin
        skip <= skip - 1'b1;
      end else begin
        words[wcnt] <= rx.data;
        wcnt <= wcnt + 1'b1;
        if (frame_end) begin
          if (!locked) begin
            if (border_ok) begin
              if (good == ($bits(good))'(LOCK_FRAMES - 1)) begin
                locked <= 1'b1; good <= '0; bad <= '0;
              end else begin
                good <= good + 1'b1;
              end
            end else begin
              good <= '0;
              if (wslip == 3'd7) begin
                wslip <= '0; rx_bitslip <= 1'b1; skip <= 4'(SLIP_WAIT);
              end else begin
                wslip <= wslip + 1'b1; skip <= 4'd1;
              end
            end
          end else begin
            if (border_ok) bad <= '0;
            else if (bad == ($bits(bad))'(UNLOCK_FRAMES - 1)) begin
              locked <= 1'b0; bad <= '0;
            end else bad <= bad + 1'b1;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ decoding
  always_ff @(posedge clk) begin
    if (rst) begin
      bcid <= '0; bc_sync <= 1'b0; prev_f <= '0; oactive <= 1'b0; ocnt <= '0;
      out_err <= '0; out_bcid <= '0; out_bcid_valid <= 1'b0;
      crc_err_cnt <= '0; bcid_err_cnt <= '0;
      for (int k = 0; k < 8; k++) begin prev_s[k] <= '0; out_adc[k] <= '0; end
    end else begin
      if (oactive) ocnt <= ocnt + 1'b1;
      if (oactive && ocnt == 3'd7) oactive <= 1'b0;
      if (frame_end) begin
        for (int k = 0; k < 8; k++) prev_s[k] <= fw[k][13:2];
        prev_f <= bc_field;
      end
      if (frame_end && locked) begin
        logic [11:0] exp_bcid;
        logic        berr, cerr;
        exp_bcid = (bcid == 12'(ORBIT - 1)) ? 12'd0 : bcid + 1'b1;
        berr = 1'b0;
        if (bc_sync) begin
          bcid <= exp_bcid;
          out_bcid <= exp_bcid;
          berr = (bc_field != exp_bcid[3:0]);
          if (berr) bc_sync <= 1'b0;
          out_bcid_valid <= !berr;
        end else if (prev_f == WRAP_LSB && bc_field == 4'd0) begin
          bcid <= 12'd0; bc_sync <= 1'b1; out_bcid <= 12'd0; out_bcid_valid <= 1'b1;
        end else begin
          out_bcid_valid <= 1'b0;
        end
        cerr = (crc_calc != crc_rx);
        out_err <= {berr, cerr};
        if (cerr && crc_err_cnt != 16'hFFFF)  crc_err_cnt  <= crc_err_cnt + 1'b1;
        if (berr && bcid_err_cnt != 16'hFFFF) bcid_err_cnt <= bcid_err_cnt + 1'b1;
        for (int k = 0; k < 8; k++) out_adc[k] <= descr[k];
        oactive <= 1'b1; ocnt <= '0;
      end else if (!locked) begin
        bc_sync <= 1'b0;
      end
    end
  end

  always_comb begin
    out_word.data  = out_adc[ocnt];
    out_word.error = out_err;
    out_word.sop   = oactive && (ocnt == 3'd0);
    out_word.valid = oactive;
  end
endmodule
