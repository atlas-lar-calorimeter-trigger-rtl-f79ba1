// Behavioural model of one LTDB fibre as seen at the receiver's parallel
// output: a LOCic transmitter (tb_pkg::adc_pattern samples, scrambled, with
// CRC, border pattern and BCID bits) followed by a 16-bit deserialiser whose
// word boundary starts at INIT_SLIP bits and moves by one bit per rx_bitslip
// pulse. The first frame carries START_BCID. inject_crc / inject_bcid corrupt
// the CRC or the BCID field of the frame that starts while they are high.
module ltdb_link_model #(
  parameter int FID        = 0,
  parameter int ORBIT      = 3564,
  parameter int START_BCID = 0,
  parameter int INIT_SLIP  = 0,
  parameter int INIT_WORD  = 0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bitslip,
  input  logic             inject_crc,
  input  logic             inject_bcid,
  output lar_pkg::ltdb_word_t rx,
  output int               bitslips
);
  import tb_pkg::*;
  logic [15:0] frame [8];
  logic [11:0] prev_s [8];
  logic [15:0] prev_w, cur_w;
  int wi, bcid, off;

  task automatic build_frame(int b, bit bad_crc, bit bad_bcid);
    logic [95:0] bits;
    logic [7:0]  crc;
    logic [3:0]  bf;
    logic [11:0] s;
    for (int k = 0; k < 8; k++) bits[95 - 12*k -: 12] = adc_pattern(FID, b, k);
    crc = crc8(bits) ^ (bad_crc ? 8'h10 : 8'h00);
    bf  = 4'(b) ^ (bad_bcid ? 4'h3 : 4'h0);
    for (int k = 0; k < 8; k++) begin
      s = scramble12(adc_pattern(FID, b, k), prev_s[k]);
      prev_s[k] = s;
      frame[k] = {crc[7-k], (k < 4) ? lar_pkg::LOCIC_BORDER[3-k] : bf[7-k], s, 2'b00};
    end
  endtask

  always @(posedge clk) begin
    if (rst) begin
      wi = INIT_WORD; bcid = START_BCID; off = INIT_SLIP; bitslips = 0;
      for (int k = 0; k < 8; k++) prev_s[k] = 12'(k * 77);
      build_frame(bcid, 0, 0);
      prev_w = 16'h0; cur_w = 16'h0;
      rx <= '0;
    end else begin
      if (bitslip) begin off = (off + 1) % 16; bitslips++; end
      prev_w = cur_w;
      cur_w  = frame[wi];
      wi++;
      if (wi == 8) begin
        wi = 0;
        bcid = (bcid + 1) % ORBIT;
        build_frame(bcid, inject_crc, inject_bcid);
      end
      rx.data  <= 16'(({prev_w, cur_w} << off) >> 16);
      rx.valid <= 1'b1;
    end
  end
endmodule
