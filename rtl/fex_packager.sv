// FEX packager: moves one bunch crossing's payload from the 240 MHz to the
// 280 MHz domain and frames it for an output fibre.
//
// The 240 MHz side pushes N_DATA words per bunch crossing (five of the six
// cycles). They cross through a dual-clock FIFO. The 280 MHz side sends a
// frame of seven cycles per bunch crossing: a header, the N_DATA payload
// words popped one per cycle, and a trailer, so five of the seven output
// cycles carry payload. A frame starts as soon as START_LEVEL words are
// visible on the read side; since the read side pops faster (280 MHz) than
// the write side pushes (240 MHz), START_LEVEL = 2 is the smallest start
// level that, with the synchroniser delay of the FIFO, never finds the FIFO
// empty in the middle of a frame for clocks derived from the same bunch
// clock; a pop that finds it empty sets the sticky underflow flag. All
// packagers fed by the same bursts start their frames in the same cycle.
// Header = {8'hBC, STREAM_ID[7:0], frame count[15:0]};
// trailer = {8'hDC, 8'h00, XOR of the payload halfwords}.
// The FIFO crossing and the 5-of-6 / 5-of-7 rates follow the spec; the
// start rule and the header and trailer contents are this design's own, as
// the FEX format is not fixed.
module fex_packager
  import lar_pkg::*;
#(
  parameter int unsigned N_DATA    = 5,
  parameter int unsigned STREAM_ID = 0,
  parameter int unsigned START_LEVEL = 2
) (
  input  logic        clk_240,
  input  logic        rst_240,
  input  logic        push,
  input  logic [31:0] push_data,
  input  logic        clk_280,
  input  logic        rst_280,
  output fex_word_t   out_word,
  output logic        overflow,    // clk_240 domain, sticky
  output logic        underflow    // clk_280 domain, sticky
);
  initial assert (N_DATA + 2 <= SLOTS_280);
  logic [31:0] rd_data;
  logic        rempty, wfull, pop;
  logic [4:0]  rlevel;
  logic        active;
  logic [2:0]  slot;
  logic [15:0] frame_cnt;
  logic [15:0] xsum;

  async_fifo #(.WIDTH(32), .DEPTH(16)) u_fifo (
    .wclk(clk_240), .wrst(rst_240), .wr_en(push), .wr_data(push_data), .wfull,
    .rclk(clk_280), .rrst(rst_280), .rd_en(pop), .rd_data, .rempty, .rlevel);

  always_ff @(posedge clk_240) begin
    if (rst_240) overflow <= 1'b0;
    else if (push && wfull) overflow <= 1'b1;
  end

  // slot = position in the frame of the word sent in the next cycle
  assign pop = active && slot >= 3'd1 && slot <= 3'(N_DATA) && !rempty;

  always_ff @(posedge clk_280) begin
    if (rst_280) begin
      active <= 1'b0; slot <= '0; frame_cnt <= '0; xsum <= '0; out_word <= '0;
      underflow <= 1'b0;
    end else begin
      out_word <= '0;
      if (!active) begin
        if (rlevel >= 5'(START_LEVEL)) begin
          active <= 1'b1; slot <= 3'd1;
          xsum   <= '0;
          out_word <= '{data: {8'hBC, 8'(STREAM_ID), frame_cnt}, valid: 1'b1};
        end
      end else if (slot <= 3'(N_DATA)) begin
        if (rempty) underflow <= 1'b1;
        out_word <= '{data: rempty ? 32'h0 : rd_data, valid: 1'b1};
        xsum     <= xsum ^ rd_data[31:16] ^ rd_data[15:0];
        slot     <= slot + 1'b1;
      end else begin
        out_word <= '{data: {8'hDC, 8'h00, xsum}, valid: 1'b1};
        frame_cnt <= frame_cnt + 1'b1;
        active <= 1'b0; slot <= '0;
      end
    end
  end
endmodule
