// Test pattern generator of the input stage.
//
// A dual-port RAM of DEPTH 16-bit words holds LOCic-formatted words (eight
// words per bunch crossing). Port A is the slow-control side (100 MHz): a
// write stores a word, a read returns it on the next cycle with
// rdata_valid. Port B replays the RAM in the 320 MHz domain: while test_mode
// is 0 its address is held at 0; while it is 1 the address advances every
// cycle and returns to 0 after PATTERN_LEN-1 (one full orbit, 3564 x 8 =
// 28512 words). pattern_word is registered, one cycle behind the address;
// pattern_sof marks the word read from address 0. Depth, width, orbit length
// and the address behaviour follow the spec; the bus handshake is this
// design's own. test_mode must already be synchronous to clk.
module test_pattern_gen
  import lar_pkg::*;
#(
  parameter int unsigned DEPTH       = 32768,
  parameter int unsigned PATTERN_LEN = ORBIT_BCS * WORDS_PER_BC
) (
  // slow-control port
  input  logic                     clk_ipb,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     write,
  input  logic                     read,
  input  logic [15:0]              wdata,
  output logic [15:0]              rdata,
  output logic                     rdata_valid,
  // replay port
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     test_mode,
  output logic [15:0]              pattern_word,
  output logic                     pattern_sof
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [15:0] ram [DEPTH];
  logic [AW-1:0] raddr;

  always_ff @(posedge clk_ipb) begin
    if (write) ram[addr] <= wdata;
    rdata       <= ram[addr];
    rdata_valid <= read;
  end

  always_ff @(posedge clk) begin
    if (rst || !test_mode) raddr <= '0;
    else if (raddr == AW'(PATTERN_LEN - 1)) raddr <= '0;
    else raddr <= raddr + 1'b1;
    pattern_word <= ram[raddr];
    pattern_sof  <= test_mode && (raddr == '0);
  end
endmodule
