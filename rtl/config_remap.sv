// Configurable remapping: regroups the super-cell samples of the input stage
// by trigger tower and moves them from the 320 MHz to the 240 MHz domain.
//
// Input: N_IN aligned fibre streams, 8 samples per bunch crossing at 320 MHz.
// Output: N_OUT trigger-tower streams, 6 words per bunch crossing at
// 240 MHz, each word a pair of 12-bit samples with their error bits.
//
// How: the 320 MHz side writes every sample of a bunch crossing into one of
// two capture banks (N_IN x 8 entries), alternating banks at each bunch
// crossing, and toggles a flag when a bank is complete. The 240 MHz side
// synchronises the flag, copies the completed bank into a snapshot register
// (well before the 320 MHz side writes that bank again, one bunch crossing
// later) and plays the snapshot out over six cycles. Output word s, half h of
// stream o takes the sample chosen by map entry o*12 + 2*s + h:
// {enable, fibre[5:0], sample[2:0]}. A disabled entry gives a zero sample.
// The map is a register table written over the slow-control port (word
// address = entry index, read back with one-cycle latency); it is meant to be
// loaded at power-up and is read as quasi-static by the 240 MHz side. At
// reset entry e maps to fibre e/8, sample e%8. Latency: about one bunch
// crossing to collect the samples plus three to four 240 MHz cycles, inside the
// 1.5 BC the spec allows. The bank/snapshot scheme and the table format are
// this design's own; the sizes and clock rates follow the spec.
module config_remap
  import lar_pkg::*;
#(
  parameter int unsigned N_IN  = N_FIBRES,
  parameter int unsigned N_OUT = N_TT
) (
  input  logic        clk_ipb,
  input  logic        rst_ipb,
  input  mm_req_t     mm_req,
  output mm_rsp_t     mm_rsp,
  input  logic        clk_320,
  input  logic        rst_320,
  input  sc_word_t    in_word  [N_IN],
  input  logic        clk_240,
  input  logic        rst_240,
  output remap_word_t out_word [N_OUT]
);
  localparam int unsigned NS   = N_IN * WORDS_PER_BC;        // samples per BC
  localparam int unsigned NE   = N_OUT * SLOTS_240 * 2;      // map entries
  localparam int unsigned EAW  = $clog2(NE);
  localparam int unsigned SAW  = $clog2(NS);

  typedef struct packed {
    logic       en;
    logic [5:0] fibre;
    logic [2:0] sample;
  } map_t;

  typedef struct packed {
    logic        valid;
    logic [1:0]  error;
    logic [11:0] data;
  } cap_t;

  // ------------------------------------------------------------ map table
  map_t map [NE];
  always_ff @(posedge clk_ipb) begin
    if (rst_ipb) begin
      for (int e = 0; e < int'(NE); e++) map[e] <= '{en: 1'b1, fibre: 6'((e / 8) % N_IN), sample: 3'(e % 8)};
      mm_rsp <= '0;
    end else begin
      if (mm_req.write && mm_req.address < 24'(NE)) map[mm_req.address[EAW-1:0]] <= map_t'(mm_req.writedata[9:0]);
      mm_rsp.readdatavalid <= mm_req.read;
      mm_rsp.readdata      <= (mm_req.address < 24'(NE)) ? {22'b0, map[mm_req.address[EAW-1:0]]} : '0;
    end
  end

  // ------------------------------------------------------------ 320 MHz capture
  cap_t       bank [2][NS];
  logic       wbank, done_bank, tog;
  logic [2:0] k;
  logic       any_sop, any_valid;
  always_comb begin
    any_sop = 1'b0; any_valid = 1'b0;
    for (int f = 0; f < int'(N_IN); f++) begin
      any_sop   |= in_word[f].valid && in_word[f].sop;
      any_valid |= in_word[f].valid;
    end
  end
  wire [2:0] kk = any_sop ? 3'd0 : k;

  always_ff @(posedge clk_320) begin
    if (any_valid)
      for (int f = 0; f < int'(N_IN); f++)
        bank[wbank][f*8 + int'(kk)] <= '{valid: in_word[f].valid, error: in_word[f].error, data: in_word[f].data};
  end
  always_ff @(posedge clk_320) begin
    if (rst_320) begin
      k <= '0; wbank <= 1'b0; done_bank <= 1'b0; tog <= 1'b0;
    end else if (any_valid) begin
      k <= kk + 1'b1;
      if (kk == 3'd7) begin
        done_bank <= wbank; wbank <= ~wbank; tog <= ~tog;
      end
    end
  end

  // ------------------------------------------------------------ 240 MHz playout
  // Slot 0 is taken straight from the completed bank in the cycle the flag is
  // seen; slots 1..5 come from the snapshot taken in that same cycle.
  logic [2:0] tog_s;
  cap_t       snap [NS];
  logic [2:0] slot;       // next slot to emit from the snapshot
  logic       playing;
  wire        det = (tog_s[2] != tog_s[1]);
  always_ff @(posedge clk_240) begin
    if (rst_240) begin
      tog_s <= '0; slot <= '0; playing <= 1'b0;
    end else begin
      tog_s <= {tog_s[1:0], tog};
      if (det) begin
        slot <= 3'd1; playing <= 1'b1;
      end else if (playing) begin
        if (slot == 3'(SLOTS_240 - 1)) playing <= 1'b0;
        slot <= slot + 1'b1;
      end
    end
  end
  always_ff @(posedge clk_240) begin
    if (det) snap <= bank[done_bank];
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    always_ff @(posedge clk_240) begin
      if (rst_240) out_word[o] <= '0;
      else begin
        remap_word_t w;
        logic [2:0]  s;
        w = '0;
        s = det ? 3'd0 : slot;
        if (det || playing) begin
          w.valid = 1'b1;
          w.sop   = det;
          for (int h = 0; h < 2; h++) begin
            map_t m;
            cap_t c;
            m = map[o*12 + int'(s)*2 + h];
            c = det ? bank[done_bank][SAW'(int'(m.fibre) * 8 + int'(m.sample))]
                    : snap[SAW'(int'(m.fibre) * 8 + int'(m.sample))];
            if (m.en) begin
              if (!c.valid) w.valid = 1'b0;
              w.data[h*12 +: 12] = c.data;
              w.error[h*2 +: 2]  = c.error;
            end
          end
        end
        out_word[o] <= w;
      end
    end
  end
endmodule
