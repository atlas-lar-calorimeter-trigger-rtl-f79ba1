// Output summing: prepares the FEX output fibres from the user code energies.
//
// Per bunch crossing each of the N_TT trigger-tower streams delivers twelve
// 14-bit super-cell energies (six 240 MHz words). When a tower is complete:
//  * 12-to-10 adapter: if enabled for the tower, super cells 8+9 and 10+11 are
//    summed into two pseudo super cells (saturating at 14 bits); otherwise
//    super cells 0..9 are kept.
//  * eFEX precision: each of the ten energies is shifted right by efex_shift
//    and saturated to 10 bits.
//  * first summing stage: tower sum over the super cells enabled in the
//    tower's 12-bit mask (16 bits, saturating), for the jFEX.
//  * second summing stage: 0.2 x 0.2 region sums over four consecutive
//    towers (16 bits, saturating), for the gFEX.
// Packagers (fex_packager) then cross to 280 MHz and add headers/trailers:
// one eFEX stream per tower (5 words: {8'b0, err[sc 2w+1], err[sc 2w],
// E10[sc 2w+1], E10[sc 2w]}), one jFEX stream per eight towers (4 words of
// two tower sums + a zero word) and one gFEX stream (4 words of two region
// sums + a zero word). Selective duplication: each of the N_OUT output
// fibres takes any packager stream (register {enable, source}); several
// fibres may take the same one. Monitoring: the sum picked by mon_sel
// (0..31 tower sums, 32..39 region sums) is sent once per bunch crossing as
// {sel[7:0], 8'b0, sum[15:0]}.
//
// Registers (word address, one-cycle read latency):
//   0x000 adapter enable (bit per tower)   0x001 efex_shift[3:0]
//   0x002 mon_sel[5:0]                     0x100+t super-cell mask of tower t
//   0x200+o {enable, source[5:0]} of output fibre o
// Defaults: adapter off, shift 0, mask 0x3FF, output o = stream o
// (o < number of streams), monitoring of tower 0.
// The four register families and the data flow follow the spec; the pairs
// combined by the adapter, the tower-to-region grouping, the payload layout
// and the bit widths of the sums are this design's choices.
module output_summing
  import lar_pkg::*;
#(
  parameter int unsigned N     = N_TT,
  parameter int unsigned N_OUT = N_FEX_OUT
) (
  input  logic        clk_ipb,
  input  logic        rst_ipb,
  input  mm_req_t     mm_req,
  output mm_rsp_t     mm_rsp,
  input  logic        clk_240,
  input  logic        rst_240,
  input  user_word_t  in_word  [N],
  input  logic        clk_280,
  input  logic        rst_280,
  output fex_word_t   out_word [N_OUT],
  output osum_mon_t   mon,
  output logic        overflow     // sticky packager FIFO overflow or underflow
);
  localparam int unsigned NJ  = (N + 7) / 8;          // jFEX streams
  localparam int unsigned NR  = (N + 3) / 4;          // gFEX regions
  localparam int unsigned NSTR = N + NJ + 1;          // packager streams
  localparam int unsigned SW  = $clog2(NSTR + 1);

  // ------------------------------------------------------------ registers
  logic [N-1:0]  adapt_en;
  logic [3:0]    efex_shift;
  logic [5:0]    mon_sel;
  logic [11:0]   sc_mask [N];
  logic [6:0]    dup     [N_OUT];

  always_ff @(posedge clk_ipb) begin
    if (rst_ipb) begin
      adapt_en <= '0; efex_shift <= '0; mon_sel <= '0; mm_rsp <= '0;
      for (int t = 0; t < int'(N); t++) sc_mask[t] <= 12'h3FF;
      for (int o = 0; o < int'(N_OUT); o++) dup[o] <= (o < int'(NSTR)) ? {1'b1, 6'(o)} : 7'h0;
    end else begin
      logic [23:0] a;
      a = mm_req.address;
      if (mm_req.write) begin
        if (a == 24'h000) adapt_en <= mm_req.writedata[N-1:0];
        if (a == 24'h001) efex_shift <= mm_req.writedata[3:0];
        if (a == 24'h002) mon_sel <= mm_req.writedata[5:0];
        if (a >= 24'h100 && a < 24'h100 + 24'(N)) sc_mask[a[$clog2(N)-1:0]] <= mm_req.writedata[11:0];
        if (a >= 24'h200 && a < 24'h200 + 24'(N_OUT)) dup[a[$clog2(N_OUT)-1:0]] <= mm_req.writedata[6:0];
      end
      mm_rsp.readdatavalid <= mm_req.read;
      mm_rsp.readdata <= '0;
      if (a == 24'h000) mm_rsp.readdata <= 32'(adapt_en);
      if (a == 24'h001) mm_rsp.readdata <= 32'(efex_shift);
      if (a == 24'h002) mm_rsp.readdata <= 32'(mon_sel);
      if (a >= 24'h100 && a < 24'h100 + 24'(N)) mm_rsp.readdata <= 32'(sc_mask[a[$clog2(N)-1:0]]);
      if (a >= 24'h200 && a < 24'h200 + 24'(N_OUT)) mm_rsp.readdata <= 32'(dup[a[$clog2(N_OUT)-1:0]]);
    end
  end

  // ------------------------------------------------------------ collect a bunch crossing
  logic [2:0]  slot;
  logic [13:0] et  [N][SC_PER_TT];
  logic [1:0]  err [N][SC_PER_TT];
  wire         last = in_word[0].valid && slot == 3'(SLOTS_240 - 1);
  always_ff @(posedge clk_240) begin
    if (rst_240) slot <= '0;
    else if (in_word[0].valid) slot <= in_word[0].sop ? 3'd1 : slot + 1'b1;
  end
  always_ff @(posedge clk_240) begin
    for (int t = 0; t < int'(N); t++)
      if (in_word[t].valid)
        for (int h = 0; h < 2; h++) begin
          et [t][(in_word[0].sop ? 0 : int'(slot)) * 2 + h] <= in_word[t].data[h*14 +: 14];
          err[t][(in_word[0].sop ? 0 : int'(slot)) * 2 + h] <= in_word[t].error[h*2 +: 2];
        end
  end

  // stage 1: adapter and tower sums (the last word has been stored)
  logic        p1, p2;
  logic [13:0] e10in [N][10];
  logic [1:0]  e10err [N][10];
  logic [15:0] ttsum [N];
  always_ff @(posedge clk_240) begin
    if (rst_240) p1 <= 1'b0;
    else p1 <= last;
  end
  logic [15:0] rsum [NR];
  logic [9:0]  e10 [N][10];
  always_ff @(posedge clk_240) begin
    if (rst_240) p2 <= 1'b0;
    else p2 <= p1;
    if (p1) begin
      for (int t = 0; t < int'(N); t++) begin
        logic [19:0] s;
        s = '0;
        for (int c = 0; c < int'(SC_PER_TT); c++) if (sc_mask[t][c]) s += 20'(et[t][c]);
        ttsum[t] <= sat_u16(s);
        for (int c = 0; c < 10; c++) begin
          logic [14:0] v;
          v = {1'b0, et[t][c]};
          e10err[t][c] <= err[t][c];
          if (adapt_en[t] && c >= 8) begin
            v = 15'(et[t][8 + 2*(c-8)]) + 15'(et[t][9 + 2*(c-8)]);
            e10err[t][c] <= err[t][8 + 2*(c-8)] | err[t][9 + 2*(c-8)];
          end
          e10in[t][c] <= v[14] ? 14'h3FFF : v[13:0];
        end
      end
    end
  end
  // stage 2: precision and region sums
  always_comb begin
    for (int t = 0; t < int'(N); t++)
      for (int c = 0; c < 10; c++) begin
        logic [13:0] sh;
        sh = e10in[t][c] >> efex_shift;
        e10[t][c] = (sh > 14'd1023) ? 10'h3FF : sh[9:0];
      end
    for (int r = 0; r < int'(NR); r++) begin
      logic [19:0] s;
      s = '0;
      for (int i = 0; i < 4; i++) if (4*r + i < int'(N)) s += 20'(ttsum[4*r + i]);
      rsum[r] = sat_u16(s);
    end
  end

  // ------------------------------------------------------------ payload bursts
  logic [31:0] payload [NSTR][5];
  logic [2:0]  pcnt;
  logic        pushing;
  always_ff @(posedge clk_240) begin
    if (rst_240) begin
      pcnt <= '0; pushing <= 1'b0; mon <= '0;
    end else begin
      mon.valid <= 1'b0;
      if (p2) begin
        pushing <= 1'b1; pcnt <= '0;
        for (int t = 0; t < int'(N); t++)
          for (int w = 0; w < 5; w++)
            payload[t][w] <= {8'b0, e10err[t][2*w+1], e10err[t][2*w], e10[t][2*w+1], e10[t][2*w]};
        for (int j = 0; j < int'(NJ); j++)
          for (int w = 0; w < 5; w++)
            payload[N + j][w] <= (w < 4 && 8*j + 2*w + 1 < int'(N))
                                 ? {ttsum[8*j + 2*w + 1], ttsum[8*j + 2*w]} : 32'h0;
        for (int w = 0; w < 5; w++)
          payload[N + NJ][w] <= (w < 4 && 2*w + 1 < int'(NR)) ? {rsum[2*w + 1], rsum[2*w]} : 32'h0;
        mon.valid <= 1'b1;
        mon.data  <= {2'b0, mon_sel, 8'b0,
                      (32'(mon_sel) < 32'(N)) ? ttsum[mon_sel[4:0]]
                      : (32'(mon_sel) < 32'(N + NR)) ? rsum[3'(mon_sel - 6'(N))] : 16'h0};
      end else if (pushing) begin
        if (pcnt == 3'd4) pushing <= 1'b0;
        pcnt <= pcnt + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ packagers
  fex_word_t   pk  [NSTR];
  logic [NSTR-1:0] ovf, unf;
  for (genvar s = 0; s < NSTR; s++) begin : g_pkg
    fex_packager #(.N_DATA(5), .STREAM_ID(s)) u_pkg (
      .clk_240, .rst_240, .push(pushing), .push_data(payload[s][pcnt]),
      .clk_280, .rst_280, .out_word(pk[s]), .overflow(ovf[s]), .underflow(unf[s]));
  end
  assign overflow = |ovf || |unf;   // any packager FIFO error (sticky)

  // ------------------------------------------------------------ selective duplication
  for (genvar o = 0; o < N_OUT; o++) begin : g_dup
    always_ff @(posedge clk_280) begin
      if (rst_280) out_word[o] <= '0;
      else out_word[o] <= (dup[o][6] && 32'(dup[o][5:0]) < 32'(NSTR)) ? pk[dup[o][5:0]] : '0;
    end
  end
endmodule
