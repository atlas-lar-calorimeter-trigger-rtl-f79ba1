// User code for one trigger-tower stream: energy reconstruction and bunch
// crossing identification for the 12 super cells carried by the stream.
//
// Input: one remapped word per 240 MHz cycle, two 12-bit ADC samples, six
// words per bunch crossing (super cell sc = 2*slot + half). Output: at the
// same position, two 14-bit transverse energies with 4-bit quality and 2-bit
// error fields per super cell, exactly LAT_BC bunch crossings after the
// sample of the same super cell and bunch crossing entered (fixed latency).
//
// Filtering block, per super cell, time-multiplexed over the six slots:
//   p(m)  = ADC(m) - ped                           pedestal subtraction
//   F(m-1)= sum_{i=0}^{N_TAPS-1} a_i * p(m-i) >>> COEF_FRAC
// i.e. with five taps the filter for bunch crossing k uses three samples
// before k, k itself and one sample after. BCid condition: F(k) is a peak,
// F(k) > F(k-1), F(k) >= F(k+1) and F(k) > thr.
// Saturation detection: a sample is saturated when ADC >= sat_thr. If any of
// the samples k-1, k, k+1 is saturated the saturation path decides: the
// bunch crossing of the leading edge (first saturated sample) receives
// sat_et, the others 0. Combine block: saturation path if active, else the
// BCid-gated, 14-bit-clipped F(k).
// quality[3:0] per super cell = {F clipped, leading edge, saturation window,
// FIR peak}; error = the input error bits of sample k.
// The equation of the filter, the 5-BC latency, the 14-bit energies and the
// register table (pedestal, N coefficients, condition, saturation and
// combine parameters per super cell) follow the spec; the peak condition,
// the saturation rule, COEF_FRAC and the quality encoding are this design's
// choices, as the spec leaves the algorithms open.
//
// Configuration (clk_ipb domain, read as quasi-static): cfg_addr =
// {sc[3:0], param[3:0]}; param 0 = pedestal, 1..N_TAPS = a_0..a_{N-1}
// (signed), 8 = peak threshold, 9 = saturation threshold, 10 = saturated
// energy. cfg_rdata returns the addressed register combinationally.
// Monitoring (mon): raw and pedestal-subtracted samples of bunch crossing m,
// F and the decisions for bunch crossing m-2, valid in the cycle after the
// input word.
module user_code_stream
  import lar_pkg::*;
#(
  parameter int unsigned N_TAPS    = 5,
  parameter int unsigned COEF_FRAC = 12,
  parameter int unsigned LAT_BC    = 5
) (
  input  logic        clk_ipb,
  input  logic        cfg_we,
  input  logic [7:0]  cfg_addr,
  input  logic [13:0] cfg_wdata,
  output logic [13:0] cfg_rdata,
  input  logic        clk,          // ttc_240_clk
  input  logic        rst,
  input  remap_word_t in_word,
  output user_word_t  out_word,
  output user_mon_t   mon
);
  localparam int unsigned NSC   = SC_PER_TT;
  localparam int unsigned CW    = $clog2(N_TAPS);
  localparam int unsigned DELAY = LAT_BC * SLOTS_240 - 2 * SLOTS_240 - 2;
  initial assert (N_TAPS >= 1 && N_TAPS <= 7 && LAT_BC >= 3);

  // ------------------------------------------------------------ registers
  logic [13:0]        ped     [NSC];
  logic signed [13:0] coef    [NSC][N_TAPS];
  logic [13:0]        thr     [NSC];
  logic [11:0]        sat_thr [NSC];
  logic [13:0]        sat_et  [NSC];

  always_ff @(posedge clk_ipb) begin
    if (cfg_we && cfg_addr[7:4] < 4'(NSC)) begin
      case (cfg_addr[3:0])
        4'd0:  ped[cfg_addr[7:4]]     <= cfg_wdata;
        4'd8:  thr[cfg_addr[7:4]]     <= cfg_wdata;
        4'd9:  sat_thr[cfg_addr[7:4]] <= cfg_wdata[11:0];
        4'd10: sat_et[cfg_addr[7:4]]  <= cfg_wdata;
        default:
          if (cfg_addr[3:0] >= 4'd1 && cfg_addr[3:0] <= 4'(N_TAPS))
            coef[cfg_addr[7:4]][CW'(cfg_addr[3:0] - 4'd1)] <= cfg_wdata;
      endcase
    end
  end
  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr[7:4] < 4'(NSC)) begin
      case (cfg_addr[3:0])
        4'd0:  cfg_rdata = ped[cfg_addr[7:4]];
        4'd8:  cfg_rdata = thr[cfg_addr[7:4]];
        4'd9:  cfg_rdata = {2'b0, sat_thr[cfg_addr[7:4]]};
        4'd10: cfg_rdata = sat_et[cfg_addr[7:4]];
        default:
          if (cfg_addr[3:0] >= 4'd1 && cfg_addr[3:0] <= 4'(N_TAPS))
            cfg_rdata = coef[cfg_addr[7:4]][CW'(cfg_addr[3:0] - 4'd1)];
      endcase
    end
  end

  // ------------------------------------------------------------ stage A: slot
  remap_word_t a_w;
  logic [2:0]  a_slot, slot_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      a_w <= '0; a_slot <= '0; slot_cnt <= '0;
    end else begin
      a_w <= in_word;
      if (in_word.valid) begin
        a_slot   <= in_word.sop ? 3'd0 : slot_cnt;
        slot_cnt <= in_word.sop ? 3'd1 : slot_cnt + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ stage B: filter
  logic signed [14:0] phist [NSC][N_TAPS];   // p(m-1) .. p(m-N_TAPS) ([0] newest)
  logic signed [19:0] fh1 [NSC], fh2 [NSC];  // F(k) and F(k-1) for the next decision
  logic [11:0]        rh1 [NSC], rh2 [NSC], rh3 [NSC];
  logic [1:0]         eh1 [NSC], eh2 [NSC];

  user_word_t b_out;
  user_mon_t  b_mon;

  always_ff @(posedge clk) begin
    if (rst) begin
      b_out <= '0; b_mon <= '0;
      for (int s = 0; s < int'(NSC); s++) begin
        fh1[s] <= '0; fh2[s] <= '0; rh1[s] <= '0; rh2[s] <= '0; rh3[s] <= '0;
        eh1[s] <= '0; eh2[s] <= '0;
        for (int i = 0; i < int'(N_TAPS); i++) phist[s][i] <= '0;
      end
    end else begin
      b_out.valid <= a_w.valid;
      b_out.sop   <= a_w.valid && a_w.sop;
      b_mon.valid <= a_w.valid;
      b_mon.sop   <= a_w.valid && a_w.sop;
      if (a_w.valid) begin
        for (int h = 0; h < 2; h++) begin
          logic [3:0]         sc;
          logic [11:0]        raw;
          logic signed [14:0] p;
          logic signed [31:0] acc;
          logic signed [19:0] f_new, f_k, f_km1;
          logic               peak, s_k, s_km1, s_kp1, satwin, lead, clip;
          logic [13:0]        et_fir, et_id;
          sc  = 4'(int'(a_slot) * 2 + h);
          raw = a_w.data[h*12 +: 12];
          p   = $signed({3'b0, raw}) - $signed({1'b0, ped[sc]});
          acc = 32'(coef[sc][0]) * 32'(p);
          for (int i = 1; i < int'(N_TAPS); i++) acc += 32'(coef[sc][i]) * 32'(phist[sc][i-1]);
          f_new = 20'(acc >>> COEF_FRAC);              // F(k+1), k = m-2
          f_k   = fh1[sc];
          f_km1 = fh2[sc];
          peak  = (f_k > f_km1) && (f_k >= f_new) && (f_k > $signed({6'b0, thr[sc]}));
          s_kp1 = rh1[sc] >= sat_thr[sc];
          s_k   = rh2[sc] >= sat_thr[sc];
          s_km1 = rh3[sc] >= sat_thr[sc];
          satwin = s_kp1 || s_k || s_km1;
          lead   = s_k && !s_km1;
          clip   = f_k > 20'sd16383;
          et_fir = (f_k < 0) ? 14'd0 : clip ? 14'h3FFF : f_k[13:0];
          et_id  = satwin ? (lead ? sat_et[sc] : 14'd0) : (peak ? et_fir : 14'd0);
          // histories
          phist[sc][0] <= p;
          for (int i = 1; i < int'(N_TAPS); i++) phist[sc][i] <= phist[sc][i-1];
          fh1[sc] <= f_new; fh2[sc] <= f_k;
          rh1[sc] <= raw; rh2[sc] <= rh1[sc]; rh3[sc] <= rh2[sc];
          eh1[sc] <= a_w.error[h*2 +: 2]; eh2[sc] <= eh1[sc];
          // outputs for bunch crossing k
          b_out.data[h*14 +: 14]   <= et_id;
          b_out.quality[h*4 +: 4]  <= {clip, satwin && lead, satwin, peak && !satwin};
          b_out.error[h*2 +: 2]    <= eh2[sc];
          // monitoring
          b_mon.raw_adc[h*12 +: 12]         <= raw;
          b_mon.adc_ped[h*12 +: 12]         <= (p > 15'sd2047) ? 12'h7FF : (p < -15'sd2048) ? 12'h800 : p[11:0];
          b_mon.transverse_e[h*14 +: 14]    <= (f_k > 20'sd8191) ? 14'h1FFF : (f_k < -20'sd8192) ? 14'h2000 : f_k[13:0];
          b_mon.sat_detect[h*2 +: 2]        <= {satwin && lead, satwin};
          b_mon.quality[h*4 +: 4]           <= {clip, satwin && lead, satwin, peak && !satwin};
          b_mon.transverse_e_id[h*14 +: 14] <= et_id;
        end
      end
    end
  end
  assign mon = b_mon;

  // ------------------------------------------------------------ fixed-latency delay
  user_word_t dl [DELAY];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DELAY); i++) dl[i] <= '0;
    end else begin
      dl[0] <= b_out;
      for (int i = 1; i < int'(DELAY); i++) dl[i] <= dl[i-1];
    end
  end
  assign out_word = dl[DELAY-1];
endmodule
