// Testbench of one user code stream. Twelve super cells receive noise,
// ordinary pulses of random height and saturated pulses; a reference model
// written here (pedestal subtraction, FIR filter, peak condition, saturation
// rule, combine) predicts every output energy, quality and error field. The
// output must also appear exactly LAT_BC = 5 bunch crossings (30 cycles)
// after the input. Counts ordinary peaks, saturated bunch crossings and
// clipped energies so that each path is seen to be exercised.
module tb_user_code_stream;
  import lar_pkg::*;
  localparam int NB = 400, NT = 5;
  logic clk = 0, clk_ipb = 0, rst = 1;
  always #28 clk = ~clk;
  always #17 clk_ipb = ~clk_ipb;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [7:0] cfg_addr = 0; logic [13:0] cfg_wdata = 0, cfg_rdata;
  remap_word_t in_w = '0; user_word_t out_w; user_mon_t mon;
  user_code_stream dut (.clk_ipb, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .clk, .rst,
    .in_word(in_w), .out_word(out_w), .mon);

  int adc [12][NB]; int errs [12][NB];
  int ped [12], thr [12], sthr [12], set_ [12]; int a [12][NT];
  int shape [NT] = '{0, 0, 0, 0, 0};

  task automatic cfg(int sc, int par, int v);
    @(negedge clk_ipb); cfg_addr = 8'(sc * 16 + par); cfg_wdata = 14'(v); cfg_we = 1;
    @(negedge clk_ipb); cfg_we = 0;
  endtask

  function automatic longint F(int sc, int k);   // filter output assigned to BC k
    longint acc = 0;
    for (int i = 0; i < NT; i++) begin
      int m = k + 1 - i;
      int p = (m >= 0) ? adc[sc][m] - ped[sc] : 0;
      acc += longint'(a[sc][i]) * p;
    end
    return acc >>> 12;
  endfunction

  int n_peak = 0, n_sat = 0, n_clip = 0;
  longint t_in [NB]; int nout = 0;
  always @(posedge clk) if (!rst && out_w.valid) begin
    static int slot = 0;
    if (out_w.sop) begin
      slot = 0;
      // word n carries the decisions for bunch crossing n-2
      if (nout >= 2) begin
        checks++;
        if ($time - t_in[nout-2] != 30 * 56) begin failures++; $display("latency %0d", $time - t_in[nout-2]); end
      end
      nout++;
    end
    for (int h = 0; h < 2; h++) begin
      int sc, k; longint fk; bit sk, skm1, skp1, satwin, lead, peak, clip; int et; logic [3:0] q;
      sc = slot * 2 + h; k = nout - 1 - 2;
      if (k >= 6) begin
        fk = F(sc, k);
        peak = fk > F(sc, k - 1) && fk >= F(sc, k + 1) && fk > thr[sc];
        skp1 = adc[sc][k+1] >= sthr[sc]; sk = adc[sc][k] >= sthr[sc]; skm1 = adc[sc][k-1] >= sthr[sc];
        satwin = skp1 || sk || skm1; lead = sk && !skm1;
        clip = fk > 16383;
        et = satwin ? (lead ? set_[sc] : 0) : (peak ? (fk < 0 ? 0 : clip ? 16383 : int'(fk)) : 0);
        q = {clip, satwin && lead, satwin, peak && !satwin};
        if (q[0]) n_peak++;
        if (q[2]) n_sat++;
        if (q[3] && q[0]) n_clip++;
        checks++;
        if (out_w.data[h*14 +: 14] !== 14'(et) || out_w.quality[h*4 +: 4] !== q || out_w.error[h*2 +: 2] !== 2'(errs[sc][k])) begin
          failures++;
          if (failures < 8) $display("bc=%0d sc=%0d got et=%0d q=%b e=%b exp et=%0d q=%b e=%0d F=%0d", k, sc,
            out_w.data[h*14 +: 14], out_w.quality[h*4 +: 4], out_w.error[h*2 +: 2], et, q, errs[sc][k], fk);
        end
      end
    end
    slot++;
  end

  initial begin
    // pulse shape (peak at the BC whose filter window is centred)
    for (int sc = 0; sc < 12; sc++) begin
      ped[sc] = 900 + sc * 11; thr[sc] = 20 + sc; sthr[sc] = 4000 - sc; set_[sc] = 12000 + sc;
      a[sc][0] = -300; a[sc][1] = 1200 + 40 * sc; a[sc][2] = 4096; a[sc][3] = 1500; a[sc][4] = -200;
      cfg(sc, 0, ped[sc]); cfg(sc, 8, thr[sc]); cfg(sc, 9, sthr[sc]); cfg(sc, 10, set_[sc]);
      for (int i = 0; i < NT; i++) cfg(sc, 1 + i, a[sc][i]);
    end
    @(negedge clk_ipb); cfg_addr = 8'(7 * 16 + 3);
    @(negedge clk_ipb); checks++; if (cfg_rdata !== 14'(a[7][2])) begin failures++; $display("readback"); end
    // samples
    for (int sc = 0; sc < 12; sc++)
      for (int b = 0; b < NB; b++) begin
        adc[sc][b] = ped[sc] + int'($urandom_range(0, 12)) - 6;
        errs[sc][b] = ($urandom_range(0, 30) == 0) ? int'($urandom_range(1, 3)) : 0;
      end
    for (int sc = 0; sc < 12; sc++)
      for (int b = 10; b < NB - 10; b += 9 + sc % 4) begin
        int amp, kind;
        kind = int'($urandom_range(0, 9));
        amp = (kind == 0) ? 9000 : (kind == 1) ? 3300 : int'($urandom_range(20, 2500));
        adc[sc][b-1] += amp / 4; adc[sc][b] += amp; adc[sc][b+1] += amp * 2 / 3; adc[sc][b+2] += amp / 5;
        for (int j = -1; j <= 2; j++) if (adc[sc][b+j] > 4095) adc[sc][b+j] = 4095;
      end
    repeat (3) @(posedge clk); rst = 0;
    for (int b = 0; b < NB; b++)
      for (int s = 0; s < 6; s++) begin
        @(negedge clk);
        in_w.valid = 1; in_w.sop = (s == 0);
        in_w.data = {12'(adc[2*s+1][b]), 12'(adc[2*s][b])};
        in_w.error = {2'(errs[2*s+1][b]), 2'(errs[2*s][b])};
        if (s == 0) t_in[b] = $time + 28;
      end
    @(negedge clk); in_w = '0;
    repeat (40) @(posedge clk);
    $display("peaks=%0d saturated=%0d clipped=%0d", n_peak, n_sat, n_clip);
    checks++; if (n_peak < 100 || n_sat < 10 || nout < NB - 2) begin failures++; $display("paths not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(56 * 6 * (NB + 400));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
