// Testbench of the output summing at full size (32 towers in, 48 fibres out)
// with exact 240/280 MHz clock ratios. Registers enable the 12-to-10 adapter
// on some towers, change super-cell masks, set the eFEX shift, duplicate one
// eFEX stream and the gFEX stream onto spare fibres and select a region sum
// for monitoring. Every frame on every enabled fibre (header, five payload
// words, trailer) and every monitoring word is compared with a reference
// model; frames must come one per bunch crossing, each header within 1.5 BC
// of the last input word of its bunch crossing. Counts adapter use,
// saturated eFEX values and duplicated frames.
module tb_output_summing;
  import lar_pkg::*;
  localparam int N = 32, NO = 48, NB = 60, NSTR = 37, BC = 336;
  logic clk_ipb = 0, clk_240 = 0, clk_280 = 0, rst = 1;
  always #17 clk_ipb = ~clk_ipb;
  always #28 clk_240 = ~clk_240;
  always #24 clk_280 = ~clk_280;
  int checks = 0, failures = 0;

  mm_req_t req = '0; mm_rsp_t rsp;
  user_word_t in_w [N]; fex_word_t out_w [NO]; osum_mon_t mon; logic ovf;
  output_summing dut (.clk_ipb, .rst_ipb(rst), .mm_req(req), .mm_rsp(rsp), .clk_240, .rst_240(rst),
    .in_word(in_w), .clk_280, .rst_280(rst), .out_word(out_w), .mon, .overflow(ovf));

  int et [NB][N][12]; int er [NB][N][12];
  bit adapt [N]; int mask [N]; int shift = 1; int dupsrc [NO]; int monsel = 35;

  function automatic int sat16(int v); return v > 65535 ? 65535 : v; endfunction
  function automatic int ttsum(int b, int t);
    int s = 0;
    for (int c = 0; c < 12; c++) if (mask[t][c]) s += et[b][t][c];
    return sat16(s);
  endfunction
  function automatic int rsum(int b, int r);
    int s = 0;
    for (int i = 0; i < 4; i++) s += ttsum(b, 4*r + i);
    return sat16(s);
  endfunction
  function automatic logic [31:0] payload(int b, int s, int w);
    if (s < N) begin
      int v [2]; int e [2];
      for (int h = 0; h < 2; h++) begin
        int c = 2*w + h;
        if (adapt[s] && c >= 8) begin
          v[h] = et[b][s][8 + 2*(c-8)] + et[b][s][9 + 2*(c-8)];
          if (v[h] > 16383) v[h] = 16383;
          e[h] = er[b][s][8 + 2*(c-8)] | er[b][s][9 + 2*(c-8)];
        end else begin v[h] = et[b][s][c]; e[h] = er[b][s][c]; end
        v[h] = v[h] >> shift; if (v[h] > 1023) v[h] = 1023;
      end
      return {8'b0, 2'(e[1]), 2'(e[0]), 10'(v[1]), 10'(v[0])};
    end else if (s < N + 4) begin
      int j = s - N;
      return (w < 4) ? {16'(ttsum(b, 8*j + 2*w + 1)), 16'(ttsum(b, 8*j + 2*w))} : 32'h0;
    end else return (w < 4) ? {16'(rsum(b, 2*w + 1)), 16'(rsum(b, 2*w))} : 32'h0;
  endfunction

  task automatic mm_write(int a, int d);
    @(negedge clk_ipb); req.address = 24'(a); req.writedata = 32'(d); req.write = 1;
    @(negedge clk_ipb); req.write = 0;
  endtask

  // frame checker per output fibre
  int pos [NO]; int fcnt [NO]; int frames = 0, dup_frames = 0; logic [15:0] xs [NO];
  longint t_first [NB]; longint maxlat = 0;
  always @(posedge clk_280) if (!rst) begin
    for (int o = 0; o < NO; o++) begin
      int s; s = dupsrc[o];
      if (s < 0) begin
        checks++; if (out_w[o].valid) begin failures++; $display("disabled fibre %0d active", o); end
      end else if (out_w[o].valid) begin
        logic [31:0] exp;
        if (pos[o] == 0) begin
          exp = {8'hBC, 8'(s), 16'(fcnt[o])}; xs[o] = 0;
          if (o == 0 && fcnt[o] < NB && $time - t_first[fcnt[o]] > maxlat) maxlat = $time - t_first[fcnt[o]];
        end else if (pos[o] <= 5) begin
          exp = payload(fcnt[o], s, pos[o] - 1); xs[o] ^= exp[31:16] ^ exp[15:0];
        end else exp = {8'hDC, 8'h0, xs[o]};
        checks++;
        if (fcnt[o] >= NB || out_w[o].data !== exp) begin
          failures++;
          if (failures < 8) $display("fibre %0d src %0d frame %0d pos %0d got %h exp %h", o, s, fcnt[o], pos[o], out_w[o].data, exp);
        end
        pos[o]++;
        if (pos[o] == 7) begin pos[o] = 0; fcnt[o]++; frames++; if (o >= NSTR) dup_frames++; end
      end else begin
        checks++; if (pos[o] != 0) begin failures++; $display("gap inside a frame on fibre %0d", o); end
      end
    end
  end
  int nmon = 0;
  always @(posedge clk_240) if (!rst && mon.valid) begin
    checks++;
    if (mon.data !== {2'b0, 6'(monsel), 8'b0, 16'(rsum(nmon, monsel - 32))}) begin failures++; $display("mon %0d got %h", nmon, mon.data); end
    nmon++;
  end

  int n_adapt = 0, n_satur = 0;
  initial begin
    for (int t = 0; t < N; t++) begin adapt[t] = (t % 3 == 1); mask[t] = (t % 5 == 0) ? 12'hFFF : 12'h3FF; end
    for (int o = 0; o < NO; o++) dupsrc[o] = (o < NSTR) ? o : -1;
    dupsrc[40] = 3; dupsrc[47] = 36;
    for (int b = 0; b < NB; b++)
      for (int t = 0; t < N; t++)
        for (int c = 0; c < 12; c++) begin
          et[b][t][c] = ($urandom_range(0, 7) == 0) ? int'($urandom_range(0, 16383)) : int'($urandom_range(0, 900));
          er[b][t][c] = ($urandom_range(0, 20) == 0) ? 1 : 0;
        end
    for (int i = 0; i < N; i++) for (int f = 0; f < N; f++) in_w[f] = '0;
    repeat (5) @(posedge clk_ipb); rst = 0;
    mm_write(0, 32'h92492492);  // adapter on towers t % 3 == 1
    mm_write(1, shift);
    mm_write(2, monsel);
    for (int t = 0; t < N; t += 5) mm_write(24'h100 + t, 12'hFFF);
    mm_write(24'h200 + 40, {1'b1, 6'd3});
    mm_write(24'h200 + 47, {1'b1, 6'd36});
    @(negedge clk_ipb); req.address = 24'h200 + 40; req.read = 1;
    @(negedge clk_ipb); req.read = 0;
    checks++; if (rsp.readdata[6:0] !== {1'b1, 6'd3}) begin failures++; $display("readback"); end
    for (int t = 0; t < N; t++) if (adapt[t]) n_adapt++;
    for (int b = 0; b < NB; b++)
      for (int s = 0; s < 6; s++) begin
        @(negedge clk_240);
        if (s == 5) t_first[b] = $time + 28;   // last word of the bunch crossing
        for (int t = 0; t < N; t++) begin
          in_w[t].valid = 1; in_w[t].sop = (s == 0);
          in_w[t].data = {14'(et[b][t][2*s+1]), 14'(et[b][t][2*s])};
          in_w[t].error = {2'(er[b][t][2*s+1]), 2'(er[b][t][2*s])};
          in_w[t].quality = '0;
          if (payload(b, t, s % 5)[9:0] == 10'h3FF) n_satur++;
        end
      end
    @(negedge clk_240); for (int t = 0; t < N; t++) in_w[t] = '0;
    repeat (30) @(posedge clk_240);
    $display("frames=%0d duplicated=%0d adapter towers=%0d saturated eFEX=%0d latency=%0d (BC=%0d)", frames, dup_frames, n_adapt, n_satur, maxlat, BC);
    checks++; if (frames != NB * (NSTR + 2)) begin failures++; $display("expected %0d frames", NB * (NSTR + 2)); end
    checks++; if (nmon != NB) begin failures++; $display("monitoring words %0d", nmon); end
    checks++; if (dup_frames == 0 || n_satur == 0 || ovf) failures++;
    checks++; if (maxlat > 3 * BC / 2) begin failures++; $display("latency too long"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(BC * (NB + 200));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
