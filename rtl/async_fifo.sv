// Dual-clock FIFO with Gray-coded pointers and two-flop synchronisers.
// Write side in wclk, read side in rclk; rd_data shows the head word while
// rempty is low (show-ahead) and rd_en pops it. rlevel is the read side's
// (conservative) view of the fill level. Used by the packagers of the output
// summing to cross from the 240 MHz to the 280 MHz domain, and by the
// TDAQ output FIFO (240 MHz to 40 MHz). The spec asks for these
// clock-domain crossings; the FIFO itself is a generic building block of
// this design.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rempty,
  output logic [$clog2(DEPTH):0] rlevel
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r1, wgray_r2, rgray_w1, rgray_w2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  assign wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wclk) begin
    if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wr_data;
  end
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr_en && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read side
  assign rempty  = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];
  assign rlevel  = gray2bin(wgray_r2) - rbin;
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd_en && !rempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
