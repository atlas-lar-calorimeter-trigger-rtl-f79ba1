// Single-clock FIFO with a show-ahead read port (head word visible without a
// read strobe).
// Words are written with wr_en and appear on rd_data while empty is low;
// rd_en consumes the head word. Depth is a power of two. Writing when full
// or reading when empty is ignored and raises the sticky overflow/underflow
// flag until reset. Used for the fibre-to-fibre alignment buffers and the
// L1A buffer of the TDAQ readout. The spec asks for these buffers; the
// FIFO itself is a generic building block of this design.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic             underflow,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign level   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (level == (AW+1)'(DEPTH));
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; overflow <= 1'b0; underflow <= 1'b0;
    end else begin
      if (wr_en) begin
        if (full) overflow <= 1'b1;
        else      wp <= wp + 1'b1;
      end
      if (rd_en) begin
        if (empty) underflow <= 1'b1;
        else       rp <= rp + 1'b1;
      end
    end
  end
endmodule
