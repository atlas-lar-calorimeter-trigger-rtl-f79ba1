// Fibre-to-fibre alignment (synchroniser) of the input stage.
//
// Fibres arrive with different delays. Each fibre has a FIFO of DEPTH words.
// After a restart each fibre waits for the start of a frame whose BCID is 0
// and only then starts writing, so the first word of every FIFO belongs to
// BCID 0. When every selected fibre's FIFO is non-empty, all of them are read
// together, one word per cycle, and stay read continuously: the aligned
// outputs then carry the same bunch crossing on every fibre, and out_bcid
// counts the bunch crossings of the aligned stream. A FIFO overflow or
// underflow, or a selected fibre losing its stream, clears all FIFOs and
// restarts the procedure (resync_cnt counts these restarts). Unselected
// fibres stay idle. The FIFO-per-fibre scheme, the BCID-0 start and the
// common read follow the spec; the restart policy is this design's choice.
// All fibres are in one 320 MHz clock domain.
module fibre_sync
  import lar_pkg::*;
#(
  parameter int unsigned N     = N_FIBRES,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned ORBIT = ORBIT_BCS
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  fibre_select,
  input  sc_word_t      in_word   [N],
  input  logic [11:0]   in_bcid   [N],
  input  logic          in_bcid_valid [N],
  output sc_word_t      out_word  [N],
  output logic [11:0]   out_bcid,
  output logic          aligned,
  output logic [15:0]   resync_cnt
);
  logic [N-1:0] writing, nonempty, ovf, unf, lost;
  logic         fifo_rst, restart;
  logic [14:0]  rdata [N];

  wire all_ready = ((nonempty & fibre_select) == fibre_select) && (fibre_select != '0) && !fifo_rst;
  // once aligned, every selected FIFO must have a word in every cycle
  assign restart  = !fifo_rst && (|((ovf | unf | lost) & fibre_select) || (aligned && !all_ready));
  wire rd        = all_ready && !fifo_rst;

  for (genvar f = 0; f < N; f++) begin : g_fibre
    logic empty;
    wire start = in_word[f].valid && in_word[f].sop && in_bcid_valid[f] && (in_bcid[f] == 12'd0);
    wire wr    = fibre_select[f] && in_word[f].valid && (writing[f] || start);
    assign lost[f]     = writing[f] && !in_word[f].valid;
    assign nonempty[f] = !empty;
    always_ff @(posedge clk) begin
      if (fifo_rst || !fibre_select[f]) writing[f] <= 1'b0;
      else if (start)                   writing[f] <= 1'b1;
    end
    sync_fifo #(.WIDTH(15), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst(fifo_rst || !fibre_select[f]),
      .wr_en(wr), .wr_data({in_word[f].error, in_word[f].sop, in_word[f].data}),
      .rd_en(rd && fibre_select[f]), .rd_data(rdata[f]),
      .empty, .full(), .overflow(ovf[f]), .underflow(unf[f]), .level());
    always_ff @(posedge clk) begin
      if (fifo_rst) out_word[f] <= '0;
      else begin
        out_word[f].data  <= rdata[f][11:0];
        out_word[f].sop   <= rdata[f][12] && rd && fibre_select[f];
        out_word[f].error <= rdata[f][14:13];
        out_word[f].valid <= rd && fibre_select[f];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fifo_rst <= 1'b1; aligned <= 1'b0; resync_cnt <= '0; out_bcid <= '0;
    end else begin
      fifo_rst <= restart;
      if (restart) begin
        aligned <= 1'b0;
        if (resync_cnt != 16'hFFFF) resync_cnt <= resync_cnt + 1'b1;
      end else if (!aligned && all_ready) aligned <= 1'b1;
      // out_bcid belongs to the word presented on out_word in the next cycle
      if (!aligned && all_ready) out_bcid <= '0;
      else if (aligned && rd && rdata_sop_any())
        out_bcid <= (out_bcid == 12'(ORBIT - 1)) ? 12'd0 : out_bcid + 1'b1;
    end
  end

  // start of frame among the words being read (all selected fibres agree)
  function automatic logic rdata_sop_any();
    logic s;
    s = 1'b0;
    for (int f = 0; f < int'(N); f++) if (fibre_select[f] && rdata[f][12]) s = 1'b1;
    return s;
  endfunction
endmodule
