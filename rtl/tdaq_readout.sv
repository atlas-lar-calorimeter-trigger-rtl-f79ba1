// TDAQ readout buffering of the user code results.
//
// Circular buffers: for every trigger-tower stream, two RAMs of DEPTH_BC
// bunch crossings x 8 word slots keep a moving window of the last DEPTH_BC
// (512) bunch crossings: the raw ADC pair of each word, and the transverse
// energy pair (14 bits each) with its quality (4 bits each). The user code
// monitoring stream gives the energies two bunch crossings after the raw
// samples, so they are written two bunch crossings back to keep both RAMs
// aligned on the bunch crossing of the sample.
// L1A buffering: each L1A stores the current buffer position in an L1A FIFO
// (L1A_DEPTH entries), so that consecutive L1As are kept while an earlier
// one is being read out.
// Readout: for each buffered L1A the state machine reads n_samples bunch
// crossings, starting n_pre before the triggered bunch crossing, which lies
// l1_latency bunch crossings before the L1A arrived; for each bunch
// crossing, every stream and every word slot it writes one 84-bit word into
// the output FIFO (512 words) that the GBT side reads at 40 MHz:
//   header  {4'hA, L1A count[23:0], trigger BC position[8:0], n_samples[3:0], 43'b0}
//   data    {4'h1, stream[4:0], slot[2:0], sample[3:0], 8'b0,
//            quality pair[7:0], energy pair[27:0], raw pair[23:0]}
//   trailer {4'hF, data word count[15:0], 64'b0}
// Each data word takes two cycles (RAM read, FIFO write), and the state
// machine waits while the output FIFO is full.
// Registers (one-cycle read latency): 0 l1_latency (default 100 BC, the
// 2.5 us of Phase 1), 1 n_samples (default 1), 2 n_pre (default 0),
// 3 L1A count (read only), 4 {L1A FIFO overflow} (read only).
// Readout limit: an event is N x 6 x n_samples + 2 words and the GBT side
// reads one word per bunch crossing, so the last word of an event must leave
// the buffers before they wrap, i.e. the backlog plus l1_latency + n_pre must
// stay below 512 bunch crossings. The default (one sample, the triggered
// bunch crossing: 194 words for 32 streams) meets this; multi-sample
// (noise-mode) readout needs fewer streams or a lower L1A rate.
// The 512-deep circular buffers, the L1A buffering and the 84-bit output
// FIFO read at 40 MHz follow the spec; the buffer organisation per stream,
// the word formats and the register map are this design's choices.
module tdaq_readout
  import lar_pkg::*;
#(
  parameter int unsigned N         = N_TT,
  parameter int unsigned DEPTH_BC  = 512,
  parameter int unsigned L1A_DEPTH = 8
) (
  input  logic        clk_ipb,
  input  logic        rst_ipb,
  input  mm_req_t     mm_req,
  output mm_rsp_t     mm_rsp,
  input  logic        clk,            // ttc_240_clk
  input  logic        rst,
  input  user_mon_t   mon [N],
  input  logic        l1a,
  input  logic        clk_rd,         // GBT side, 40 MHz
  input  logic        rst_rd,
  input  logic        rd,
  output logic [83:0] rd_data,
  output logic        rd_empty
);
  localparam int unsigned BW = $clog2(DEPTH_BC);
  localparam int unsigned AW = BW + 3;
  localparam int unsigned SW = $clog2(N);

  // ------------------------------------------------------------ registers
  logic [BW-1:0] l1_latency;
  logic [3:0]    n_samples, n_pre;
  logic [23:0]   l1a_count;
  logic          l1a_ovf;
  always_ff @(posedge clk_ipb) begin
    if (rst_ipb) begin
      l1_latency <= BW'(100); n_samples <= 4'd1; n_pre <= 4'd0; mm_rsp <= '0;
    end else begin
      if (mm_req.write) begin
        if (mm_req.address == 24'd0) l1_latency <= mm_req.writedata[BW-1:0];
        if (mm_req.address == 24'd1) n_samples  <= mm_req.writedata[3:0];
        if (mm_req.address == 24'd2) n_pre      <= mm_req.writedata[3:0];
      end
      mm_rsp.readdatavalid <= mm_req.read;
      case (mm_req.address)
        24'd0:   mm_rsp.readdata <= 32'(l1_latency);
        24'd1:   mm_rsp.readdata <= 32'(n_samples);
        24'd2:   mm_rsp.readdata <= 32'(n_pre);
        24'd3:   mm_rsp.readdata <= 32'(l1a_count);
        24'd4:   mm_rsp.readdata <= 32'(l1a_ovf);
        default: mm_rsp.readdata <= '0;
      endcase
    end
  end

  // ------------------------------------------------------------ circular buffers
  logic [BW-1:0] wbc;          // bunch crossing being written (raw samples)
  logic [2:0]    wslot;
  always_ff @(posedge clk) begin
    if (rst) begin
      wbc <= '0; wslot <= '0;
    end else if (mon[0].valid) begin
      if (mon[0].sop) begin
        wbc <= wbc + 1'b1; wslot <= 3'd1;
      end else wslot <= wslot + 1'b1;
    end
  end
  wire [BW-1:0] cur_bc   = mon[0].sop ? wbc + 1'b1 : wbc;
  wire [2:0]    cur_slot = mon[0].sop ? 3'd0 : wslot;

  logic [AW-1:0] raddr;
  logic [23:0]   raw_q [N];
  logic [35:0]   etq_q [N];
  for (genvar s = 0; s < N; s++) begin : g_buf
    logic [23:0] raw_mem [2**AW];
    logic [35:0] etq_mem [2**AW];
    always_ff @(posedge clk) begin
      if (mon[s].valid) begin
        raw_mem[{cur_bc, cur_slot}]          <= mon[s].raw_adc;
        etq_mem[{cur_bc - BW'(2), cur_slot}] <= {mon[s].quality, mon[s].transverse_e_id};
      end
      raw_q[s] <= raw_mem[raddr];
      etq_q[s] <= etq_mem[raddr];
    end
  end

  // ------------------------------------------------------------ L1A FIFO
  logic [BW-1:0] l1a_bc;
  logic          l1a_empty, l1a_pop;
  sync_fifo #(.WIDTH(BW), .DEPTH(L1A_DEPTH)) u_l1a (
    .clk, .rst, .wr_en(l1a), .wr_data(wbc), .rd_en(l1a_pop), .rd_data(l1a_bc),
    .empty(l1a_empty), .full(), .overflow(l1a_ovf), .underflow(), .level());

  // ------------------------------------------------------------ readout FSM
  typedef enum logic [2:0] {R_IDLE, R_HEADER, R_READ, R_WRITE, R_TRAILER} rstate_t;
  rstate_t       st;
  logic [BW-1:0] bc0;
  logic [3:0]    smp;
  logic [SW-1:0] strm;
  logic [2:0]    slt;
  logic [15:0]   nwords;
  logic [83:0]   wdata;
  logic          wen, wfull;

  assign raddr = {bc0 + BW'(smp), slt};

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= R_IDLE; wen <= 1'b0; l1a_pop <= 1'b0; l1a_count <= '0;
      bc0 <= '0; smp <= '0; strm <= '0; slt <= '0; nwords <= '0; wdata <= '0;
    end else begin
      wen <= 1'b0; l1a_pop <= 1'b0;
      case (st)
        R_IDLE:
          if (!l1a_empty && !l1a_pop) begin
            bc0 <= l1a_bc - l1_latency - BW'(n_pre);
            smp <= '0; strm <= '0; slt <= '0; nwords <= '0;
            st  <= R_HEADER;
          end
        R_HEADER:
          if (!wfull) begin
            wen   <= 1'b1;
            wdata <= {4'hA, l1a_count, l1a_bc - l1_latency, n_samples, 43'b0};
            l1a_count <= l1a_count + 1'b1;
            l1a_pop <= 1'b1;
            st <= R_READ;
          end
        R_READ: st <= R_WRITE;      // RAM output valid next cycle
        R_WRITE:
          if (!wfull && !wen) begin
            wen    <= 1'b1;
            wdata  <= {4'h1, 5'(strm), slt, smp, 8'b0, etq_q[strm][35:28], etq_q[strm][27:0], raw_q[strm]};
            nwords <= nwords + 1'b1;
            st     <= R_READ;
            if (slt == 3'(SLOTS_240 - 1)) begin
              slt <= '0;
              if (strm == SW'(N - 1)) begin
                strm <= '0;
                if (smp == n_samples - 1'b1) st <= R_TRAILER;
                else smp <= smp + 1'b1;
              end else strm <= strm + 1'b1;
            end else slt <= slt + 1'b1;
          end
        R_TRAILER:
          if (!wfull && !wen) begin
            wen   <= 1'b1;
            wdata <= {4'hF, nwords, 64'b0};
            st    <= R_IDLE;
          end
        default: st <= R_IDLE;
      endcase
    end
  end

  async_fifo #(.WIDTH(84), .DEPTH(512)) u_out (
    .wclk(clk), .wrst(rst), .wr_en(wen), .wr_data(wdata), .wfull,
    .rclk(clk_rd), .rrst(rst_rd), .rd_en(rd), .rd_data, .rempty(rd_empty), .rlevel());
endmodule
