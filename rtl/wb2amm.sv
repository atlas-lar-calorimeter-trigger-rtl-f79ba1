// Wishbone (IPbus slave port) to Avalon-MM adapter.
//
// The IPbus controller's address fabric hands each slave a Wishbone-style
// bus: strobe, write, address, write data, answered by ack or err with read
// data. This adapter turns one such bus into the Avalon-MM request used by
// the firmware blocks. A write strobe becomes a one-cycle Avalon write and is
// acknowledged in the next cycle. A read strobe becomes a one-cycle Avalon
// read; the transaction is acknowledged when readdatavalid returns, or ends
// with err after TIMEOUT cycles without an answer. The strobe is expected to
// stay high until ack or err (IPbus rule); a new transaction starts only
// after the strobe has dropped. Addresses are passed through (low 24 bits).
// The adapter's existence and role follow the spec; its timing is this
// design's own.
module wb2amm
  import lar_pkg::*;
#(
  parameter int unsigned TIMEOUT = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  ipb_wbus_t ipb_in,
  output ipb_rbus_t ipb_out,
  output mm_req_t   mm_req,
  input  mm_rsp_t   mm_rsp
);
  typedef enum logic [1:0] {IDLE, WAIT_READ, DONE} state_t;
  state_t state;
  logic [$clog2(TIMEOUT+1)-1:0] tmr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; mm_req <= '0; ipb_out <= '0; tmr <= '0;
    end else begin
      mm_req.write <= 1'b0;
      mm_req.read  <= 1'b0;
      ipb_out.ack  <= 1'b0;
      ipb_out.err  <= 1'b0;
      case (state)
        IDLE:
          if (ipb_in.strobe) begin
            mm_req.address   <= ipb_in.addr[23:0];
            mm_req.writedata <= ipb_in.wdata;
            if (ipb_in.write) begin
              mm_req.write <= 1'b1;
              ipb_out.ack  <= 1'b1;
              state        <= DONE;
            end else begin
              mm_req.read <= 1'b1;
              tmr         <= '0;
              state       <= WAIT_READ;
            end
          end
        WAIT_READ:
          if (mm_rsp.readdatavalid) begin
            ipb_out.rdata <= mm_rsp.readdata;
            ipb_out.ack   <= 1'b1;
            state         <= DONE;
          end else if (tmr == ($bits(tmr))'(TIMEOUT)) begin
            ipb_out.err <= 1'b1;
            state       <= DONE;
          end else tmr <= tmr + 1'b1;
        DONE:
          if (!ipb_in.strobe && !ipb_out.ack && !ipb_out.err) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // one transaction per strobe: a request is never issued while one is pending
  assert property (@(posedge clk) disable iff (rst) mm_req.read |-> !mm_req.write);
endmodule
