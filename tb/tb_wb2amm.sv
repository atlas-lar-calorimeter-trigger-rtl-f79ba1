// Testbench of the Wishbone to Avalon-MM adapter. A register-file slave
// model answers reads after a random 1-4 cycle delay, and never answers
// addresses at or above 0x100. Random writes and reads are checked against a
// shadow memory; write ack must come at the first clock edge after the request, a read ack
// one cycle after readdatavalid, and an unanswered read must end with err
// after TIMEOUT cycles. The number of timeouts is counted and must be nonzero.
module tb_wb2amm;
  import lar_pkg::*;
  localparam int TIMEOUT = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  ipb_wbus_t ib = '0; ipb_rbus_t ob;
  mm_req_t req; mm_rsp_t rsp = '0;
  wb2amm #(.TIMEOUT(TIMEOUT)) dut (.clk, .rst, .ipb_in(ib), .ipb_out(ob), .mm_req(req), .mm_rsp(rsp));

  logic [31:0] mem [256];
  logic [31:0] shadow [256];
  int pend = -1; logic [7:0] pend_a;
  always @(posedge clk) begin
    rsp.readdatavalid <= 0;
    if (req.write) mem[req.address[7:0]] <= req.writedata;
    if (req.read && req.address < 24'h100) begin pend <= 1 + int'($urandom % 4); pend_a <= req.address[7:0]; end
    else if (pend > 0) pend <= pend - 1;
    if (pend == 1) begin rsp.readdatavalid <= 1; rsp.readdata <= mem[pend_a]; pend <= -1; end
  end

  int n_to = 0;
  task automatic xfer(bit wr, int a, logic [31:0] d, output logic [31:0] q, output bit err, output int cyc);
    @(negedge clk); ib.addr = 32'(a); ib.wdata = d; ib.write = wr; ib.strobe = 1; cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!ob.ack && !ob.err && cyc < 100);
    q = ob.rdata; err = ob.err;
    @(negedge clk); ib.strobe = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] q; bit err; int cyc;
    for (int i = 0; i < 256; i++) begin mem[i] = 0; shadow[i] = 0; end
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 400; i++) begin
      int a; a = int'($urandom % 64);
      if ($urandom % 2) begin
        logic [31:0] d; d = $urandom;
        xfer(1, a, d, q, err, cyc); shadow[a] = d;
        checks++; if (err || cyc != 1) begin failures++; $display("write cyc %0d err %0d", cyc, err); end
      end else if ($urandom % 10 == 0) begin
        xfer(0, 'h100 + a, 0, q, err, cyc); n_to++;
        checks++; if (!err || cyc != TIMEOUT + 2) begin failures++; $display("timeout cyc %0d err %0d", cyc, err); end
      end else begin
        xfer(0, a, 0, q, err, cyc);
        checks++; if (err || q !== shadow[a] || cyc < 4 || cyc > 7) begin failures++; $display("read a=%0d q=%h exp %h cyc %0d", a, q, shadow[a], cyc); end
      end
    end
    checks++; if (n_to == 0) begin failures++; $display("no timeout"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
