// User code array: one user_code_stream per trigger-tower stream, as the
// spec foresees one user code instance per input stream, plus the decoding
// of their configuration registers on the slow-control port.
// Register word address = {stream[4:0], super cell[3:0], parameter[3:0]}
// (see user_code_stream for the parameter numbers); reads return the
// register one cycle later. Stream s of the input feeds out_word[s] and
// mon[s]; the latency of every stream is the same fixed LAT_BC bunch
// crossings.
module user_code
  import lar_pkg::*;
#(
  parameter int unsigned N      = N_TT,
  parameter int unsigned N_TAPS = 5,
  parameter int unsigned LAT_BC = 5
) (
  input  logic        clk_ipb,
  input  logic        rst_ipb,
  input  mm_req_t     mm_req,
  output mm_rsp_t     mm_rsp,
  input  logic        clk,
  input  logic        rst,
  input  remap_word_t in_word  [N],
  output user_word_t  out_word [N],
  output user_mon_t   mon      [N]
);
  logic [13:0] rdata [N];
  wire  [4:0]  sel = mm_req.address[12:8];

  for (genvar s = 0; s < N; s++) begin : g_stream
    user_code_stream #(.N_TAPS(N_TAPS), .LAT_BC(LAT_BC)) u_stream (
      .clk_ipb, .cfg_we(mm_req.write && sel == 5'(s)), .cfg_addr(mm_req.address[7:0]),
      .cfg_wdata(mm_req.writedata[13:0]), .cfg_rdata(rdata[s]),
      .clk, .rst, .in_word(in_word[s]), .out_word(out_word[s]), .mon(mon[s]));
  end

  always_ff @(posedge clk_ipb) begin
    if (rst_ipb) mm_rsp <= '0;
    else begin
      mm_rsp.readdatavalid <= mm_req.read;
      mm_rsp.readdata      <= (32'(sel) < 32'(N)) ? {18'b0, rdata[sel]} : '0;
    end
  end
endmodule
