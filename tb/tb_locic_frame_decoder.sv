// Testbench of the LOCic frame decoder: one fibre model starting at an
// arbitrary bit and word offset must be brought into lock through word and
// bit slips; after BCID synchronisation every decoded sample is compared
// with the reference pattern, and injected CRC and BCID faults must raise
// the matching error flag on exactly the corrupted frame.
module tb_locic_frame_decoder;
  import lar_pkg::*;
  import tb_pkg::*;
  localparam int ORBIT = 60;
  logic clk = 0, rst = 1;
  always #1562 clk = ~clk;
  int checks = 0, failures = 0;

  ltdb_word_t rx;
  logic bitslip, locked, bval, inj_crc = 0, inj_bcid = 0;
  sc_word_t ow;
  logic [11:0] obcid;
  logic [15:0] ccnt, bcnt;
  int nslips;

  ltdb_link_model #(.FID(5), .ORBIT(ORBIT), .START_BCID(17), .INIT_SLIP(9), .INIT_WORD(3)) link (
    .clk, .rst, .bitslip, .inject_crc(inj_crc), .inject_bcid(inj_bcid), .rx, .bitslips(nslips));
  locic_frame_decoder #(.ORBIT(ORBIT)) dut (
    .clk, .rst, .rx, .rx_bitslip(bitslip), .locked, .out_word(ow), .out_bcid(obcid),
    .out_bcid_valid(bval), .crc_err_cnt(ccnt), .bcid_err_cnt(bcnt));

  int frames_ok = 0, crc_flagged = 0, bcid_flagged = 0, k = 0;
  logic [11:0] fb; logic fbv; logic [1:0] ferr;
  always @(posedge clk) if (!rst && ow.valid) begin
    if (ow.sop) begin k = 0; fb = obcid; fbv = bval; ferr = ow.error; end
    if (ferr[0] && k == 0) crc_flagged++;
    if (ferr[1] && k == 0) bcid_flagged++;
    if (fbv && ferr == 0) begin
      checks++;
      if (ow.data !== adc_pattern(5, int'(fb), k)) begin
        failures++;
        if (failures < 5) $display("mismatch bcid=%0d ch=%0d got %h exp %h", fb, k, ow.data, adc_pattern(5, int'(fb), k));
      end
      if (k == 7) frames_ok++;
    end
    k++;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    wait (locked);
    checks++; if (nslips == 0) begin failures++; $display("no bit slip was needed"); end
    wait (bval);
    repeat (8 * 70) @(posedge clk);
    @(posedge clk iff (link.wi == 7)); inj_crc = 1; @(posedge clk); inj_crc = 0;
    repeat (8 * 10) @(posedge clk);
    @(posedge clk iff (link.wi == 7)); inj_bcid = 1; @(posedge clk); inj_bcid = 0;
    repeat (8 * 10) @(posedge clk);
    checks++; if (bval) begin failures++; $display("BCID still valid after sequence error"); end
    repeat (8 * 2 * ORBIT) @(posedge clk);
    checks++; if (!bval) begin failures++; $display("BCID not resynchronised"); end
    checks++; if (crc_flagged != 1 || ccnt != 1) begin failures++; $display("crc flagged %0d cnt %0d", crc_flagged, ccnt); end
    checks++; if (bcid_flagged != 1 || bcnt != 1) begin failures++; $display("bcid flagged %0d cnt %0d", bcid_flagged, bcnt); end
    checks++; if (frames_ok < 150) begin failures++; $display("only %0d good frames", frames_ok); end
    checks++; if (!locked) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
