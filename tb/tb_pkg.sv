// Testbench helpers: the reference data pattern every LTDB model sends and the
// reference encoding functions of the LOCic frame (scrambler, CRC) written
// independently of the decoder.
package tb_pkg;
  // ADC sample sent by fibre fid, channel ch, in bunch crossing bcid.
  function automatic logic [11:0] adc_pattern(int fid, int bcid, int ch);
    int v;
    v = fid * 397 + bcid * 13 + ch * 101 + ((bcid * (ch + 1)) >> 2) + ((fid * bcid) & 63);
    return 12'(v);
  endfunction

  // Multiplicative scrambler x^7+x^6+1 applied to a 12-bit sample, MSB first.
  // prev: the previous 12 scrambled bits of the same channel.
  function automatic logic [11:0] scramble12(logic [11:0] d, logic [11:0] prev);
    logic [23:0] v;
    v = {prev, 12'h000};
    for (int p = 11; p >= 0; p--) v[p] = d[p] ^ v[p+6] ^ v[p+7];
    return v[11:0];
  endfunction

  function automatic logic [7:0] crc8(logic [95:0] bits);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 95; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ bits[i];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction
endpackage
