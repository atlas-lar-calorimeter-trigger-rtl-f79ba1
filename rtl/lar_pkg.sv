// Shared constants and stream types of the AMC-A10 trigger data path.
// The sizes (48 LTDB fibres, 8 words of 16 bits per bunch crossing at 320 MHz,
// 6 words per bunch crossing at 240 MHz, 7 at 280 MHz, 32 trigger-tower streams,
// a 3564-BC orbit) follow the specification. The struct layouts mirror the
// Avalon-ST signal lists of the block interfaces (data, error, startofpacket,
// valid); the register bus struct is this design's own simplified Avalon-MM
// (one-cycle read latency, no wait states).
package lar_pkg;

  localparam int unsigned N_FIBRES       = 48;
  localparam int unsigned WORDS_PER_BC   = 8;     // 320 MHz words per bunch crossing
  localparam int unsigned SLOTS_240      = 6;     // 240 MHz cycles per bunch crossing
  localparam int unsigned SLOTS_280      = 7;     // 280 MHz cycles per bunch crossing
  localparam int unsigned ORBIT_BCS      = 3564;  // LHC orbit length in bunch crossings
  localparam int unsigned N_TT           = 32;    // trigger-tower streams (user code instances)
  localparam int unsigned SC_PER_TT      = 12;    // super cells per trigger-tower stream
  localparam int unsigned N_FEX_OUT      = 48;    // output fibres to the FEXs

  // Border pattern carried by T8..T11 of a LOCic frame.
  localparam logic [3:0] LOCIC_BORDER    = 4'b0101;

  // Register bus (Avalon-MM subset) used by all configuration ports.
  typedef struct packed {
    logic [23:0] address;     // word address
    logic        write;
    logic        read;
    logic [31:0] writedata;
  } mm_req_t;

  typedef struct packed {
    logic [31:0] readdata;
    logic        readdatavalid;
  } mm_rsp_t;

  // IPbus Wishbone slave port as delivered by the IPbus address fabric.
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  // Raw LTDB stream from the receiver (lli_istage_ltdb_data_st).
  typedef struct packed {
    logic [15:0] data;
    logic        valid;       // receiver locked
  } ltdb_word_t;

  // Aligned super-cell stream (istage_remap_sc_data_aligned_st).
  typedef struct packed {
    logic [11:0] data;
    logic [1:0]  error;       // [1] BCID error, [0] CRC error
    logic        sop;
    logic        valid;
  } sc_word_t;

  // Remapped trigger-tower stream (remap_user_remap_data_st).
  typedef struct packed {
    logic [23:0] data;        // two 12-bit samples, [11:0] first super cell
    logic [3:0]  error;       // two error pairs, [1:0] first super cell
    logic        sop;
    logic        valid;
  } remap_word_t;

  // User code output stream (user_osum_out_data_st).
  typedef struct packed {
    logic [27:0] data;        // two 14-bit transverse energies
    logic [3:0]  error;
    logic [7:0]  quality;     // two 4-bit quality words
    logic        sop;
    logic        valid;
  } user_word_t;

  // User code monitoring streams (user_mon_monitoring_data_c).
  typedef struct packed {
    logic [23:0] raw_adc;
    logic [23:0] adc_ped;
    logic [27:0] transverse_e;
    logic [3:0]  sat_detect;
    logic [7:0]  quality;
    logic [27:0] transverse_e_id;
    logic        sop;
    logic        valid;
  } user_mon_t;

  // FEX output stream (osum_lli_fex_data_st).
  typedef struct packed {
    logic [31:0] data;
    logic        valid;
  } fex_word_t;

  // Monitoring stream of the output summing (osum_mon_monitoring_data_st).
  typedef struct packed {
    logic [31:0] data;
    logic        valid;
  } osum_mon_t;

  // CRC-8, polynomial x^8+x^2+x+1, one bit at a time, MSB first.
  function automatic logic [7:0] crc8_bit(logic [7:0] crc, logic b);
    logic fb;
    fb = crc[7] ^ b;
    return {crc[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
  endfunction

  // Unsigned saturation of a wide non-negative value to W bits.
  function automatic logic [15:0] sat_u16(logic [19:0] v);
    return (v > 20'hFFFF) ? 16'hFFFF : v[15:0];
  endfunction

endpackage
