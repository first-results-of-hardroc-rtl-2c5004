// hardroc_pkg: sizes, frame layout and slow-control settings shared by the
// HaRDROC digital blocks.
//
// The chip stores, for every accepted trigger, one 160-bit frame:
// 8 header bits (the chip tag from slow control), a 24-bit bunch crossing
// number and 2 hit bits for each of the 64 channels. 128 frames fit in the
// on-chip memory (128 x 160 = 20480 bits). These numbers come from the chip's
// architecture description; the order of the three fields inside the frame
// and the pairing of the two hit bits of a channel are this design's choice:
//   frame = {header[7:0], bcid[23:0], hits[127:0]},  hits[2*ch+1 : 2*ch] = {D1, D0}
//
// The slow-control word is 571 bits long. Bit k of the chip's bit table
// (numbered 1..571) is bit k-1 of the vector held by slow_control_register;
// sc_decode() turns that vector into the named settings of sc_cfg_t.
package hardroc_pkg;

  localparam int unsigned NCH      = 64;
  localparam int unsigned DEPTH    = 128;
  localparam int unsigned AW       = 7;                       // RAM address width
  localparam int unsigned BCID_W   = 24;
  localparam int unsigned HDR_W    = 8;
  localparam int unsigned HITS_W   = 2 * NCH;                 // 128
  localparam int unsigned FRAME_W  = HDR_W + BCID_W + HITS_W; // 160
  localparam int unsigned SC_BITS  = 571;
  localparam int unsigned DAC_W    = 10;
  localparam int unsigned GAIN_W   = 6;

  typedef struct packed {
    logic [HDR_W-1:0]  header;
    logic [BCID_W-1:0] bcid;
    logic [HITS_W-1:0] hits;
  } frame_t;

  // Digital settings (bits 1..20 and 21..84 of the table).
  typedef struct packed {
    logic              en_ramfull;      // bit 1
    logic              en_dout;         // bit 2
    logic              en_transmit_on;  // bit 3
    logic              en_out_discri;   // bit 4
    logic [HDR_W-1:0]  header;          // bits 5..12, Header 0 = bit 5
    logic              bypass_chip;     // bit 13
    logic              en_out_trig_int; // bit 14
    logic              en_trig_int;     // bit 15
    logic              en_trig_ext;     // bit 16
    logic              en_out_raz_int;  // bit 17
    logic              en_raz_int;      // bit 18
    logic              en_raz_ext;      // bit 19
    logic [NCH-1:0]    valid_trig;      // bits 21..84
  } sc_dig_t;

  // Settings that only steer the analog part; the digital blocks pass them on.
  typedef struct packed {
    logic [DAC_W-1:0]            dac0;       // bits 85..94 (B0 0 = bit 85)
    logic [DAC_W-1:0]            dac1;       // bits 95..104
    logic                        on_otadac;  // bit 105
    logic                        on_dac;     // bit 106
    logic                        on_otabg;   // bit 107
    logic [NCH-1:0]              test_ch;    // bits 108..171
    logic [NCH-1:0][GAIN_W-1:0]  gain;       // bits 172..555, 6 per channel
    logic [15:0]                 bias;       // bits 556..571: ON_pa (bit 0) .. Sw_ssc0 (bit 15)
  } sc_ana_t;

  typedef struct packed {
    sc_dig_t dig;
    sc_ana_t ana;
  } sc_cfg_t;

  // Table bit number (1-based) to vector index.
  function automatic int unsigned scb(int unsigned k);
    return k - 1;
  endfunction

  function automatic sc_cfg_t sc_decode(logic [SC_BITS-1:0] b);
    sc_cfg_t c;
    c.dig.en_ramfull      = b[scb(1)];
    c.dig.en_dout         = b[scb(2)];
    c.dig.en_transmit_on  = b[scb(3)];
    c.dig.en_out_discri   = b[scb(4)];
    for (int i = 0; i < int'(HDR_W); i++) c.dig.header[i] = b[scb(5) + i];
    c.dig.bypass_chip     = b[scb(13)];
    c.dig.en_out_trig_int = b[scb(14)];
    c.dig.en_trig_int     = b[scb(15)];
    c.dig.en_trig_ext     = b[scb(16)];
    c.dig.en_out_raz_int  = b[scb(17)];
    c.dig.en_raz_int      = b[scb(18)];
    c.dig.en_raz_ext      = b[scb(19)];
    for (int ch = 0; ch < int'(NCH); ch++) begin
      c.dig.valid_trig[ch] = b[scb(21) + ch];
      c.ana.test_ch[ch]    = b[scb(108) + ch];
      for (int g = 0; g < int'(GAIN_W); g++)
        c.ana.gain[ch][g] = b[scb(172) + GAIN_W*ch + g];
    end
    for (int i = 0; i < int'(DAC_W); i++) begin
      c.ana.dac0[i] = b[scb(85) + i];
      c.ana.dac1[i] = b[scb(95) + i];
    end
    c.ana.on_otadac = b[scb(105)];
    c.ana.on_dac    = b[scb(106)];
    c.ana.on_otabg  = b[scb(107)];
    for (int i = 0; i < 16; i++) c.ana.bias[i] = b[scb(556) + i];
    return c;
  endfunction

endpackage
