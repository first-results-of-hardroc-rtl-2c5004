// slow_control_register: the chip's 571-bit serial configuration register.
//
// The register is loaded and read back through four pins: D (D_SC), Q (Q_SC),
// its own clock (CK_SC) and an active-low reset (rst_SC*), as the chip
// description asks of it. On every rising edge of ck the whole word moves one
// place towards bit 1 and d enters at bit N; after N clocks the first bit sent
// sits in bit 1 (table bit 1, EN_RamFull). q is bit 1, the bit that the next
// clock pushes out, so shifting N further bits reads the word back. The
// direction of the shift and the all-zero reset value are this design's
// choices. The register contents are also decoded into the named settings
// (hardroc_pkg::sc_decode), which the rest of the chip uses as static levels.
module slow_control_register
  import hardroc_pkg::*;
#(
  parameter int unsigned N = SC_BITS
) (
  input  logic         ck,
  input  logic         rst_n,
  input  logic         d,
  output logic         q,
  output logic [N-1:0] bits,
  output sc_cfg_t      cfg
);

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else        bits <= {d, bits[N-1:1]};
  end

  assign q = bits[0];

  // Decoding needs the full-length word; a shorter register (tests only)
  // leaves the upper bits zero.
  logic [SC_BITS-1:0] word;
  always_comb begin
    word = '0;
    for (int i = 0; i < int'(N) && i < int'(SC_BITS); i++) word[i] = bits[i];
  end
  assign cfg = sc_decode(word);

endmodule
