// rfid_pkg -- types and constants shared by the RF-ID pulse-peak-detection reader.
//
// The reader samples the antenna signal with a 12-bit ADC, sums five consecutive
// samples, and decodes glitch-encoded tag packets (8 start ZERO bits, two dead bits,
// a synchronising ONE, 64 ID bits of which the last 16 are a CRC-16). The widths and
// constants below are the ones every stage agrees on.
package rfid_pkg;

  // ADC sample width (THS1206 is a 12-bit converter).
  localparam int unsigned SAMPLE_W = 12;
  // Five-point moving sum: 5 * 4095 = 20475 needs 15 bits.
  localparam int unsigned FILT_W   = 15;
  // Tag ID including the 16 CRC bits.
  localparam int unsigned ID_W     = 64;
  // Sample counter width used by the look-forward stages (distances up to 63).
  localparam int unsigned CNT_W    = 7;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [FILT_W-1:0]   filt_t;
  typedef logic [ID_W-1:0]     tag_id_t;

  // Host packet header byte.
  localparam logic [7:0] PACKET_HEADER = 8'hAA;

  // CRC-16 generator x^16 + x^15 + x^2 + 1 applied serially, MSB first.
  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  // Serial CRC-16 step: one message bit into the shift register.
  function automatic logic [15:0] crc16_step(logic [15:0] crc, logic bit_in);
    logic fb;
    logic [15:0] nxt;
    fb  = bit_in ^ crc[15];
    nxt = {crc[14:0], fb};
    nxt[2]  = crc[1] ^ fb;
    nxt[15] = crc[14] ^ fb;
    return nxt;
  endfunction

endpackage
