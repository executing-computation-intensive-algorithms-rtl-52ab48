// tag_wave_pkg -- test stimulus for the RF-ID detector testbenches.
//
// Produces the ADC samples of a glitch-encoded tag packet as the detector would see
// it at 24 samples per bit: 8 start ZEROs, two dead bits, a synchronising ONE and 64
// ID bits, first ID bit = bit 63. A ONE is a 6-sample pulse in the first quarter of
// its bit period (phase 0..5), a ZERO a 6-sample pulse in the third quarter (phase
// 12..17). A deterministic pseudo-random noise of +/-NOISE rides on a constant
// floor. Also gives the five-point sum the detector's filter produces, and a
// reference CRC-16 (x^16 + x^15 + x^2 + 1, start 0xFFFF, MSB first) to build IDs
// whose last 16 bits make the whole 64-bit word check to zero.
package tag_wave_pkg;

  localparam int SPB   = 24;      // samples per bit
  localparam int NBITS = 75;      // bits per packet
  localparam int BASE  = 300;     // noise floor
  localparam int NOISE = 20;      // +/- noise amplitude
  localparam int AMP   = 700;     // pulse height above the floor

  // Kinds of bit slot.
  localparam int K_NONE = 0, K_ZERO = 1, K_ONE = 2;

  // Independent noise value for sample i.
  function automatic int noise_at(int i);
    int unsigned h;
    h = i * 32'd1103515245 + 32'd12345;
    h = h ^ (h >> 13);
    h = h * 32'd2654435761;
    return int'((h >> 8) % (2 * NOISE + 1)) - NOISE;
  endfunction

  // Kind of bit k of a packet; bad_start != 0 turns start bit bad_start-1 into a ONE.
  function automatic int bit_kind(int k, logic [63:0] id, int bad_start);
    if (k < 8)   return (bad_start != 0 && k == bad_start - 1) ? K_ONE : K_ZERO;
    if (k < 10)  return K_NONE;
    if (k == 10) return K_ONE;
    return id[63 - (k - 11)] ? K_ONE : K_ZERO;
  endfunction

  // Pulse contribution of a packet starting at sample s0.
  function automatic int pulse_at(int i, int s0, logic [63:0] id, int bad_start);
    int rel, k, ph, kind;
    rel = i - s0;
    if (rel < 0 || rel >= NBITS * SPB) return 0;
    k    = rel / SPB;
    ph   = rel % SPB;
    kind = bit_kind(k, id, bad_start);
    if (kind == K_ONE  && ph <= 5)             return AMP;
    if (kind == K_ZERO && ph >= 12 && ph <= 17) return AMP;
    return 0;
  endfunction

  // CRC register after shifting the top nbits of v (MSB first).
  function automatic logic [15:0] crc_ref(logic [63:0] v, int nbits);
    logic [15:0] c;
    logic        fb;
    c = 16'hFFFF;
    for (int i = 63; i > 63 - nbits; i--) begin
      fb = v[i] ^ c[15];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h8005;
    end
    return c;
  endfunction

  // 64-bit ID: 48 data bits followed by their CRC, so the full word checks to zero.
  function automatic logic [63:0] make_id(logic [47:0] data);
    logic [63:0] v;
    v = {data, 16'h0000};
    return {data, crc_ref(v, 48)};
  endfunction

endpackage
