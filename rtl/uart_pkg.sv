// Shared types of the serial transmitter/receiver pair.
//
// frame_state_t names the eleven positions of a serial frame. The transmitter
// and the receiver both walk through it, one state per bit: IDLE, START, the
// eight data bits D0..D7 (D0 carries data[7], D7 carries data[0], so the byte
// goes out most significant bit first) and STOP.
//
// rate_sel_t is the two-bit rate select {s1, s0} of selectable_clock:
// 00 = 16 Hz, 01 = 1 Hz, 10 = 10 Hz, 11 = 160 Hz from a 50 MHz board clock.
package uart_pkg;

  typedef enum logic [3:0] {
    ST_IDLE  = 4'd0,
    ST_START = 4'd1,
    ST_D0    = 4'd2,
    ST_D1    = 4'd3,
    ST_D2    = 4'd4,
    ST_D3    = 4'd5,
    ST_D4    = 4'd6,
    ST_D5    = 4'd7,
    ST_D6    = 4'd8,
    ST_D7    = 4'd9,
    ST_STOP  = 4'd10
  } frame_state_t;

  typedef enum logic [1:0] {
    RATE_16HZ  = 2'b00,
    RATE_1HZ   = 2'b01,
    RATE_10HZ  = 2'b10,
    RATE_160HZ = 2'b11
  } rate_sel_t;

  // Index into the data byte of the bit carried by data state s (D0 -> 7).
  function automatic logic [2:0] bit_index(frame_state_t s);
    return 3'(4'(ST_D7) - 4'(s));
  endfunction

endpackage
