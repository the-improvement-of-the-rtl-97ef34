// Shared types and constants of the LCD-driver memory-access scheduler.
//
// The scheduler tells a host when it may write a new frame into the
// display memory of an LCD driver IC so that the host's writing scan never
// crosses the driver's display scan. All counters and settings are 16-bit
// words, as on the simulation waveforms of the original design; the state
// codes are the ones of its state chart.
package ldi_pkg;

  // Width of every rate, line, porch and frame quantity.
  localparam int unsigned W16 = 16;
  // Width of the user frame-period setting (4 bits on the original waveforms).
  localparam int unsigned UFM_W = 4;

  typedef logic [W16-1:0] word_t;

  // States of the accessing-position state machine, with the codes of the
  // original state chart.
  typedef enum logic [3:0] {
    ST_IDLE          = 4'b0000,
    ST_FREQ_COMPARE  = 4'b0001,
    ST_FAST          = 4'b0010,
    ST_FAST_STABLE   = 4'b0011,
    ST_FAST_UNSTABLE = 4'b0100,
    ST_SLOW          = 4'b0101,
    ST_SLOW_CONTROL  = 4'b0110,
    ST_SLOW_STABLE   = 4'b0111,
    ST_SLOW_UNSTABLE = 4'b1000,
    ST_SLOW_OVERFLOW = 4'b1001,
    ST_FOLLOW        = 4'b1010,
    ST_INTERRUPT     = 4'b1011,
    ST_FLAG          = 4'b1100,
    ST_SAME          = 4'b1101
  } sm_state_e;

  // Settings held by the setting block and read by the rest of the design.
  typedef struct packed {
    word_t             wr_rate;   // host write frame rate, Hz
    word_t             dis_rate;  // panel display frame rate, Hz
    word_t             gate_line; // gate resolution (active lines per frame)
    word_t             bp;        // back porch, lines
    word_t             fp;        // front porch, lines
    logic [UFM_W-1:0]  usr_fm;    // user frame period, 0 = automatic
    logic              ignore;    // 1: host ignores overflow and follows usr_fm
  } settings_t;

endpackage
