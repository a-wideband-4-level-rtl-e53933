// fsk4_pkg: constants and types shared by the 4-level FSK demodulator.
//
// The demodulator tells the four IF carriers apart by counting how many
// cycles of a 5 MHz clock fit in one whole IF period.  The four nominal
// counts are the ones the design is built around:
//
//   IF carrier   period / 200 ns   count   code      data
//   52.4 kHz         95.4            95    1011111   2'b11
//   50.8 kHz         98.4            98    1100010   2'b10
//   49.2 kHz        101.6           101    1100101   2'b01
//   47.6 kHz        105.0           105    1101001   2'b00
//   anything else                          0000000   (no symbol)
//
// A count within +/-1 of a nominal value is taken as that carrier, which
// absorbs the jitter of the received IF edges.  The counter is 7 bits wide
// because 5 MHz / 47.6 kHz = 105 < 2^7, and the 200 ns clock period is well
// below the smallest difference between two carrier periods (about 0.62 us).
// The counts, codes, data mapping and tolerance follow the design's
// specification; the packing of the result into a struct is this design's own.
package fsk4_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CNT_W    = 7;   // period counter width
  localparam int unsigned NUM_SYM  = 4;   // number of FSK levels
  localparam int unsigned DATA_W   = 2;   // bits per symbol
  localparam int unsigned TOL      = 1;   // accepted count error, +/-

  typedef logic [CNT_W-1:0]  count_t;
  typedef logic [DATA_W-1:0] data_t;

  // Nominal whole-period counts, lowest first (highest IF first).
  typedef count_t count_table_t [NUM_SYM];
  typedef data_t  data_table_t  [NUM_SYM];

  localparam count_table_t NOMINAL_COUNT = '{7'd95, 7'd98, 7'd101, 7'd105};
  localparam data_table_t  NOMINAL_DATA  = '{2'b11, 2'b10, 2'b01, 2'b00};

  // Code output for a period that matches none of the carriers.
  localparam count_t NO_CODE = '0;

  // One demodulated IF period.
  typedef struct packed {
    count_t code;   // nominal count of the matched carrier, 0 if none
    data_t  data;   // 2-bit symbol, meaningful only when code != 0
  } decision_t;

endpackage
