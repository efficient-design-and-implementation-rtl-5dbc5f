// Shared types and constants of the multi-type digital modulator.
//
// Every modulation type is produced by the same mechanism: a 256-sample sine
// table read from a start sample (the phase), stepped at one of several sample
// rates (the frequency) and scaled about mid-scale (the amplitude). A symbol is
// therefore fully described by a carrier_cfg_t. Phases are in table samples
// (256 samples = 360 degrees); gains are unsigned Q1.8 (256 = full amplitude).
// The amplitude steps 1/4, 1/2, 0.33 and 0.77 come from the reference design; their Q1.8
// codes are this design's rounding of them.
package mod_pkg;

  localparam int unsigned SAMPLES   = 256;  // samples per carrier cycle

  typedef logic [7:0] phase_t;               // start sample, 0..255
  typedef logic [8:0] gain_t;                // Q1.8 amplitude

  localparam gain_t GAIN_ZERO    = 9'd0;
  localparam gain_t GAIN_QUARTER = 9'd64;
  localparam gain_t GAIN_THIRD   = 9'd85;    // 0.33
  localparam gain_t GAIN_HALF    = 9'd128;
  localparam gain_t GAIN_077     = 9'd197;   // 0.77
  localparam gain_t GAIN_FULL    = 9'd256;

  localparam logic [7:0] MID_SCALE = 8'h80;  // output for "no carrier"

  // Carrier settings of one symbol. rate selects the sample clock:
  // 0 = base rate (one carrier cycle per symbol), r = r+1 cycles per symbol.
  typedef struct packed {
    phase_t     phase;
    gain_t      gain;
    logic [1:0] rate;
  } carrier_cfg_t;

  // Design one modulation types (SEL[1:0], Table 2 of the reference design)
  typedef enum logic [1:0] {
    D1_ASK = 2'b00, D1_PSK = 2'b01, D1_DPSK = 2'b10, D1_FSK = 2'b11
  } d1_sel_e;

  // Design two modulation types (Tables 3 and 4)
  typedef enum logic [1:0] {
    D2_ASK4 = 2'b00, D2_FSK4 = 2'b01, D2_QPSK = 2'b10, D2_DQPSK = 2'b11
  } d2_sel_e;

  // Design three modulation types (Table 5); 2'b11 behaves as 16-QAM
  typedef enum logic [1:0] {
    D3_PSK8 = 2'b00, D3_QAM8 = 2'b01, D3_QAM16 = 2'b10, D3_QAM16B = 2'b11
  } d3_sel_e;

endpackage
