// Amplitude scaler: shrinks a carrier sample toward mid-scale.
//
// The unsigned sample is offset to a signed value about 0x80, multiplied by an
// unsigned Q1.8 gain, shifted right by 8 (arithmetic, rounding toward minus
// infinity) and offset back:  scaled = 0x80 + floor((sample - 0x80) * gain / 256).
// Gains 64 and 128 are exactly the right shifts by 2 and 1 used for 4-ASK;
// 85 and 197 give the 0.33 and 0.77 amplitudes of 8-QAM and 16-QAM; 0 gives a
// constant 0x80 (no carrier) and 256 passes the sample unchanged. Scaling by
// shift and offset about mid-scale follows the reference design; one small
// constant-gain product covering all six levels is this design's choice.
//
// Interface: purely combinational, sample/gain -> scaled.
module amp_scaler
  import mod_pkg::*;
(
  input  logic [7:0] sample,
  input  gain_t      gain,
  output logic [7:0] scaled
);

  logic signed [8:0]  centred;
  logic signed [18:0] product;
  logic signed [10:0] shrunk;

  always_comb begin
    centred = $signed({1'b0, sample}) - 9'sd128;
    product = centred * $signed({1'b0, gain});
    shrunk  = 11'(product >>> 8);
    scaled  = 8'(shrunk + 11'sd128);
  end

endmodule
