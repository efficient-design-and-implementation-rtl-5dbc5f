// Reference model shared by the modulator testbenches.
//
// Works out the expected DAC sample from first principles, independently of
// the RTL: the sine table from its formula, amplitudes in real arithmetic and
// each modulation type's code table from its phase in degrees and its
// amplitude (16-QAM from the geometry of the square constellation, with the
// edge points at 15 degrees from an axis).
package tb_mod_ref_pkg;

  typedef struct {
    int phase;  // start sample
    int gain;   // Q1.8
    int div;    // source clocks per carrier sample
  } ref_cfg_t;

  function automatic int sine(input int n);
    int m;
    m = n % 256;
    if (m == 0 || m == 128) return 128;
    return int'($floor(127.5 + 127.5 * $sin(2.0 * $acos(-1.0) * m / 256.0)));
  endfunction

  function automatic int scale(input int s, input int g);
    return 128 + int'($floor(real'((s - 128) * g) / 256.0));
  endfunction

  function automatic int deg2ph(input real deg);
    return int'($floor(deg * 256.0 / 360.0 + 0.5)) % 256;
  endfunction

  // bits per symbol of a (dsg, sel) pair; dsg 0..2
  function automatic int bits_per_sym(input int dsg, input int sel);
    if (dsg == 0) return 1;
    if (dsg == 1) return 2;
    return (sel >= 2) ? 4 : 3;
  endfunction

  // does the mode transmit the differentially encoded code
  function automatic bit is_diff(input int dsg, input int sel);
    return (dsg == 0 && sel == 2) || (dsg == 1 && sel == 3);
  endfunction

  function automatic ref_cfg_t cfg(input int dsg, input int sel, input int code, input int sdiv);
    ref_cfg_t c;
    real deg, a;
    int q, pos;
    int gray[8];
    gray = '{0, 1, 3, 2, 6, 7, 5, 4};
    c.phase = 0; c.gain = 256; c.div = sdiv;
    case (dsg)
      0: case (sel)
           0: c.gain  = (code != 0) ? 256 : 0;
           1, 2: c.phase = (code != 0) ? 128 : 0;
           default: c.div = (code != 0) ? sdiv / 2 : sdiv;
         endcase
      1: case (sel)
           0: c.gain = (code == 0) ? 0 : (code == 1) ? 64 : (code == 2) ? 128 : 256;
           1: c.div  = sdiv / (code + 1);
           default: begin
             // Gray-coded QPSK: 11 45, 01 135, 00 225, 10 315 degrees
             deg = (code == 3) ? 45.0 : (code == 1) ? 135.0 : (code == 0) ? 225.0 : 315.0;
             c.phase = deg2ph(deg);
           end
         endcase
      default: case (sel)
           0: begin
             for (int i = 0; i < 8; i++)
               if (gray[i] == code) c.phase = deg2ph(22.5 + 45.0 * i);
           end
           1: begin
             q = code >> 1;
             deg = (q == 3) ? 45.0 : (q == 2) ? 135.0 : (q == 0) ? 225.0 : 315.0;
             c.phase = deg2ph(deg);
             c.gain  = ((code & 1) != 0) ? 256 : 85;
           end
           default: begin
             pos = code & 3;
             a = (pos == 2) ? 15.0 : (pos == 1) ? 75.0 : 45.0;
             if (!code[3]) a = 180.0 - a;
             if (!code[2]) a = 360.0 - a;
             c.phase = deg2ph(a);
             c.gain  = (pos == 3) ? 256 : (pos == 0) ? 85 : 197;
           end
         endcase
    endcase
    return c;
  endfunction

  // expected sample u clocks into a symbol
  function automatic int sample_at(input ref_cfg_t c, input int u);
    return scale(sine(c.phase + (u / c.div) % 256), c.gain);
  endfunction

endpackage
