// tb_chan_pkg: behavioural model of one track of the tape channel as seen
// by the digital read channel: head, read amplifier, analog filters and
// sampling. The written NRZ bits (+1/-1) are played back at a speed that
// the testbench may vary; the restored full-response waveform follows the
// written bit, with linear transitions half a bit wide centred on the bit
// boundaries, so its zero crossings fall on the boundaries. Optionally a
// one-tap echo (inter-symbol interference of the analog path) and uniform
// noise are added, and the result is quantised like the 6-bit converter.
package tb_chan_pkg;
  class track_chan;
    bit   bits[$];       // written channel bits
    real  pos;           // playback position in bits
    real  amp;           // amplitude in converter steps
    real  echo;          // weight of the previous sample
    int   noise;         // peak noise in converter steps
    real  prev;

    function new(real start_pos = 0.0, real amp_i = 20.0, real echo_i = 0.0, int noise_i = 0);
      pos   = start_pos;
      amp   = amp_i;
      echo  = echo_i;
      noise = noise_i;
      prev  = 0.0;
    endfunction

    function real nrz(input int i);
      if (i < 0 || i >= bits.size()) return -1.0;
      return bits[i] ? 1.0 : -1.0;
    endfunction

    function real level(input real x);
      int  i;
      real f;
      i = int'($floor(x));
      f = x - i;
      if (f < 0.25)      return nrz(i - 1) * (0.25 - f) * 2.0 + nrz(i) * (0.25 + f) * 2.0;
      else if (f > 0.75) return nrz(i) * (1.25 - f) * 2.0 + nrz(i + 1) * (f - 0.75) * 2.0;
      else               return nrz(i);
    endfunction

    // Next converter sample; the tape advances bits_per_sample bits.
    function int sample(input real bits_per_sample, input int lo = -32, input int hi = 31);
      real v;
      int  q;
      v    = amp * level(pos);
      q    = int'(v + echo * prev) + (noise > 0 ? int'($urandom_range(2 * noise)) - noise : 0);
      prev = v;
      pos  = pos + bits_per_sample;
      if (q > hi) q = hi;
      if (q < lo) q = lo;
      return q;
    endfunction

    function bit done();
      return pos >= bits.size();
    endfunction
  endclass
endpackage
