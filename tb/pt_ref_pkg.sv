// pt_ref_pkg: reference model of the Pan-Tompkins filter chain for the testbenches.
//
// Computes every stage in its direct, non-recursive form from a history of inputs,
// so that it shares no structure with the RTL (which uses recursive sums):
//   low-pass   FIR with the triangular taps 1,2,3,4,5,6,5,4,3,2,1, then /32
//   high-pass  32*x[n-16] minus the sum of x[n..n-31], then /32
//   derivative (2x[n] + x[n-1] - x[n-3] - 2x[n-4]) / 8
//   square     x^2 / 32
//   integrator sum of the last WIN squares / WIN
// Divisions by powers of two round toward minus infinity, as the RTL shifts do.
// Also holds helpers shared by the testbenches: a synthetic ECG generator and the
// software decision step that the host processor runs on the integrated signal.
package pt_ref_pkg;

  // floor(a / 2^s) for signed values
  function automatic longint fdiv(longint a, int s);
    return a >>> s;
  endfunction

  class stage_hist;
    longint h[$];          // h[0] = newest
    int     depth;
    function new(int depth); this.depth = depth; h = {}; endfunction
    function void push(longint v);
      h.push_front(v);
      if (h.size() > depth) void'(h.pop_back());
    endfunction
    function longint at(int k);   // x[n-k], zero before the first sample
      return (k < h.size()) ? h[k] : 64'sd0;
    endfunction
    function void reset(); h = {}; endfunction
  endclass

  typedef struct {
    longint lp, bp, deriv, sq, mwi;
  } chain_out_t;

  class chain_ref;
    int        win;
    stage_hist xin, lpin, bpin, sqin;

    function new(int win = 32);
      this.win = win;
      xin  = new(16);
      lpin = new(40);
      bpin = new(8);
      sqin = new(win + 1);
    endfunction

    function void reset();
      xin.reset(); lpin.reset(); bpin.reset(); sqin.reset();
    endfunction

    static function longint lp_tap(int k);
      return (k <= 5) ? k + 1 : 11 - k;   // k = 0..10
    endfunction

    function longint lowpass(longint x);
      longint acc = 0;
      xin.push(x);
      for (int k = 0; k <= 10; k++) acc += lp_tap(k) * xin.at(k);
      return fdiv(acc, 5);
    endfunction

    function longint highpass(longint x);
      longint acc = 0;
      lpin.push(x);
      for (int k = 0; k < 32; k++) acc += lpin.at(k);
      return fdiv(32 * lpin.at(16) - acc, 5);
    endfunction

    function longint derivative(longint x);
      bpin.push(x);
      return fdiv(2*bpin.at(0) + bpin.at(1) - bpin.at(3) - 2*bpin.at(4), 3);
    endfunction

    static function longint square(longint x);
      return (x * x) >> 5;
    endfunction

    function longint mwi(longint x);
      longint acc = 0;
      sqin.push(x);
      for (int k = 0; k < win; k++) acc += sqin.at(k);
      return acc / win;
    endfunction

    function chain_out_t push(longint x);
      chain_out_t o;
      o.lp    = lowpass(x);
      o.bp    = highpass(o.lp);
      o.deriv = derivative(o.bp);
      o.sq    = square(o.deriv);
      o.mwi   = mwi(o.sq);
      return o;
    endfunction
  endclass

  // Synthetic ECG at 200 Hz. ecg_wave gives sample n when it lies 'ph' samples
  // into the current beat: baseline wander, then P, Q, R (peak at ph = 56), S and
  // T waves scaled by 'gain', plus a little noise. Amplitudes are in counts of a
  // 16-bit converter. ecg_sample is a regular rhythm of one beat every 'period'.
  localparam int ECG_R_PEAK = 56;

  function automatic longint ecg_wave(int n, int ph, real gain = 1.0);
    real w = 0.0;
    real t = real'(n) / 200.0;
    longint v;
    if (ph >= 20 && ph < 36)  w += 1200.0 * $sin(3.14159265 * real'(ph - 20) / 16.0); // P
    if (ph >= 50 && ph < 53)  w -= real'((ph - 49) * 1500);                           // Q
    if (ph >= 53 && ph < 57)  w += real'((ph - 52) * 4000);                           // R up
    if (ph >= 57 && ph < 61)  w += real'((61 - ph) * 4000 - 6000);                    // R down, S
    if (ph >= 61 && ph < 64)  w -= real'((64 - ph) * 1500);                           // S back
    if (ph >= 90 && ph < 130) w += 2500.0 * $sin(3.14159265 * real'(ph - 90) / 40.0); // T
    v = longint'(gain * w + 1500.0 * $sin(2.0 * 3.14159265 * 0.3 * t));              // + wander
    v += longint'($urandom_range(0, 200)) - 100;                                      // noise
    return v;
  endfunction

  function automatic longint ecg_sample(int n, int period);
    return ecg_wave(n, n % period);
  endfunction

  // Simplified Pan-Tompkins decision on the integrated signal, as the host runs it:
  // a local maximum is a QRS if it exceeds a threshold a quarter of the way from the
  // running noise-peak estimate to the running signal-peak estimate and lies more
  // than 200 ms (40 samples) after the previous QRS; otherwise it updates the noise
  // estimate. Both estimates start from the first 'learn' samples (half their peak
  // and half their mean). Returns the sample indices of QRS peaks at or after 'learn'.
  function automatic void qrs_decide(const ref longint mwi[$], input int learn,
                                     ref int det[$]);
    real    spki = 0.0, npki = 0.0, thr;
    longint mx = 0;
    int     last = -1000;
    det = {};
    for (int n = 0; n < learn; n++) begin
      if (mwi[n] > mx) mx = mwi[n];
      npki += real'(mwi[n]);
    end
    spki = 0.5 * real'(mx);
    npki = 0.5 * npki / real'(learn);
    for (int n = 2; n < mwi.size(); n++) begin
      longint p = mwi[n-1];
      if (p > mwi[n-2] && p >= mwi[n]) begin
        thr = npki + 0.25 * (spki - npki);
        if (real'(p) > thr && (n - 1 - last) > 40) begin
          spki = 0.125 * real'(p) + 0.875 * spki;
          last = n - 1;
          if (n - 1 >= learn) det.push_back(n - 1);
        end else begin
          npki = 0.125 * real'(p) + 0.875 * npki;
        end
      end
    end
  endfunction

endpackage
