// decim_ref_pkg: bit-exact reference models used by the decimation filter
// testbenches, written independently of the RTL as plain direct-form
// convolutions, plus a small 3-bit sigma-delta modulator model that produces
// realistic input streams.
//
// Each decimate-by-2 (or by-8) stage is modelled as y[m] = sum_k h[k] x[e-k]
// with e = 2m+1 (8m+7 for the CIC): the stage output is produced when the
// sample at index e arrives. The half-band and FIR products h[k]*x are
// truncated by 6 bits (floor) before summation, as in the hardware; the sums
// are then shifted right (floor) to the output width, and the FIR output is
// clamped to 17 bits.
package decim_ref_pkg;

  typedef int sample_q_t [$];

  // Integer coefficients, units of 2^-12.
  localparam int HB_H  [11] = '{53, 0, -262, 0, 1235, 2048, 1235, 0, -262, 0, 53};
  localparam int FIR_H_HALF [14] = '{12, 16, -20, -32, 44, 54, -88, -74, 184, 100,
                                     -384, -118, 1284, 2168};

  // Counters of mechanisms seen by the references.
  int hb_trunc_events  = 0;   // products whose dropped 6 bits were non-zero
  int fir_trunc_events = 0;
  int fir_sat_events   = 0;

  function automatic sample_q_t cic_ref(sample_q_t x);
    int g [29];
    int tmp [29];
    int len;
    sample_q_t y;
    foreach (g[i]) g[i] = 0;
    g[0] = 1; len = 1;
    repeat (4) begin
      foreach (tmp[i]) tmp[i] = 0;
      for (int i = 0; i < len; i++)
        for (int j = 0; j < 8; j++) tmp[i + j] += g[i];
      len += 7;
      g = tmp;
    end
    for (int e = 7; e < x.size(); e += 8) begin
      int acc;
      acc = 0;
      for (int k = 0; k < 29; k++) if (e - k >= 0) acc += g[k] * x[e - k];
      y.push_back(acc);
    end
    return y;
  endfunction

  function automatic sample_q_t hb_ref(sample_q_t x);
    sample_q_t y;
    for (int e = 1; e < x.size(); e += 2) begin
      longint acc, p;
      acc = 0;
      for (int k = 0; k < 11; k++) if (e - k >= 0 && HB_H[k] != 0) begin
        p = longint'(HB_H[k]) * x[e - k];
        if ((p & 63) != 0) hb_trunc_events++;
        acc += p >>> 6;
      end
      y.push_back(int'(acc >>> 4));
    end
    return y;
  endfunction

  function automatic sample_q_t fir_ref(sample_q_t x);
    sample_q_t y;
    for (int e = 1; e < x.size(); e += 2) begin
      longint acc, p, r;
      acc = 0;
      for (int k = 0; k < 27; k++) if (e - k >= 0) begin
        p = longint'(FIR_H_HALF[(k <= 13) ? k : 26 - k]) * x[e - k];
        if ((p & 63) != 0) fir_trunc_events++;
        acc += p >>> 6;
      end
      r = acc >>> 7;
      if (r > 65535)       begin r = 65535;  fir_sat_events++; end
      else if (r < -65536) begin r = -65536; fir_sat_events++; end
      y.push_back(int'(r));
    end
    return y;
  endfunction

  // Second-order error-feedback modulator with an 8-level (3-bit) quantizer:
  // w = x - 2 e[n-1] + e[n-2], code = Q(w), e = level(code) - w, so the
  // output is x + (1 - z^-1)^2 e. Codes -4..+3 stand for the levels
  // (code + 0.5) / 4 of full scale; inputs up to about 0.35 never overload.
  // It stands in for the third-order modulator the filter is meant for.
  class sdm3_model;
    real e1 = 0.0, e2 = 0.0;
    function int step(real x);
      real w, lvl;
      int code;
      w = x - 2.0 * e1 + e2;
      code = int'($floor(w * 4.0));
      if (code > 3) code = 3;
      if (code < -4) code = -4;
      lvl = (code + 0.5) / 4.0;
      e2 = e1;
      e1 = lvl - w;
      return code;
    endfunction
  endclass

endpackage
