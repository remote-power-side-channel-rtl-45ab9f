// attack_analysis: the host-side analysis of the power side-channel attack, for
// testbenches. Given one Hamming weight per input pixel (already averaged
// over several runs), it recovers a foreground/background image:
//   1. high-pass: subtract from each value the mean of the previous ten
//      values and take the magnitude of the difference;
//   2. histogram the magnitudes in 40 equal bins from their minimum to
//      their maximum;
//   3. threshold: start at the most populated bin (the background) and
//      walk right until a bin holds fewer than a tenth of the peak count;
//      values at or above that bin's lower edge are foreground.
// Testbenches instantiate it and call recover() and ccr_n() by
// hierarchical name. ccr_n is the normalised cross-correlation of two images:
//   sum((A-mean A)(B-mean B)) / sqrt(sum (A-mean A)^2 * sum (B-mean B)^2).
module attack_analysis;

  localparam int NPIX  = 784;
  localparam int NBINS = 40;
  localparam int HP_WIN = 10;

  function automatic void recover(input real avg [NPIX], output bit rec [NPIX], output int tbin);
    real filt [NPIX];
    int  hist [NBINS];
    real fmin, fmax, bw, thr;
    int  peak;
    for (int i = 0; i < NPIX; i++) begin
      automatic real m = 0.0;
      automatic int  cnt = 0;
      for (int j = i - HP_WIN; j < i; j++) if (j >= 0) begin m += avg[j]; cnt++; end
      m = (cnt > 0) ? m / real'(cnt) : avg[i];
      filt[i] = (avg[i] < m) ? (m - avg[i]) : (avg[i] - m);
    end
    fmin = filt[0];
    fmax = filt[0];
    foreach (filt[i]) begin
      if (filt[i] < fmin) fmin = filt[i];
      if (filt[i] > fmax) fmax = filt[i];
    end
    bw = (fmax > fmin) ? (fmax - fmin) / real'(NBINS) : 1.0;
    foreach (hist[b]) hist[b] = 0;
    foreach (filt[i]) begin
      automatic int b = int'($floor((filt[i] - fmin) / bw));
      if (b > NBINS - 1) b = NBINS - 1;
      hist[b]++;
    end
    peak = 0;
    foreach (hist[b]) if (hist[b] > hist[peak]) peak = b;
    tbin = peak;
    while (tbin < NBINS - 1 && hist[tbin] * 10 > hist[peak]) tbin++;
    thr = fmin + bw * real'(tbin);
    foreach (filt[i]) rec[i] = (filt[i] >= thr);
  endfunction

  function automatic real ccr_n(input real a [NPIX], input bit b [NPIX]);
    real ma = 0.0, mb = 0.0, sab = 0.0, saa = 0.0, sbb = 0.0;
    for (int i = 0; i < NPIX; i++) begin
      ma += a[i];
      mb += real'(b[i]);
    end
    ma /= real'(NPIX);
    mb /= real'(NPIX);
    for (int i = 0; i < NPIX; i++) begin
      automatic real da = a[i] - ma;
      automatic real db = real'(b[i]) - mb;
      sab += da * db;
      saa += da * da;
      sbb += db * db;
    end
    return (saa > 0.0 && sbb > 0.0) ? sab / $sqrt(saa * sbb) : 0.0;
  endfunction

endmodule
