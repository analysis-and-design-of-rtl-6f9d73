// cpsd_model_pkg: reference model of the CPSD algorithm for the testbenches.
//
// Works on whole arrays of filtered samples, second by second, with plain
// integer arithmetic: window peak M, eq. 3 quantisation with saturation to
// [-M, M] and the top level clamped to N-1, the phase-vector histogram of
// eq. 4, the difference count of eq. 5, the Q8.8 ratio of eq. 6, and the
// training / on-line sequence (candidate, check against Threshold_valid,
// reference refresh after ref_period seconds, retraining on request).
// It keeps counts of how often each of those situations occurred.
package cpsd_model_pkg;

  // Synthetic 10-bit ECG test signal, sample i at sps samples/s.
  //   kind 0: normal sinus rhythm, one beat per second (QRS spike and a
  //           T wave) with +/-2 LSB noise
  //   kind 1: fibrillation-like: fast triangular oscillation of about 4 Hz,
  //           amplitude 250, with +/-80 LSB noise
  //   kind 2: motion artifact: uniform noise over +/-500
  //   kind 3: normal rhythm in which every fourth beat is a premature
  //           ventricular contraction: early, wide, inverted complex
  //   kind 4: ventricular tachycardia: regular wide complexes at 3 beats/s
  function automatic int ecg_sample(int kind, int i, int sps);
    int p, w, q0, per, t, b;
    case (kind)
      3: begin
        b = i / sps;
        p = i % sps;
        if (b % 4 != 3) return ecg_sample(0, i, sps);
        w = (sps / 12 > 0) ? sps / 12 : 1;
        t = $urandom_range(0, 4) - 2;
        if (p >= sps / 16 && p < sps / 16 + w) t -= 350;
        else if (p >= sps / 16 + w && p < sps / 16 + 2 * w) t += 200;
        else if (p >= sps / 3 && p < sps / 2) t -= 80;
        return t;
      end
      4: begin
        per = (sps / 3 >= 3) ? sps / 3 : 3;
        p = i % per;
        t = $urandom_range(0, 4) - 2;
        if (p < per * 2 / 5) t += 400 * p * (per * 2 / 5 - p) * 4 / ((per * 2 / 5) * (per * 2 / 5));
        else if (p < per * 7 / 10) t -= 150;
        return t;
      end
      0: begin
        p = i % sps;
        w = (sps / 64 > 0) ? sps / 64 : 1;
        q0 = sps / 8;
        t = $urandom_range(0, 4) - 2;
        if (p >= q0 && p < q0 + w) t += 150;
        else if (p >= q0 + w && p < q0 + 2 * w) t += 450;
        else if (p >= q0 + 2 * w && p < q0 + 3 * w) t -= 150;
        else if (p >= sps * 3 / 8 && p < sps / 2) t += 60;
        return t;
      end
      1: begin
        per = (sps / 4 >= 4) ? sps / 4 : 4;
        p = i % per;
        t = (p < per / 2) ? (p * 1000 / per) - 250 : 750 - (p * 1000 / per);
        return t + $urandom_range(0, 160) - 80;
      end
      default: return $urandom_range(0, 1000) - 500;
    endcase
  endfunction

  class cpsd_model;
    int sps, win_sec, n, d, h, th_valid, ref_period;
    int x[$];                 // filtered samples in arrival order
    bit retrain_in_sec[int];  // retrain requested during second k
    // expected results
    int exp_cpsd[$];          // one per on-line second, in order
    int exp_cpsd_sec[$];      // the second each belongs to
    int exp_diff_cur[$];
    int exp_diff_ref[$];
    int exp_mref[$];
    // event counts
    int n_cand, n_check_pass, n_check_fail, n_online, n_refresh, n_retrain, n_saturated;
    int final_phase;          // 0 fill, 1 cand, 2 check, 3 online

    function new(int sps, int win_sec, int n, int d, int h, int th_valid, int ref_period);
      this.sps = sps; this.win_sec = win_sec; this.n = n; this.d = d;
      this.h = h; this.th_valid = th_valid; this.ref_period = ref_period;
    endfunction

    function int quant(int s, int m);
      int q;
      if (m == 0) m = 1;
      if (s > m) s = m;
      if (s < -m) s = -m;
      q = ((s + m) * n + m) / (2 * m);
      return (q > n - 1) ? n - 1 : q;
    endfunction

    // PM of the window that ends just before sample index `last_excl`.
    function void build_pm(int last_excl, int m, ref int pm[], input bit count_sat);
      int depth = sps * win_sec;
      int first = last_excl - depth;
      pm = new[n * n];
      foreach (pm[i]) pm[i] = 0;
      for (int i = d; i < depth; i++)
        pm[quant(x[first + i - d], m) * n + quant(x[first + i], m)]++;
      if (count_sat)
        for (int i = 0; i < depth; i++)
          if (x[first + i] > m || x[first + i] < -m) n_saturated++;
    endfunction

    function int window_m(int last_excl);
      int depth = sps * win_sec;
      int m = 0, a;
      for (int i = last_excl - depth; i < last_excl; i++) begin
        a = (x[i] < 0) ? -x[i] : x[i];
        if (a > m) m = a;
      end
      return m;
    endfunction

    function int diff(const ref int a[], const ref int b[]);
      int c = 0, dd;
      foreach (a[i]) begin
        dd = a[i] - b[i];
        if (dd < 0) dd = -dd;
        if (dd > h) c++;
      end
      return c;
    endfunction

    // Run the algorithm over all complete seconds of x.
    function void run();
      int depth = sps * win_sec;
      int nsec = x.size() / sps;
      int phase = 0, since_ref = 0, m_ref = 0, diff_ref = 0, dcur, q;
      bit pend = 0;
      int ref_pm[], cur_pm[];
      for (int k = 1; k <= nsec; k++) begin
        int last_excl = k * sps;
        if (retrain_in_sec.exists(k)) pend = 1;
        if (last_excl < depth) continue;
        if (phase == 0 || phase == 1 || pend) begin
          if (pend && phase != 0 && phase != 1) n_retrain++;
          pend = 0;
          phase = 1;
        end
        if (phase == 1) begin
          m_ref = window_m(last_excl);
          build_pm(last_excl, m_ref, ref_pm, 0);
          n_cand++;
          phase = 2;
        end else if (phase == 2) begin
          build_pm(last_excl, m_ref, cur_pm, 1);
          dcur = diff(cur_pm, ref_pm);
          if (dcur < th_valid) begin
            n_check_pass++;
            diff_ref = dcur;
            phase = 3;
            since_ref = 0;
          end else begin
            n_check_fail++;
            phase = 1;
          end
        end else begin
          build_pm(last_excl, m_ref, cur_pm, 1);
          dcur = diff(cur_pm, ref_pm);
          q = (dcur * 256) / ((diff_ref == 0) ? 1 : diff_ref);
          if (q > 65535) q = 65535;
          exp_cpsd.push_back(q);
          exp_cpsd_sec.push_back(k);
          exp_diff_cur.push_back(dcur);
          exp_diff_ref.push_back(diff_ref);
          exp_mref.push_back(m_ref);
          n_online++;
          since_ref++;
          if (ref_period != 0 && since_ref >= ref_period) begin
            n_refresh++;
            phase = 1;
          end
        end
      end
      final_phase = phase;
    endfunction
  endclass

endpackage
