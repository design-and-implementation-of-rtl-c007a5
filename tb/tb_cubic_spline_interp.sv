// tb_cubic_spline_interp: end-to-end test of the interpolator at its default
// size (32-spike queue, 45-sample spikes).
// Synthetic spikes (a sharp peak followed by a slow opposite phase, random
// amplitude, polarity, sub-sample position and noise) are loaded through the
// detector interface. For every spike the output is checked against a
// floating-point model: the six-sample natural spline of each segment (end
// samples repeated at the spike ends), evaluated at the positions that
// survive down-sampling around the chosen alignment point. The alignment
// point must be one the selected criterion allows given the model's step-1
// values (a small tolerance absorbs the 1/4 LSB rounding); every output
// sample must be within 0.3 LSB of the model, and the count, flags and
// channel must match.
// Phases: idle with an empty queue, worst-case throughput (45 samples, U = 8,
// D = 1, spike-to-spike interval at most 385 cycles, i.e. 2,600 spikes/s at
// 1 MHz), every combination of up/down-sampling factor and alignment mode,
// a queue overflow with back-pressure, too-short spikes, a threshold that no
// sample reaches, and one second of the published real-time load (128
// channels x 20 spikes/s, 45 samples, U = 8, 1 MHz) without back-pressure.
// Each mechanism is counted and must occur.
module tb_cubic_spline_interp;
  import spline_pkg::*;
  import tb_spline_ref_pkg::*;

  localparam int LEN_W = 6, CH_W = 7;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0, in_dropped;
  logic signed [SAMPLE_W-1:0] in_sample = '0;
  logic [LEN_W-1:0] in_align = '0;
  logic [CH_W-1:0]  in_channel = '0;
  logic [1:0] cfg_up_log = 2'd3, cfg_dn_log = 2'd0;
  align_mode_e cfg_align_mode = ALIGN_PEAK;
  logic [SAMPLE_W-1:0] cfg_threshold = 8'd40;
  logic out_valid, out_first, out_last, out_align, queue_empty, pu_clk_en;
  logic signed [OUT_W-1:0] out_sample;
  logic [CH_W-1:0] out_channel;

  cubic_spline_interp dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int y [$];
    int len, align, ch, up, dn, mode, thr;
    int t_in;
  } spike_t;
  spike_t model [$];

  // mechanism counters
  int n_idle_gated = 0, n_full = 0, n_drop = 0, n_fallback = 0, n_spikes = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_up [4] = '{0, 0, 0, 0};
  int n_dn [4] = '{0, 0, 0, 0};
  int n_emptyseg = 0, n_edge_clamp = 0, worst_interval = 0, n_intervals = 0;
  int max_latency = 0, n_rt_spikes = 0;
  bit realtime_phase = 0;

  // ---------------------------------------------------------------- model
  function automatic real ref_at(input spike_t sp, input int p);
    win_t w;
    int seg, idx;
    seg = p >> 3;
    for (int k = 0; k < 6; k++) begin
      idx = seg - 2 + k;
      if (idx < 0) idx = 0;
      if (idx > sp.len - 1) idx = sp.len - 1;
      w[k] = real'(sp.y[idx]);
    end
    return mid_value(w, real'(p & 7) / 8.0);
  endfunction

  // Is P an alignment point the criterion allows?
  function automatic bit p_allowed(input spike_t sp, input int P, output bit fb);
    int A, U, n, base;
    real v [16], best, tol;
    A = sp.align;
    if (A < 1) A = 1;
    if (A > sp.len - 2) A = sp.len - 2;
    U = 1 << sp.up;
    n = 2 * U;
    base = 8 * (A - 1);
    tol = 0.6;
    fb = 0;
    for (int j = 0; j < n; j++) v[j] = ref_at(sp, base + j * (8 / U));
    if ((P - base) % (8 / U) != 0 || P < base || P >= base + 8 * 2) begin
      // only the threshold fallback may lie outside... it is 8A, inside
      return 0;
    end
    case (sp.mode)
      0: begin
        best = 0;
        for (int j = 0; j < n; j++) if (absr(v[j]) > best) best = absr(v[j]);
        return absr(v[(P - base) / (8 / U)]) >= best - tol;
      end
      1: begin
        int jp;
        jp = (P - base) / (8 / U);
        best = 0;
        for (int j = 1; j < n; j++) if (absr(v[j] - v[j-1]) > best) best = absr(v[j] - v[j-1]);
        if (jp == 0) return 0;
        return absr(v[jp] - v[jp-1]) >= best - tol;
      end
      default: begin
        int jp;
        bit any;
        jp = (P - base) / (8 / U);
        any = 0;
        for (int j = 0; j < n; j++) if (absr(v[j]) >= real'(sp.thr) - 0.3) any = 1;
        // fallback: nothing clearly crossed
        if (P == 8 * A) begin
          bit none;
          none = 1;
          for (int j = 0; j < n; j++) if (absr(v[j]) >= real'(sp.thr) + 0.3) none = 0;
          if (none) begin fb = 1; return 1; end
        end
        if (absr(v[jp]) < real'(sp.thr) - 0.3) return 0;
        for (int j = 0; j < jp; j++) if (absr(v[j]) >= real'(sp.thr) + 0.3) return 0;
        return any;
      end
    endcase
  endfunction

  // ---------------------------------------------------------------- monitor
  int got [$];
  int got_align [$];
  int got_ch;
  int last_first_cyc = -1;
  bit measure_interval = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_first) begin
        got.delete(); got_align.delete();
        got_ch = int'(out_channel);
        if (measure_interval && last_first_cyc >= 0) begin
          n_intervals++;
          if (cyc - last_first_cyc > worst_interval) worst_interval = cyc - last_first_cyc;
        end
        last_first_cyc = cyc;
      end
      check(int'(out_channel) == got_ch, "channel constant within a spike");
      got.push_back(int'(out_sample));
      if (out_align) got_align.push_back(got.size() - 1);
      if (out_last) check_spike();
    end
  end

  task automatic check_spike();
    spike_t sp;
    int S, ja, P, p0, n_exp, bad;
    bit fb;
    check(model.size() > 0, "output spike without an input spike");
    if (model.size() == 0) return;
    sp = model.pop_front();
    n_spikes++;
    if (realtime_phase) begin
      n_rt_spikes++;
      if (cyc - sp.t_in > max_latency) max_latency = cyc - sp.t_in;
    end
    check(got_ch == sp.ch, $sformatf("channel %0d expected %0d", got_ch, sp.ch));
    check(got_align.size() == 1, "exactly one alignment sample");
    if (got_align.size() != 1) return;
    ja = got_align[0];
    S = (8 >> sp.up) << sp.dn;
    // The alignment point P is not visible directly: the outputs sit at
    // P mod S + kS and the flagged one has index P / S. Among the positions
    // the criterion allows with that index, take the one whose output
    // positions match the samples best (several differ only by phase when
    // S > 8).
    P = -1;
    begin
      real best_err;
      best_err = 1.0e9;
      for (int p = 0; p < 8 * (sp.len - 1); p++) begin
        bit f;
        if (p / S == ja && p_allowed(sp, p, f)) begin
          real err;
          int q0, ne;
          q0 = p % S;
          ne = 0;
          for (int q = q0; q < 8 * (sp.len - 1); q += S) ne++;
          err = (ne == got.size()) ? 0.0 : 1.0e6;
          for (int j = 0; j < got.size() && j < ne; j++) begin
            real e;
            e = absr(real'(got[j]) / 4.0 - ref_at(sp, q0 + j * S));
            if (e > err) err = e;
          end
          if (err < best_err) begin best_err = err; P = p; fb = f; end
        end
      end
    end
    check(P >= 0, $sformatf("no allowed alignment point at output index %0d (mode %0d)", ja, sp.mode));
    if (P < 0) return;
    if (fb) n_fallback++;
    p0 = P % S;
    n_exp = 0;
    for (int p = p0; p < 8 * (sp.len - 1); p += S) n_exp++;
    check(got.size() == n_exp, $sformatf("count %0d expected %0d", got.size(), n_exp));
    bad = 0;
    for (int j = 0; j < got.size() && j < n_exp; j++) begin
      real r;
      r = ref_at(sp, p0 + j * S);
      checks++;
      if (absr(real'(got[j]) / 4.0 - r) > 0.3) begin
        failures++;
        if (bad++ < 5) $display("FAIL: spike %0d (U=%0d D=%0d mode %0d P=%0d) sample %0d = %f expected %f",
                                n_spikes, 1 << sp.up, 1 << sp.dn, sp.mode, P, j, real'(got[j]) / 4.0, r);
      end
    end
    if (S > 8) n_emptyseg++;
    if (sp.align < 1 || sp.align > sp.len - 2) n_edge_clamp++;
  endtask

  // ---------------------------------------------------------------- driver
  task automatic make_spike(input int len, output spike_t sp);
    real c, amp, v;
    int pol;
    c = 10.0 + real'($urandom_range(0, 1000)) / 1000.0 + real'($urandom_range(0, 8));
    if (c > real'(len) - 6.0) c = real'(len) / 2.0;
    amp = real'($urandom_range(40, 120));
    pol = ($urandom % 2 != 0) ? 1 : -1;
    sp.y.delete();
    for (int k = 0; k < len; k++) begin
      real x1, x2;
      x1 = (real'(k) - c) / 1.2;
      x2 = (real'(k) - c - 4.0) / 2.5;
      v = real'(pol) * amp * ($exp(-x1 * x1) - 0.4 * $exp(-x2 * x2))
          + real'($urandom_range(0, 6)) - 3.0;
      if (v > 127.0) v = 127.0;
      if (v < -128.0) v = -128.0;
      sp.y.push_back($rtoi(v < 0 ? v - 0.5 : v + 0.5));
    end
    sp.len = len;
    sp.align = $rtoi(c + 0.5) + $urandom_range(0, 2) - 1;
    sp.ch = $urandom_range(0, 127);
    sp.up = int'(cfg_up_log);
    sp.dn = int'(cfg_dn_log);
    sp.mode = int'(cfg_align_mode);
    sp.thr = int'(cfg_threshold);
  endtask

  task automatic send(input spike_t sp, input int nsamp);
    for (int k = 0; k < nsamp; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_sample = SAMPLE_W'(k < sp.len ? sp.y[k] : 0);
      in_last = (k == nsamp - 1);
      in_align = LEN_W'(sp.align);
      in_channel = CH_W'(sp.ch);
      #1;
      while (!in_ready) begin
        n_full++;
        @(negedge clk);
        #1;
      end
      if (in_last && in_dropped) n_drop++;
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    in_last = 0;
    sp.t_in = cyc;
    if (nsamp >= 3) model.push_back(sp);
  endtask

  task automatic send_random(input int len);
    spike_t sp;
    make_spike(len, sp);
    send(sp, len);
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    do begin
      @(negedge clk);
      guard++;
    end while ((!queue_empty || pu_clk_en || model.size() != 0) && guard < 100000);
    check(model.size() == 0, "all queued spikes were output");
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int idle_cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. event-triggered: nothing runs without spikes
    idle_cycles = 0;
    repeat (50) begin
      @(negedge clk);
      if (queue_empty && !pu_clk_en && !out_valid) idle_cycles++;
    end
    check(idle_cycles == 50, "processing units idle while the queue is empty");
    if (idle_cycles == 50) n_idle_gated++;

    // 2. worst case: 45 samples, U = 8, no down-sampling, back-to-back spikes
    cfg_up_log = 2'd3; cfg_dn_log = 2'd0; cfg_align_mode = ALIGN_PEAK;
    measure_interval = 1;
    repeat (8) send_random(45);
    drain();
    measure_interval = 0;
    check(n_intervals >= 6, "throughput intervals measured");
    check(worst_interval <= 385,
          $sformatf("worst spike interval %0d cycles (<= 385 for 2600 spikes/s at 1 MHz)", worst_interval));
    $display("worst-case spike interval: %0d cycles", worst_interval);

    // 3. every configuration
    for (int u = 1; u <= 3; u++)
      for (int d = 0; d <= 3; d++)
        for (int m = 0; m < 3; m++) begin
          cfg_up_log = 2'(u); cfg_dn_log = 2'(d); cfg_align_mode = align_mode_e'(m);
          cfg_threshold = 8'($urandom_range(20, 60));
          n_up[u]++; n_dn[d]++; n_mode[m]++;
          repeat (2) send_random($urandom_range(20, 45));
          drain();
        end

    // 4. threshold that nothing reaches: alignment stays at the detector's point
    cfg_up_log = 2'd2; cfg_dn_log = 2'd1; cfg_align_mode = ALIGN_THRESH; cfg_threshold = 8'd255;
    repeat (3) send_random(30);
    drain();

    // 5. overflow: more spikes than the queue holds, sent back to back
    cfg_up_log = 2'd3; cfg_dn_log = 2'd0; cfg_align_mode = ALIGN_SLOPE;
    repeat (40) send_random(45);
    drain();

    // 6. too-short spikes are discarded, spikes at the queue's maximum length
    begin
      spike_t sp;
      make_spike(2, sp);
      send(sp, 2);
      make_spike(45, sp);
      sp.align = 0;          // alignment index at the spike's edge
      send(sp, 45);
      make_spike(45, sp);
      sp.align = 44;
      send(sp, 45);
      drain();
    end

    // 7. real-time load of the published operating point: 128 channels x
    //    20 spikes/s = 2,560 spikes of 45 samples in one second of a 1 MHz
    //    clock (one cycle = 1 us), U = 8, no down-sampling, spikes evenly
    //    spread in time. Nothing may stall and every spike must be finished
    //    well before the queue could fill.
    begin
      int t0, full0;
      cfg_up_log = 2'd3; cfg_dn_log = 2'd0; cfg_align_mode = ALIGN_PEAK;
      realtime_phase = 1;
      full0 = n_full;
      @(negedge clk);
      t0 = cyc;
      for (int k = 0; k < 128 * 20; k++) begin
        while (longint'(cyc) < longint'(t0) + (longint'(k) * 1000000) / 2560) @(negedge clk);
        send_random(45);
      end
      drain();
      realtime_phase = 0;
      check(n_rt_spikes == 2560, $sformatf("real-time spikes processed: %0d", n_rt_spikes));
      check(n_full == full0, "no back-pressure at the real-time load");
      check(cyc - t0 <= 1000000 + 1000, $sformatf("real-time load took %0d cycles", cyc - t0));
      check(max_latency < 2 * 385 + 45, $sformatf("worst spike latency %0d cycles", max_latency));
      $display("real-time load: %0d spikes in %0d cycles, worst latency %0d cycles",
               n_rt_spikes, cyc - t0, max_latency);
    end

    check(n_idle_gated > 0, "idle gating");
    check(n_full > 0, "queue full back-pressure");
    check(n_drop > 0, "short spike discarded");
    check(n_fallback > 0, "threshold fallback");
    check(n_emptyseg > 0, "down-sampling coarser than the original rate");
    check(n_edge_clamp > 0, "alignment index clamped at a spike edge");
    for (int m = 0; m < 3; m++) check(n_mode[m] > 0, "alignment mode used");
    for (int u = 1; u < 4; u++) check(n_up[u] > 0, "up-sampling factor used");
    for (int d = 0; d < 4; d++) check(n_dn[d] > 0, "down-sampling factor used");
    $display("spikes %0d, full-stall cycles %0d, drops %0d, fallbacks %0d, coarse %0d, edge %0d",
             n_spikes, n_full, n_drop, n_fallback, n_emptyseg, n_edge_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
