// tb_iced_workloads: the evaluation scenarios of the ICED design run through
// the full deinterleaver at its default size (16 clusters), every result
// compared with the reference model.
//
// PDWs are generated here in the units of a 32 MHz channel receiver: RF in
// 4 kHz bins (13 bits, channel centre at bin 4096), PW and TOA in 16 ns
// ticks. Pulses of different emitters that overlap in time are merged into
// one PDW (earliest TOA, mean RF, union of the two widths), as a receiver
// would report them.
//
//   Gaussian  one emitter, RF and PW ~ N(8000, 10), PRI 2000, 500 pulses;
//             trials A (threshold 7, fade 10000), B (7, 5000), C (10, 5000)
//   Case I    emitters at -5 MHz / 1.0 us / PRI 20 us and +5 MHz / 0.8 us /
//             PRI 6 us (starting at 1 us and 500 us), threshold 100, fade 3000
//   Case II   one emitter hopping +11, +6, +14, +1 MHz every 1 ms, 1.2 us
//             pulses, PRI 40 us, threshold 100, fade 10000
//   Case III  Case I and Case II together, threshold 100, fade 7500
//
// Besides exact agreement with the model it checks what the scenarios are
// meant to show: the Gaussian trial C keeps more inputs in the main cluster
// than trial A; Case I ends with the two emitters as the two heaviest
// clusters and overlapped pulses form a third one at times; Case II keeps one cluster per hop frequency with a PRI estimate
// of 40 us; Case III finds both fixed emitters.
module tb_iced_workloads;
  import iced_pkg::*;
  import iced_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        pdw_valid = 0, pdw_ready;
  coord_t      pdw_rf, pdw_pw;
  toa_t        pdw_toa;
  logic        out_valid, out_new;
  logic [3:0]  out_id;
  coord_t      out_rf, out_pw;
  weight_t     out_weight;
  toa_t        out_pri;
  logic        host_wr = 0, host_rd = 0;
  logic [7:0]  host_addr;
  logic [31:0] host_wdata, host_rdata;

  typedef struct {
    int          id;
    bit          is_new;
    logic [15:0] rf, pw, w;
    logic [31:0] pri;
  } result_t;

  typedef struct {
    int unsigned toa;
    int          rf, pw;
  } pulse_t;

  result_t exp_q[$];
  pulse_t  train[$];
  iced_model m;
  int checks = 0, failures = 0, results = 0;
  int n_main, n_total, max_active;

  always #5 clk = ~clk;

  iced_top dut (.*);

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("[%0d] %s: got %0d exp %0d", results, what, got, exp_v);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      result_t e;
      if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        e = exp_q.pop_front();
        results++;
        check("id", out_id, e.id);
        check("new", out_new, e.is_new);
        check("rf", out_rf, e.rf);
        check("pw", out_pw, e.pw);
        check("weight", out_weight, e.w);
        check("pri", out_pri, e.pri);
      end
    end
  end

  function automatic int heaviest(int skip);
    int h = (skip == 0) ? 1 : 0;
    for (int j = 0; j < 16; j++)
      if (j != skip && m.w[j] > m.w[h]) h = j;
    return h;
  endfunction

  task automatic send(logic [15:0] rf, logic [15:0] pw, int unsigned toa);
    result_t e;
    @(negedge clk);
    pdw_rf = rf; pdw_pw = pw; pdw_toa = toa; pdw_valid = 1;
    while (!pdw_ready) @(negedge clk);
    @(negedge clk); pdw_valid = 0;
    m.step(rf, pw, toa);
    e.id = m.o_id; e.is_new = m.o_new; e.rf = m.o_rf; e.pw = m.o_pw; e.w = m.o_w; e.pri = m.o_pri;
    exp_q.push_back(e);
    n_total++;
    if (m.o_id == heaviest(-1)) n_main++;
    if (m.active_count() > max_active) max_active = m.active_count();
  endtask

  task automatic host_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  // fresh engine state for each scenario
  task automatic restart(int unsigned thr, int unsigned len, int rmin, int rmax, int pmin, int pmax);
    drain();
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    m = new(16);
    host_write(0, thr); host_write(1, len); host_write(2, 4096);
    host_write(3, rmin); host_write(4, rmax); host_write(5, pmin); host_write(6, pmax);
    m.threshold = thr; m.fade_len = len; m.max_weight = 4096;
    m.rf_min = 16'(rmin); m.rf_max = 16'(rmax); m.pw_min = 16'(pmin); m.pw_max = 16'(pmax);
    n_main = 0; n_total = 0; max_active = 0;
  endtask

  function automatic int gauss(int mean, real sigma);
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(0, 1_000_000)) / 1.0e6;
    return mean + int'((s - 6.0) * sigma);
  endfunction

  // pulses of one emitter between t0 and t1 (ticks), with up to 6 ticks of
  // TOA jitter
  task automatic add_emitter(int rf, int pw, int unsigned pri, int unsigned t0, int unsigned t1);
    for (int unsigned t = t0; t < t1; t += pri)
      train.push_back('{toa: t + $urandom_range(0, 6), rf: rf, pw: pw});
  endtask

  // sort by TOA, merge overlapping pulses, add measurement jitter, send
  task automatic play();
    pulse_t p, q;
    train.sort(x) with (x.toa);
    while (train.size() != 0) begin
      p = train.pop_front();
      while (train.size() != 0 && train[0].toa < p.toa + p.pw) begin
        int unsigned tend;
        q = train.pop_front();
        tend = (q.toa + q.pw > p.toa + p.pw) ? q.toa + q.pw : p.toa + p.pw;
        p.rf = (p.rf + q.rf) / 2;
        p.pw = tend - p.toa;
      end
      send(16'(p.rf + $urandom_range(0, 4) - 2), 16'(p.pw + $urandom_range(0, 2) - 1), p.toa);
    end
    drain();
  endtask

  function automatic int mhz(real off);   // channel offset in MHz -> 4 kHz bin
    return 4096 + int'(off * 250.0);
  endfunction

  function automatic bit near_rf(int j, int rf_bin);
    int native = ref_undo(m.c_rf[j], m.rf_min, m.rf_max);
    return (native >= rf_bin - 4) && (native <= rf_bin + 4) && m.w[j] != 0;
  endfunction

  initial begin
    int pct[3];
    int thr[3] = '{7, 7, 10};
    int len[3] = '{10000, 5000, 5000};
    pdw_rf = 0; pdw_pw = 0; pdw_toa = 0; host_addr = 0; host_wdata = 0;
    m = new(16);
    repeat (4) @(negedge clk); rst_n = 1;

    // ---- Gaussian trials A, B, C, three datasets each
    for (int tr = 0; tr < 3; tr++) begin
      int sum, amax;
      sum = 0; amax = 0;
      for (int ds = 0; ds < 3; ds++) begin
        restart(thr[tr], len[tr], 0, 65535, 0, 65535);
        for (int i = 0; i < 500; i++)
          send(16'(gauss(8000, 3.1623)), 16'(gauss(8000, 3.1623)), 2000 * (i + 1));
        drain();
        sum += 100 * n_main / n_total;
        amax += max_active;
      end
      pct[tr] = sum / 3;
      $display("Gaussian trial %s: threshold %0d fade %0d: %0d%% in main cluster, max clusters %0.1f",
               tr == 0 ? "A" : tr == 1 ? "B" : "C", thr[tr], len[tr], pct[tr], real'(amax) / 3.0);
    end
    checks++;
    if (pct[2] <= pct[0]) begin failures++; $display("trial C not better than trial A"); end

    // ---- Case I: two emitters with overlapping pulses
    restart(100, 3000, 0, 8191, 0, 4095);
    add_emitter(mhz(-5.0), 62, 1250, 62, 625000);     // 1.0 us, PRI 20 us, from 1 us
    add_emitter(mhz(5.0),  50, 375, 31250, 625000);   // 0.8 us, PRI 6 us, from 500 us
    play();
    begin
      int h0, h1;
      h0 = heaviest(-1); h1 = heaviest(h0);
      $display("Case I: max clusters %0d, heaviest weights %0d and %0d", max_active, m.w[h0], m.w[h1]);
      checks++;
      if (max_active < 3) begin failures++; $display("Case I: overlapped pulses never formed a cluster"); end
      checks++;
      if (!((near_rf(h0, mhz(-5.0)) && near_rf(h1, mhz(5.0))) || (near_rf(h0, mhz(5.0)) && near_rf(h1, mhz(-5.0))))) begin
        failures++; $display("Case I: emitters not the two heaviest clusters");
      end
    end

    // ---- Case II: frequency hopper, two passes over the four hops
    restart(100, 10000, 0, 8191, 0, 4095);
    begin
      real hops[4] = '{11.0, 6.0, 14.0, 1.0};
      for (int k = 0; k < 8; k++) add_emitter(mhz(hops[k % 4]), 75, 2500, 62500 * k, 62500 * (k + 1));
      play();
      $display("Case II: active clusters %0d", m.active_count());
      for (int h = 0; h < 4; h++) begin
        bit found;
        found = 0;
        for (int j = 0; j < 16; j++)
          if (near_rf(j, mhz(hops[h])) && m.pri[j] >= 2494 && m.pri[j] <= 2506) found = 1;
        checks++;
        if (!found) begin failures++; $display("Case II: hop %0d lost", h); end
      end
    end

    // ---- Case III: both fixed emitters plus the hopper
    restart(100, 7500, 0, 8191, 0, 4095);
    begin
      real hops[4] = '{11.0, 6.0, 14.0, 1.0};
      add_emitter(mhz(-5.0), 62, 1250, 62, 500000);
      add_emitter(mhz(5.0),  50, 375, 31250, 500000);
      for (int k = 0; k < 8; k++) add_emitter(mhz(hops[k % 4]), 75, 2500, 62500 * k, 62500 * (k + 1));
      play();
      $display("Case III: max clusters %0d, active at end %0d", max_active, m.active_count());
      for (int e = 0; e < 2; e++) begin
        bit found;
        found = 0;
        for (int j = 0; j < 16; j++) if (near_rf(j, mhz(e == 0 ? -5.0 : 5.0))) found = 1;
        checks++;
        if (!found) begin failures++; $display("Case III: fixed emitter %0d lost", e); end
      end
    end

    $display("results=%0d", results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
