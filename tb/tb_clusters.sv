// tb_clusters: the clustering engine with 4 slots, fed with PDWs of six
// jittered emitters plus outliers, so that new clusters fill free slots,
// inputs join clusters, active clusters are evicted when all slots are busy,
// clusters fade to zero and weights are halved at the maximum. Every result
// (ID, new/update, centre, weight, PRI) and every slot state is compared with
// the reference model; the 34-cycle latency is checked.
module tb_clusters;
  import iced_pkg::*;
  import iced_ref_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, start = 0, done, out_new;
  coord_t rf, pw;
  toa_t toa;
  weight_t fade_cycles, max_weight;
  dist_t threshold;
  logic [1:0] out_id;
  center_t out_state;
  center_t [N-1:0] states;
  int checks = 0, failures = 0;
  int n_new = 0, n_upd = 0, n_evict = 0, n_fadeout = 0, n_halved = 0;
  iced_model m;
  always #5 clk = ~clk;

  clusters #(.N(N)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s: got %0d exp %0d", what, got, exp_v); end
  endtask

  initial begin
    int unsigned t = 0;
    int e_rf[6] = '{1000, 9000, 20000, 30000, 45000, 60000};
    int e_pw[6] = '{500, 2000, 800, 5000, 100, 3000};
    m = new(N);
    m.threshold = 100; m.fade_len = 400; m.max_weight = 12;
    m.rf_min = 0; m.rf_max = 16'hFFFF; m.pw_min = 0; m.pw_max = 16'hFFFF;
    threshold = 100; max_weight = 12;
    rf = 0; pw = 0; toa = 0; fade_cycles = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      int e, cyc;
      logic [15:0] irf, ipw;
      e = (i < 600) ? i % 3 : (i < 1000) ? $urandom_range(0, 5) : 3 + i % 3;
      irf = 16'(e_rf[e] + $urandom_range(0, 40) - 20);
      ipw = 16'(e_pw[e] + $urandom_range(0, 40) - 20);
      if (i % 23 == 0) begin irf = 16'($urandom); ipw = 16'($urandom); end
      t += $urandom_range(20, (i % 200 < 20) ? 3000 : 150);
      m.step(irf, ipw, t);
      @(negedge clk);
      rf = m.x_rf; pw = m.x_pw; toa = t; fade_cycles = m.o_fade; start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      check("latency", cyc, 34);
      check("id", out_id, m.o_id);
      check("new", out_new, m.o_new);
      check("rf", out_state.rf, m.o_rf_norm);
      check("pw", out_state.pw, m.o_pw_norm);
      check("weight", out_state.weight, m.o_w);
      check("pri", out_state.pri, m.o_pri);
      for (int j = 0; j < N; j++) begin
        check("slot weight", states[j].weight, m.w[j]);
        if (m.w[j] != 0) check("slot rf", states[j].rf, m.c_rf[j]);
      end
      if (m.o_new) n_new++; else n_upd++;
      if (m.o_evict) n_evict++;
      n_fadeout += m.o_faded_out;
      if (m.o_halved) n_halved++;
    end
    $display("new=%0d update=%0d evict=%0d fadeout=%0d halved=%0d", n_new, n_upd, n_evict, n_fadeout, n_halved);
    checks += 5;
    if (n_new == 0 || n_upd == 0 || n_evict == 0 || n_fadeout == 0 || n_halved == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
