// tb_iced_top: end-to-end test of the deinterleaver with every parameter at
// its default (16 clusters, 512-deep FIFO). PDWs of jittered emitters, with
// outliers and inputs outside the programmed ranges, go in through the PDW
// port; every result is compared, in order, with the reference model of the
// algorithm, and the cluster slots are read back over the host port.
//
// Phases: (1) isolated PDWs, checking the 74-cycle write-to-result latency;
// (2) bursts of 20 concurrent emitters, more than there are slots, so that
// the FIFO backs up and fills (input refused) and active clusters are
// evicted; (3) a configuration change (threshold, fade length, maximum
// weight, ranges) and sparse traffic so that clusters fade out. The test
// counts how often each mechanism happened and fails if one never did.
module tb_iced_top;
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
    longint      t_in;
  } result_t;

  result_t exp_q[$];
  iced_model m;
  longint cycle = 0;
  int checks = 0, failures = 0, results = 0;
  int n_new = 0, n_upd = 0, n_evict = 0, n_fadeout = 0, n_halved = 0;
  int n_backlog = 0, n_refused = 0, n_clamped = 0, n_lat = 0, n_cfg = 0, n_readback = 0;
  int unsigned t_now = 0;
  int e_rf[20], e_pw[20];
  bit track_latency = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  iced_top dut (.*);

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  // result monitor
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
        if (track_latency) begin
          // clock edges from the write edge to the edge that raises out_valid
          check("latency", cycle - e.t_in, 74);
          checks++; if (cycle - e.t_in > 84) failures++;
          n_lat++;
        end
      end
    end
  end

  // present one PDW; returns once the FIFO has taken it
  task automatic send(logic [15:0] rf, logic [15:0] pw, int unsigned dt);
    result_t e;
    @(negedge clk);
    t_now += dt;
    pdw_rf = rf; pdw_pw = pw; pdw_toa = t_now; pdw_valid = 1;
    if (!pdw_ready) n_refused++;
    while (!pdw_ready) @(negedge clk);
    if (dut.u_fifo.level != 0 || dut.state_q != dut.S_IDLE) n_backlog++;
    @(negedge clk); pdw_valid = 0;
    e.t_in = cycle;  // counts the write edge
    m.step(rf, pw, t_now);
    if (rf < m.rf_min || rf > m.rf_max || pw < m.pw_min || pw > m.pw_max) n_clamped++;
    e.id = m.o_id; e.is_new = m.o_new; e.rf = m.o_rf; e.pw = m.o_pw; e.w = m.o_w; e.pri = m.o_pri;
    if (m.o_new) n_new++; else n_upd++;
    if (m.o_evict) n_evict++;
    if (m.o_halved) n_halved++;
    n_fadeout += m.o_faded_out;
    exp_q.push_back(e);
  endtask

  task automatic host_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask

  task automatic host_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = a; host_rd = 1;
    @(negedge clk); host_rd = 0; d = host_rdata;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  task automatic configure(int unsigned thr, int unsigned len, int unsigned wmax,
                           int unsigned rmin, int unsigned rmax, int unsigned pmin, int unsigned pmax);
    logic [31:0] d;
    host_write(0, thr);  host_write(1, len); host_write(2, wmax);
    host_write(3, rmin); host_write(4, rmax); host_write(5, pmin); host_write(6, pmax);
    m.threshold = thr; m.fade_len = len; m.max_weight = 16'(wmax);
    m.rf_min = 16'(rmin); m.rf_max = 16'(rmax); m.pw_min = 16'(pmin); m.pw_max = 16'(pmax);
    host_read(1, d); check("fade_len readback", d, len);
    n_cfg++;
  endtask

  task automatic read_back();
    logic [31:0] d;
    for (int j = 0; j < 16; j++) begin
      host_read(8'h80 + 8'(4*j + 2), d); check("slot weight", d, m.w[j]);
      host_read(8'h80 + 8'(4*j + 0), d); check("slot rf", d, m.c_rf[j]);
      host_read(8'h80 + 8'(4*j + 1), d); check("slot pw", d, m.c_pw[j]);
      host_read(8'h80 + 8'(4*j + 3), d); check("slot pri", d, m.pri[j]);
    end
    host_read(8'h07, d); check("processed", d, results);
    n_readback++;
  endtask

  function automatic logic [15:0] jit(int v, int a);
    return 16'(v + $urandom_range(0, 2 * a) - a);
  endfunction

  initial begin
    pdw_rf = 0; pdw_pw = 0; pdw_toa = 0; host_addr = 0; host_wdata = 0;
    m = new(16);
    for (int e = 0; e < 20; e++) begin
      e_rf[e] = 2000 + 1800 * e;          // native RF bins
      e_pw[e] = 200 + 97 * ((e * 7) % 20); // native PW bins
    end
    repeat (4) @(negedge clk); rst_n = 1;

    // (1) isolated PDWs with the Case I settings: threshold 100, fade 3000
    configure(100, 3000, 64, 1000, 40000, 100, 3000);
    track_latency = 1;
    for (int i = 0; i < 150; i++) begin
      int e = i % 2;
      send(jit(e_rf[e], 10), jit(e_pw[e], 5), 625 + $urandom_range(0, 20));
      drain();
    end
    send(16'd500, 16'd5000, 700); drain();   // outside both ranges: clamped
    track_latency = 0;
    read_back();

    // (2) 20 emitters in bursts, long fade so that all slots stay busy
    configure(60, 200000, 40, 1000, 40000, 100, 3000);
    for (int i = 0; i < 1400; i++) begin
      int e = $urandom_range(0, 19);
      if (i % 31 == 0) send(16'($urandom_range(0, 45000)), 16'($urandom_range(0, 3500)), 3);
      else             send(jit(e_rf[e], 8), jit(e_pw[e], 4), $urandom_range(1, 40));
    end
    drain();
    read_back();

    // (3) sparse traffic, short fade: clusters fade out
    configure(150, 1500, 30, 0, 50000, 0, 4000);
    for (int i = 0; i < 300; i++) begin
      int e = (i < 150) ? i % 3 : 3 + i % 2;
      send(jit(e_rf[e], 10), jit(e_pw[e], 5), (i % 40 == 39) ? 20000 : $urandom_range(300, 900));
      if (i % 8 == 0) drain();
    end
    drain();
    read_back();

    $display("results=%0d new=%0d update=%0d evict=%0d fadeout=%0d halved=%0d backlog=%0d refused=%0d clamped=%0d latency_checked=%0d cfg=%0d readback=%0d",
             results, n_new, n_upd, n_evict, n_fadeout, n_halved, n_backlog, n_refused, n_clamped, n_lat, n_cfg, n_readback);
    checks += 11;
    if (n_new == 0)      begin failures++; $display("no new cluster"); end
    if (n_upd == 0)      begin failures++; $display("no update"); end
    if (n_evict == 0)    begin failures++; $display("no eviction of an active cluster"); end
    if (n_fadeout == 0)  begin failures++; $display("no cluster faded out"); end
    if (n_halved == 0)   begin failures++; $display("no weight halving"); end
    if (n_backlog == 0)  begin failures++; $display("FIFO never backed up"); end
    if (n_refused == 0)  begin failures++; $display("FIFO never full"); end
    if (n_clamped == 0)  begin failures++; $display("no input clamped"); end
    if (n_lat == 0)      begin failures++; $display("latency never checked"); end
    if (n_cfg < 2)       begin failures++; $display("no configuration change"); end
    if (n_readback == 0) begin failures++; $display("no readback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
