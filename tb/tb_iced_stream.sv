// tb_iced_stream: sustained-rate test of the complete engine at its default
// size. Twelve emitters, all at 200 kHz pulse-repetition frequency (PRI 5 us),
// are interleaved into one stream of 80,000 PDWs, which is the densest case
// the original ICED design was required to keep up with (one pulse every
// 417 ns on average) and the input count of its software comparison.
//
// TOA is counted in clock cycles here (5 ns at 200 MHz), and each PDW is
// written into the FIFO on the cycle its TOA names, so bunched pulses queue
// up as they would behind a receiver. Every result is compared with the
// reference model. The bench checks that the FIFO never fills, that the
// backlog stays small, that each of the twelve emitters ends as its own
// cluster with the right PRI estimate, and that an isolated PDW takes exactly
// 74 cycles. It prints the largest backlog and queueing latency and the mean
// interval between PDWs.
module tb_iced_stream;
  import iced_pkg::*;
  import iced_ref_pkg::*;

  localparam int N_PDW   = 80_000;
  localparam int N_EMIT  = 12;
  localparam int PRI     = 1000;     // 5 us in 5 ns ticks
  localparam int MAX_LOG = 4;        // allowed backlog in the FIFO

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
  logic [7:0]  host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;

  typedef struct {
    int          id;
    bit          is_new;
    logic [15:0] rf, pw, w;
    logic [31:0] pri;
    longint      sent;
  } result_t;

  iced_model m;
  result_t   exp_q[$];
  int        checks = 0, failures = 0, results = 0;
  longint    cycle = 0;
  int        max_backlog = 0, max_wait = 0, stalls = 0;
  int        first_latency = -1;

  always #5 clk = ~clk;   // one tick of 5 ns per 10 time units
  always @(posedge clk) cycle++;

  iced_top dut (.*);

  initial begin
    repeat (10_000_000) @(posedge clk);
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
        if (first_latency < 0) first_latency = int'(cycle - e.sent);
        if (cycle - e.sent > max_wait) max_wait = int'(cycle - e.sent);
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

  initial begin
    int unsigned next_toa [N_EMIT];
    int          emit_rf  [N_EMIT];
    int          emit_pw  [N_EMIT];
    int          e, found, t0;
    longint      t_start;
    for (int j = 0; j < N_EMIT; j++) begin
      emit_rf[j]  = 3000 + 5000 * j;
      emit_pw[j]  = 20000 + 1500 * (j % 5);
      next_toa[j] = 5000 + $urandom_range(0, PRI - 1);
    end
    m = new(16);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    t0 = int'(cycle);
    t_start = cycle;

    for (int i = 0; i < N_PDW; i++) begin
      result_t r;
      // earliest pending pulse of all emitters
      e = 0;
      for (int j = 1; j < N_EMIT; j++) if (next_toa[j] < next_toa[e]) e = j;
      // wait for its arrival time; the write happens on the next edge
      while (cycle + 1 < t0 + next_toa[e]) @(negedge clk);
      if (!pdw_ready) stalls++;
      while (!pdw_ready) @(negedge clk);
      pdw_rf = 16'(emit_rf[e] + $urandom_range(0, 16) - 8);
      pdw_pw = 16'(emit_pw[e] + $urandom_range(0, 8) - 4);
      pdw_toa = next_toa[e];
      pdw_valid = 1;
      r.sent = cycle + 1;
      m.step(pdw_rf, pdw_pw, pdw_toa);
      r.id = m.o_id; r.is_new = m.o_new; r.rf = m.o_rf; r.pw = m.o_pw; r.w = m.o_w; r.pri = m.o_pri;
      exp_q.push_back(r);
      if (exp_q.size() - 1 > max_backlog) max_backlog = exp_q.size() - 1;
      @(negedge clk); pdw_valid = 0;
      next_toa[e] += PRI - 2 + $urandom_range(0, 4);
    end
    while (exp_q.size() != 0) @(negedge clk);

    $display("%0d PDWs in %0d cycles: one every %0.1f cycles against 74 to process one, largest backlog %0d, longest wait %0d cycles, first result after %0d",
             results, cycle - t_start, real'(cycle - t_start) / results, max_backlog, max_wait, first_latency);
    check("results", results, N_PDW);
    check("first latency", first_latency, 74);
    checks++;
    if (stalls != 0) begin failures++; $display("FIFO full %0d times", stalls); end
    checks++;
    if (max_backlog > MAX_LOG) begin failures++; $display("backlog %0d above %0d", max_backlog, MAX_LOG); end
    // every emitter holds a cluster of its own with a PRI near 5 us
    for (int j = 0; j < N_EMIT; j++) begin
      found = 0;
      for (int k = 0; k < 16; k++)
        if (m.w[k] != 0 && ref_l1(m.c_rf[k], m.c_pw[k],
                                  ref_norm(16'(emit_rf[j]), 0, 16'hFFFF),
                                  ref_norm(16'(emit_pw[j]), 0, 16'hFFFF)) < 40
            && m.pri[k] >= PRI - 4 && m.pri[k] <= PRI + 4)
          found++;
      checks++;
      if (found != 1) begin failures++; $display("emitter %0d held by %0d clusters", j, found); end
    end
    check("active clusters", m.active_count(), N_EMIT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
