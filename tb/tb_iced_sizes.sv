// tb_iced_sizes: runs the complete engine at 2, 4, 8 and 16 clusters side by
// side, the cluster counts over which the original ICED design reports its
// resource use. All four instances of iced_top receive the same PDW stream:
// six interleaved emitters with jittered RF and PW plus scattered noise
// pulses, so the small engines must keep evicting clusters while the large
// ones hold every emitter.
//
// Each instance is compared, result by result, with its own reference model
// of the same size (ID, new flag, native RF and PW, weight, PRI). The bench
// also checks that the latency is 74 cycles at every size (the comparator
// trees add no clock cycles) and that a larger engine never evicts more
// active clusters than a smaller one on the same stream. It prints the
// evictions per size.
module tb_iced_sizes;
  import iced_pkg::*;
  import iced_ref_pkg::*;

  localparam int NS = 4;
  localparam int SIZES [NS] = '{2, 4, 8, 16};
  localparam int N_PDW = 800;

  logic        clk = 0, rst_n = 0;
  logic        pdw_valid = 0;
  coord_t      pdw_rf, pdw_pw;
  toa_t        pdw_toa;
  logic        host_wr = 0, host_rd = 0;
  logic [7:0]  host_addr = '0;
  logic [31:0] host_wdata = '0;

  // per-size results, IDs widened to 4 bits
  logic [NS-1:0] ready, valid, is_new;
  logic [3:0]    id    [NS];
  coord_t        o_rf  [NS], o_pw [NS];
  weight_t       o_w   [NS];
  toa_t          o_pri [NS];

  typedef struct {
    int          id;
    bit          is_new;
    logic [15:0] rf, pw, w;
    logic [31:0] pri;
  } result_t;

  iced_model m [NS];
  result_t   exp_q [NS][$];
  int        evictions [NS];
  int        checks = 0, failures = 0;
  int        sent_cycle, got_cycle, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  for (genvar k = 0; k < NS; k++) begin : g_size
    localparam int N    = SIZES[k];
    localparam int ID_W = $clog2(N);
    logic [ID_W-1:0] id_k;
    logic [31:0]     rdata_k;
    iced_top #(.N_CLUSTERS(N)) dut (
      .clk, .rst_n,
      .pdw_valid, .pdw_rf, .pdw_pw, .pdw_toa, .pdw_ready(ready[k]),
      .out_valid(valid[k]), .out_id(id_k), .out_new(is_new[k]),
      .out_rf(o_rf[k]), .out_pw(o_pw[k]), .out_weight(o_w[k]), .out_pri(o_pri[k]),
      .host_wr, .host_rd, .host_addr, .host_wdata, .host_rdata(rdata_k)
    );
    assign id[k] = 4'(id_k);
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, int k, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("N=%0d %s: got %0d exp %0d", SIZES[k], what, got, exp_v);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (valid != '0 && valid != '1) begin
        failures++; $display("instances out of step: valid=%b", valid);
      end
      if (valid[0]) got_cycle = cycle;
      for (int k = 0; k < NS; k++) begin
        if (valid[k]) begin
          result_t e;
          if (exp_q[k].size() == 0) begin failures++; $display("N=%0d unexpected result", SIZES[k]); end
          else begin
            e = exp_q[k].pop_front();
            check("id", k, id[k], e.id);
            check("new", k, is_new[k], e.is_new);
            check("rf", k, o_rf[k], e.rf);
            check("pw", k, o_pw[k], e.pw);
            check("weight", k, o_w[k], e.w);
            check("pri", k, o_pri[k], e.pri);
          end
        end
      end
    end
  end

  // one PDW into every instance and every model; waits for its result when
  // `wait_result` is set so that the latency can be measured
  task automatic send(logic [15:0] rf, logic [15:0] pw, int unsigned toa, bit wait_result);
    @(negedge clk);
    pdw_rf = rf; pdw_pw = pw; pdw_toa = toa; pdw_valid = 1;
    while (ready != '1) @(negedge clk);
    sent_cycle = cycle + 1;   // the next edge writes the PDW
    @(negedge clk); pdw_valid = 0;
    for (int k = 0; k < NS; k++) begin
      result_t e;
      m[k].step(rf, pw, toa);
      e.id = m[k].o_id; e.is_new = m[k].o_new; e.rf = m[k].o_rf; e.pw = m[k].o_pw;
      e.w = m[k].o_w; e.pri = m[k].o_pri;
      exp_q[k].push_back(e);
      if (m[k].o_evict) evictions[k]++;
    end
    if (wait_result) begin
      while (exp_q[0].size() != 0) @(negedge clk);
      checks++;
      if (got_cycle - sent_cycle != 74) begin
        failures++; $display("latency %0d, expected 74", got_cycle - sent_cycle);
      end
    end
  endtask

  initial begin
    int unsigned toa;
    int          e, rf, pw;
    int          emit_rf [6];
    int          emit_pw [6];
    for (int k = 0; k < NS; k++) begin
      m[k] = new(SIZES[k]);
      evictions[k] = 0;
    end
    for (int j = 0; j < 6; j++) begin
      emit_rf[j] = 6000 + 9000 * j;
      emit_pw[j] = 1000 + 700 * j;
    end
    toa = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // isolated PDWs: latency at every size
    for (int i = 0; i < 6; i++) begin
      toa += 200;
      send(16'(emit_rf[i]), 16'(emit_pw[i]), toa, 1);
    end

    // interleaved stream: each PDW from a random emitter with jitter,
    // one in eight a noise pulse anywhere
    for (int i = 0; i < N_PDW; i++) begin
      toa += 20 + $urandom_range(0, 60);
      if ($urandom_range(0, 7) == 0) begin
        rf = $urandom_range(0, 65535);
        pw = $urandom_range(0, 65535);
      end else begin
        e  = $urandom_range(0, 5);
        rf = emit_rf[e] + $urandom_range(0, 40) - 20;
        pw = emit_pw[e] + $urandom_range(0, 20) - 10;
      end
      send(16'(rf), 16'(pw), toa, 0);
    end
    while (exp_q[NS-1].size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);

    for (int k = 0; k < NS; k++)
      $display("N=%0d: %0d evictions of active clusters, %0d active at end",
               SIZES[k], evictions[k], m[k].active_count());
    for (int k = 1; k < NS; k++) begin
      checks++;
      if (evictions[k] > evictions[k-1]) begin
        failures++; $display("N=%0d evicts more than N=%0d", SIZES[k], SIZES[k-1]);
      end
    end
    checks++;
    if (evictions[0] == 0) begin failures++; $display("N=2 never evicted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
