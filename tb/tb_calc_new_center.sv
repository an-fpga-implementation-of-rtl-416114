// tb_calc_new_center: random cluster states, inputs and fade counts; checks
// the faded weight, the running-average update (rounded to nearest), the
// weight halving at the maximum, the PRI estimate, the overwrite state and
// the 33-cycle latency.
module tb_calc_new_center;
  import iced_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  coord_t rf, pw;
  toa_t toa;
  weight_t fade_cycles, max_weight, w_faded;
  center_t cur, current, pend_update, pend_overwrite;
  int checks = 0, failures = 0, halved = 0;
  always #5 clk = ~clk;

  calc_new_center dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s: got %0d exp %0d", what, got, exp_v); end
  endtask

  initial begin
    rf = 0; pw = 0; toa = 0; fade_cycles = 0; max_weight = 4096; cur = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      int cyc;
      longint unsigned wf, wi;
      @(negedge clk);
      cyc = 0;
      cur.rf = 16'($urandom); cur.pw = 16'($urandom);
      cur.weight = (i % 4 == 0) ? 16'($urandom) : 16'($urandom_range(0, 40));
      cur.last_toa = $urandom; cur.pri = $urandom;
      rf = 16'($urandom); pw = 16'($urandom); toa = $urandom;
      fade_cycles = (i % 3 == 0) ? 16'($urandom) : 16'($urandom_range(0, 5));
      max_weight = (i % 5 == 0) ? 16'($urandom_range(2, 40)) : 16'hFFFF;
      start = 1; @(negedge clk); start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      wf = (cur.weight > fade_cycles) ? cur.weight - fade_cycles : 0;
      wi = wf + 1;
      check("latency", cyc, 33);
      check("w_faded", w_faded, wf);
      check("current.weight", current.weight, wf);
      check("current.rf", current.rf, cur.rf);
      check("upd.rf", pend_update.rf, (longint'(cur.rf) * wf + rf + wi / 2) / wi);
      check("upd.pw", pend_update.pw, (longint'(cur.pw) * wf + pw + wi / 2) / wi);
      if (wi >= max_weight) begin halved++; check("upd.w halved", pend_update.weight, max_weight >> 1); end
      else check("upd.w", pend_update.weight, wi);
      check("upd.pri", pend_update.pri, 32'(toa - cur.last_toa));
      check("upd.last", pend_update.last_toa, toa);
      check("ovw.rf", pend_overwrite.rf, rf);
      check("ovw.pw", pend_overwrite.pw, pw);
      check("ovw.w", pend_overwrite.weight, 1);
      check("ovw.pri", pend_overwrite.pri, 0);
      @(posedge clk);
    end
    checks++; if (halved == 0) begin failures++; $display("halving never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
