// tb_cluster_center: one cluster slot (ID 2 of 4) driven with random inputs
// and random assignment decisions. The testbench keeps its own copy of the
// slot's state and checks distance, activity, faded weight, the multiplexer
// output offered to the Assigned tree and the register contents after each
// commit: updated when the decision names this slot, restarted on overwrite,
// only faded otherwise.
module tb_cluster_center;
  import iced_pkg::*;
  import iced_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, commit = 0;
  coord_t rf, pw;
  toa_t toa;
  weight_t fade_cycles, max_weight, w_faded;
  logic meas_valid, active, calc_done, hit;
  dist_t distance;
  assign_type_e assign_type;
  logic [1:0] assign_id;
  center_t next, state, ms;
  int checks = 0, failures = 0, n_upd = 0, n_ovw = 0, n_keep = 0;
  always #5 clk = ~clk;

  cluster_center #(.ID_W(2), .CLUSTER_ID(2)) dut (.*);

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
    ms = '0;
    rf = 0; pw = 0; toa = 0; fade_cycles = 0; max_weight = 10;
    assign_type = ASSIGN_UPDATE; assign_id = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      longint unsigned wf, wi;
      @(negedge clk);
      rf = (i % 2) ? 16'($urandom) : 16'(ms.rf + $urandom_range(0, 30));
      pw = 16'(ms.pw + $urandom_range(0, 30));
      toa = toa + $urandom_range(1, 1000);
      fade_cycles = (i % 5 == 0) ? 16'($urandom_range(0, 12)) : 16'h0;
      start = 1;
      @(negedge clk); start = 0;
      wf = (ms.weight > fade_cycles) ? ms.weight - fade_cycles : 0;
      check("meas_valid", meas_valid, 1);
      check("distance", distance, ref_l1(rf, pw, ms.rf, ms.pw));
      check("w_faded", w_faded, wf);
      check("active", active, wf != 0);
      while (!calc_done) @(negedge clk);
      assign_type = assign_type_e'($urandom_range(0, 1));
      assign_id = (i < 3) ? 2'd2 : 2'($urandom);
      commit = 1;
      #1;
      check("hit", hit, assign_id == 2);
      if (assign_id != 2) begin
        n_keep++;
        ms.weight = 16'(wf);
      end else if (assign_type == ASSIGN_UPDATE) begin
        n_upd++;
        wi = wf + 1;
        ms.rf = 16'((longint'(ms.rf) * wf + rf + wi / 2) / wi);
        ms.pw = 16'((longint'(ms.pw) * wf + pw + wi / 2) / wi);
        ms.weight = (wi >= max_weight) ? max_weight >> 1 : 16'(wi);
        ms.pri = toa - ms.last_toa;
        ms.last_toa = toa;
      end else begin
        n_ovw++;
        ms = '{rf: rf, pw: pw, weight: 1, last_toa: toa, pri: 0};
      end
      check("next", next, ms);
      @(negedge clk); commit = 0;
      check("state", state, ms);
    end
    checks++; if (n_upd == 0 || n_ovw == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
