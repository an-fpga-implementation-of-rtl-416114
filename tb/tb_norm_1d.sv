// tb_norm_1d: random and corner-case operands for one normalization unit,
// compared with (din - min) * 65536 / (max - min) computed in the testbench,
// including clamping and saturation; also checks the 33-cycle latency.
module tb_norm_1d;
  import iced_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] din, mn, mx, dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  norm_1d dut (.clk, .rst_n, .start, .din, .min_v(mn), .max_v(mx), .done, .dout);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(logic [15:0] a, logic [15:0] lo, logic [15:0] hi);
    int cyc;
    logic [15:0] exp_v;
    cyc = 0;
    @(negedge clk);
    din = a; mn = lo; mx = hi; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    exp_v = ref_norm(a, lo, hi);
    checks++;
    if (dout !== exp_v) begin failures++; $display("norm(%0d,%0d,%0d)=%0d exp %0d", a, lo, hi, dout, exp_v); end
    checks++;
    if (cyc != 33) begin failures++; $display("latency %0d", cyc); end
    @(posedge clk);
  endtask

  initial begin
    din = 0; mn = 0; mx = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    run(100, 100, 200); run(150, 100, 200); run(199, 100, 200); run(200, 100, 200);
    run(50, 100, 200); run(1, 0, 16'hFFFF); run(16'hFFFE, 0, 16'hFFFF); run(8000, 0, 16'hFFFF);
    for (int i = 0; i < 300; i++) begin
      logic [15:0] lo, hi;
      lo = 16'($urandom); hi = 16'($urandom);
      if (lo > hi) begin logic [15:0] t = lo; lo = hi; hi = t; end
      run(16'($urandom_range(lo, hi)), lo, hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
