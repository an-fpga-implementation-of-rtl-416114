// tb_fade: a sequence of TOA stamps, including a counter wrap and long gaps
// that saturate the count, against f = (toa - prev + r) / L with the
// remainder carried; checks the 35-cycle latency.
module tb_fade;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] toa, fade_len;
  logic [15:0] fade_cycles;
  int checks = 0, failures = 0;
  longint unsigned prev = 0, r = 0, e, f;
  always #5 clk = ~clk;

  fade dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(logic [31:0] t, logic [31:0] len);
    int cyc;
    cyc = 0;
    @(negedge clk);
    toa = t; fade_len = len; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    e = longint'(32'(t - 32'(prev))) + r;
    f = e / len; r = e % len; prev = t;
    if (f > 65535) f = 65535;
    checks += 2;
    if (fade_cycles !== 16'(f)) begin failures++; $display("toa %0d: f=%0d exp %0d", t, fade_cycles, f); end
    if (cyc != 35) begin failures++; $display("latency %0d", cyc); end
    @(posedge clk);
  endtask

  initial begin
    toa = 0; fade_len = 3000;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    run(1000, 3000); run(2500, 3000); run(3100, 3000); run(9100, 3000);
    run(32'hFFFF_F000, 3000);                // huge gap: saturates
    run(32'h0000_1000, 3000);                // TOA wraps
    for (int i = 0; i < 300; i++) begin
      logic [31:0] len;
      len = (i % 7 == 0) ? 32'($urandom_range(1, 5)) : 32'($urandom_range(100, 20000));
      run(32'(prev) + 32'($urandom_range(0, 40000)), len);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
