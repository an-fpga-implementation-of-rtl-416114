// tb_norm_2d: RF and PW normalized together with different ranges; each
// output compared with the reference formula.
module tb_norm_2d;
  import iced_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] rf, pw, rf_min, rf_max, pw_min, pw_max, rf_norm, pw_norm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  norm_2d dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rf = 0; pw = 0; rf_min = 1000; rf_max = 9000; pw_min = 10; pw_max = 700;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rf = 16'($urandom_range(0, 10000)); pw = 16'($urandom_range(0, 800));
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks += 2;
      if (rf_norm !== ref_norm(rf, rf_min, rf_max)) begin failures++; $display("rf %0d -> %0d", rf, rf_norm); end
      if (pw_norm !== ref_norm(pw, pw_min, pw_max)) begin failures++; $display("pw %0d -> %0d", pw, pw_norm); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
