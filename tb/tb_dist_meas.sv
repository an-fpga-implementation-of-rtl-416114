// tb_dist_meas: random and extreme points against |drf| + |dpw|, one-cycle
// latency.
module tb_dist_meas;
  import iced_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] rf, pw, c_rf, c_pw;
  logic [16:0] distance;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dist_meas dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rf = 0; pw = 0; c_rf = 0; c_pw = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i == 0) begin rf = 16'hFFFF; pw = 0; c_rf = 0; c_pw = 16'hFFFF; end
      else begin rf = 16'($urandom); pw = 16'($urandom); c_rf = 16'($urandom); c_pw = 16'($urandom); end
      start = 1; @(negedge clk); start = 0;
      checks += 2;
      if (!done) failures++;
      if (distance !== 17'(ref_l1(rf, pw, c_rf, c_pw))) begin
        failures++; $display("d(%0d,%0d;%0d,%0d)=%0d", rf, pw, c_rf, c_pw, distance);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
