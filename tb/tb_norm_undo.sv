// tb_norm_undo: random ranges and coordinates against
// min + ((max - min) * norm >> 16); round trip through the reference
// normalization stays within one unit.
module tb_norm_undo;
  import iced_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] norm, min_v, max_v, native;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  norm_undo dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    norm = 0; min_v = 0; max_v = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic [15:0] x;
      @(negedge clk);
      min_v = 16'($urandom_range(0, 30000)); max_v = 16'($urandom_range(min_v + 1, 65535));
      x = 16'($urandom_range(min_v, max_v));
      norm = ref_norm(x, min_v, max_v);
      start = 1; @(negedge clk); start = 0;
      checks += 3;
      if (!done) failures++;
      if (native !== ref_undo(norm, min_v, max_v)) begin failures++; $display("undo %0d -> %0d", norm, native); end
      if (!(native == x || native + 1 == x)) begin failures++; $display("round trip %0d -> %0d", x, native); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
