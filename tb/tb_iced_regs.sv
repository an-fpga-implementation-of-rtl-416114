// tb_iced_regs: reset values, write/read of every configuration register,
// read of the processed counter and of every field of every cluster slot
// (4 slots), and zero for addresses beyond the last slot.
module tb_iced_regs;
  import iced_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [7:0] addr;
  logic [31:0] wdata, rdata, processed;
  cfg_t cfg;
  center_t [3:0] states;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  iced_regs #(.N(4), .ADDR_W(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s: got %0d exp %0d", what, got, exp_v); end
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd_en = 1;
    @(negedge clk); rd_en = 0; d = rdata;
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr_en = 1;
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    logic [31:0] d;
    logic [31:0] vals[7];
    addr = 0; wdata = 0; processed = 32'd1234;
    for (int j = 0; j < 4; j++) states[j] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk); rst_n = 1;
    rd(0, d); check("reset threshold", d, 100);
    rd(1, d); check("reset fade", d, 3000);
    rd(4, d); check("reset rf max", d, 16'hFFFF);
    vals = '{17'($urandom), $urandom, 16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
    for (int a = 0; a < 7; a++) wr(8'(a), vals[a]);
    for (int a = 0; a < 7; a++) begin rd(8'(a), d); check("cfg readback", d, vals[a]); end
    check("cfg.threshold", cfg.threshold, vals[0]);
    check("cfg.fade_len", cfg.fade_len, vals[1]);
    check("cfg.max_weight", cfg.max_weight, vals[2]);
    check("cfg.pw_max", cfg.pw_max, vals[6]);
    rd(7, d); check("processed", d, 1234);
    for (int j = 0; j < 4; j++) begin
      rd(8'h80 + 8'(4*j + 0), d); check("slot rf", d, states[j].rf);
      rd(8'h80 + 8'(4*j + 1), d); check("slot pw", d, states[j].pw);
      rd(8'h80 + 8'(4*j + 2), d); check("slot w", d, states[j].weight);
      rd(8'h80 + 8'(4*j + 3), d); check("slot pri", d, states[j].pri);
    end
    rd(8'h80 + 8'd16, d); check("beyond last slot", d, 0);
    wr(8'h81, 32'hDEAD);  // cluster area is read only
    rd(8'h01, d); check("fade unchanged", d, vals[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
