// tb_pdw_fifo: a 16-deep FIFO driven with random simultaneous writes and
// reads against a queue model, in phases that fill it to full (extra writes
// dropped), drain it to empty (extra reads ignored) and mix both.
module tb_pdw_fifo;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, empty, full;
  logic [63:0] wr_data, rd_data;
  logic [4:0] level;
  logic [63:0] q[$];
  logic [63:0] exp_v;
  int checks = 0, failures = 0, saw_full = 0, saw_empty_rd = 0;
  always #5 clk = ~clk;

  pdw_fifo #(.WIDTH(64), .DEPTH(16)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_data = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int phase, sz;
      bit popped;
      phase = (i / 200) % 3;   // fill, drain, mixed
      @(negedge clk);
      checks += 3;
      if (empty !== (q.size() == 0)) begin failures++; $display("empty flag"); end
      if (full !== (q.size() == 16)) begin failures++; $display("full flag"); end
      if (level !== 5'(q.size())) begin failures++; $display("level %0d exp %0d", level, q.size()); end
      wr_en = (phase == 0) ? 1'($urandom_range(0, 3) != 0) : (phase == 1) ? 1'($urandom_range(0, 3) == 0) : 1'($urandom);
      rd_en = (phase == 0) ? 1'($urandom_range(0, 3) == 0) : (phase == 1) ? 1'($urandom_range(0, 3) != 0) : 1'($urandom);
      wr_data = {$urandom, $urandom};
      if (full && wr_en) saw_full++;
      if (empty && rd_en) saw_empty_rd++;
      sz = q.size();
      popped = 0;
      if (rd_en && sz > 0) begin exp_v = q.pop_front(); popped = 1; end
      if (wr_en && sz < 16) q.push_back(wr_data);
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      if (popped) begin
        checks++;
        if (rd_data !== exp_v) begin failures++; $display("read %h exp %h", rd_data, exp_v); end
      end
    end
    checks += 2;
    if (saw_full == 0) begin failures++; $display("never written while full"); end
    if (saw_empty_rd == 0) begin failures++; $display("never read while empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
