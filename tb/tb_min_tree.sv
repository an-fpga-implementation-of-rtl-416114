// tb_min_tree: a 16-leaf tree (Min_d configuration) and a 5-leaf tree
// (padding) fed with random keys and valid flags, many of them equal,
// against a linear search with lower-index ties.
module tb_min_tree;
  logic [15:0]       v16;
  logic [15:0][16:0] k16;
  logic              mv16;
  logic [16:0]       mk16;
  logic [3:0]        mi16;
  logic [4:0]        v5;
  logic [4:0][15:0]  k5;
  logic              mv5;
  logic [15:0]       mk5;
  logic [2:0]        mi5;
  int checks = 0, failures = 0;

  min_tree #(.N(16), .KEY_W(17)) dut16 (.leaf_valid(v16), .leaf_key(k16), .min_valid(mv16), .min_key(mk16), .min_id(mi16));
  min_tree #(.N(5),  .KEY_W(16)) dut5  (.leaf_valid(v5),  .leaf_key(k5),  .min_valid(mv5),  .min_key(mk5),  .min_id(mi5));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int e16, e5;
      for (int j = 0; j < 16; j++) begin
        v16[j] = (t % 9 == 0) ? 1'b0 : 1'($urandom_range(0, 3) != 0);
        k16[j] = 17'($urandom_range(0, (t % 2) ? 8 : 131071));
      end
      for (int j = 0; j < 5; j++) begin
        v5[j] = (t % 3 == 0) ? 1'b1 : 1'($urandom);
        k5[j] = 16'($urandom_range(0, 6));
      end
      #1;
      e16 = -1; e5 = -1;
      for (int j = 0; j < 16; j++) if (v16[j] && (e16 < 0 || k16[j] < k16[e16])) e16 = j;
      for (int j = 0; j < 5; j++)  if (v5[j]  && (e5 < 0  || k5[j]  < k5[e5]))   e5 = j;
      checks += 2;
      if (e16 < 0 ? mv16 : !(mv16 && mi16 == 4'(e16) && mk16 == k16[e16])) begin
        failures++; $display("tree16 t%0d got %0d exp %0d", t, mi16, e16);
      end
      if (e5 < 0 ? mv5 : !(mv5 && mi5 == 3'(e5) && mk5 == k5[e5])) begin
        failures++; $display("tree5 t%0d got %0d exp %0d", t, mi5, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
