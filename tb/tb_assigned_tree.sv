// tb_assigned_tree: one-hot selects on a 16-leaf and a 3-leaf tree bring
// the selected leaf's data and index out; no select gives found = 0.
module tb_assigned_tree;
  logic [15:0]       s16;
  logic [15:0][63:0] d16;
  logic              f16;
  logic [63:0]       o16;
  logic [3:0]        i16;
  logic [2:0]        s3;
  logic [2:0][7:0]   d3;
  logic              f3;
  logic [7:0]        o3;
  logic [1:0]        i3;
  int checks = 0, failures = 0;

  assigned_tree #(.N(16), .DATA_W(64)) dut16 (.leaf_sel(s16), .leaf_data(d16), .found(f16), .data(o16), .id(i16));
  assigned_tree #(.N(3),  .DATA_W(8))  dut3  (.leaf_sel(s3),  .leaf_data(d3),  .found(f3),  .data(o3),  .id(i3));

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int w16, w3;
      w16 = (t % 17 == 16) ? -1 : t % 16;
      w3  = (t % 4 == 3) ? -1 : t % 3;
      for (int j = 0; j < 16; j++) begin d16[j] = {$urandom, $urandom}; s16[j] = (j == w16); end
      for (int j = 0; j < 3; j++)  begin d3[j] = 8'($urandom); s3[j] = (j == w3); end
      #1;
      checks += 2;
      if (w16 < 0 ? f16 : !(f16 && i16 == 4'(w16) && o16 == d16[w16])) begin failures++; $display("t%0d 16: %0d", t, i16); end
      if (w3 < 0 ? f3 : !(f3 && i3 == 2'(w3) && o3 == d3[w3])) begin failures++; $display("t%0d 3: %0d", t, i3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
