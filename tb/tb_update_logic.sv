// tb_update_logic: every combination of valid, type and ID against the
// expected multiplexer select for slot 5.
module tb_update_logic;
  import iced_pkg::*;
  logic valid, hit;
  assign_type_e assign_type;
  logic [3:0] assign_id;
  coord_sel_e coord_sel, exp_sel;
  int checks = 0, failures = 0;

  update_logic #(.ID_W(4), .CLUSTER_ID(5)) dut (.*);

  initial begin
    for (int v = 0; v < 2; v++)
      for (int t = 0; t < 2; t++)
        for (int i = 0; i < 16; i++) begin
          valid = v[0]; assign_type = assign_type_e'(t[0]); assign_id = 4'(i);
          #1;
          exp_sel = SEL_CURRENT;
          if (v == 1 && i == 5) exp_sel = (t == 0) ? SEL_PEND_UPDATE : SEL_PEND_OVERWRITE;
          checks += 2;
          if (coord_sel !== exp_sel) begin failures++; $display("v%0d t%0d id%0d sel %0d", v, t, i, coord_sel); end
          if (hit !== (v == 1 && i == 5)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
