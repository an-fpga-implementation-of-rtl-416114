// tb_cluster_assignment: random nearest/lightest candidates and thresholds,
// including distance equal to the threshold and no active cluster.
module tb_cluster_assignment;
  import iced_pkg::*;
  logic near_valid;
  dist_t near_dist, threshold;
  logic [3:0] near_id, light_id, assign_id;
  assign_type_e assign_type;
  int checks = 0, failures = 0;

  cluster_assignment #(.ID_W(4)) dut (.*);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      bit upd;
      near_valid = (i % 10) != 0;
      threshold = dist_t'($urandom_range(0, 300));
      near_dist = (i % 5 == 1) ? threshold : dist_t'($urandom_range(0, 400));
      near_id = 4'($urandom); light_id = 4'($urandom);
      #1;
      upd = near_valid && (near_dist < threshold);
      checks++;
      if (upd ? (assign_type !== ASSIGN_UPDATE || assign_id !== near_id)
              : (assign_type !== ASSIGN_OVERWRITE || assign_id !== light_id)) begin
        failures++; $display("v%0d d%0d D%0d -> %0d/%0d", near_valid, near_dist, threshold, assign_type, assign_id);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
