// cluster_assignment: the ICED decision rule. If some cluster is active and
// the nearest one lies closer than the threshold D (strictly less), the input
// joins that cluster (ASSIGN_UPDATE with its ID); otherwise a new cluster is
// started over the lightest one (ASSIGN_OVERWRITE with the lightest ID).
// Because an empty slot has weight 0, the lightest slot is a free one
// whenever one exists. Combinational.
module cluster_assignment
  import iced_pkg::*;
#(
  parameter int unsigned ID_W = 4
) (
  input  logic            near_valid,
  input  dist_t           near_dist,
  input  logic [ID_W-1:0] near_id,
  input  logic [ID_W-1:0] light_id,
  input  dist_t           threshold,
  output assign_type_e    assign_type,
  output logic [ID_W-1:0] assign_id
);

  always_comb begin
    if (near_valid && (near_dist < threshold)) begin
      assign_type = ASSIGN_UPDATE;
      assign_id   = near_id;
    end else begin
      assign_type = ASSIGN_OVERWRITE;
      assign_id   = light_id;
    end
  end

endmodule
