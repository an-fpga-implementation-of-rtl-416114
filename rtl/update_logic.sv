// update_logic: turns the decision broadcast by the Cluster_assignment block
// (assigned cluster ID and whether it is updated or overwritten) into the
// select of one cluster centre's output multiplexer. The centre whose
// CLUSTER_ID matches takes pend_update or pend_overwrite; every other centre,
// and every centre while no decision is presented, keeps `current`.
// Purely combinational.
module update_logic
  import iced_pkg::*;
#(
  parameter int unsigned ID_W       = 4,
  parameter int unsigned CLUSTER_ID = 0
) (
  input  logic            valid,
  input  assign_type_e    assign_type,
  input  logic [ID_W-1:0] assign_id,
  output logic            hit,
  output coord_sel_e      coord_sel
);

  always_comb begin
    hit       = valid && (assign_id == ID_W'(CLUSTER_ID));
    coord_sel = SEL_CURRENT;
    if (hit) coord_sel = (assign_type == ASSIGN_UPDATE) ? SEL_PEND_UPDATE
                                                        : SEL_PEND_OVERWRITE;
  end

endmodule
