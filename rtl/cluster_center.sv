// cluster_center: one of the N cluster slots of the Clusters block.
//
// It holds the slot's state (the "Coordinates" register: RF and PW centre in
// normalized units, weight, TOA of the last assigned input and the PRI
// estimate) and, for each input, runs two things side by side: dist_meas
// finds the distance from the input to the centre, and calc_new_center
// fades the weight and prepares the updated and the overwritten state. When
// the Cluster_assignment decision comes back (`commit`), update_logic picks
// one of current / pend_update / pend_overwrite through a 3-way multiplexer;
// the result is written to the register and also offered to the Assigned
// tree as `next` together with `hit`.
//
// A slot is active while its faded weight is non-zero; inactive slots are
// marked so the nearest-cluster search skips them.
//
// Timing: `start` samples the input. `meas_valid` pulses one cycle later with
// `distance`, `active` and `w_faded` valid; `calc_done` pulses 2*DATA_W+1 cycles
// after start. `commit` may be given on or after calc_done, before the next
// start. All state resets to zero (no active cluster), as the algorithm
// requires.
module cluster_center
  import iced_pkg::*;
#(
  parameter int unsigned ID_W       = 4,
  parameter int unsigned CLUSTER_ID = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  // input broadcast from Norm and Fade
  input  logic            start,
  input  coord_t          rf,
  input  coord_t          pw,
  input  toa_t            toa,
  input  weight_t         fade_cycles,
  input  weight_t         max_weight,
  // towards the Min_d and Min_w trees
  output logic            meas_valid,
  output dist_t           distance,
  output logic            active,
  output weight_t         w_faded,
  output logic            calc_done,
  // decision fed back from Cluster_assignment
  input  logic            commit,
  input  assign_type_e    assign_type,
  input  logic [ID_W-1:0] assign_id,
  // towards the Assigned tree and the host
  output logic            hit,
  output center_t         next,
  output center_t         state
);

  center_t    current, pend_update, pend_overwrite;
  coord_sel_e coord_sel;

  dist_meas u_dist (
    .clk, .rst_n, .start,
    .rf, .pw, .c_rf(state.rf), .c_pw(state.pw),
    .done(meas_valid), .distance
  );

  calc_new_center u_calc (
    .clk, .rst_n, .start,
    .rf, .pw, .toa, .fade_cycles, .max_weight,
    .cur(state), .w_faded, .done(calc_done),
    .current, .pend_update, .pend_overwrite
  );

  update_logic #(.ID_W(ID_W), .CLUSTER_ID(CLUSTER_ID)) u_update (
    .valid(commit), .assign_type, .assign_id, .hit, .coord_sel
  );

  assign active = w_faded != '0;

  always_comb begin
    unique case (coord_sel)
      SEL_PEND_UPDATE:    next = pend_update;
      SEL_PEND_OVERWRITE: next = pend_overwrite;
      default:            next = current;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= '0;
    else if (commit) state <= next;
  end

endmodule
