// clusters: the clustering engine of ICED. It holds N cluster_center slots,
// the Min_d and Min_w comparator trees, the Cluster_assignment rule and the
// Assigned multiplexer tree.
//
// For each input (normalized RF/PW, TOA, fade-cycle count) every slot
// measures its distance and fades its weight in the first cycle. The Min_d
// tree then finds the nearest active slot and Min_w the lightest slot; both
// results and the assignment decision are registered in the next two cycles.
// Meanwhile each slot computes its running-average update, which takes the
// bit-serial division time. When the slots are done the decision is
// broadcast (`commit`), every slot writes its new state, and the Assigned
// tree delivers the state and ID of the slot that took the input.
//
// Timing: `start` samples the input; `done` pulses 2*DATA_W+2 cycles later
// with the result held until the next done. `start` must not come again
// before `done`. `states` shows every slot to the host at all times.
module clusters
  import iced_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned ID_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  coord_t            rf,
  input  coord_t            pw,
  input  toa_t              toa,
  input  weight_t           fade_cycles,
  input  dist_t             threshold,
  input  weight_t           max_weight,
  output logic              done,
  output logic [ID_W-1:0]   out_id,
  output logic              out_new,    // the input started a new cluster
  output center_t           out_state,  // state of that cluster after the input
  output center_t [N-1:0]   states
);

  localparam int unsigned CW = $bits(center_t);

  logic    [N-1:0]        meas_valid, calc_done, active, hit;
  dist_t   [N-1:0]        distance;
  weight_t [N-1:0]        w_faded;
  center_t [N-1:0]        next;

  logic                   near_valid;
  dist_t                  near_dist;
  logic [ID_W-1:0]        near_id;
  logic                   light_valid_unused;
  weight_t                light_w_unused;
  logic [ID_W-1:0]        light_id;

  // registered tree results and decision
  logic                   tree_q;
  logic                   near_valid_q;
  dist_t                  near_dist_q;
  logic [ID_W-1:0]        near_id_q, light_id_q;
  assign_type_e           dec_type, dec_type_q;
  logic [ID_W-1:0]        dec_id, dec_id_q;

  logic                   commit;
  logic                   found;
  logic [CW-1:0]          win_data;
  logic [ID_W-1:0]        win_id;

  for (genvar j = 0; j < N; j++) begin : g_center
    cluster_center #(.ID_W(ID_W), .CLUSTER_ID(j)) u_center (
      .clk, .rst_n, .start,
      .rf, .pw, .toa, .fade_cycles, .max_weight,
      .meas_valid (meas_valid[j]),
      .distance   (distance[j]),
      .active     (active[j]),
      .w_faded    (w_faded[j]),
      .calc_done  (calc_done[j]),
      .commit,
      .assign_type(dec_type_q),
      .assign_id  (dec_id_q),
      .hit        (hit[j]),
      .next       (next[j]),
      .state      (states[j])
    );
  end

  min_tree #(.N(N), .KEY_W(DIST_W), .ID_W(ID_W)) u_min_d (
    .leaf_valid(active), .leaf_key(distance),
    .min_valid(near_valid), .min_key(near_dist), .min_id(near_id)
  );

  min_tree #(.N(N), .KEY_W(WEIGHT_W), .ID_W(ID_W)) u_min_w (
    .leaf_valid({N{1'b1}}), .leaf_key(w_faded),
    .min_valid(light_valid_unused), .min_key(light_w_unused), .min_id(light_id)
  );

  cluster_assignment #(.ID_W(ID_W)) u_assign (
    .near_valid(near_valid_q), .near_dist(near_dist_q), .near_id(near_id_q),
    .light_id(light_id_q), .threshold,
    .assign_type(dec_type), .assign_id(dec_id)
  );

  assigned_tree #(.N(N), .DATA_W(CW), .ID_W(ID_W)) u_assigned (
    .leaf_sel(hit), .leaf_data(next), .found, .data(win_data), .id(win_id)
  );

  // All slots run in lock step; slot 0 paces the sequence.
  assign commit = calc_done[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tree_q       <= 1'b0;
      near_valid_q <= 1'b0;
      near_dist_q  <= '0;
      near_id_q    <= '0;
      light_id_q   <= '0;
      dec_type_q   <= ASSIGN_OVERWRITE;
      dec_id_q     <= '0;
      done         <= 1'b0;
      out_id       <= '0;
      out_new      <= 1'b0;
      out_state    <= '0;
    end else begin
      tree_q <= meas_valid[0];
      if (meas_valid[0]) begin
        near_valid_q <= near_valid;
        near_dist_q  <= near_dist;
        near_id_q    <= near_id;
        light_id_q   <= light_id;
      end
      if (tree_q) begin
        dec_type_q <= dec_type;
        dec_id_q   <= dec_id;
      end
      done <= commit;
      if (commit) begin
        out_id    <= win_id;
        out_new   <= dec_type_q == ASSIGN_OVERWRITE;
        out_state <= center_t'(win_data);
      end
    end
  end

  // The slots finish together, and the decision is ready long before them.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (calc_done == '0) || (calc_done == '1));
  a_one_winner: assert property (@(posedge clk) disable iff (!rst_n)
    commit |-> found && $onehot(hit));

endmodule
