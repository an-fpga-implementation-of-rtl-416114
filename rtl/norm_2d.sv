// norm_2d: the Norm block. Normalizes RF and PW of one PDW at the same time
// with two norm_1d units, each given its own range from the host registers.
// `start` samples both parameters; `done` pulses when both normalized values
// are valid (the two units run in lock step, 2*DATA_W+1 cycles).
module norm_2d
  import iced_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  coord_t rf,
  input  coord_t pw,
  input  coord_t rf_min,
  input  coord_t rf_max,
  input  coord_t pw_min,
  input  coord_t pw_max,
  output logic   done,
  output coord_t rf_norm,
  output coord_t pw_norm
);

  logic rf_done, pw_done;

  norm_1d #(.DATA_W(DATA_W)) u_rf (
    .clk, .rst_n, .start,
    .din(rf), .min_v(rf_min), .max_v(rf_max), .done(rf_done), .dout(rf_norm)
  );

  norm_1d #(.DATA_W(DATA_W)) u_pw (
    .clk, .rst_n, .start,
    .din(pw), .min_v(pw_min), .max_v(pw_max), .done(pw_done), .dout(pw_norm)
  );

  assign done = rf_done & pw_done;

endmodule
