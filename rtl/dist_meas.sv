// dist_meas: Manhattan (L1) distance between the normalized input and one
// cluster centre, |rf - c_rf| + |pw - c_pw|. The original ICED design picks this metric
// because it needs no multiplier, and keeps it in a module of its own so that
// another metric can be dropped in. The result is registered: `start` samples
// the operands and `done` pulses one cycle later with `distance` valid until the
// next start.
module dist_meas
  import iced_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  coord_t rf,
  input  coord_t pw,
  input  coord_t c_rf,
  input  coord_t c_pw,
  output logic   done,
  output dist_t  distance
);

  coord_t d_rf, d_pw;

  always_comb begin
    d_rf = (rf >= c_rf) ? rf - c_rf : c_rf - rf;
    d_pw = (pw >= c_pw) ? pw - c_pw : c_pw - pw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      distance <= '0;
    end else begin
      done <= start;
      if (start) distance <= DIST_W'(d_rf) + DIST_W'(d_pw);
    end
  end

endmodule
