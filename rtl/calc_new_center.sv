// calc_new_center: works out, while the nearest cluster is still being
// searched for, the three states a cluster centre may take after this input:
//
//   current        coordinates kept, weight faded: w_f = max(w - f, 0)
//   pend_update    the input joins: c' = (c * w_f + x) / (w_f + 1) for RF and
//                  PW, weight w_f + 1, PRI estimate = toa - last_toa
//   pend_overwrite the cluster restarts at the input with weight 1
//
// When w_f + 1 reaches the host's maximum weight the weight is set to half
// the maximum (a shift), as the original ICED design prescribes. The running average is
// divided with two bit-serial dividers (RF and PW) and rounded to the nearest
// integer, a choice of this design: a truncating division would pull every
// centre steadily downwards once its weight is large, because any input below
// the centre moves it down by one while only inputs more than w_f + 1 above
// it can move it up. The new PRI of a restarted cluster is 0, which
// marks "no estimate yet".
//
// Timing: `start` samples the input; `w_faded` is valid one cycle later and
// `done` pulses 2*DATA_W+1 cycles after start, with all three states valid
// until the next start. The centre state `cur` must hold still meanwhile.
module calc_new_center
  import iced_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  coord_t  rf,
  input  coord_t  pw,
  input  toa_t    toa,
  input  weight_t fade_cycles,
  input  weight_t max_weight,
  input  center_t cur,
  output weight_t w_faded,
  output logic    done,
  output center_t current,
  output center_t pend_update,
  output center_t pend_overwrite
);

  localparam int unsigned NUM_W = 2 * DATA_W;

  coord_t  rf_q, pw_q;
  toa_t    toa_q;
  logic    go_q;
  logic    rf_done, pw_done;
  logic [NUM_W-1:0] rf_quo, pw_quo;
  logic [WEIGHT_W:0] rf_rem_unused, pw_rem_unused;
  logic [NUM_W-1:0] rf_num, pw_num;
  logic [WEIGHT_W:0] w_inc;

  always_comb begin
    w_inc  = {1'b0, w_faded} + 1'b1;
    // + (w_f + 1) / 2 rounds the quotient to the nearest integer
    rf_num = NUM_W'(cur.rf) * NUM_W'(w_faded) + NUM_W'(rf_q) + NUM_W'(w_inc >> 1);
    pw_num = NUM_W'(cur.pw) * NUM_W'(w_faded) + NUM_W'(pw_q) + NUM_W'(w_inc >> 1);
  end

  serial_div #(.NUM_W(NUM_W), .DEN_W(WEIGHT_W + 1)) u_div_rf (
    .clk, .rst_n, .start(go_q), .dividend(rf_num), .divisor(w_inc),
    .done(rf_done), .quotient(rf_quo), .remainder(rf_rem_unused)
  );

  serial_div #(.NUM_W(NUM_W), .DEN_W(WEIGHT_W + 1)) u_div_pw (
    .clk, .rst_n, .start(go_q), .dividend(pw_num), .divisor(w_inc),
    .done(pw_done), .quotient(pw_quo), .remainder(pw_rem_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_q    <= '0;
      pw_q    <= '0;
      toa_q   <= '0;
      go_q    <= 1'b0;
      w_faded <= '0;
    end else begin
      go_q <= start;
      if (start) begin
        rf_q    <= rf;
        pw_q    <= pw;
        toa_q   <= toa;
        w_faded <= (cur.weight > fade_cycles) ? cur.weight - fade_cycles : '0;
      end
    end
  end

  assign done = rf_done & pw_done;

  always_comb begin
    current        = cur;
    current.weight = w_faded;

    pend_update          = cur;
    pend_update.rf       = rf_quo[DATA_W-1:0];
    pend_update.pw       = pw_quo[DATA_W-1:0];
    pend_update.weight   = (w_inc >= {1'b0, max_weight}) ? (max_weight >> 1)
                                                         : w_inc[WEIGHT_W-1:0];
    pend_update.last_toa = toa_q;
    pend_update.pri      = toa_q - cur.last_toa;

    pend_overwrite.rf       = rf_q;
    pend_overwrite.pw       = pw_q;
    pend_overwrite.weight   = weight_t'(1);
    pend_overwrite.last_toa = toa_q;
    pend_overwrite.pri      = '0;
  end

endmodule
