// fade: counts the whole fade cycles that elapsed between the previous input
// and this one, f = (toa - toa_prev + r_prev) / L, and keeps the remainder r
// for the next input so that no fraction of a cycle is lost.
//
// The count is driven by the TOA stamps rather than a free-running timer, so
// inputs that waited in the FIFO still fade the clusters by the time that
// separated the pulses. TOA differences are taken modulo 2^TOA_W, so the
// stamp may wrap. The first input is measured from TOA 0 (all clusters are
// empty then, so this has no effect). `fade_cycles` saturates at the weight
// width, which fades any cluster to zero. A fade length of 0 divides by zero
// and also gives the saturated count. `start` samples toa and fade_len;
// `done` pulses TOA_W+3 cycles later.
module fade
  import iced_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  toa_t    toa,
  input  toa_t    fade_len,
  output logic    done,
  output weight_t fade_cycles
);

  localparam int unsigned NUM_W = TOA_W + 1;

  toa_t             toa_prev_q, rem_q, toa_q;
  logic [NUM_W-1:0] elapsed_q;
  logic             go_q;
  logic             div_done;
  logic [NUM_W-1:0] quo;
  toa_t             rem;

  serial_div #(.NUM_W(NUM_W), .DEN_W(TOA_W)) u_div (
    .clk, .rst_n,
    .start    (go_q),
    .dividend (elapsed_q),
    .divisor  (fade_len),
    .done     (div_done),
    .quotient (quo),
    .remainder(rem)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      toa_prev_q  <= '0;
      rem_q       <= '0;
      toa_q       <= '0;
      elapsed_q   <= '0;
      go_q        <= 1'b0;
      done        <= 1'b0;
      fade_cycles <= '0;
    end else begin
      go_q <= start;
      done <= div_done;
      if (start) begin
        toa_q     <= toa;
        elapsed_q <= NUM_W'(toa_t'(toa - toa_prev_q)) + NUM_W'(rem_q);
      end
      if (div_done) begin
        toa_prev_q  <= toa_q;
        rem_q       <= rem;
        fade_cycles <= (quo > NUM_W'({WEIGHT_W{1'b1}})) ? '1 : WEIGHT_W'(quo);
      end
    end
  end

endmodule
