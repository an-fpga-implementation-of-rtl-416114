// norm_1d: maps one PDW parameter from its expected range [min_v, max_v]
// onto the full 16-bit scale, norm = (din - min_v) * 65536 / (max_v - min_v).
//
// Multiplying by 65536 instead of 65535 turns the scaling into a 16-bit
// shift of the dividend, as the original ICED design does; the division by the runtime
// range uses a bit-serial divider. Inputs at or below min_v give 0 and inputs
// at or above max_v give 65535 (the clamp and the saturation of a quotient of
// 65536 are this design's choices). `start` samples din, min_v and max_v;
// `done` pulses DATA_W*2+1 cycles later with `dout` valid until the next
// start.
module norm_1d #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] min_v,
  input  logic [DATA_W-1:0] max_v,
  output logic              done,
  output logic [DATA_W-1:0] dout
);

  localparam int unsigned NUM_W = 2 * DATA_W;

  logic              below_q, above_q;
  logic              div_done;
  logic [NUM_W-1:0]  quo;
  logic [DATA_W-1:0] rem_unused;
  logic [NUM_W-1:0]  dividend;

  assign dividend = {DATA_W'(din - min_v), {DATA_W{1'b0}}};

  serial_div #(.NUM_W(NUM_W), .DEN_W(DATA_W)) u_div (
    .clk, .rst_n,
    .start    (start),
    .dividend (dividend),
    .divisor  (max_v - min_v),
    .done     (div_done),
    .quotient (quo),
    .remainder(rem_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      below_q <= 1'b0;
      above_q <= 1'b0;
      done    <= 1'b0;
      dout    <= '0;
    end else begin
      if (start) begin
        below_q <= din <= min_v;
        above_q <= din >= max_v;
      end
      done <= div_done;
      if (div_done) begin
        if (below_q)                     dout <= '0;
        else if (above_q)                dout <= '1;
        else if (quo[NUM_W-1:DATA_W] != '0) dout <= '1;
        else                             dout <= quo[DATA_W-1:0];
      end
    end
  end

endmodule
