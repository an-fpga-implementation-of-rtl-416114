// serial_div: unsigned restoring divider, one quotient bit per clock.
//
// Norm, Fade and Calc_new_center all divide by a runtime value that is not a
// power of two, so each uses one of these. A pulse on `start` loads the
// operands; the divider then shifts the dividend into a partial remainder
// one bit per cycle and subtracts the divisor whenever it fits. `done` is high
// for one cycle, NUM_W cycles after `start`, with `quotient` and `remainder`
// valid from then until the next `start`. Division by zero gives an all-ones
// quotient and the dividend as remainder (what the restoring recurrence
// produces). The bit-serial structure is this design's choice; the original ICED design
// only says that these blocks divide.
module serial_div #(
  parameter int unsigned NUM_W = 32,
  parameter int unsigned DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] dividend,
  input  logic [DEN_W-1:0] divisor,
  output logic             done,
  output logic [NUM_W-1:0] quotient,
  output logic [DEN_W-1:0] remainder
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [DEN_W-1:0] den_q;
  logic [DEN_W-1:0] rem_q;
  logic [NUM_W-1:0] quo_q;
  logic [CNT_W-1:0] cnt_q;

  logic [DEN_W:0]   trial;   // partial remainder shifted by one bit
  logic             fits;

  always_comb begin
    trial = {rem_q, quo_q[NUM_W-1]};
    fits  = trial >= {1'b0, den_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      den_q <= '0;
      rem_q <= '0;
      quo_q <= '0;
      cnt_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        den_q <= divisor;
        rem_q <= '0;
        quo_q <= dividend;
        cnt_q <= CNT_W'(NUM_W);
      end else if (cnt_q != '0) begin
        rem_q <= fits ? DEN_W'(trial - {1'b0, den_q}) : DEN_W'(trial);
        quo_q <= {quo_q[NUM_W-2:0], fits};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNT_W'(1)) done <= 1'b1;
      end
    end
  end

  assign quotient  = quo_q;
  assign remainder = rem_q;

endmodule
