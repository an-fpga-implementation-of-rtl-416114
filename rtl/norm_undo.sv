// norm_undo: converts a normalized coordinate of the assigned cluster back to
// native units, native = min + ((max - min) * norm) >> 16. The division by
// 65535 of the exact inverse is replaced by a 16-bit shift, which costs at
// most one unit and saves a divider, as the original ICED design does. Adding `min_v`
// back is needed for the inverse of the normalization and is part of this
// block. `start` samples the operands; `done` pulses one cycle later with
// `native` valid until the next start.
module norm_undo
  import iced_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  coord_t norm,
  input  coord_t min_v,
  input  coord_t max_v,
  output logic   done,
  output coord_t native
);

  logic [2*DATA_W-1:0] prod;

  assign prod = (2*DATA_W)'(coord_t'(max_v - min_v)) * (2*DATA_W)'(norm);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      native <= '0;
    end else begin
      done <= start;
      if (start) native <= min_v + prod[2*DATA_W-1:DATA_W];
    end
  end

endmodule
