// min2: one node of the Min_d / Min_w comparator trees. Passes on the
// smaller key of its two children together with its ID. A child without
// `valid` never wins; on equal keys the left child (lower cluster ID) wins,
// which is this design's tie rule. Combinational.
module min2 #(
  parameter int unsigned KEY_W = 17,
  parameter int unsigned ID_W  = 4
) (
  input  logic             a_valid,
  input  logic [KEY_W-1:0] a_key,
  input  logic [ID_W-1:0]  a_id,
  input  logic             b_valid,
  input  logic [KEY_W-1:0] b_key,
  input  logic [ID_W-1:0]  b_id,
  output logic             y_valid,
  output logic [KEY_W-1:0] y_key,
  output logic [ID_W-1:0]  y_id
);

  logic take_b;

  always_comb begin
    take_b  = b_valid && (!a_valid || (b_key < a_key));
    y_valid = a_valid | b_valid;
    y_key   = take_b ? b_key : a_key;
    y_id    = take_b ? b_id  : a_id;
  end

endmodule
