// mux2: one node of the Assigned tree. Forwards the data and ID of whichever
// child carries the `sel` flag of the winning cluster (the left one if both
// do, which a correct decision never causes). Combinational.
module mux2 #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ID_W   = 4
) (
  input  logic              a_sel,
  input  logic [DATA_W-1:0] a_data,
  input  logic [ID_W-1:0]   a_id,
  input  logic              b_sel,
  input  logic [DATA_W-1:0] b_data,
  input  logic [ID_W-1:0]   b_id,
  output logic              y_sel,
  output logic [DATA_W-1:0] y_data,
  output logic [ID_W-1:0]   y_id
);

  always_comb begin
    y_sel  = a_sel | b_sel;
    y_data = a_sel ? a_data : b_data;
    y_id   = a_sel ? a_id   : b_id;
  end

endmodule
