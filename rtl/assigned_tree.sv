// assigned_tree: binary tree of mux2 nodes that brings the state of the
// winning cluster (the one whose `leaf_sel` is set) and its ID to a single
// output, in ceil(log2 N) multiplexer levels, generated from N. `found` is
// low if no leaf is selected. Combinational.
module assigned_tree #(
  parameter int unsigned N      = 16,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ID_W   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]             leaf_sel,
  input  logic [N-1:0][DATA_W-1:0] leaf_data,
  output logic                     found,
  output logic [DATA_W-1:0]        data,
  output logic [ID_W-1:0]          id
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;
  localparam int unsigned NODES  = 2 * P - 1;

  logic [NODES-1:0]             n_sel;
  logic [NODES-1:0][DATA_W-1:0] n_data;
  logic [NODES-1:0][ID_W-1:0]   n_id;

  for (genvar l = 0; l < P; l++) begin : g_leaf
    if (l < N) begin : g_real
      assign n_sel[P-1+l]  = leaf_sel[l];
      assign n_data[P-1+l] = leaf_data[l];
    end else begin : g_pad
      assign n_sel[P-1+l]  = 1'b0;
      assign n_data[P-1+l] = '0;
    end
    assign n_id[P-1+l] = ID_W'(l);
  end

  for (genvar i = 0; i < P - 1; i++) begin : g_node
    mux2 #(.DATA_W(DATA_W), .ID_W(ID_W)) u_mux2 (
      .a_sel(n_sel[2*i+1]), .a_data(n_data[2*i+1]), .a_id(n_id[2*i+1]),
      .b_sel(n_sel[2*i+2]), .b_data(n_data[2*i+2]), .b_id(n_id[2*i+2]),
      .y_sel(n_sel[i]),     .y_data(n_data[i]),     .y_id(n_id[i])
    );
  end

  assign found = n_sel[0];
  assign data  = n_data[0];
  assign id    = n_id[0];

endmodule
