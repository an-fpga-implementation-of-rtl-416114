// min_tree: binary tree of min2 comparators that finds the smallest key of N
// leaves and its index in ceil(log2 N) comparator levels. The same module,
// with the key width as a parameter, serves as Min_d (distance, only active
// clusters valid) and as Min_w (faded weight, all clusters valid). N need
// not be a power of two: missing leaves are padded as invalid. The tree is
// generated from N, so the number of clusters is a single parameter.
// Combinational; ties go to the lower index.
module min_tree #(
  parameter int unsigned N     = 16,
  parameter int unsigned KEY_W = 17,
  parameter int unsigned ID_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]            leaf_valid,
  input  logic [N-1:0][KEY_W-1:0] leaf_key,
  output logic                    min_valid,
  output logic [KEY_W-1:0]        min_key,
  output logic [ID_W-1:0]         min_id
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;  // leaves after padding
  localparam int unsigned NODES  = 2 * P - 1;    // heap: node i has children 2i+1, 2i+2

  logic [NODES-1:0]            n_valid;
  logic [NODES-1:0][KEY_W-1:0] n_key;
  logic [NODES-1:0][ID_W-1:0]  n_id;

  for (genvar l = 0; l < P; l++) begin : g_leaf
    if (l < N) begin : g_real
      assign n_valid[P-1+l] = leaf_valid[l];
      assign n_key[P-1+l]   = leaf_key[l];
    end else begin : g_pad
      assign n_valid[P-1+l] = 1'b0;
      assign n_key[P-1+l]   = '1;
    end
    assign n_id[P-1+l] = ID_W'(l);
  end

  for (genvar i = 0; i < P - 1; i++) begin : g_node
    min2 #(.KEY_W(KEY_W), .ID_W(ID_W)) u_min2 (
      .a_valid(n_valid[2*i+1]), .a_key(n_key[2*i+1]), .a_id(n_id[2*i+1]),
      .b_valid(n_valid[2*i+2]), .b_key(n_key[2*i+2]), .b_id(n_id[2*i+2]),
      .y_valid(n_valid[i]),     .y_key(n_key[i]),     .y_id(n_id[i])
    );
  end

  assign min_valid = n_valid[0];
  assign min_key   = n_key[0];
  assign min_id    = n_id[0];

endmodule
