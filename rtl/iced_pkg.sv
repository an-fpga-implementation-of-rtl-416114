// iced_pkg: widths, types and reset values shared by the ICED incremental
// clustering deinterleaver.
//
// A pulse descriptor word (PDW) carries 16-bit RF and PW measurements and a
// 32-bit time of arrival (TOA); coordinates are kept as 16-bit normalized
// values inside the clustering engine. The Manhattan distance of two 16-bit
// points needs 17 bits. Weight width (16 bits) and the reset values of the
// host registers are this design's own choices; threshold 100 and fade
// length 3000 are the values used for the two-emitter overlap scenario.
package iced_pkg;

  localparam int unsigned DATA_W   = 16;  // RF, PW and normalized coordinates
  localparam int unsigned TOA_W    = 32;  // time of arrival
  localparam int unsigned DIST_W   = DATA_W + 1;
  localparam int unsigned WEIGHT_W = 16;  // cluster weight and fade-cycle count

  typedef logic [DATA_W-1:0]   coord_t;
  typedef logic [TOA_W-1:0]    toa_t;
  typedef logic [DIST_W-1:0]   dist_t;
  typedef logic [WEIGHT_W-1:0] weight_t;

  // One pulse descriptor word as written into the input FIFO.
  typedef struct packed {
    coord_t rf;
    coord_t pw;
    toa_t   toa;
  } pdw_t;

  // State of one cluster centre (the "Coordinates" register).
  typedef struct packed {
    coord_t  rf;
    coord_t  pw;
    weight_t weight;
    toa_t    last_toa;  // TOA of the last input assigned to the cluster
    toa_t    pri;       // TOA difference of the last two assignments
  } center_t;

  // What the Cluster_assignment block decides for one input.
  typedef enum logic [0:0] {
    ASSIGN_UPDATE    = 1'b0,  // add input to the nearest cluster
    ASSIGN_OVERWRITE = 1'b1   // start a new cluster over the lightest one
  } assign_type_e;

  // Select of the per-cluster output multiplexer.
  typedef enum logic [1:0] {
    SEL_CURRENT        = 2'd0,
    SEL_PEND_UPDATE    = 2'd1,
    SEL_PEND_OVERWRITE = 2'd2
  } coord_sel_e;

  // Runtime configuration written by the host.
  typedef struct packed {
    dist_t   threshold;   // D: distance below which an input joins a cluster
    toa_t    fade_len;    // L: TOA ticks per fade cycle
    weight_t max_weight;  // weight at which a cluster is halved
    coord_t  rf_min;
    coord_t  rf_max;
    coord_t  pw_min;
    coord_t  pw_max;
  } cfg_t;

  localparam cfg_t CFG_RESET = '{
    threshold:  dist_t'(100),
    fade_len:   toa_t'(3000),
    max_weight: weight_t'(4096),
    rf_min:     coord_t'(0),
    rf_max:     coord_t'(16'hFFFF),
    pw_min:     coord_t'(0),
    pw_max:     coord_t'(16'hFFFF)
  };

endpackage
