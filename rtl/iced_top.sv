// iced_top: ICED, incremental clustering of evolving data, as a radar pulse
// deinterleaver. Each pulse descriptor word (RF, PW, TOA) is assigned to a
// cluster (a presumed emitter), and the cluster's ID and its running-average
// RF and PW, in native units, are returned together with a PRI estimate.
//
// Data path: PDWs are written into pdw_fifo. A small sequencer takes one PDW
// at a time, because each input must finish updating the clusters before the
// next one can be clustered. Norm (RF and PW) and Fade (TOA) then run in
// parallel; their results go to the Clusters engine; the coordinates of the
// assigned cluster are converted back to native units by two norm_undo units
// and presented on the out_* ports for one cycle. iced_regs holds the
// host-programmable configuration and exposes every cluster slot.
//
// Timing with the default widths: out_valid is raised by the 74th clock edge
// after the edge that writes a PDW into an empty FIFO while the engine is
// idle: 1 edge to pop the FIFO, 1 to present the word, 35 for Fade (Norm, 33,
// runs under it), 1 to start Clusters, 34 for Clusters, 1 for norm_undo and 1
// for the output register. One PDW is processed at a time, at the same pace,
// so further PDWs wait in the FIFO. The 16-cluster default and the overall
// structure follow the original ICED design; the sequencer, FIFO depth,
// register map and port list are this design's own.
module iced_top
  import iced_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = 16,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned ADDR_W     = 8,
  localparam int unsigned ID_W      = (N_CLUSTERS > 1) ? $clog2(N_CLUSTERS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // PDW input
  input  logic              pdw_valid,
  input  coord_t            pdw_rf,
  input  coord_t            pdw_pw,
  input  toa_t              pdw_toa,
  output logic              pdw_ready,   // FIFO not full
  // result, one per PDW
  output logic              out_valid,
  output logic [ID_W-1:0]   out_id,
  output logic              out_new,     // PDW started a new cluster
  output coord_t            out_rf,      // native units
  output coord_t            out_pw,
  output weight_t           out_weight,
  output toa_t              out_pri,     // 0 = no estimate yet
  // host register port
  input  logic              host_wr,
  input  logic              host_rd,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_NORM_FADE, S_CLUSTER, S_UNDO} state_e;

  state_e  state_q;
  cfg_t    cfg;
  pdw_t    fifo_in, fifo_out;
  logic    fifo_empty, fifo_full, fifo_rd;
  logic [$clog2(FIFO_DEPTH):0] fifo_level_unused;

  logic    nf_start, norm_done, fade_done, norm_seen_q, fade_seen_q;
  coord_t  rf_norm, pw_norm;
  weight_t fade_cycles;
  toa_t    toa_q;

  logic    cl_start, cl_done, cl_new;
  logic [ID_W-1:0] cl_id;
  center_t cl_state;
  center_t [N_CLUSTERS-1:0] states;

  logic    undo_rf_done, undo_pw_done;
  coord_t  undo_rf, undo_pw;
  logic [31:0] processed_q;

  assign fifo_in   = '{rf: pdw_rf, pw: pdw_pw, toa: pdw_toa};
  assign pdw_ready = !fifo_full;

  pdw_fifo #(.WIDTH($bits(pdw_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(pdw_valid), .wr_data(fifo_in),
    .rd_en(fifo_rd), .rd_data(fifo_out),
    .empty(fifo_empty), .full(fifo_full), .level(fifo_level_unused)
  );

  norm_2d u_norm (
    .clk, .rst_n, .start(nf_start),
    .rf(fifo_out.rf), .pw(fifo_out.pw),
    .rf_min(cfg.rf_min), .rf_max(cfg.rf_max),
    .pw_min(cfg.pw_min), .pw_max(cfg.pw_max),
    .done(norm_done), .rf_norm, .pw_norm
  );

  fade u_fade (
    .clk, .rst_n, .start(nf_start),
    .toa(fifo_out.toa), .fade_len(cfg.fade_len),
    .done(fade_done), .fade_cycles
  );

  clusters #(.N(N_CLUSTERS), .ID_W(ID_W)) u_clusters (
    .clk, .rst_n, .start(cl_start),
    .rf(rf_norm), .pw(pw_norm), .toa(toa_q), .fade_cycles,
    .threshold(cfg.threshold), .max_weight(cfg.max_weight),
    .done(cl_done), .out_id(cl_id), .out_new(cl_new), .out_state(cl_state),
    .states
  );

  norm_undo u_undo_rf (
    .clk, .rst_n, .start(cl_done), .norm(cl_state.rf),
    .min_v(cfg.rf_min), .max_v(cfg.rf_max), .done(undo_rf_done), .native(undo_rf)
  );

  norm_undo u_undo_pw (
    .clk, .rst_n, .start(cl_done), .norm(cl_state.pw),
    .min_v(cfg.pw_min), .max_v(cfg.pw_max), .done(undo_pw_done), .native(undo_pw)
  );

  iced_regs #(.N(N_CLUSTERS), .ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n,
    .wr_en(host_wr), .addr(host_addr), .wdata(host_wdata),
    .rd_en(host_rd), .rdata(host_rdata),
    .cfg, .states, .processed(processed_q)
  );

  // ---------------------------------------------------------------- sequencer
  assign fifo_rd  = (state_q == S_IDLE) && !fifo_empty;
  assign nf_start = state_q == S_READ;
  assign cl_start = (state_q == S_NORM_FADE) &&
                    (norm_seen_q || norm_done) && (fade_seen_q || fade_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      norm_seen_q <= 1'b0;
      fade_seen_q <= 1'b0;
      toa_q       <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (fifo_rd) state_q <= S_READ;
        S_READ: begin
          state_q     <= S_NORM_FADE;
          toa_q       <= fifo_out.toa;
          norm_seen_q <= 1'b0;
          fade_seen_q <= 1'b0;
        end
        S_NORM_FADE: begin
          if (norm_done) norm_seen_q <= 1'b1;
          if (fade_done) fade_seen_q <= 1'b1;
          if (cl_start)  state_q     <= S_CLUSTER;
        end
        S_CLUSTER: if (cl_done) state_q <= S_UNDO;
        S_UNDO:    if (undo_rf_done) state_q <= S_IDLE;
        default:   state_q <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------ output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_id      <= '0;
      out_new     <= 1'b0;
      out_rf      <= '0;
      out_pw      <= '0;
      out_weight  <= '0;
      out_pri     <= '0;
      processed_q <= '0;
    end else begin
      out_valid <= undo_rf_done & undo_pw_done;
      if (undo_rf_done & undo_pw_done) begin
        out_id      <= cl_id;
        out_new     <= cl_new;
        out_rf      <= undo_rf;
        out_pw      <= undo_pw;
        out_weight  <= cl_state.weight;
        out_pri     <= cl_state.pri;
        processed_q <= processed_q + 1'b1;
      end
    end
  end

endmodule
