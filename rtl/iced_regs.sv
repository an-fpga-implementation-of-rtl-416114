// iced_regs: host-accessible registers of ICED. The host sets the distance
// threshold, the fade-cycle length, the maximum cluster weight and the
// expected RF and PW ranges used for normalization while the engine runs,
// and reads back the state of every cluster slot.
//
// Register map (32-bit words, word addresses; this layout is this design's
// own):
//   0x00 threshold D        0x01 fade length L      0x02 maximum weight
//   0x03 RF min             0x04 RF max             0x05 PW min
//   0x06 PW max             0x07 PDWs processed (read only)
//   cluster area, address bit ADDR_W-1 set, slot j = addr[ADDR_W-2:2]:
//   +0 RF centre (normalized)  +1 PW centre  +2 weight  +3 PRI estimate
// A write takes effect on the next clock edge; reads return `rdata` one
// cycle after `rd_en`. Unused addresses read as 0. Reset loads CFG_RESET.
module iced_regs
  import iced_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  input  logic              rd_en,
  output logic [31:0]       rdata,
  output cfg_t              cfg,
  input  center_t [N-1:0]   states,
  input  logic [31:0]       processed
);

  localparam int unsigned SLOT_W = ADDR_W - 3;

  initial assert (N <= (1 << SLOT_W))
    else $error("iced_regs: ADDR_W too small for %0d clusters", N);

  logic [SLOT_W-1:0] slot;
  logic [31:0]       rd_mux;

  assign slot = addr[ADDR_W-2:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= CFG_RESET;
    end else if (wr_en && !addr[ADDR_W-1]) begin
      unique case (addr[2:0])
        3'd0: cfg.threshold  <= DIST_W'(wdata);
        3'd1: cfg.fade_len   <= TOA_W'(wdata);
        3'd2: cfg.max_weight <= WEIGHT_W'(wdata);
        3'd3: cfg.rf_min     <= DATA_W'(wdata);
        3'd4: cfg.rf_max     <= DATA_W'(wdata);
        3'd5: cfg.pw_min     <= DATA_W'(wdata);
        3'd6: cfg.pw_max     <= DATA_W'(wdata);
        default: ;
      endcase
    end
  end

  always_comb begin
    rd_mux = '0;
    if (!addr[ADDR_W-1]) begin
      unique case (addr[2:0])
        3'd0: rd_mux = 32'(cfg.threshold);
        3'd1: rd_mux = 32'(cfg.fade_len);
        3'd2: rd_mux = 32'(cfg.max_weight);
        3'd3: rd_mux = 32'(cfg.rf_min);
        3'd4: rd_mux = 32'(cfg.rf_max);
        3'd5: rd_mux = 32'(cfg.pw_min);
        3'd6: rd_mux = 32'(cfg.pw_max);
        default: rd_mux = processed;
      endcase
    end else if (32'(slot) < N) begin
      unique case (addr[1:0])
        2'd0: rd_mux = 32'(states[slot].rf);
        2'd1: rd_mux = 32'(states[slot].pw);
        2'd2: rd_mux = 32'(states[slot].weight);
        default: rd_mux = 32'(states[slot].pri);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rdata <= '0;
    else if (rd_en) rdata <= rd_mux;
  end

endmodule
