// config_regs: the run-time configuration and status registers of the scan
// detection core, written and read by the host processor over a simple
// word-addressed register port (one write or read per cycle, read data
// registered one cycle after bus_rd).
//
// Writable registers (word address: contents, reset value):
//    0 subnet mask              FFFF_FF00      1 AGG_TH        5
//    2 SUSP_TH                  5              3 HASH_TH       8
//    4 aggregate time-out       60000 ticks    5 suspicion time-out 60000
//    6 hash time-out            3600000        7 aggregate check interval 1000
//    8 suspicion check interval 1000           9 hash check interval 1000
//   10 tick divider             99999 (one tick = tick_div+1 clocks, 1 ms at 100 MHz)
// Read-only status (counters of the event pulses, wrapping):
//   16 packets decided   17 packets dropped   18 scanners added
//   19 suspects added    20 HASH_TH crossings 21 current time (ticks)
//   22 rows used in the scanner list
// Thresholds, subnet mask, time-out periods and check intervals being set by
// the processor follows the described system; the register map, the reset
// values of the time-outs and the status counters are this design's. The
// reset thresholds are the values used in the stealth scan evaluation
// (AGG_TH = SUSP_TH = 5, HASH_TH = 8).
module config_regs
  import sds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [4:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output sds_cfg_t    cfg,
  input  sds_events_t ev,
  input  time_t       now,
  input  logic [31:0] scanner_count
);
  logic [31:0] cnt_pkt, cnt_drop, cnt_scn, cnt_susp, cnt_hash;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.subnet_mask  <= 32'hFFFF_FF00;
      cfg.agg_th       <= TH_W'(5);
      cfg.susp_th      <= TH_W'(5);
      cfg.hash_th      <= TH_W'(8);
      cfg.agg_timeout  <= 32'd60_000;
      cfg.susp_timeout <= 32'd60_000;
      cfg.hash_timeout <= 32'd3_600_000;
      cfg.agg_check    <= 32'd1_000;
      cfg.susp_check   <= 32'd1_000;
      cfg.hash_check   <= 32'd1_000;
      cfg.tick_div     <= 32'd99_999;
    end else if (bus_wr) begin
      unique case (bus_addr)
        5'd0:  cfg.subnet_mask  <= bus_wdata;
        5'd1:  cfg.agg_th       <= bus_wdata[TH_W-1:0];
        5'd2:  cfg.susp_th      <= bus_wdata[TH_W-1:0];
        5'd3:  cfg.hash_th      <= bus_wdata[TH_W-1:0];
        5'd4:  cfg.agg_timeout  <= bus_wdata;
        5'd5:  cfg.susp_timeout <= bus_wdata;
        5'd6:  cfg.hash_timeout <= bus_wdata;
        5'd7:  cfg.agg_check    <= bus_wdata;
        5'd8:  cfg.susp_check   <= bus_wdata;
        5'd9:  cfg.hash_check   <= bus_wdata;
        5'd10: cfg.tick_div     <= bus_wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_pkt <= '0; cnt_drop <= '0; cnt_scn <= '0; cnt_susp <= '0; cnt_hash <= '0;
    end else begin
      if (ev.pkt)          cnt_pkt  <= cnt_pkt + 1'b1;
      if (ev.drop)         cnt_drop <= cnt_drop + 1'b1;
      if (ev.scanner_add)  cnt_scn  <= cnt_scn + 1'b1;
      if (ev.susp_add)     cnt_susp <= cnt_susp + 1'b1;
      if (ev.hash_reached) cnt_hash <= cnt_hash + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata <= '0;
    end else if (bus_rd) begin
      unique case (bus_addr)
        5'd0:  bus_rdata <= cfg.subnet_mask;
        5'd1:  bus_rdata <= 32'(cfg.agg_th);
        5'd2:  bus_rdata <= 32'(cfg.susp_th);
        5'd3:  bus_rdata <= 32'(cfg.hash_th);
        5'd4:  bus_rdata <= cfg.agg_timeout;
        5'd5:  bus_rdata <= cfg.susp_timeout;
        5'd6:  bus_rdata <= cfg.hash_timeout;
        5'd7:  bus_rdata <= cfg.agg_check;
        5'd8:  bus_rdata <= cfg.susp_check;
        5'd9:  bus_rdata <= cfg.hash_check;
        5'd10: bus_rdata <= cfg.tick_div;
        5'd16: bus_rdata <= cnt_pkt;
        5'd17: bus_rdata <= cnt_drop;
        5'd18: bus_rdata <= cnt_scn;
        5'd19: bus_rdata <= cnt_susp;
        5'd20: bus_rdata <= cnt_hash;
        5'd21: bus_rdata <= now;
        5'd22: bus_rdata <= scanner_count;
        default: bus_rdata <= '0;
      endcase
    end
  end

endmodule
