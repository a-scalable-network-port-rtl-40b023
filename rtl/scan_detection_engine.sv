// scan_detection_engine: the hardware lists and the scan detection unit.
//
// Holds the aggregate source list, the aggregate destination list, the
// suspicion list, the hash table and the scanner list, wires their request
// ports to the scan detection unit and feeds suspects purged from the
// suspicion list back to it for hashing. A time base divides the clock by
// cfg.tick_div + 1 into ticks and counts ticks as the time `now` that rows
// store as their arrival time; time-out periods and check intervals are in
// ticks. Headers come in on hdr_valid/hdr_ready, one decision goes out per
// header on decision_valid/decision_drop, and ev carries one-cycle event
// pulses for status counters.
//
// The list sizes default to those of the described implementation (128 rows
// in the aggregate and suspicion lists, 256 in the hash table, 64 in the
// scanner list); the aggregate destination list is given the aggregate
// list's 128 rows, and the time base is this design's own.
module scan_detection_engine
  import sds_pkg::*;
#(
  parameter int unsigned AGG_DEPTH  = 128,
  parameter int unsigned ADST_DEPTH = 128,
  parameter int unsigned SUSP_DEPTH = 128,
  parameter int unsigned HASH_DEPTH = 256,
  parameter int unsigned SCN_DEPTH  = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sds_cfg_t    cfg,
  input  logic        hdr_valid,
  output logic        hdr_ready,
  input  pkt_hdr_t    hdr,
  output logic        decision_valid,
  output logic        decision_drop,
  output sds_events_t ev,
  output time_t       now,
  output logic [$clog2(SCN_DEPTH+1)-1:0] scanner_count
);
  // time base
  time_t       div_cnt;
  logic        tick;
  assign tick = (div_cnt >= cfg.tick_div);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      now     <= '0;
    end else if (tick) begin
      div_cnt <= '0;
      now     <= now + 1'b1;
    end else begin
      div_cnt <= div_cnt + 1'b1;
    end
  end

  logic scn_req_valid, scn_req_ready, scn_req_add, scn_resp_valid, scn_resp_hit, scn_resp_added;
  ip_t  scn_req_ip;
  logic adst_req_valid, adst_req_ready, adst_req_touch, adst_resp_valid, adst_resp_hit;
  ip_t  adst_req_ip;
  logic agg_req_valid, agg_req_ready, agg_req_incr, agg_resp_valid, agg_resp_reached;
  ip_t  agg_req_ip;
  logic susp_req_valid, susp_req_ready, susp_resp_valid, susp_resp_hit;
  logic susp_resp_inserted, susp_resp_reached;
  susp_op_e susp_req_op;
  ip_t  susp_req_ip, susp_req_peer;
  logic [7:0] susp_req_flags;
  logic susp_purge_valid, susp_purge_ready;
  ip_t  susp_purge_ip;
  logic [CNT_W-1:0] susp_purge_count;
  logic hash_req_valid, hash_req_ready, hash_resp_valid, hash_resp_hit, hash_resp_reached;
  hash_op_e hash_req_op;
  ip_t  hash_req_ip, hash_resp_ip;
  logic [7:0] hash_req_amount;

  scan_detection_unit u_sdu (.*);

  scanner_list #(.DEPTH(SCN_DEPTH)) u_scanner (
    .clk, .rst_n,
    .req_valid (scn_req_valid), .req_ready(scn_req_ready),
    .req_add   (scn_req_add),   .req_ip   (scn_req_ip),
    .resp_valid(scn_resp_valid), .resp_hit(scn_resp_hit), .resp_added(scn_resp_added),
    .count     (scanner_count)
  );

  aggregate_destination_list #(.DEPTH(ADST_DEPTH)) u_adst (
    .clk, .rst_n, .tick, .now,
    .subnet_mask   (cfg.subnet_mask),
    .check_interval(cfg.agg_check),
    .timeout       (cfg.agg_timeout),
    .req_valid (adst_req_valid), .req_ready(adst_req_ready),
    .req_ip    (adst_req_ip),    .req_touch(adst_req_touch),
    .resp_valid(adst_resp_valid), .resp_hit(adst_resp_hit),
    .resp_inserted(), .resp_full(), .scanning(), .purge_valid()
  );

  aggregate_source_list #(.DEPTH(AGG_DEPTH)) u_agg (
    .clk, .rst_n, .tick, .now,
    .subnet_mask   (cfg.subnet_mask),
    .agg_th        (cfg.agg_th),
    .check_interval(cfg.agg_check),
    .timeout       (cfg.agg_timeout),
    .req_valid (agg_req_valid), .req_ready(agg_req_ready),
    .req_ip    (agg_req_ip),    .req_incr (agg_req_incr),
    .resp_valid(agg_resp_valid), .resp_hit(), .resp_inserted(), .resp_full(),
    .resp_reached(agg_resp_reached), .resp_count(), .scanning(), .purge_valid()
  );

  suspicion_list #(.DEPTH(SUSP_DEPTH)) u_susp (
    .clk, .rst_n, .tick, .now,
    .susp_th       (cfg.susp_th),
    .check_interval(cfg.susp_check),
    .timeout       (cfg.susp_timeout),
    .req_valid (susp_req_valid), .req_ready(susp_req_ready),
    .req_op    (susp_req_op), .req_ip(susp_req_ip), .req_peer(susp_req_peer),
    .req_flags (susp_req_flags),
    .resp_valid(susp_resp_valid), .resp_hit(susp_resp_hit),
    .resp_inserted(susp_resp_inserted), .resp_full(),
    .resp_reached(susp_resp_reached), .resp_count(),
    .purge_valid(susp_purge_valid), .purge_ready(susp_purge_ready),
    .purge_ip  (susp_purge_ip), .purge_count(susp_purge_count),
    .scanning  ()
  );

  hash_table #(.DEPTH(HASH_DEPTH)) u_hash (
    .clk, .rst_n, .tick, .now,
    .hash_th       (cfg.hash_th),
    .check_interval(cfg.hash_check),
    .timeout       (cfg.hash_timeout),
    .req_valid (hash_req_valid), .req_ready(hash_req_ready),
    .req_op    (hash_req_op), .req_ip(hash_req_ip), .req_amount(hash_req_amount),
    .resp_valid(hash_resp_valid), .resp_hit(hash_resp_hit),
    .resp_reached(hash_resp_reached), .resp_ip(hash_resp_ip), .resp_count(),
    .purge_valid(), .scanning()
  );

endmodule
