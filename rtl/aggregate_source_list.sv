// aggregate_source_list: one row per monitored subnet, counting scanner-like
// events of the whole subnet.
//
// A request carries an IP address and `incr`, set when the packet shows one
// of the two properties counted at subnet level (the address received a
// legitimate RST+ACK or sent invalid TCP flags). The address is ANDed with
// the programmable (not necessarily contiguous) subnet mask and looked up.
// On a hit the row's AGG_count is raised by incr and its arrival time
// refreshed; on a miss a new row is made with AGG_count = incr. When
// AGG_count reaches agg_th the response flags `reached` and the count
// restarts from zero, so a subnet holding several scanners must build it up
// again for each. Idle rows are purged by the time-out scan.
//
// Latency: three cycles from request to resp_valid (see timed_list). The
// masking, the 128 rows, the 5-bit AGG_count, the 32-bit arrival time and
// threshold rule follow the described list; the restart of the count after
// a crossing is read from the remark that a subnet's count must build up
// again for every further scanner.
module aggregate_source_list
  import sds_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  time_t           now,
  input  ip_t             subnet_mask,
  input  logic [TH_W-1:0] agg_th,
  input  time_t           check_interval,
  input  time_t           timeout,
  input  logic            req_valid,
  output logic            req_ready,
  input  ip_t             req_ip,
  input  logic            req_incr,
  output logic            resp_valid,
  output logic            resp_hit,
  output logic            resp_inserted,
  output logic            resp_full,
  output logic            resp_reached,
  output logic [CNT_W-1:0] resp_count,
  output logic            scanning,
  output logic            purge_valid
);
  logic             incr_q;
  logic             cur_valid, cur_hit, upd_write;
  logic [CNT_W-1:0] cur_data, upd_data;
  logic [7:0]       sum;
  logic             reached;
  ip_t              purge_key;
  logic [CNT_W-1:0] purge_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      incr_q <= 1'b0;
    else if (req_valid && req_ready) incr_q <= req_incr;
  end

  // update logic: the path from the row read back to the row write
  always_comb begin
    sum       = sat_add8(8'(cur_data), {7'd0, incr_q}, 8'((1 << CNT_W) - 1));
    reached   = incr_q && (sum >= agg_th);
    upd_write = 1'b1;
    upd_data  = reached ? '0 : sum[CNT_W-1:0];
  end

  timed_list #(.DEPTH(DEPTH), .KEY_W(IP_W), .DATA_W(CNT_W)) u_list (
    .clk, .rst_n, .tick, .now, .check_interval, .timeout,
    .req_valid, .req_ready,
    .req_key      (req_ip & subnet_mask),
    .cur_valid, .cur_hit, .cur_data, .upd_write, .upd_data,
    .resp_valid, .resp_hit, .resp_inserted, .resp_full,
    .resp_addr    (),
    .purge_valid,
    .purge_ready  (1'b1),
    .purge_key, .purge_data,
    .scanning
  );

  assign resp_reached = cur_valid && reached;
  assign resp_count   = sum[CNT_W-1:0];

endmodule
