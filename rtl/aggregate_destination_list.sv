// aggregate_destination_list: the subnets that packets have been sent to.
//
// Every TCP packet's destination address, ANDed with the subnet mask, is
// entered (or its arrival time refreshed) with a `touch` request. A `check`
// request (req_touch = 0) only looks a subnet up. The scan detection unit
// checks the source of every RST+ACK reply here: a reply from a subnet that
// nobody sent a request to is taken as spoofed and not counted against the
// receiver. Rows hold only the masked address (in the CAM) and the arrival
// time; idle rows are purged by the time-out scan, using the aggregate
// list's time-out settings.
//
// Latency: three cycles from request to resp_valid. The row contents follow
// the described list; its use for validating replies is this design's
// reading of the list's stated purpose, as is sharing the aggregate list's
// time-out settings.
module aggregate_destination_list
  import sds_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  input  time_t now,
  input  ip_t   subnet_mask,
  input  time_t check_interval,
  input  time_t timeout,
  input  logic  req_valid,
  output logic  req_ready,
  input  ip_t   req_ip,
  input  logic  req_touch,
  output logic  resp_valid,
  output logic  resp_hit,
  output logic  resp_inserted,
  output logic  resp_full,
  output logic  scanning,
  output logic  purge_valid
);
  logic touch_q;
  logic cur_valid, cur_hit, upd_write;
  logic cur_data;
  ip_t  purge_key;
  logic purge_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      touch_q <= 1'b0;
    else if (req_valid && req_ready) touch_q <= req_touch;
  end

  assign upd_write = touch_q;

  // DATA_W = 1: the row's data bit marks the row as a destination entry
  timed_list #(.DEPTH(DEPTH), .KEY_W(IP_W), .DATA_W(1)) u_list (
    .clk, .rst_n, .tick, .now, .check_interval, .timeout,
    .req_valid, .req_ready,
    .req_key      (req_ip & subnet_mask),
    .cur_valid, .cur_hit, .cur_data, .upd_write,
    .upd_data     (1'b1),
    .resp_valid, .resp_hit, .resp_inserted, .resp_full,
    .resp_addr    (),
    .purge_valid,
    .purge_ready  (1'b1),
    .purge_key, .purge_data,
    .scanning
  );

endmodule
