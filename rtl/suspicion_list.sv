// suspicion_list: one row per suspicious IP address, checked individually
// for the four properties of a scanner.
//
// A row holds the suspect's address (in the CAM) and, in the block RAM, the
// peer of its current TCP connection, the number of connections it opened,
// the number of packets exchanged on the current connection, SUSP_count and
// the arrival time. Requests:
//   SUSP_ADD  enter a suspect (refresh it if already present);
//   SUSP_SRC  a packet sent by the suspect:
//               invalid flags                                -> SUSP_count+1
//               SYN without ACK opens a new connection; the previous one
//               counts as a scan probe if it exchanged 2, 3 or 5 packets
//               (half-open, torn down by RST, or handshake with no data and
//               an optional FIN pair)                        -> SUSP_count+1
//               otherwise a packet to the current peer       -> packets+1
//   SUSP_DST  a packet received by the suspect:
//               RST+ACK                                      -> SUSP_count+1
//               a packet from the current peer               -> packets+1
// SRC and DST requests for an address not in the list change nothing. When
// SUSP_count reaches susp_th the response flags `reached`: the scan detection
// unit then blocks the address. Rows idle for the suspicion time-out are
// purged and handed out on purge_valid (key and SUSP_count) for the hash
// table; purge_ready holds the purge back until the consumer can take it.
//
// Latency: three cycles per request. The four properties, the row columns
// and the purge into the hash table follow the described list; tracking one
// current connection per suspect, the packet-count rule and the counter
// widths are this design's own.
module suspicion_list
  import sds_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  time_t           now,
  input  logic [TH_W-1:0] susp_th,
  input  time_t           check_interval,
  input  time_t           timeout,
  input  logic            req_valid,
  output logic            req_ready,
  input  susp_op_e        req_op,
  input  ip_t             req_ip,
  input  ip_t             req_peer,
  input  logic [7:0]      req_flags,
  output logic            resp_valid,
  output logic            resp_hit,
  output logic            resp_inserted,
  output logic            resp_full,
  output logic            resp_reached,
  output logic [CNT_W-1:0] resp_count,
  output logic            purge_valid,
  input  logic            purge_ready,
  output ip_t             purge_ip,
  output logic [CNT_W-1:0] purge_count,
  output logic            scanning
);
  typedef struct packed {
    ip_t              peer;
    logic [7:0]       conns;
    logic [2:0]       pkts;
    logic [CNT_W-1:0] susp;
  } susp_row_t;

  localparam int unsigned ROW_W = $bits(susp_row_t);
  localparam logic [7:0] CNT_MAX = 8'((1 << CNT_W) - 1);

  susp_op_e   op_q;
  ip_t        peer_q;
  logic [7:0] flags_q;

  logic             cur_valid, cur_hit, upd_write;
  logic [ROW_W-1:0] cur_data, upd_data, purge_data;
  susp_row_t        old_r, new_r;
  logic [7:0]       s;
  logic             probe_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q    <= SUSP_ADD;
      peer_q  <= '0;
      flags_q <= '0;
    end else if (req_valid && req_ready) begin
      op_q    <= req_op;
      peer_q  <= req_peer;
      flags_q <= req_flags;
    end
  end

  always_comb begin
    old_r      = susp_row_t'(cur_data);
    new_r      = old_r;
    s          = 8'(old_r.susp);
    probe_done = (old_r.conns != 8'd0)
              && (old_r.pkts == 3'd2 || old_r.pkts == 3'd3 || old_r.pkts == 3'd5);
    upd_write  = cur_hit;
    unique case (op_q)
      SUSP_ADD: begin
        upd_write = 1'b1;
        if (!cur_hit) begin
          new_r      = '0;
          new_r.peer = peer_q;
        end
      end
      SUSP_SRC: begin
        if (is_invalid_flags(flags_q)) begin
          s = sat_add8(s, 8'd1, CNT_MAX);
        end else if (flags_q[TCP_SYN] && !flags_q[TCP_ACK]) begin
          if (probe_done) s = sat_add8(s, 8'd1, CNT_MAX);
          new_r.peer  = peer_q;
          new_r.pkts  = 3'd1;
          new_r.conns = sat_add8(old_r.conns, 8'd1, 8'hFF);
        end else if (peer_q == old_r.peer) begin
          new_r.pkts = 3'(sat_add8(8'(old_r.pkts), 8'd1, 8'd7));
        end
      end
      SUSP_DST: begin
        if (is_rst_ack(flags_q)) s = sat_add8(s, 8'd1, CNT_MAX);
        if (peer_q == old_r.peer) new_r.pkts = 3'(sat_add8(8'(old_r.pkts), 8'd1, 8'd7));
      end
      default: ;
    endcase
    if (op_q != SUSP_ADD) new_r.susp = s[CNT_W-1:0];
    upd_data = ROW_W'(new_r);
  end

  timed_list #(.DEPTH(DEPTH), .KEY_W(IP_W), .DATA_W(ROW_W)) u_list (
    .clk, .rst_n, .tick, .now, .check_interval, .timeout,
    .req_valid, .req_ready,
    .req_key      (req_ip),
    .cur_valid, .cur_hit, .cur_data, .upd_write, .upd_data,
    .resp_valid, .resp_hit, .resp_inserted, .resp_full,
    .resp_addr    (),
    .purge_valid, .purge_ready,
    .purge_key    (purge_ip),
    .purge_data,
    .scanning
  );

  assign resp_reached = cur_valid && cur_hit && (op_q != SUSP_ADD) && (s >= 8'(susp_th));
  assign resp_count   = new_r.susp;
  susp_row_t purge_r;
  assign purge_r      = susp_row_t'(purge_data);
  assign purge_count  = purge_r.susp;

endmodule
