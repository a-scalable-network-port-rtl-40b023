// sds_pkg: types and constants shared by the scan detection system.
//
// Holds the parsed packet header handed from the transfer engine to the
// scan detection unit, the run-time configuration (thresholds, subnet mask,
// time-out periods and check intervals), the TCP flag bit positions and the
// two flag classifiers the detection rules use (RST+ACK reply and invalid
// flag combination). The widths of the per-row counters follow the 5-bit
// AGG_count field of the aggregate list; the remaining widths and all default
// configuration values are this design's own choices.
package sds_pkg;

  localparam int unsigned IP_W   = 32;
  localparam int unsigned TIME_W = 32;
  localparam int unsigned CNT_W  = 5;   // AGG_count / SUSP_count width
  localparam int unsigned HCNT_W = 8;   // HASH_count width
  localparam int unsigned TH_W   = 8;   // threshold register width

  // TCP flag bit positions in the TCP header flags byte
  localparam int unsigned TCP_FIN = 0;
  localparam int unsigned TCP_SYN = 1;
  localparam int unsigned TCP_RST = 2;
  localparam int unsigned TCP_PSH = 3;
  localparam int unsigned TCP_ACK = 4;
  localparam int unsigned TCP_URG = 5;

  typedef logic [IP_W-1:0]   ip_t;
  typedef logic [TIME_W-1:0] time_t;

  typedef struct packed {
    logic       is_ipv4;
    logic       is_tcp;
    ip_t        sip;
    ip_t        dip;
    logic [7:0] flags;
  } pkt_hdr_t;

  typedef struct packed {
    ip_t             subnet_mask;
    logic [TH_W-1:0] agg_th;
    logic [TH_W-1:0] susp_th;
    logic [TH_W-1:0] hash_th;
    time_t           agg_timeout;
    time_t           susp_timeout;
    time_t           hash_timeout;
    time_t           agg_check;
    time_t           susp_check;
    time_t           hash_check;
    time_t           tick_div;
  } sds_cfg_t;

  // Requests of the suspicion list
  typedef enum logic [1:0] {SUSP_ADD, SUSP_SRC, SUSP_DST} susp_op_e;

  // Requests of the hash table
  typedef enum logic {HASH_PROBE, HASH_ADD} hash_op_e;

  // One-cycle event pulses of the scan detection unit, for status counters
  typedef struct packed {
    logic pkt;          // a header was decided
    logic drop;         // ... and dropped
    logic spoof;        // an RST+ACK from a subnet nobody was sent to
    logic agg_reached;  // a subnet's AGG_count reached AGG_TH
    logic hash_hit;     // a misbehaving address was found in the hash table
    logic susp_add;     // an address entered the suspicion list
    logic susp_reached; // a suspect's SUSP_count reached SUSP_TH
    logic hash_add;     // a timed-out suspect was hashed
    logic hash_reached; // a HASH_count reached HASH_TH
    logic scanner_add;  // an address entered the scanner list
  } sds_events_t;

  // A reply that refuses a connection attempt to a closed port.
  function automatic logic is_rst_ack(input logic [7:0] f);
    return f[TCP_RST] && f[TCP_ACK];
  endfunction

  // Flag combinations a conforming TCP stack never sends; scanners use them
  // for OS fingerprinting (NULL, SYN+FIN, SYN+RST, FIN without ACK as in
  // FIN and Xmas probes).
  function automatic logic is_invalid_flags(input logic [7:0] f);
    return (f[5:0] == 6'd0)
        || (f[TCP_SYN] && f[TCP_FIN])
        || (f[TCP_SYN] && f[TCP_RST])
        || (f[TCP_FIN] && !f[TCP_ACK]);
  endfunction

  // Saturating add used by all row counters.
  function automatic logic [7:0] sat_add8(input logic [7:0] a, input logic [7:0] b,
                                          input logic [7:0] maxv);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s > {1'b0, maxv}) ? maxv : s[7:0];
  endfunction

endpackage
