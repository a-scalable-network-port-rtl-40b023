// scan_detection_core: the complete scan detection core, placed between two
// Ethernet MACs and configured by a host processor.
//
// Frames from either MAC's receive FIFO are buffered in the transfer engine,
// their IP/TCP header is judged by the scan detection engine, and the frame
// is then forwarded to the other MAC's transmit FIFO or dropped. The host
// sets thresholds, the subnet mask and time-outs, and reads status counters,
// through the register port of config_regs. All ports are plain signals:
// byte-wide valid/ready/last streams per MAC, and the register port.
//
// The split into transfer engine and scan detection engine, with the header
// going one way and pass/drop the other, follows the described core; the
// processor, the peripheral bus and the MACs are outside this module.
module scan_detection_core
  import sds_pkg::*;
#(
  parameter int unsigned NUM_MACS   = 2,
  parameter int unsigned NUM_BANKS  = 2,
  parameter int unsigned BANK_DEPTH = 2048,
  parameter int unsigned AGG_DEPTH  = 128,
  parameter int unsigned ADST_DEPTH = 128,
  parameter int unsigned SUSP_DEPTH = 128,
  parameter int unsigned HASH_DEPTH = 256,
  parameter int unsigned SCN_DEPTH  = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_MACS-1:0] rx_valid,
  output logic [NUM_MACS-1:0] rx_ready,
  input  logic [7:0]          rx_data [NUM_MACS],
  input  logic [NUM_MACS-1:0] rx_last,
  output logic [NUM_MACS-1:0] tx_valid,
  input  logic [NUM_MACS-1:0] tx_ready,
  output logic [7:0]          tx_data [NUM_MACS],
  output logic [NUM_MACS-1:0] tx_last,
  input  logic                bus_wr,
  input  logic                bus_rd,
  input  logic [4:0]          bus_addr,
  input  logic [31:0]         bus_wdata,
  output logic [31:0]         bus_rdata,
  output sds_events_t         ev,
  output logic                frame_passed,
  output logic                frame_dropped
);
  sds_cfg_t cfg;
  logic     hdr_valid, hdr_ready, decision_valid, decision_drop;
  pkt_hdr_t hdr;
  time_t    now;
  logic [$clog2(SCN_DEPTH+1)-1:0] scanner_count;

  transfer_engine #(.NUM_MACS(NUM_MACS), .NUM_BANKS(NUM_BANKS), .BANK_DEPTH(BANK_DEPTH)) u_te (
    .clk, .rst_n,
    .rx_valid, .rx_ready, .rx_data, .rx_last,
    .tx_valid, .tx_ready, .tx_data, .tx_last,
    .hdr_valid, .hdr_ready, .hdr, .decision_valid, .decision_drop,
    .frame_passed, .frame_dropped
  );

  scan_detection_engine #(
    .AGG_DEPTH(AGG_DEPTH), .ADST_DEPTH(ADST_DEPTH), .SUSP_DEPTH(SUSP_DEPTH),
    .HASH_DEPTH(HASH_DEPTH), .SCN_DEPTH(SCN_DEPTH)
  ) u_sde (
    .clk, .rst_n, .cfg,
    .hdr_valid, .hdr_ready, .hdr, .decision_valid, .decision_drop,
    .ev, .now, .scanner_count
  );

  config_regs u_cfg (
    .clk, .rst_n, .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata,
    .cfg, .ev, .now,
    .scanner_count(32'(scanner_count))
  );

endmodule
