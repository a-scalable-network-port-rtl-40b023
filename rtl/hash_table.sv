// hash_table: remembers suspects that went quiet, to catch stealth scanners.
//
// A direct-mapped table of DEPTH rows indexed by a hash of the IP address
// (the address folded onto log2(DEPTH) bits by XOR). A row holds the last
// address hashed into it, HASH_count and the arrival time; a separate valid
// bit per row lives in registers. Requests:
//   HASH_ADD    a suspect purged from the suspicion list: its SUSP_count
//               (req_amount) is added to the row's HASH_count, the address
//               and arrival time are stored and the row becomes valid;
//   HASH_PROBE  a packet showed scanner behaviour for this address: if the
//               row is valid (the hash of the address exists) HASH_count is
//               raised by req_amount, address and arrival time are refreshed
//               and resp_hit is set; an invalid row is left alone.
// When HASH_count reaches hash_th the response flags `reached` (the stored,
// i.e. last hashed, address is then blocked) and the count restarts at zero.
// Rows idle for the (long) hash time-out are invalidated by the time-out
// scan.
//
// Latency: two cycles from request to resp_valid. Matching by hash only, the
// columns and the threshold rule follow the described table; the XOR-fold
// hash, the 8-bit HASH_count and the restart after a crossing are this
// design's choices.
module hash_table
  import sds_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  time_t            now,
  input  logic [TH_W-1:0]  hash_th,
  input  time_t            check_interval,
  input  time_t            timeout,
  input  logic             req_valid,
  output logic             req_ready,
  input  hash_op_e         req_op,
  input  ip_t              req_ip,
  input  logic [7:0]       req_amount,
  output logic             resp_valid,
  output logic             resp_hit,
  output logic             resp_reached,
  output ip_t              resp_ip,
  output logic [HCNT_W-1:0] resp_count,
  output logic             purge_valid,
  output logic             scanning
);
  localparam int unsigned ROW_W = IP_W + HCNT_W + TIME_W;

  function automatic logic [AW-1:0] ip_hash(input ip_t ip);
    logic [AW-1:0] h;
    h = '0;
    for (int i = 0; i < IP_W; i += AW) h ^= AW'(ip >> i);
    return h;
  endfunction

  typedef enum logic {H_IDLE, H_UPDATE} hstate_t;
  hstate_t state;

  logic [DEPTH-1:0] valid;
  hash_op_e         op_q;
  ip_t              ip_q;
  logic [7:0]       amount_q;
  logic [AW-1:0]    idx_q;

  logic             a_en, a_we;
  logic [AW-1:0]    a_addr;
  logic [ROW_W-1:0] a_wdata, a_rdata;
  logic             b_en, b_we;
  logic [AW-1:0]    b_addr;
  logic [ROW_W-1:0] b_rdata;

  logic             p_b_en, p_del_en, p_rd_latch;
  logic [AW-1:0]    p_b_addr, p_del_addr;

  logic             row_valid;
  logic [HCNT_W-1:0] old_cnt;
  logic [7:0]       sum;
  logic             do_write, reached;

  wire accept = req_valid && req_ready;
  assign req_ready = (state == H_IDLE) && !p_del_en;

  assign row_valid = valid[idx_q];
  assign old_cnt   = row_valid ? a_rdata[TIME_W +: HCNT_W] : '0;
  assign sum       = sat_add8(8'(old_cnt), amount_q, 8'((1 << HCNT_W) - 1));
  assign do_write  = (state == H_UPDATE) && (op_q == HASH_ADD || row_valid);
  assign reached   = do_write && (sum >= 8'(hash_th));

  assign a_en    = accept || do_write;
  assign a_we    = do_write;
  assign a_addr  = accept ? ip_hash(req_ip) : idx_q;
  assign a_wdata = {ip_q, reached ? HCNT_W'(0) : HCNT_W'(sum), now};

  assign b_en   = p_b_en;
  assign b_we   = 1'b0;
  assign b_addr = p_b_addr;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(ROW_W)) u_ram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata('0), .b_rdata
  );

  timeout_purge_fsm #(.DEPTH(DEPTH)) u_purge (
    .clk, .rst_n, .tick, .now, .check_interval, .timeout,
    .b_en       (p_b_en),
    .b_addr     (p_b_addr),
    .row_valid  (valid[p_b_addr]),
    .row_arrival(b_rdata[TIME_W-1:0]),
    .rd_latch   (p_rd_latch),
    .busy       ((state != H_IDLE) || req_valid),
    .wr_en      (a_we),
    .wr_addr    (a_addr),
    .purge_ready(1'b1),
    .del_en     (p_del_en),
    .del_addr   (p_del_addr),
    .scanning
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= H_IDLE;
      valid    <= '0;
      op_q     <= HASH_PROBE;
      ip_q     <= '0;
      amount_q <= '0;
      idx_q    <= '0;
    end else begin
      if (p_del_en) valid[p_del_addr] <= 1'b0;
      case (state)
        H_IDLE: if (accept) begin
          op_q     <= req_op;
          ip_q     <= req_ip;
          amount_q <= req_amount;
          idx_q    <= ip_hash(req_ip);
          state    <= H_UPDATE;
        end
        default: begin
          if (do_write) valid[idx_q] <= 1'b1;
          state <= H_IDLE;
        end
      endcase
    end
  end

  assign resp_valid   = (state == H_UPDATE);
  assign resp_hit     = row_valid;
  assign resp_reached = reached;
  assign resp_ip      = ip_q;
  assign resp_count   = HCNT_W'(sum);
  assign purge_valid  = p_del_en;

endmodule
