// timed_list: a list whose keys live in a CAM and whose row data live in a
// dual-port block RAM, with a time-out scan that purges idle rows.
//
// Only the key (an IP address or a masked subnet) is stored in the CAM; the
// matched CAM address points to the block RAM row that holds the rest of the
// row (DATA_W bits) and its arrival time. One request is served at a time:
//   cycle 0  request accepted, CAM searched with req_key
//   cycle 1  match and matched address latched, lowest vacant row latched,
//            block RAM port A read at the matched address
//   cycle 2  the old row (cur_hit, cur_data) is shown to the owner's
//            combinational update logic, which answers with upd_write and
//            upd_data; the row is rewritten with arrival time `now` (or, on a
//            miss, the key is written into the vacant CAM row and the new row
//            into the block RAM); resp_valid pulses with the outcome.
// A request therefore takes three cycles. On a miss with no vacant row the
// row is not stored and resp_full is reported.
//
// The time-out scan (timeout_purge_fsm) reads rows through port B and deletes
// timed-out rows from the CAM and clears them in the block RAM; the deleted
// key and its data appear on purge_valid/purge_key/purge_data for one cycle.
// Requests are refused only in that delete cycle.
//
// The CAM-holds-the-key, BRAM-holds-the-rest split, the two ports and the
// update path from port A's output back to its input follow the described
// aggregate list; the three-cycle schedule is this design's.
module timed_list
  import sds_pkg::*;
#(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned KEY_W  = 32,
  parameter int unsigned DATA_W = 5,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  time_t             now,
  input  time_t             check_interval,
  input  time_t             timeout,
  // request
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [KEY_W-1:0]  req_key,
  // update logic of the owner
  output logic              cur_valid,
  output logic              cur_hit,
  output logic [DATA_W-1:0] cur_data,
  input  logic              upd_write,
  input  logic [DATA_W-1:0] upd_data,
  // response
  output logic              resp_valid,
  output logic              resp_hit,
  output logic              resp_inserted,
  output logic              resp_full,
  output logic [AW-1:0]     resp_addr,
  // purge output
  output logic              purge_valid,
  input  logic              purge_ready,
  output logic [KEY_W-1:0]  purge_key,
  output logic [DATA_W-1:0] purge_data,
  output logic              scanning
);
  localparam int unsigned ROW_W = DATA_W + TIME_W;

  typedef enum logic [1:0] {L_IDLE, L_MATCH, L_UPDATE} lstate_t;
  lstate_t state;

  logic [KEY_W-1:0] key_q;
  logic             hit_q;
  logic [AW-1:0]    addr_q;
  logic             vac_found_q;
  logic [AW-1:0]    vac_addr_q;

  // CAM
  logic             cam_match;
  logic [AW-1:0]    cam_match_addr;
  logic             cam_we, cam_wvalid, cam_busy;
  logic [AW-1:0]    cam_waddr;
  logic [KEY_W-1:0] cam_wkey;
  logic             cam_free_found;
  logic [AW-1:0]    cam_free_addr;
  logic [KEY_W-1:0] cam_rd_key;
  logic             cam_rd_valid;

  // block RAM
  logic             a_en, a_we;
  logic [AW-1:0]    a_addr;
  logic [ROW_W-1:0] a_wdata, a_rdata;
  logic             b_en, b_we;
  logic [AW-1:0]    b_addr;
  logic [ROW_W-1:0] b_rdata;

  // purge machine
  logic             p_b_en, p_rd_latch, p_del_en, p_wr_en;
  logic [AW-1:0]    p_b_addr, p_del_addr;
  logic [ROW_W-1:0] purge_row_q;
  logic             p_busy;

  logic do_insert, do_rewrite;

  assign req_ready = (state == L_IDLE) && !p_del_en;
  wire   accept    = req_valid && req_ready;

  assign cur_valid  = (state == L_UPDATE);
  assign cur_hit    = hit_q;
  assign cur_data   = hit_q ? a_rdata[ROW_W-1:TIME_W] : '0;
  assign do_rewrite = cur_valid && upd_write && hit_q;
  assign do_insert  = cur_valid && upd_write && !hit_q && vac_found_q;

  // the scan's delete has the CAM write port only when the list is idle
  assign cam_we     = do_insert || p_del_en;
  assign cam_waddr  = p_del_en ? p_del_addr : vac_addr_q;
  assign cam_wkey   = key_q;
  assign cam_wvalid = !p_del_en;

  assign a_en    = (state == L_MATCH) || do_rewrite || do_insert;
  assign a_we    = do_rewrite || do_insert;
  assign a_addr  = (state == L_MATCH) ? cam_match_addr : (hit_q ? addr_q : vac_addr_q);
  assign a_wdata = {upd_data, now};

  assign b_en   = p_b_en || p_del_en;
  assign b_we   = p_del_en;
  assign b_addr = p_del_en ? p_del_addr : p_b_addr;

  assign p_busy  = (state != L_IDLE) || req_valid || cam_busy;
  assign p_wr_en = a_we;

  cam #(.DEPTH(DEPTH), .KEY_W(KEY_W)) u_cam (
    .clk, .rst_n,
    .search_en  (accept),
    .search_key (req_key),
    .match      (cam_match),
    .match_addr (cam_match_addr),
    .write_en   (cam_we),
    .write_addr (cam_waddr),
    .write_key  (cam_wkey),
    .write_valid(cam_wvalid),
    .busy       (cam_busy),
    .free_found (cam_free_found),
    .free_addr  (cam_free_addr),
    .rd_addr    (p_del_en ? p_del_addr : p_b_addr),
    .rd_key     (cam_rd_key),
    .rd_valid   (cam_rd_valid)
  );

  dp_ram #(.DEPTH(DEPTH), .WIDTH(ROW_W)) u_ram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata('0), .b_rdata
  );

  timeout_purge_fsm #(.DEPTH(DEPTH)) u_purge (
    .clk, .rst_n, .tick, .now, .check_interval, .timeout,
    .b_en       (p_b_en),
    .b_addr     (p_b_addr),
    .row_valid  (cam_rd_valid),
    .row_arrival(b_rdata[TIME_W-1:0]),
    .rd_latch   (p_rd_latch),
    .busy       (p_busy),
    .wr_en      (p_wr_en),
    .wr_addr    (a_addr),
    .purge_ready,
    .del_en     (p_del_en),
    .del_addr   (p_del_addr),
    .scanning
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= L_IDLE;
      key_q       <= '0;
      hit_q       <= 1'b0;
      addr_q      <= '0;
      vac_found_q <= 1'b0;
      vac_addr_q  <= '0;
      purge_row_q <= '0;
    end else begin
      if (p_rd_latch) purge_row_q <= b_rdata;
      case (state)
        L_IDLE:   if (accept) begin
                    key_q <= req_key;
                    state <= L_MATCH;
                  end
        L_MATCH:  begin
                    hit_q       <= cam_match;
                    addr_q      <= cam_match_addr;
                    vac_found_q <= cam_free_found;
                    vac_addr_q  <= cam_free_addr;
                    state       <= L_UPDATE;
                  end
        default:  state <= L_IDLE;
      endcase
    end
  end

  assign resp_valid    = cur_valid;
  assign resp_hit      = hit_q;
  assign resp_inserted = do_insert;
  assign resp_full     = cur_valid && upd_write && !hit_q && !vac_found_q;
  assign resp_addr     = hit_q ? addr_q : vac_addr_q;

  assign purge_valid = p_del_en;
  assign purge_key   = cam_rd_key;
  assign purge_data  = purge_row_q[ROW_W-1:TIME_W];

endmodule
