// scanner_list: the black list of confirmed scanners.
//
// A CAM of DEPTH addresses. A search request (req_add = 0) answers whether
// the address is blocked; an add request (req_add = 1) searches first and,
// if the address is not yet present, writes it into the next row of a
// round-robin pointer, so once the list is full the oldest entry is
// replaced. Entries are never timed out: a scanner stays blocked.
// Latency: two cycles from request to resp_valid (search, then answer and
// write). resp_added reports that a new address was written.
//
// The 64 rows and the CAM follow the described list; the round-robin
// replacement when full is this design's choice.
module scanner_list
  import sds_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid,
  output logic  req_ready,
  input  logic  req_add,
  input  ip_t   req_ip,
  output logic  resp_valid,
  output logic  resp_hit,
  output logic  resp_added,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  logic          busy_q;
  logic          add_q;
  ip_t           ip_q;
  logic [AW-1:0] wr_ptr;
  logic          match;
  logic [AW-1:0] match_addr;
  logic          do_add;

  assign req_ready = !busy_q;
  wire accept = req_valid && req_ready;

  assign resp_valid = busy_q;
  assign resp_hit   = match;
  assign do_add     = busy_q && add_q && !match;
  assign resp_added = do_add;

  cam #(.DEPTH(DEPTH), .KEY_W(IP_W)) u_cam (
    .clk, .rst_n,
    .search_en  (accept),
    .search_key (req_ip),
    .match, .match_addr,
    .write_en   (do_add),
    .write_addr (wr_ptr),
    .write_key  (ip_q),
    .write_valid(1'b1),
    .busy       (),
    .free_found (),
    .free_addr  (),
    .rd_addr    ('0),
    .rd_key     (),
    .rd_valid   ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      add_q  <= 1'b0;
      ip_q   <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      busy_q <= accept;
      if (accept) begin
        add_q <= req_add;
        ip_q  <= req_ip;
      end
      if (do_add) begin
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        if (count != ($clog2(DEPTH+1))'(DEPTH)) count <= count + 1'b1;
      end
    end
  end

endmodule
