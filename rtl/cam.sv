// cam: content addressable memory of DEPTH keys, built from registers.
//
// Every row holds a key and a valid bit. A search compares the key with all
// rows in parallel and returns, one clock later, whether a valid row matched
// and the lowest matching row address. A write stores a key in a given row
// (write_valid = 1) or deletes that row (write_valid = 0). The cycle after a
// write the CAM raises busy, so a controller that deletes rows on behalf of a
// time-out scan can wait for it to get free. The lowest vacant row is offered
// combinationally (free_found / free_addr) for new entries, and a read port
// returns the key and valid bit of any row, so a purged row can be reported.
// The search-in-one-cycle behaviour and the busy signal follow the described
// CAM; the register implementation, the lowest-match priority, the
// one-cycle busy and the valid bits are this design's choices. (A delete could
// also write an all-zero key, but then the address 0.0.0.0 could not be
// stored; the valid bit avoids that.)
module cam #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned KEY_W = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // search
  input  logic             search_en,
  input  logic [KEY_W-1:0] search_key,
  output logic             match,
  output logic [AW-1:0]    match_addr,
  // write / delete
  input  logic             write_en,
  input  logic [AW-1:0]    write_addr,
  input  logic [KEY_W-1:0] write_key,
  input  logic             write_valid,
  output logic             busy,
  // vacancy
  output logic             free_found,
  output logic [AW-1:0]    free_addr,
  // read-back of one row
  input  logic [AW-1:0]    rd_addr,
  output logic [KEY_W-1:0] rd_key,
  output logic             rd_valid
);
  logic [KEY_W-1:0] keys [DEPTH];
  logic [DEPTH-1:0] valid;

  logic             hit_c;
  logic [AW-1:0]    hit_addr_c;

  always_comb begin
    hit_c      = 1'b0;
    hit_addr_c = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid[i] && keys[i] == search_key) begin
        hit_c      = 1'b1;
        hit_addr_c = AW'(i);
      end
    end
  end

  always_comb begin
    free_found = 1'b0;
    free_addr  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        free_found = 1'b1;
        free_addr  = AW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (write_en) keys[write_addr] <= write_key;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid      <= '0;
      match      <= 1'b0;
      match_addr <= '0;
      busy       <= 1'b0;
    end else begin
      if (write_en) valid[write_addr] <= write_valid;
      busy <= write_en;
      if (search_en) begin
        match      <= hit_c;
        match_addr <= hit_addr_c;
      end
    end
  end

  assign rd_key   = keys[rd_addr];
  assign rd_valid = valid[rd_addr];

endmodule
