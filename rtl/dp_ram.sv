// dp_ram: true dual-port synchronous RAM, the block RAM of the lists and the
// frame memory banks.
//
// Two independent ports A and B, each with enable, write enable, address,
// write data and registered read data (read-before-write: a read returns the
// row's old contents one clock after the enable). If both ports write the
// same row in one cycle, port B wins. The contents are not reset; the users
// keep a separate valid bit for every row. Two ports, with port A used for
// packet updates and port B for the time-out scan, follow the described block
// memory; the collision rule is this design's choice.
module dp_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 37,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
    if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

endmodule
