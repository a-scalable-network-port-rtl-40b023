// tb_aggregate_destination_list: self-checking test of the destination
// subnet list. A check request must not enter anything; a touch request
// enters the masked subnet; any host of a touched subnet is then found;
// idle subnets disappear after the time-out.
module tb_aggregate_destination_list;
  import sds_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tick = 1; time_t now = 0; ip_t subnet_mask = 32'hFFFF_0000;
  time_t check_interval = 1_000_000, timeout = 1_000_000;
  logic req_valid = 0, req_ready, req_touch = 0; ip_t req_ip = 0;
  logic resp_valid, resp_hit, resp_inserted, resp_full, scanning, purge_valid;

  aggregate_destination_list #(.DEPTH(DEPTH)) dut (.*);
  always_ff @(posedge clk) now <= now + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit r_hit, r_ins, r_full;
  task automatic request(input ip_t ip, input bit touch);
    @(negedge clk); req_valid = 1; req_ip = ip; req_touch = touch;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    r_hit = resp_hit; r_ins = resp_inserted; r_full = resp_full;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    request(32'h8C20_0101, 0);
    chk(!r_hit && !r_ins, "check does not insert");
    request(32'h8C20_0101, 0);
    chk(!r_hit, "still absent");
    request(32'h8C20_0101, 1);
    chk(!r_hit && r_ins, "touch inserts");
    request(32'h8C20_FE09, 0);
    chk(r_hit, "other host of the subnet found");
    request(32'h8C21_0101, 0);
    chk(!r_hit, "neighbour subnet absent");
    for (int i = 0; i < 3; i++) begin
      request(32'h0B00_0000 + (32'(i) << 16), 1);
      chk(r_ins, "fill");
    end
    request(32'h0C00_0001, 1);
    chk(r_full && !r_ins, "full");
    timeout = 100; check_interval = 10;
    repeat (300) @(posedge clk);
    request(32'h8C20_0101, 0);
    chk(!r_hit, "timed out");
    request(32'h0C00_0001, 1);
    chk(r_ins, "room after time-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
