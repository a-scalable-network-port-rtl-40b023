// tb_aggregate_source_list: self-checking test of the per-subnet counter
// list. Different hosts of one /24 subnet share one row; AGG_count rises only
// for flagged packets, `reached` fires when it gets to AGG_TH and the count
// restarts; a non-contiguous mask groups hosts as the mask says; idle rows
// are purged by the time-out scan. Expected values come from a simple model
// in the testbench.
module tb_aggregate_source_list;
  import sds_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tick = 1; time_t now = 0;
  ip_t subnet_mask = 32'hFFFF_FF00; logic [7:0] agg_th = 8'd3;
  time_t check_interval = 1_000_000, timeout = 1_000_000;
  logic req_valid = 0, req_ready, req_incr = 0; ip_t req_ip = 0;
  logic resp_valid, resp_hit, resp_inserted, resp_full, resp_reached; logic [4:0] resp_count;
  logic scanning, purge_valid;
  int purges = 0;

  aggregate_source_list #(.DEPTH(DEPTH)) dut (.*);
  always_ff @(posedge clk) begin
    now <= now + 1;
    if (purge_valid) purges++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit r_hit, r_ins, r_reached; int r_count;
  task automatic request(input ip_t ip, input bit incr);
    @(negedge clk); req_valid = 1; req_ip = ip; req_incr = incr;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    r_hit = resp_hit; r_ins = resp_inserted; r_reached = resp_reached; r_count = resp_count;
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int model;
    repeat (3) @(posedge clk); rst_n = 1;
    request(32'h0A01_0105, 0);
    chk(!r_hit && r_ins && r_count == 0 && !r_reached, "new subnet");
    model = 0;
    // 7 flagged packets from different hosts in 10.1.1.0/24, with benign ones between
    for (int n = 0; n < 7; n++) begin
      request(32'h0A01_0100 | 32'(n + 20), 1);
      model++;
      chk(r_hit, "same subnet hits");
      chk(r_reached == (model == 3), $sformatf("reached at %0d", model));
      if (model == 3) model = 0;
      chk(r_count == model || (r_reached && r_count == 3), $sformatf("count %0d model %0d", r_count, model));
      request(32'h0A01_01F0, 0);
      chk(r_hit && !r_reached, "benign packet does not count");
    end
    // another subnet is independent
    request(32'h0A01_0205, 1);
    chk(!r_hit && r_ins && r_count == 1, "second subnet");
    // non-contiguous mask: only the top byte and the low byte matter
    subnet_mask = 32'hFF00_00FF;
    request(32'hC0A8_0007, 1);
    chk(!r_hit && r_ins, "masked entry");
    request(32'hC011_2207, 1);
    chk(r_hit && r_count == 2, "non-contiguous mask groups hosts");
    request(32'hC0A8_0008, 1);
    chk(!r_hit, "different low byte is another group");
    // purge of idle rows
    timeout = 100; check_interval = 10;
    repeat (400) @(posedge clk);
    chk(purges == 4, $sformatf("purges %0d", purges));
    request(32'hC0A8_0007, 0);
    chk(!r_hit && r_ins, "purged row re-entered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
