// tb_scanner_list: self-checking test of the black list. Searches of absent
// addresses miss; added addresses are found; adding an address twice stores
// it once; when more addresses are added than the list has rows the oldest
// are replaced in order. Expected contents come from a queue model.
module tb_scanner_list;
  import sds_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, req_add = 0; ip_t req_ip = 0;
  logic resp_valid, resp_hit, resp_added; logic [3:0] count;

  scanner_list #(.DEPTH(DEPTH)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit r_hit, r_added;
  task automatic request(input bit add, input ip_t ip);
    @(negedge clk); req_valid = 1; req_add = add; req_ip = ip;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    r_hit = resp_hit; r_added = resp_added;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ip_t q[$];
    ip_t ips [12];
    for (int i = 0; i < 12; i++) ips[i] = 32'hAC10_0000 + 32'($urandom_range(0, 65535) * 16 + i);
    repeat (3) @(posedge clk); rst_n = 1;
    request(0, ips[0]);
    chk(!r_hit, "empty list misses");
    for (int i = 0; i < 5; i++) begin
      request(1, ips[i]); q.push_back(ips[i]);
      chk(r_added, "added");
    end
    request(1, ips[2]);
    chk(r_hit && !r_added, "duplicate not added");
    chk(count == 5, "count 5");
    for (int i = 0; i < 12; i++) begin
      request(0, ips[i]);
      chk(r_hit == (i < 5), $sformatf("search %0d", i));
    end
    for (int i = 5; i < 12; i++) begin
      request(1, ips[i]); q.push_back(ips[i]);
      if (q.size() > DEPTH) void'(q.pop_front());
    end
    chk(count == 4'(DEPTH), "count saturates at depth");
    for (int i = 0; i < 12; i++) begin
      bit in_q; in_q = 0;
      foreach (q[j]) if (q[j] == ips[i]) in_q = 1;
      request(0, ips[i]);
      chk(r_hit == in_q, $sformatf("after wrap %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
