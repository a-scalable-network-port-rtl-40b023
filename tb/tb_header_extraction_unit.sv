// tb_header_extraction_unit: self-checking test of the header extractor.
// Streams random TCP frames (random addresses, flags, IP option lengths and
// payloads, with idle gaps), UDP frames, non-IP frames and frames too short
// to hold a header, and compares every extracted header and frame length
// with the values the frame was built from.
module tb_header_extraction_unit;
  import sds_pkg::*;
  import tb_frame_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_last = 0; logic [7:0] in_data = 0;
  logic hdr_valid; pkt_hdr_t hdr; logic [15:0] len;

  header_extraction_unit dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input frame_t f, input bit gaps);
    for (int i = 0; i < f.size(); i++) begin
      @(negedge clk);
      if (gaps && $urandom_range(0, 3) == 0) begin
        in_valid = 0; @(negedge clk);
      end
      in_valid = 1; in_data = f[i]; in_last = (i == f.size() - 1);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    chk(hdr_valid, "hdr_valid one cycle after the last byte");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    frame_t f;
    ip_t s, d; logic [7:0] fl; int ihl, pl;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      s = $urandom; d = $urandom; fl = 8'($urandom); ihl = $urandom_range(5, 8);
      pl = $urandom_range(0, 200);
      f = make_frame(s, d, fl, pl, 8'd6, ihl);
      send(f, n % 2 == 1);
      chk(hdr.is_ipv4 && hdr.is_tcp, "TCP frame recognised");
      chk(hdr.sip == s && hdr.dip == d, "addresses");
      chk(hdr.flags == fl, $sformatf("flags %h vs %h (ihl %0d)", hdr.flags, fl, ihl));
      chk(int'(len) == f.size(), "length");
    end
    f = make_frame(32'h01020304, 32'h05060708, 8'h02, 10, 8'd17);
    send(f, 0);
    chk(hdr.is_ipv4 && !hdr.is_tcp && hdr.sip == 32'h01020304, "UDP frame");
    f = make_frame(32'h01020304, 32'h05060708, 8'h02, 10, 8'd6, 5, 16'h86DD);
    send(f, 0);
    chk(!hdr.is_ipv4 && !hdr.is_tcp, "non-IPv4 frame");
    f = make_frame(32'h01020304, 32'h05060708, 8'h12, 0);
    f = f[0:29];
    send(f, 0);
    chk(!hdr.is_ipv4 && !hdr.is_tcp && len == 16'd30, "runt frame");
    f = make_frame(32'h0A0B0C0D, 32'h01010101, 8'h14, 0);
    send(f, 0);
    chk(hdr.is_tcp && hdr.flags == 8'h14 && hdr.sip == 32'h0A0B0C0D, "frame after runt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
