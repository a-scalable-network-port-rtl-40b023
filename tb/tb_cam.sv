// tb_cam: self-checking test of the CAM. Fills an 8-row CAM with random
// keys, searches every stored key and several absent ones against a
// reference array, deletes rows, checks the vacancy output, the busy flag
// after a write and the read-back port.
module tb_cam;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic search_en = 0; logic [31:0] search_key = 0;
  logic match; logic [2:0] match_addr;
  logic write_en = 0; logic [2:0] write_addr = 0; logic [31:0] write_key = 0; logic write_valid = 0;
  logic busy, free_found; logic [2:0] free_addr, rd_addr = 0;
  logic [31:0] rd_key; logic rd_valid;

  cam #(.DEPTH(DEPTH), .KEY_W(32)) dut (.*);

  logic [31:0] ref_key [DEPTH];
  logic        ref_v   [DEPTH];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_write(input int a, input logic [31:0] k, input bit v);
    @(negedge clk); write_en = 1; write_addr = 3'(a); write_key = k; write_valid = v;
    @(negedge clk); write_en = 0;
    chk(busy == 1'b1, "busy after write");
    ref_key[a] = k; ref_v[a] = v;
  endtask

  task automatic do_search(input logic [31:0] k);
    int exp_a; bit exp_m;
    exp_m = 0; exp_a = 0;
    for (int i = DEPTH - 1; i >= 0; i--) if (ref_v[i] && ref_key[i] == k) begin exp_m = 1; exp_a = i; end
    @(negedge clk); search_en = 1; search_key = k;
    @(negedge clk); search_en = 0;
    chk(match == exp_m, $sformatf("match for %h", k));
    if (exp_m) chk(match_addr == 3'(exp_a), $sformatf("addr for %h", k));
  endtask

  task automatic chk_free();
    int exp_a; bit exp_f;
    exp_f = 0; exp_a = 0;
    for (int i = DEPTH - 1; i >= 0; i--) if (!ref_v[i]) begin exp_f = 1; exp_a = i; end
    chk(free_found == exp_f, "free_found");
    if (exp_f) chk(free_addr == 3'(exp_a), "free_addr");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin ref_v[i] = 0; ref_key[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    chk_free();
    for (int i = 0; i < DEPTH; i++) begin
      do_write(i, $urandom, 1);
      chk_free();
    end
    chk(free_found == 0, "full");
    for (int i = 0; i < DEPTH; i++) do_search(ref_key[i]);
    for (int i = 0; i < 10; i++) do_search($urandom);
    // a duplicate key in two rows returns the lower row
    do_write(5, ref_key[2], 1);
    do_search(ref_key[2]);
    // delete rows and search again
    do_write(2, ref_key[2], 0);
    do_write(6, ref_key[6], 0);
    chk_free();
    for (int i = 0; i < DEPTH; i++) do_search(ref_key[i]);
    // read-back port
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = 3'(i); #1;
      chk(rd_valid == ref_v[i], "rd_valid");
      if (ref_v[i]) chk(rd_key == ref_key[i], "rd_key");
    end
    @(negedge clk); chk(busy == 0, "busy clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
