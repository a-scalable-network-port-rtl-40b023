// tb_dp_ram: self-checking test of the dual-port RAM. Random reads and
// writes on both ports are compared with a reference array, including the
// read-before-write behaviour and the rule that port B wins a same-row
// write collision.
module tb_dp_ram;
  localparam int DEPTH = 16, WIDTH = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [3:0] a_addr = 0, b_addr = 0;
  logic [WIDTH-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [WIDTH-1:0] exp_a, exp_b;
  bit ea, eb;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // initialise through both ports
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = 4'(i); a_wdata = WIDTH'(i * 3);
      ref_mem[i] = WIDTH'(i * 3);
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 4'($urandom); a_wdata = WIDTH'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 4'($urandom); b_wdata = WIDTH'($urandom);
      if (n % 50 == 0) begin a_en = 1; a_we = 1; b_en = 1; b_we = 1; b_addr = a_addr; end
      ea = a_en; eb = b_en;
      exp_a = ref_mem[a_addr]; exp_b = ref_mem[b_addr];
      if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) ref_mem[a_addr] = a_wdata;
      if (b_en && b_we) ref_mem[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (ea) begin checks++; if (a_rdata !== exp_a) begin failures++; $display("FAIL A read"); end end
      if (eb) begin checks++; if (b_rdata !== exp_b) begin failures++; $display("FAIL B read"); end end
    end
    @(negedge clk); a_en = 0; b_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = 4'(i);
      @(posedge clk); #1; checks++;
      if (a_rdata !== ref_mem[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
