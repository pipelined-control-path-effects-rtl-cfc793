// tb_arbiter: compares the output arbiter with an independent round-robin
// model for 5000 cycles of random requests, blocks and full flags, using the
// East-output connection mask (inputs West and Local only) and a full mask.
// Also checks that two inputs requesting all the time are served
// alternately (flit-by-flit).
module tb_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] req, blk, gnt_a, gnt_b;
  logic       ff;
  int checks = 0, failures = 0;

  arbiter #(.N(5), .MASK(5'b11111)) dut_a (.clk, .rst_n, .req, .blk, .ff, .gnt(gnt_a));
  arbiter #(.N(5), .MASK(5'b10100)) dut_b (.clk, .rst_n, .req, .blk, .ff, .gnt(gnt_b));

  int ptr_a = 0, ptr_b = 0;

  function automatic logic [4:0] model(logic [4:0] r, logic [4:0] m, int ptr, bit full, output int nptr);
    logic [4:0] e = r & m & ~blk;
    nptr = ptr;
    if (full) return '0;
    for (int i = 0; i < 5; i++) begin
      int k = (ptr + i) % 5;
      if (e[k]) begin
        nptr = (k + 1) % 5;
        return 5'(1 << k);
      end
    end
    return '0;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int na, nb;
    logic [4:0] ea, eb;
    req = '0; blk = '0; ff = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      req = 5'($urandom);
      blk = ($urandom_range(0, 3) == 0) ? 5'($urandom) : '0;
      ff  = ($urandom_range(0, 4) == 0);
      #1;
      ea = model(req, 5'b11111, ptr_a, ff, na);
      eb = model(req, 5'b10100, ptr_b, ff, nb);
      checks += 2;
      if (gnt_a !== ea) begin failures++; $display("FAIL: full mask req=%b blk=%b ff=%b gnt=%b exp=%b", req, blk, ff, gnt_a, ea); end
      if (gnt_b !== eb) begin failures++; $display("FAIL: E mask req=%b blk=%b ff=%b gnt=%b exp=%b", req, blk, ff, gnt_b, eb); end
      ptr_a = na; ptr_b = nb;
    end
    // constant requests from W and L: alternate
    begin
      logic [4:0] prev;
      @(negedge clk);
      req = 5'b10100; blk = '0; ff = 0; #1;
      prev = gnt_b;
      for (int t = 0; t < 10; t++) begin
        @(negedge clk); #1;
        checks++;
        if (gnt_b == prev || !$onehot(gnt_b)) begin failures++; $display("FAIL: no alternation %b", gnt_b); end
        prev = gnt_b;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
