// tb_fifo_queue: checks the 2-deep input queue against a queue model.
// Directed part: empty after reset, a written flit shows on dout the next
// cycle, the full flag rises with one flit stored and a second on the link,
// stays up with two stored, and falls after a pop. Random part: 3000 cycles
// of writes (only when the full flag allows, as a sender does) and random
// pops; every popped flit must match the model, and the full flag must follow
// the rule "full, or one short with a write on the link".
module tb_fifo_queue;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ew, ff, er, es;
  logic [38:0] din, dout;
  int checks = 0, failures = 0;

  fifo_queue dut (.clk, .rst_n, .ew, .din, .ff, .er, .es, .dout);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [38:0] model [$];
  logic        ew_next;

  initial begin : main
    ew = 0; er = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(es && !ff, "empty after reset");
    // write A
    ew = 1; din = 39'h1_2345_6789; #1;
    check(!ff, "one flit arriving into an empty queue: not full");
    @(negedge clk);
    check(!es && dout == 39'h1_2345_6789, "flit on dout one cycle after the write");
    // second write: full flag must rise already while it is on the link
    din = 39'h0_AAAA_5555; #1;
    check(ff, "one stored plus one on the link: full");
    @(negedge clk);
    ew = 0; #1;
    check(ff, "two stored: full");
    er = 1;
    @(negedge clk);
    er = 0; #1;
    check(!ff && dout == 39'h0_AAAA_5555, "after a pop: not full, next flit at head");
    er = 1;
    @(negedge clk);
    er = 0; #1;
    check(es, "empty again");

    // random traffic
    ew_next = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ew  = ew_next;
      din = {$urandom, $urandom} & 39'h7F_FFFF_FFFF;
      er  = $urandom_range(0, 1);
      #1;
      check(es == (model.size() == 0), "empty status");
      check(ff == (model.size() == 2 || (model.size() == 1 && ew)), "full flag rule");
      if (er && model.size() > 0) check(dout == model[0], "head data");
      @(posedge clk);
      // the sender decides on the flag it sees at the edge
      ew_next = !ff && ($urandom_range(0, 3) != 0);
      if (er && model.size() > 0) void'(model.pop_front());
      if (ew) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
