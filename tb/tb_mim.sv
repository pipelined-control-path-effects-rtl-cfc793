// tb_mim: checks the multiplexor with ID management at one output port.
//  1. The worked example of the design: headers from West (ID 1), East (ID 0)
//     and Local (ID 0) get the new ID-tags 0, 1 and 2 in that order; their
//     payload flits are then mapped to the same new tags whatever the order,
//     data pass unchanged, and the link is valid exactly one cycle after the
//     select.
//  2. A tail frees its slot: the next header takes the lowest free slot.
//  3. Sixteen open messages fill the table: blk rises for a waiting header
//     (and not for a payload flit) until a tail frees a slot.
module tb_mim;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t      in_flit [5];
  logic [4:0] sel, blk;
  flit_t      out_flit;
  logic       out_ew;
  int checks = 0, failures = 0;

  mim dut (.clk, .rst_n, .in_flit, .sel, .blk, .out_flit, .out_ew);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic flit_t fl(flit_type_e t, int id, logic [31:0] d);
    flit_t f;
    f.ftype = t; f.id = 4'(id); f.data = d;
    return f;
  endfunction

  // Offer flit f on input p for one cycle; check the link in the next cycle.
  task automatic send(int p, flit_t f, int exp_id);
    @(negedge clk);
    in_flit[p] = f;
    sel = 5'(1 << p);
    @(negedge clk);
    sel = '0;
    check(out_ew, "link valid one cycle after select");
    check(out_flit.ftype == f.ftype && out_flit.data == f.data, "type and data unchanged");
    check(out_flit.id == 4'(exp_id), $sformatf("port %0d old id %0d -> new id %0d (expected %0d)",
                                               p, f.id, out_flit.id, exp_id));
    @(negedge clk);
    check(!out_ew, "link idle without select");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    sel = '0;
    for (int i = 0; i < 5; i++) in_flit[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. worked example (E=0 N=1 W=2 S=3 L=4)
    send(2, fl(FT_HEAD, 1, 32'h1111_0000), 0);
    send(0, fl(FT_HEAD, 0, 32'h2222_0000), 1);
    send(4, fl(FT_HEAD, 0, 32'h3333_0000), 2);
    send(4, fl(FT_BODY, 0, 32'h3333_0001), 2);
    send(2, fl(FT_BODY, 1, 32'h1111_0001), 0);
    send(0, fl(FT_BODY, 0, 32'h2222_0001), 1);
    // 2. tail frees slot 0; the next header takes it
    send(2, fl(FT_TAIL, 1, 32'h1111_0002), 0);
    send(1, fl(FT_HEAD, 2, 32'h4444_0000), 0);
    send(0, fl(FT_TAIL, 0, 32'h2222_0002), 1);
    send(3, fl(FT_HEAD, 9, 32'h5555_0000), 1);
    // 3. fill the table: slots 0,1,2 in use, add 13 more from North
    for (int k = 3; k < 16; k++) send(1, fl(FT_HEAD, k, 32'h6000_0000 + k), k);
    @(negedge clk);
    in_flit[1] = fl(FT_HEAD, 0, 32'h7777_0000);
    in_flit[4] = fl(FT_BODY, 0, 32'h3333_0002);
    #1;
    check(blk[1] && !blk[4], "table full: header blocked, payload not");
    send(4, fl(FT_TAIL, 0, 32'h3333_0002), 2);   // frees slot 2
    in_flit[1] = fl(FT_HEAD, 0, 32'h7777_0000);
    #1;
    check(!blk[1], "slot freed: header no longer blocked");
    send(1, fl(FT_HEAD, 0, 32'h7777_0000), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
