// tb_grant_unit: exhaustive check of the grant unit over every one-hot (or
// empty) routing request and every acknowledge pattern: er must be high
// exactly when the requested output acknowledges.
module tb_grant_unit;
  logic [4:0] rr, ra;
  logic       er;
  int checks = 0, failures = 0;

  grant_unit dut (.rr, .ra, .er);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit expect_er;
    for (int r = 0; r <= 5; r++) begin
      for (int a = 0; a < 32; a++) begin
        rr = (r == 5) ? 5'b0 : 5'(1 << r);
        ra = 5'(a);
        #1;
        expect_er = (r != 5) && ((a >> r) & 1);
        checks++;
        if (er !== expect_er) begin
          failures++;
          $display("FAIL: rr=%b ra=%b er=%b", rr, ra, er);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
