// tb_transpose_ctrl2: the transpose workload at every size of the evaluation
// (250 to 4000 flits per producer) on the mesh built from the
// 2-cycle control-path router (CTRL_PIPE=2), 4x4 mesh. See
// tb_transpose_driver for the traffic and the checks.
module tb_transpose_ctrl2;
  import noc_pkg::*;

  logic clk, rst_n, done;
  flit_t inj_flit [16], ej_flit [16];
  logic [15:0] inj_ew, inj_ff, ej_ew, ej_ff;
  int checks, failures;

  noc_mesh #(.CTRL_PIPE(2)) dut (.clk, .rst_n, .inj_flit, .inj_ew, .inj_ff, .ej_flit, .ej_ew, .ej_ff);

  tb_transpose_driver #(.CTRL_PIPE(2)) drv (
    .clk, .rst_n, .inj_flit, .inj_ew, .inj_ff, .ej_flit, .ej_ew, .ej_ff,
    .done, .checks, .failures);

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
