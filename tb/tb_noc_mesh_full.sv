// tb_noc_mesh_full: the transpose workload at every size of the evaluation
// (250 to 4000 flits per producer) on the mesh with all parameters at their
// defaults (4x4, 1-cycle control path). See tb_transpose_driver for the
// traffic and the checks.
module tb_noc_mesh_full;
  import noc_pkg::*;

  logic clk, rst_n, done;
  flit_t inj_flit [16], ej_flit [16];
  logic [15:0] inj_ew, inj_ff, ej_ew, ej_ff;
  int checks, failures;

  noc_mesh dut (.clk, .rst_n, .inj_flit, .inj_ew, .inj_ff, .ej_flit, .ej_ew, .ej_ff);

  tb_transpose_driver #(.CTRL_PIPE(1)) drv (
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
