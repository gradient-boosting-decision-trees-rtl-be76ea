// tb_gbdt_accelerator: end-to-end test of the accelerator at reduced size, once with
// the multi-threaded class modules and once with the single-cycle ones.
module tb_gbdt_accelerator;
  logic fin_mt, fin_sc;
  int   chk_mt, chk_sc, fail_mt, fail_sc;

  tb_accel_env #(.NC(4), .NF(32), .AW(10), .MT(1'b1), .N_PIXELS(30)) env_mt (
    .finished(fin_mt), .checks(chk_mt), .failures(fail_mt));
  tb_accel_env #(.NC(3), .NF(20), .AW(9), .MT(1'b0), .N_PIXELS(20)) env_sc (
    .finished(fin_sc), .checks(chk_sc), .failures(fail_sc));

  initial begin
    #1;  // let the environments clear their finished flags first
    wait (fin_mt && fin_sc);
    $display("TB_RESULT checks=%0d failures=%0d", chk_mt + chk_sc, fail_mt + fail_sc);
    $finish;
  end
endmodule
