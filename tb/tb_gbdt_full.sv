// tb_gbdt_full: end-to-end run of the accelerator at its default size (16 classes,
// 224 features, 8192-word node memory per class, multi-threaded class modules), with
// about 135 trees per class, close to the largest published model, and 40 pixels.
module tb_gbdt_full;
  logic fin;
  int   chk, fail;

  tb_accel_env #(.DEFAULTS(1'b1), .NC(16), .NF(224), .AW(13), .MT(1'b1), .N_PIXELS(40),
                 .TREES(45), .MAX_DEPTH(6), .P_INNER(72), .WATCHDOG(2000000)) env (
    .finished(fin), .checks(chk), .failures(fail));

  initial begin
    #1;  // let the environments clear their finished flags first
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", chk, fail);
    $finish;
  end
endmodule
