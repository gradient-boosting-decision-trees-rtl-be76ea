// tb_gbdt_workloads: runs models shaped like the four evaluated hyperspectral data
// sets through the accelerator, each at its own number of features and classes and
// with its number of trees per class split into three equal sets:
//   IP  200 features, 16 classes, 2533 trees (158 per class)
//   KSC 176 features, 13 classes, 2600 trees (200 per class)
//   PU  103 features,  9 classes, 1206 trees (134 per class)
//   SV  224 features, 16 classes, 2146 trees (134 per class)
// The trees themselves are random (depth at most 6), not the trained models, so the
// cycle counts show the engine's behaviour, not the published figures.
module tb_gbdt_workloads;
  logic fin [4];
  int   chk [4], fail [4];

  tb_accel_env #(.NC(16), .NF(200), .AW(13), .N_PIXELS(16), .TREES(53), .SPREAD_PCT(0),
                 .MAX_DEPTH(6), .P_INNER(70), .WATCHDOG(2000000))
    env_ip (.finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  tb_accel_env #(.NC(13), .NF(176), .AW(13), .N_PIXELS(16), .TREES(67), .SPREAD_PCT(0),
                 .MAX_DEPTH(6), .P_INNER(70), .WATCHDOG(2000000))
    env_ksc (.finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  tb_accel_env #(.NC(9), .NF(103), .AW(13), .N_PIXELS(16), .TREES(45), .SPREAD_PCT(0),
                 .MAX_DEPTH(6), .P_INNER(70), .WATCHDOG(2000000))
    env_pu (.finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  tb_accel_env #(.NC(16), .NF(224), .AW(13), .N_PIXELS(16), .TREES(45), .SPREAD_PCT(0),
                 .MAX_DEPTH(6), .P_INNER(70), .WATCHDOG(2000000))
    env_sv (.finished(fin[3]), .checks(chk[3]), .failures(fail[3]));

  initial begin
    #1;  // let the environments clear their finished flags first
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3]);
    $finish;
  end
endmodule
