// serr_core_modes_tb -- end-to-end runs of the core in the three tracking
// modes other than the default: error at commit, PET buffer (512 entries)
// and pi bits in the register file. Each runs in its own environment
// (serr_core_env) with the same kind of program and fault injection.
module serr_core_modes_tb;
  import serr_pkg::*;

  bit  d0, d1, d2;
  int  c0, c1, c2, f0, f1, f2;

  serr_core_env #(.MODE(PI_TILL_COMMIT)) e_commit  (.done(d0), .checks(c0), .failures(f0));
  serr_core_env #(.MODE(PI_PET))         e_pet     (.done(d1), .checks(c1), .failures(f1));
  serr_core_env #(.MODE(PI_REGFILE))     e_regfile (.done(d2), .checks(c2), .failures(f2));

  initial begin
    #2000000;
    $display("FAIL: watchdog (done %0b%0b%0b)", d0, d1, d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
